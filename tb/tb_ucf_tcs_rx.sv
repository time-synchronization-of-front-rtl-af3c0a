// tb_ucf_tcs_rx: self-checking test of the TCS command recovery.
//
// Drives decoded words directly: idle words, valid TCS packets with random
// flags, packets of other streams, packets with a corrupted payload, with a
// decode error, and packets while not aligned. A valid TCS packet must give
// exactly its flags as one-clock pulses one clock after the payload word;
// everything else must give no command, and a bad payload must give pkt_err.
module tb_ucf_tcs_rx;
  import ucf_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        aligned = 1'b0, rx_err = 1'b0;
  logic [15:0] rx_data = {D21_5, K28_5};
  logic [1:0]  rx_charisk = 2'b01;
  logic        sync, tcs_reset, trigger, pkt_err;
  int checks = 0, failures = 0;

  ucf_tcs_rx dut (.clk, .rst, .aligned, .rx_data, .rx_charisk, .rx_err,
                  .sync, .tcs_reset, .trigger, .pkt_err);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] exp_cmd [$];
  logic       exp_err [$];

  // one word per clock; the pulses for a payload word are visible right
  // after the clock edge that takes it in
  task automatic word(input logic [15:0] d, input logic [1:0] k, input logic e,
                      input logic [2:0] ecmd, input logic eerr);
    rx_data = d; rx_charisk = k; rx_err = e;
    exp_cmd.push_back(ecmd); exp_err.push_back(eerr);
    @(posedge clk); #1;
    checks++;
    if (exp_cmd.size() > 0) begin
      logic [2:0] c;
      logic       r;
      c = exp_cmd.pop_front(); r = exp_err.pop_front();
      if ({trigger, tcs_reset, sync} !== c || pkt_err !== r) begin
        failures++;
        $display("FAIL got cmd %b err %b exp %b %b", {trigger, tcs_reset, sync}, pkt_err, c, r);
      end
    end
  endtask

  task automatic idle();
    word({D21_5, K28_5}, 2'b01, 1'b0, 3'b000, 1'b0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    idle();
    exp_cmd.delete(); exp_err.delete();
    idle();
    // not aligned: ignored
    word({8'h00, K28_2}, 2'b01, 1'b0, 3'b000, 1'b0);
    word({8'hFE, 8'h01}, 2'b00, 1'b0, 3'b000, 1'b0);
    aligned = 1'b1;
    for (int n = 0; n < 500; n++) begin
      logic [2:0] f;
      int kind;
      f = 3'($urandom % 7) + 3'd1;
      kind = $urandom % 6;
      // start word: the command (or error) comes out after the payload
      case (kind)
        0, 1, 2: begin   // valid TCS packet
          word({8'h00, K28_2}, 2'b01, 1'b0, 3'b000, 1'b0);
          word({~{5'b0, f}, {5'b0, f}}, 2'b00, 1'b0, f, 1'b0);
        end
        3: begin         // another stream
          word({8'h05, K28_2}, 2'b01, 1'b0, 3'b000, 1'b0);
          word({~{5'b0, f}, {5'b0, f}}, 2'b00, 1'b0, 3'b000, 1'b0);
        end
        4: begin         // corrupted payload
          word({8'h00, K28_2}, 2'b01, 1'b0, 3'b000, 1'b0);
          word({{5'b0, f}, {5'b0, f}}, 2'b00, 1'b0, 3'b000, 1'b1);
        end
        default: begin   // decode error on the start word
          word({8'h00, K28_2}, 2'b01, 1'b1, 3'b000, 1'b0);
          word({~{5'b0, f}, {5'b0, f}}, 2'b00, 1'b0, 3'b000, 1'b0);
        end
      endcase
      repeat ($urandom % 3) idle();
    end
    idle(); idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
