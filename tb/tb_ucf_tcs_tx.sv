// tb_ucf_tcs_tx: self-checking test of the DHMux TCS command framer.
//
// A reference model in the testbench tracks the word phase (0..3 from reset)
// and the commands still to be sent, and predicts each output word: a K28.5
// idle word in phase 0 and whenever nothing is pending, a packet start
// {0, K28.2} in phase 1 and the payload {~flags, flags} in phase 2. It checks
// every word, that tx_tcs_clk is high exactly in phases 0 and 1, that each
// command is sent within 5 clocks, and that commands of one period merge.
module tb_ucf_tcs_tx;
  import ucf_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic        cmd_valid = 1'b0;
  tcs_cmd_t    cmd = '0;
  logic [15:0] tx_data;
  logic [1:0]  tx_charisk, tx_phase;
  logic        tx_tcs_clk, pkt_sent;
  int checks = 0, failures = 0, packets = 0, merged = 0, max_lat = 0;

  ucf_tcs_tx dut (.clk, .rst, .cmd_valid, .cmd, .tx_data, .tx_charisk, .tx_phase,
                  .tx_tcs_clk, .pkt_sent);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, advanced once per clock edge
  int       ph;          // phase of the word the DUT puts out at this edge
  logic [2:0] pend, send;
  int       pend_age;
  logic [15:0] exp_d;
  logic [1:0]  exp_k;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ph = 0; pend = '0; send = '0; pend_age = -1;
    for (int c = 0; c < 4000; c++) begin
      logic [2:0] nc;
      logic       v;
      v  = ($urandom % 5) == 0;
      nc = 3'($urandom) | 3'b001 << ($urandom % 3);
      cmd_valid = v; cmd = v ? nc : '0;
      @(posedge clk); #1;
      // the word now at the output was decided at this edge with phase ph
      exp_d = {D21_5, K28_5}; exp_k = 2'b01;
      if (ph == 1 && pend != 0) begin
        exp_d = {8'h00, K28_2}; send = pend; packets++;
        if (pend_age > max_lat) max_lat = pend_age;
        pend = v ? nc : '0;
        pend_age = v ? 0 : -1;
      end else begin
        if (v) begin
          if (pend != 0 && (pend | nc) != nc) merged++;
          pend = pend | nc;
          if (pend_age < 0) pend_age = 0;
        end
        if (ph == 2 && send != 0) begin
          exp_d = {~{5'b0, send}, {5'b0, send}}; exp_k = 2'b00; send = '0;
        end
      end
      if (pend_age >= 0) pend_age++;
      checks++;
      if (tx_data !== exp_d || tx_charisk !== exp_k || tx_phase !== 2'(ph) ||
          tx_tcs_clk !== (ph < 2) || pkt_sent !== (exp_k == 2'b01 && exp_d[7:0] == K28_2)) begin
        failures++;
        $display("FAIL c=%0d ph=%0d got %h/%b ph%0d clk%b exp %h/%b", c, ph, tx_data, tx_charisk,
                 tx_phase, tx_tcs_clk, exp_d, exp_k);
      end
      ph = (ph + 1) % 4;
    end
    cmd_valid = 1'b0;
    checks++;
    if (packets < 100 || merged == 0 || max_lat > 5) begin
      failures++; $display("FAIL packets %0d merged %0d max latency %0d", packets, merged, max_lat);
    end
    $display("packets %0d, merged commands %0d, max latency %0d clocks", packets, merged, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
