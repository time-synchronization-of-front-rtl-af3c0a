// tb_dhmux_ucf_tx: self-checking test of the DHMux UCF transmit side.
//
// Random TCS commands go in; the 20-bit line words are decoded in the
// testbench (with dec8b10b) and checked: no code or disparity error, a K28.5
// comma in bits [9:0] at every rising edge of tx_tcs_clk (the first word of a
// TCS period), and the TCS packets carry the commands in order - every
// command's bits appear in exactly one packet, none is lost or invented.
module tb_dhmux_ucf_tx;
  import ucf_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, cmd_valid = 1'b0;
  tcs_cmd_t    cmd = '0;
  logic [19:0] tx_sym;
  logic        tx_tcs_clk, pkt_sent, prev_tcs = 1'b0;
  logic [15:0] d;
  logic [1:0]  k, cerr, derr;
  int checks = 0, failures = 0, commas = 0, packets = 0;
  int sent [3], rcvd [3];
  logic expect_payload = 1'b0;

  dhmux_ucf_tx dut (.clk, .rst, .cmd_valid, .cmd, .tx_sym, .tx_tcs_clk, .pkt_sent);
  dec8b10b u_chk (.clk, .rst, .sym(tx_sym), .data(d), .charisk(k), .code_err(cerr), .disp_err(derr));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line checks (raw symbols) and decoded packet checks
  always @(posedge clk) if (!rst) begin
    #1;
    if (tx_tcs_clk && !prev_tcs) begin
      checks++; commas++;
      if (tx_sym[9:0] != K28_5_RDN && tx_sym[9:0] != K28_5_RDP) begin
        failures++; $display("FAIL no comma at TCS clock edge: %h", tx_sym);
      end
    end
    prev_tcs = tx_tcs_clk;
    if (packets + commas > 2) begin
      checks++;
      if (cerr != 0 || derr != 0) begin failures++; $display("FAIL decode error on line"); end
    end
    if (expect_payload) begin
      checks++;
      if (k != 2'b00 || d[15:8] != ~d[7:0] || d[7:3] != 0) begin
        failures++; $display("FAIL bad payload %h", d);
      end
      for (int i = 0; i < 3; i++) if (d[i]) rcvd[i]++;
    end
    expect_payload = (k == 2'b01 && d[7:0] == K28_2 && d[15:8] == 8'h00);
    if (expect_payload) packets++;
  end

  initial begin
    foreach (sent[i]) begin sent[i] = 0; rcvd[i] = 0; end
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      // at most one command per TCS period, as the TCS sends them
      cmd_valid = (c % 4 == 0) && ($urandom % 3 == 0);
      cmd = cmd_valid ? tcs_cmd_t'(3'($urandom % 7) + 3'd1) : '0;
      if (cmd_valid) for (int i = 0; i < 3; i++) if (cmd[i]) sent[i]++;
      @(posedge clk); #2;
    end
    cmd_valid = 1'b0;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (sent[i] != rcvd[i]) begin
        failures++; $display("FAIL command bit %0d sent %0d received %0d", i, sent[i], rcvd[i]);
      end
    end
    $display("packets %0d, commas checked %0d", packets, commas);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
