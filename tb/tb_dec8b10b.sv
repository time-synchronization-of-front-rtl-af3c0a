// tb_dec8b10b: self-checking test of the 8b/10b decoder.
//
// 1. Known line codes (written out here from the 8b/10b standard) decode to
//    the right byte and control flag, and an all-zero symbol is a code error.
// 2. A random stream of data and K28.y bytes, encoded by enc8b10b, comes back
//    unchanged two clocks later with no error flags.
// 3. Single bit errors injected on the line are flagged (code or disparity
//    error) within ten words.
module tb_dec8b10b;
  import ucf_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] tx_data = '0;
  logic [1:0]  tx_k = '0;
  logic [19:0] enc_sym, line_sym, flip = '0, force_sym = '0;
  logic        use_force = 1'b1, enc_rd;
  logic [15:0] data;
  logic [1:0]  charisk, code_err, disp_err;
  int checks = 0, failures = 0;

  enc8b10b u_enc (.clk, .rst, .data(tx_data), .charisk(tx_k), .sym(enc_sym), .rd_out(enc_rd));
  assign line_sym = use_force ? force_sym : (enc_sym ^ flip);
  dec8b10b dut (.clk, .rst, .sym(line_sym), .data, .charisk, .code_err, .disp_err);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] line(input logic [9:0] abcdeifghj);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = abcdeifghj[9-i];
    return r;
  endfunction

  logic [15:0] hist_d [4];
  logic [1:0]  hist_k [4];
  int injected = 0, detected = 0, pending_age = -1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // known codes, from RD-: K28.5- then D21.5 ; then D0.0 at RD+ and K28.5+
    force_sym = {line(10'b1010101010), line(10'b0011111010)};
    @(posedge clk); #1;
    checks++;
    if (data !== 16'hB5BC || charisk !== 2'b01 || code_err !== 0 || disp_err !== 0) begin
      failures++; $display("FAIL known 1: %h %b %b %b", data, charisk, code_err, disp_err);
    end
    force_sym = {line(10'b1100000101), line(10'b0110001011)};
    @(posedge clk); #1;
    checks++;
    if (data !== 16'hBC00 || charisk !== 2'b10 || code_err !== 0 || disp_err !== 0) begin
      failures++; $display("FAIL known 2: %h %b %b %b", data, charisk, code_err, disp_err);
    end
    // K28.5- again at RD-: correct. D0.0 at RD- would be 100111 0100.
    force_sym = {line(10'b1001110100), 10'b0000000000};
    @(posedge clk); #1;
    checks++;
    if (code_err[0] !== 1'b1) begin
      failures++; $display("FAIL all-zero symbol not a code error");
    end
    // round trip through the encoder
    use_force = 1'b0;
    rst = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    for (int w = 0; w < 3000; w++) begin
      logic [1:0] k;
      logic [15:0] d;
      k = {($urandom % 6) == 0, ($urandom % 6) == 0};
      d = 16'($urandom);
      if (k[0]) d[4:0] = 5'd28;
      if (k[1]) d[12:8] = 5'd28;
      tx_data = d; tx_k = k;
      @(posedge clk); #1;
      hist_d[w % 4] = d; hist_k[w % 4] = k;
      if (w >= 2) begin
        checks++;
        if (data !== hist_d[(w - 1) % 4] || charisk !== hist_k[(w - 1) % 4] ||
            code_err !== 0 || disp_err !== 0) begin
          failures++;
          $display("FAIL round trip w=%0d got %h/%b exp %h/%b err %b %b", w, data, charisk,
                   hist_d[(w - 1) % 4], hist_k[(w - 1) % 4], code_err, disp_err);
        end
      end
    end
    // bit error injection
    for (int w = 0; w < 6000; w++) begin
      tx_data = 16'($urandom); tx_k = 2'b00;
      flip = '0;
      if (w % 40 == 5) begin
        flip[$urandom % 20] = 1'b1;
        injected++;
        pending_age = 0;
      end
      @(posedge clk); #1;
      flip = '0;
      if (pending_age >= 0) begin
        if (|code_err || |disp_err) begin
          detected++;
          pending_age = -1;
        end else if (++pending_age > 10) begin
          pending_age = -1;
        end
      end
    end
    checks++;
    $display("bit errors injected %0d, flagged %0d", injected, detected);
    if (detected * 100 < injected * 95) begin
      failures++; $display("FAIL too few bit errors flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
