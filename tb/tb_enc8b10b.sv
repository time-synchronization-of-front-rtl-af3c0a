// tb_enc8b10b: self-checking test of the 8b/10b encoder.
//
// Checks known code groups from the 8b/10b standard (written out here as
// abcdeifghj strings, independent of the encoder's tables), then sends a long
// random mix of data and K28.y bytes and checks the properties every valid
// 8b/10b line must have: each symbol carries 0 or +-2 disparity, the running
// sum of the line never leaves [-3, +3] (it is -1 or +1 at symbol
// boundaries), no run of more than five equal bits, and no two different
// bytes share a code at the same running disparity.
module tb_enc8b10b;
  import ucf_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] data = '0;
  logic [1:0]  charisk = '0;
  logic [19:0] sym;
  logic        rd_out;
  int checks = 0, failures = 0;

  enc8b10b dut (.clk, .rst, .data, .charisk, .sym, .rd_out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // abcdeifghj (a leftmost) to transmit order (a = bit 0)
  function automatic logic [9:0] line(input logic [9:0] abcdeifghj);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[i] = abcdeifghj[9-i];
    return r;
  endfunction

  task automatic check(input string what, input logic [9:0] got, input logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  task automatic send(input logic [7:0] b1, input logic k1, input logic [7:0] b0, input logic k0);
    data = {b1, b0};
    charisk = {k1, k0};
    @(posedge clk);
    #1;
  endtask

  int run_len, sum;
  logic last_bit;
  logic [7:0]  seen_byte [2][1024];
  logic        seen_k    [2][1024];
  logic        seen_v    [2][1024];

  initial begin
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    // start RD-: K28.5- then D0.0 at RD+
    send(8'h00, 1'b0, K28_5, 1'b1);
    check("K28.5 RD-", sym[9:0],   line(10'b0011111010));
    check("D0.0 RD+",  sym[19:10], line(10'b0110001011));
    // now RD+: D7.0 at RD+ then D21.5 at RD-
    send(8'hB5, 1'b0, 8'h07, 1'b0);
    check("D7.0 RD+",  sym[9:0],   line(10'b0001110100));
    check("D21.5",     sym[19:10], line(10'b1010101010));
    // RD-: K28.5- , then D17.7 at RD+ (primary form)
    send(8'hF1, 1'b0, K28_5, 1'b1);
    check("K28.5 RD- (2)", sym[9:0],   line(10'b0011111010));
    check("D17.7 RD+",     sym[19:10], line(10'b1000110001));
    // RD+: D0.0 at RD+ -> 011000 1011 ; RD+ then D17.7 at RD+? (no: RD after is +)
    // after D17.7+ RD is - : D17.7 at RD- takes the alternate form A7
    send(8'h00, 1'b0, 8'hF1, 1'b0);
    check("D17.7 RD- (A7)", sym[9:0],  line(10'b1000110111));
    check("D0.0 RD+ (2)",   sym[19:10], line(10'b0110001011));
    // RD+: K28.5+
    send(8'h5C, 1'b1, K28_5, 1'b1);
    check("K28.5 RD+", sym[9:0],   line(10'b1100000101));
    check("K28.2 RD-", sym[19:10], line(10'b0011110101));

    // random line properties
    sum = rd_out ? 1 : -1; run_len = 0; last_bit = 1'b0;
    foreach (seen_v[r, c]) seen_v[r][c] = 1'b0;
    for (int w = 0; w < 4000; w++) begin
      logic [7:0] b [2];
      logic       k [2];
      for (int i = 0; i < 2; i++) begin
        k[i] = ($urandom % 8) == 0;
        b[i] = k[i] ? {3'($urandom), 5'd28} : 8'($urandom);
      end
      data = {b[1], b[0]};
      charisk = {k[1], k[0]};
      @(posedge clk); #1;
      for (int i = 0; i < 2; i++) begin
        logic [9:0] s;
        int d, rd_idx;
        s = sym[10*i +: 10];
        d = $countones(s) * 2 - 10;
        rd_idx = (sum > 0) ? 1 : 0;
        checks++;
        if (!(d == 0 || d == 2 || d == -2)) begin
          failures++; $display("FAIL symbol disparity %0d", d);
        end
        // code table uniqueness at a given running disparity
        checks++;
        if (seen_v[rd_idx][s] && (seen_byte[rd_idx][s] != b[i] || seen_k[rd_idx][s] != k[i])) begin
          failures++; $display("FAIL code %b used twice", s);
        end
        seen_v[rd_idx][s] = 1'b1; seen_byte[rd_idx][s] = b[i]; seen_k[rd_idx][s] = k[i];
        for (int j = 0; j < 10; j++) begin
          sum += s[j] ? 1 : -1;
          if (s[j] == last_bit) run_len++; else run_len = 1;
          last_bit = s[j];
          checks++;
          if (run_len > 5 || sum > 3 || sum < -3) begin
            failures++; $display("FAIL run %0d sum %0d", run_len, sum);
          end
        end
        checks++;
        if (!(sum == 1 || sum == -1)) begin
          failures++; $display("FAIL running disparity %0d at boundary", sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
