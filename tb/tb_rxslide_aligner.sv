// tb_rxslide_aligner: self-checking test of the RXSLIDE word aligner.
//
// A word-level model of the deserializer presents 20-bit windows of a
// periodic line pattern (a K28.5 comma, alternating disparity, every fourth
// word, D10.2 / D21.5 filler otherwise) at a bit offset that each rxslide
// pulse advances by one. From a random start offset o the aligner must reach
// offset 0 with exactly (20 - o) mod 20 slides, keep at least SLIDE_WAIT
// clocks between pulses, raise aligned only with the comma at bits [9:0], and
// after the offset is disturbed, drop alignment (relock) and find it again.
module tb_rxslide_aligner;
  import ucf_pkg::*;

  localparam int SLIDE_WAIT = 32;

  logic        clk = 1'b0, rst = 1'b1;
  logic [19:0] word;
  logic        rxslide, aligned, relock;
  logic [7:0]  slide_cnt;
  int checks = 0, failures = 0, relocks = 0, total_slides = 0;

  rxslide_aligner dut (.clk, .rst, .rx_word(word[9:0]), .rxslide, .aligned, .slide_cnt, .relock);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line bit n of the periodic pattern (bit 0 of a symbol is sent first)
  function automatic logic line_bit(input longint n);
    longint w;
    int     pos;
    logic [9:0] s;
    w   = n / 20;
    pos = int'(n % 20);
    if (pos < 10) s = (w % 4 != 0) ? 10'h2AA : ((w / 4) % 2 == 0 ? 10'h17C : 10'h283);
    else          s = 10'h155;
    return s[pos % 10];
  endfunction

  longint wcount = 0;
  int     offset;
  int     since_slide = 1000;

  always @(posedge clk) begin
    wcount <= wcount + 1;
    since_slide <= rxslide ? 0 : since_slide + 1;
    if (rxslide) begin
      offset <= (offset + 1) % 20;
      total_slides++;
      checks++;
      if (since_slide < SLIDE_WAIT) begin
        failures++; $display("FAIL slides %0d clocks apart", since_slide);
      end
    end
    if (relock) relocks++;
  end

  always_comb
    for (int i = 0; i < 20; i++) word[i] = line_bit(wcount * 20 + offset + i);

  initial begin
    offset = 0;
    for (int trial = 0; trial < 40; trial++) begin
      int o, s0, t;
      o = $urandom % 20;
      if (trial == 0) begin
        rst = 1'b1;
        offset = o;
        repeat (2) @(posedge clk);
        #1 rst = 1'b0;
      end else begin
        // disturb the link: new random offset, wait for loss and relock
        @(posedge clk); #1;
        offset = (o == 0) ? 7 : o;
        o = offset;
        t = 0;
        while (aligned && t < 200) begin @(posedge clk); #1; t++; end
        checks++;
        if (aligned) begin failures++; $display("FAIL alignment not lost"); end
      end
      s0 = slide_cnt;
      t = 0;
      while (!aligned && t < 5000) begin @(posedge clk); #1; t++; end
      checks++;
      if (!aligned || offset != 0 || 8'(slide_cnt - 8'(s0)) != 8'((20 - o) % 20)) begin
        failures++;
        $display("FAIL trial %0d: aligned %b offset %0d slides %0d expected %0d", trial, aligned,
                 offset, 8'(slide_cnt - 8'(s0)), (20 - o) % 20);
      end
      // stays aligned with commas at bit 0
      repeat (100) begin
        @(posedge clk); #1;
        checks++;
        if (!aligned) begin failures++; $display("FAIL lost alignment"); end
      end
    end
    checks++;
    if (relocks < 39) begin failures++; $display("FAIL relocks %0d", relocks); end
    $display("relocks %0d, slides %0d", relocks, total_slides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
