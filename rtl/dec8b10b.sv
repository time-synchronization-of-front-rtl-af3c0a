// dec8b10b: 8b/10b decoder for the UCF link, NBYTES symbols per clock.
//
// The 6-bit and 4-bit sub-blocks of each symbol are looked up by searching
// the encoder tables of ucf_pkg at both running disparities, so encoder and
// decoder cannot disagree. A sub-block found in no table raises code_err; a
// sub-block that is valid only at the other running disparity raises
// disp_err. The running disparity follows the received symbols, carried
// between the symbols of a word and from word to word.
//
// Interface: sym in (byte i in sym[10*i +: 10], bit 0 first on the line);
// data, charisk, code_err and disp_err out, registered: one clock of latency.
// rst sets the running disparity negative. Only K28.y control characters are
// recognised, as only they are sent on this link (this design's choice).
module dec8b10b
  import ucf_pkg::*;
#(
  parameter int unsigned NBYTES = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [10*NBYTES-1:0]  sym,
  output logic [8*NBYTES-1:0]   data,
  output logic [NBYTES-1:0]     charisk,
  output logic [NBYTES-1:0]     code_err,
  output logic [NBYTES-1:0]     disp_err
);

  logic                 rd_q, rd_c;
  logic [8*NBYTES-1:0]  data_c;
  logic [NBYTES-1:0]    k_c, cerr_c, derr_c;

  always_comb begin
    logic       rd, k, f6, f4, ok6, ok4;
    logic [9:0] c;
    logic [5:0] c6;
    logic [3:0] c4;
    logic [4:0] x;
    logic [2:0] y;
    rd = rd_q;
    for (int i = 0; i < NBYTES; i++) begin
      c  = to_line(sym[10*i +: 10]);   // back to abcdeifghj, a = MSB
      c6 = c[9:4];
      c4 = c[3:0];
      // 6-bit sub-block
      k   = (c6 == 6'b001111) || (c6 == 6'b110000);
      x   = 5'd28;
      f6  = k;
      ok6 = k && (enc6(5'd28, 1'b1, rd) == c6);
      for (int v = 0; v < 32; v++) begin
        if (enc6(5'(v), 1'b0, 1'b0) == c6 || enc6(5'(v), 1'b0, 1'b1) == c6) begin
          x  = 5'(v);
          f6 = 1'b1;
          ok6 = ok6 || (enc6(5'(v), 1'b0, rd) == c6);
        end
      end
      rd = rd_after(rd, ones6(c6), 3'd3);
      // 4-bit sub-block
      y   = 3'd0;
      f4  = 1'b0;
      ok4 = 1'b0;
      for (int v = 0; v < 8; v++) begin
        // K28.y: the 6-bit part fixes the disparity (K28.1/K28.6 and
        // K28.2/K28.5 share 4-bit codes at opposite disparities)
        if (enc4(3'(v), x, k, rd) == c4 ||
            (!k && enc4(3'(v), x, k, !rd) == c4)) begin
          y  = 3'(v);
          f4 = 1'b1;
          ok4 = ok4 || (enc4(3'(v), x, k, rd) == c4);
        end
      end
      rd = rd_after(rd, ones4(c4), 3'd2);
      data_c[8*i +: 8] = {y, x};
      k_c[i]    = k;
      cerr_c[i] = !(f6 && f4);
      derr_c[i] = f6 && f4 && !(ok6 && ok4);
    end
    rd_c = rd;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q     <= 1'b0;
      data     <= '0;
      charisk  <= '0;
      code_err <= '0;
      disp_err <= '0;
    end else begin
      rd_q     <= rd_c;
      data     <= data_c;
      charisk  <= k_c;
      code_err <= cerr_c;
      disp_err <= derr_c;
    end
  end

endmodule
