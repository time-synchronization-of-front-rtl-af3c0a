// enc8b10b: 8b/10b encoder for the UCF link, NBYTES bytes per clock.
//
// Each byte is split into EDCBA (5b/6b) and HGF (3b/4b) and coded with the
// standard Widmer-Franaszek tables held in ucf_pkg. The running disparity is
// carried from byte 0 to byte 1 within a word and from word to word in a
// register, so the line stays DC balanced. Only K28.y control characters are
// supported; a set charisk bit codes its byte as K28.(byte[7:5]).
//
// Interface: data/charisk in, sym out; byte i goes to sym[10*i +: 10] in
// transmit order (bit 0 first). One register stage: sym is valid one clock
// after data. rst sets the running disparity negative.
//
// The 8b/10b line code is the one the UCF link uses; two bytes per 155.52 MHz
// clock gives the 3.1104 Gb/s line rate. Restricting control characters to
// K28.y is this design's choice.
module enc8b10b
  import ucf_pkg::*;
#(
  parameter int unsigned NBYTES = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [8*NBYTES-1:0]   data,
  input  logic [NBYTES-1:0]     charisk,
  output logic [10*NBYTES-1:0]  sym,
  output logic                  rd_out     // running disparity after sym
);

  logic [10*NBYTES-1:0] sym_c;
  logic                 rd_q, rd_c;

  always_comb begin
    logic       rd;
    logic [5:0] c6;
    logic [3:0] c4;
    logic [4:0] x;
    rd = rd_q;
    for (int i = 0; i < NBYTES; i++) begin
      x  = charisk[i] ? 5'd28 : data[8*i +: 5];
      c6 = enc6(x, charisk[i], rd);
      rd = rd_after(rd, ones6(c6), 3'd3);
      c4 = enc4(data[8*i+5 +: 3], x, charisk[i], rd);
      rd = rd_after(rd, ones4(c4), 3'd2);
      sym_c[10*i +: 10] = to_line({c6, c4});
    end
    rd_c = rd;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0;
      sym  <= '0;
    end else begin
      rd_q <= rd_c;
      sym  <= sym_c;
    end
  end

  assign rd_out = rd_q;

endmodule
