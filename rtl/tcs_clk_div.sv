// tcs_clk_div: divide-by-4 of the recovered link clock with SYNC phase
// recovery, the function of the BUFR divider with its CLR input.
//
// A 2-bit counter runs on the recovered 155.52 MHz clock; tcs_clk = cnt[1] is
// the 38.88 MHz TCS clock (to the FPGA logic and the external PLL reference).
// tcs_ce is a one-clock strobe in the cycle before each rising edge of
// tcs_clk, for logic kept in the link clock domain. The counter is cleared
// asynchronously by clr, a registered copy of SYNC, so that after every SYNC
// the TCS clock restarts with the same phase relative to the SYNC packet.
//
// Timing: with sync high in the cycle after edge a, clr is high from edge
// a+1 to a+2, cnt is 0 after edge a+2 and tcs_clk rises at edge a+4.
//
// Clearing the divider from the recreated SYNC follows the document. This
// design clears it only when its phase is wrong (readjust); a divider already
// in phase is left running, so a periodic SYNC does not stretch the TCS clock.
module tcs_clk_div (
  input  logic clk,
  input  logic rst,
  input  logic sync,
  output logic tcs_clk,
  output logic tcs_ce,
  output logic readjust      // pulse: SYNC found the divider out of phase
);

  logic [1:0] cnt;
  logic       clr;

  // phase the counter has after the edge that sees sync, when in step
  localparam logic [1:0] IN_PHASE = 2'd2;

  always_ff @(posedge clk) begin
    if (rst) begin
      clr      <= 1'b1;
      readjust <= 1'b0;
    end else begin
      clr      <= sync && (cnt != IN_PHASE);
      readjust <= sync && (cnt != IN_PHASE);
    end
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) cnt <= '0;
    else     cnt <= cnt + 2'd1;
  end

  assign tcs_clk  = cnt[1];
  assign tcs_ce  = (cnt == 2'd1);

endmodule
