// wb_ucf_rx: Waveboard side of the UCF link - word alignment, decoding, TCS
// command recovery and TCS clock phase recovery.
//
// The 20-bit raw word from the transceiver (clocked by its recovered
// 155.52 MHz clock) goes to rxslide_aligner, which slips the recovered clock
// with RXSLIDE until the comma sits at bit 0, and to dec8b10b. ucf_tcs_rx
// takes SYNC, RESET and trigger out of the TCS stream at fixed latency.
// tcs_clk_div divides the recovered clock by 4 to the 38.88 MHz TCS clock and
// is cleared by SYNC, so the TCS clock - the reference of the external PLL
// that makes the FADC clock - has a fixed phase relative to the DHMux. The
// tcs_timer keeps the trigger count and the time in TCS periods, cleared by
// RESET.
//
// All logic is in the recovered clock domain; rst is synchronous to it.
module wb_ucf_rx
  import ucf_pkg::*;
#(
  parameter int unsigned N_STREAMS = 64,
  parameter int unsigned TIMER_W   = 32,
  parameter int unsigned TRIG_W    = 24
) (
  input  logic               clk,          // recovered 155.52 MHz clock
  input  logic               rst,
  input  logic [19:0]        rx_sym,
  output logic               rxslide,
  output logic               aligned,
  output logic [7:0]         slide_cnt,
  output logic               relock,
  output logic               tcs_clk,      // 38.88 MHz, PLL reference
  output logic               sync,
  output logic               tcs_reset,
  output logic               trigger,
  output logic               readjust,
  output logic               pkt_err,
  output logic               link_err,
  output logic [TIMER_W-1:0] timer,
  output logic [TRIG_W-1:0]  trig_cnt,
  output logic               trig_valid,
  output logic [TRIG_W-1:0]  trig_num,
  output logic [TIMER_W-1:0] trig_time
);

  logic [15:0] d_data;
  logic [1:0]  d_k, d_cerr, d_derr;
  logic        tcs_ce;

  rxslide_aligner u_align (
    .clk, .rst, .rx_word(rx_sym[9:0]), .rxslide, .aligned, .slide_cnt, .relock
  );

  dec8b10b #(.NBYTES(2)) u_dec (
    .clk, .rst, .sym(rx_sym), .data(d_data), .charisk(d_k),
    .code_err(d_cerr), .disp_err(d_derr)
  );

  assign link_err = aligned && (|d_cerr || |d_derr);

  ucf_tcs_rx #(.N_STREAMS(N_STREAMS), .STREAM_ID(0)) u_deframe (
    .clk, .rst, .aligned, .rx_data(d_data), .rx_charisk(d_k),
    .rx_err(|d_cerr || |d_derr), .sync, .tcs_reset, .trigger, .pkt_err
  );

  tcs_clk_div u_div (
    .clk, .rst, .sync, .tcs_clk, .tcs_ce, .readjust
  );

  tcs_timer #(.TIMER_W(TIMER_W), .TRIG_W(TRIG_W)) u_timer (
    .clk, .rst, .tcs_ce, .tcs_reset, .trigger,
    .timer, .trig_cnt, .trig_valid, .trig_num, .trig_time
  );

endmodule
