// na64_sync_top: TCS clock and command distribution of the NA64 DAQ over UCF
// links, from one DHMux to N_SLAVES Waveboard front-ends.
//
// DHMux side (tx_clk, 155.52 MHz, the clock recovered from the TCS): TCS
// commands are packed into the UCF TCS stream and 8b/10b-encoded into one
// 20-bit word per clock, tx_sym, which the DHMux broadcasts through the
// serializers of all its slave ports. Waveboard side, one wb_ucf_rx per slave
// (rx_clk[i], the 155.52 MHz clock recovered by that board's CDR): rx_sym[i]
// is aligned by slipping the recovered clock (rxslide[i] to the transceiver),
// decoded, and the TCS commands are recreated; SYNC fixes the phase of the
// 38.88 MHz tcs_clk[i] that goes to the board's external jitter-cleaning PLL
// (reference of its 233.28 MHz FADC clock); RESET clears the board's trigger
// counter and timer.
//
// The transceivers (serializer, CDR, RXSLIDE) and the PLLs are outside this
// RTL: their signals are the ports tx_sym, rx_clk, rx_sym, rxslide and
// tcs_clk. N_SLAVES = 15 is the DHMux's slave count; the DHMux data
// aggregation and slow control are not part of this design. Each Waveboard
// runs in its own clock domain with its own reset rx_rst[i].
module na64_sync_top
  import ucf_pkg::*;
#(
  parameter int unsigned N_SLAVES  = 15,
  parameter int unsigned N_STREAMS = 64,
  parameter int unsigned TIMER_W   = 32,
  parameter int unsigned TRIG_W    = 24
) (
  // DHMux
  input  logic                              tx_clk,
  input  logic                              tx_rst,
  input  logic                              cmd_valid,
  input  tcs_cmd_t                          cmd,
  output logic [19:0]                       tx_sym,
  output logic                              tx_tcs_clk,
  output logic                              pkt_sent,
  // Waveboards
  input  logic [N_SLAVES-1:0]               rx_clk,
  input  logic [N_SLAVES-1:0]               rx_rst,
  input  logic [N_SLAVES-1:0][19:0]         rx_sym,
  output logic [N_SLAVES-1:0]               rxslide,
  output logic [N_SLAVES-1:0]               aligned,
  output logic [N_SLAVES-1:0][7:0]          slide_cnt,
  output logic [N_SLAVES-1:0]               relock,
  output logic [N_SLAVES-1:0]               tcs_clk,
  output logic [N_SLAVES-1:0]               sync,
  output logic [N_SLAVES-1:0]               tcs_reset,
  output logic [N_SLAVES-1:0]               trigger,
  output logic [N_SLAVES-1:0]               readjust,
  output logic [N_SLAVES-1:0]               pkt_err,
  output logic [N_SLAVES-1:0]               link_err,
  output logic [N_SLAVES-1:0][TIMER_W-1:0]  timer,
  output logic [N_SLAVES-1:0][TRIG_W-1:0]   trig_cnt,
  output logic [N_SLAVES-1:0]               trig_valid,
  output logic [N_SLAVES-1:0][TRIG_W-1:0]   trig_num,
  output logic [N_SLAVES-1:0][TIMER_W-1:0]  trig_time
);

  dhmux_ucf_tx #(.N_STREAMS(N_STREAMS)) u_dhmux (
    .clk(tx_clk), .rst(tx_rst), .cmd_valid, .cmd, .tx_sym, .tx_tcs_clk, .pkt_sent
  );

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_wb
    wb_ucf_rx #(.N_STREAMS(N_STREAMS), .TIMER_W(TIMER_W), .TRIG_W(TRIG_W)) u_wb (
      .clk(rx_clk[i]), .rst(rx_rst[i]), .rx_sym(rx_sym[i]), .rxslide(rxslide[i]),
      .aligned(aligned[i]), .slide_cnt(slide_cnt[i]), .relock(relock[i]),
      .tcs_clk(tcs_clk[i]), .sync(sync[i]), .tcs_reset(tcs_reset[i]), .trigger(trigger[i]),
      .readjust(readjust[i]), .pkt_err(pkt_err[i]), .link_err(link_err[i]),
      .timer(timer[i]), .trig_cnt(trig_cnt[i]), .trig_valid(trig_valid[i]),
      .trig_num(trig_num[i]), .trig_time(trig_time[i])
    );
  end

endmodule
