// dhmux_ucf_tx: transmit side of the DHMux UCF link towards a front-end.
//
// TCS commands (SYNC, RESET, trigger) received by the DHMux are packed into
// the TCS stream by ucf_tcs_tx and 8b/10b-encoded by enc8b10b into the 20-bit
// word handed to the transceiver serializer each 155.52 MHz clock
// (3.1104 Gb/s on the fiber). tx_tcs_clk is the 38.88 MHz TCS clock phase the
// words are scheduled against, delayed to match the encoder register, so its
// rising edge lines up with the first word of a TCS period on tx_sym.
//
// Timing: command to first symbol of its packet 3 to 6 clocks.
module dhmux_ucf_tx
  import ucf_pkg::*;
#(
  parameter int unsigned N_STREAMS = 64
) (
  input  logic        clk,          // 155.52 MHz link clock
  input  logic        rst,
  input  logic        cmd_valid,
  input  tcs_cmd_t    cmd,
  output logic [19:0] tx_sym,
  output logic        tx_tcs_clk,
  output logic        pkt_sent
);

  logic [15:0] w_data;
  logic [1:0]  w_k, w_phase;
  logic        w_tcs_clk, enc_rd;

  ucf_tcs_tx #(.N_STREAMS(N_STREAMS), .STREAM_ID(0)) u_framer (
    .clk, .rst, .cmd_valid, .cmd,
    .tx_data(w_data), .tx_charisk(w_k), .tx_phase(w_phase),
    .tx_tcs_clk(w_tcs_clk), .pkt_sent
  );

  enc8b10b #(.NBYTES(2)) u_enc (
    .clk, .rst, .data(w_data), .charisk(w_k), .sym(tx_sym), .rd_out(enc_rd)
  );

  always_ff @(posedge clk) begin
    if (rst) tx_tcs_clk <= 1'b0;
    else     tx_tcs_clk <= w_tcs_clk;
  end

  logic unused;
  assign unused = ^{w_phase, enc_rd};

endmodule
