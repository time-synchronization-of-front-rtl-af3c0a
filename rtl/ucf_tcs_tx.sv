// ucf_tcs_tx: DHMux encapsulation of TCS commands into the UCF TCS stream.
//
// A word counter (phase 0..3) divides the 155.52 MHz link word clock into the
// 38.88 MHz TCS period; tx_tcs_clk (high in phases 0 and 1) is the TCS clock
// this counter stands for. Each TCS period is sent as four words:
//   phase 0  idle {D21.5, K28.5}   a comma in every period, for alignment
//   phase 1  packet start {stream id, K28.2}, or idle
//   phase 2  payload {~flags, flags}, or idle
//   phase 3  idle
// Commands (SYNC, RESET, trigger) arriving on cmd_valid are collected and go
// out in the next free packet slot. Because a packet always starts in phase 1,
// the SYNC packet has a fixed position relative to the TCS clock, which is
// what lets the receiver recover that clock's phase.
//
// Timing: a command given in any phase appears on the output between 2 and 5
// clocks later (output registered). rst clears the phase and pending commands.
//
// Deterministic SYNC encapsulation follows the DHMux description; the word
// schedule, the packet layout and the merging of commands of one period into
// one packet are this design's own.
module ucf_tcs_tx
  import ucf_pkg::*;
#(
  parameter int unsigned N_STREAMS = 64,
  parameter int unsigned STREAM_ID = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cmd_valid,
  input  tcs_cmd_t    cmd,
  output logic [15:0] tx_data,
  output logic [1:0]  tx_charisk,
  output logic [1:0]  tx_phase,
  output logic        tx_tcs_clk,
  output logic        pkt_sent      // pulse with each packet start word
);

  localparam int unsigned SW = $clog2(N_STREAMS);

  logic [1:0] phase;
  tcs_cmd_t   pending, sending;
  logic       busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= '0;
      pending    <= '0;
      sending    <= '0;
      busy       <= 1'b0;
      tx_data    <= {D21_5, K28_5};
      tx_charisk <= 2'b01;
      pkt_sent   <= 1'b0;
    end else begin
      phase    <= phase + 2'd1;
      pkt_sent <= 1'b0;
      // default: idle word
      tx_data    <= {D21_5, K28_5};
      tx_charisk <= 2'b01;
      if (cmd_valid) pending <= pending | cmd;
      unique case (phase)
        2'd1: begin
          if (pending != '0) begin
            tx_data    <= {8'(STREAM_ID[SW-1:0]), K28_2};
            tx_charisk <= 2'b01;
            sending    <= pending;
            busy       <= 1'b1;
            pkt_sent   <= 1'b1;
            pending    <= cmd_valid ? cmd : '0;
          end
        end
        2'd2: begin
          if (busy) begin
            tx_data    <= {~{5'b0, sending}, {5'b0, sending}};
            tx_charisk <= 2'b00;
            busy       <= 1'b0;
          end
        end
        default: ;
      endcase
    end
  end

  // phase of the word now on tx_data (one clock behind the counter)
  assign tx_phase   = phase - 2'd1;
  assign tx_tcs_clk = !tx_phase[1];

  initial assert (STREAM_ID < N_STREAMS && N_STREAMS <= N_STREAMS_MAX);

endmodule
