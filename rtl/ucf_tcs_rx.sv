// ucf_tcs_rx: recreates TCS commands from the decoded UCF word stream.
//
// It watches for a packet start {stream id, K28.2} of the TCS stream and
// takes the following word as the payload {~flags, flags}. A payload that is
// not the complement pair, a control character, or any decode error in the
// two words drops the packet and raises pkt_err. Words of other streams are
// ignored here.
//
// Timing: the sync/reset/trigger pulses are one clock long and come one clock
// after the payload word is on the input, so a command always has the same
// latency from the line, which the TCS clock phase recovery relies on.
// Commands are only taken while 'aligned' is high.
//
// Recreating SYNC from a UCF packet at fixed latency follows the Waveboard
// description; the packet layout is this design's choice (see ucf_pkg).
module ucf_tcs_rx
  import ucf_pkg::*;
#(
  parameter int unsigned N_STREAMS = 64,
  parameter int unsigned STREAM_ID = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        aligned,
  input  logic [15:0] rx_data,
  input  logic [1:0]  rx_charisk,
  input  logic        rx_err,       // code or disparity error in this word
  output logic        sync,
  output logic        tcs_reset,
  output logic        trigger,
  output logic        pkt_err
);

  localparam int unsigned SW = $clog2(N_STREAMS);

  logic expect_payload;
  logic is_sop;

  assign is_sop = !rx_err && rx_charisk == 2'b01 && rx_data[7:0] == K28_2 &&
                  rx_data[15:8] == 8'(STREAM_ID[SW-1:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      expect_payload <= 1'b0;
      sync           <= 1'b0;
      tcs_reset      <= 1'b0;
      trigger        <= 1'b0;
      pkt_err        <= 1'b0;
    end else begin
      sync      <= 1'b0;
      tcs_reset <= 1'b0;
      trigger   <= 1'b0;
      pkt_err   <= 1'b0;
      expect_payload <= aligned && is_sop;
      if (aligned && expect_payload) begin
        if (!rx_err && rx_charisk == 2'b00 && rx_data[15:8] == ~rx_data[7:0] &&
            rx_data[7:3] == 5'b0) begin
          sync      <= rx_data[0];
          tcs_reset <= rx_data[1];
          trigger   <= rx_data[2];
        end else begin
          pkt_err <= 1'b1;
        end
      end
    end
  end

endmodule
