// rxslide_aligner: word alignment of the UCF receiver by slipping the
// transceiver's recovered clock (GTX RXSLIDE in PMA mode).
//
// The raw 20-bit word from the deserializer is checked for a K28.5 comma, of
// either disparity, in bits [9:0] - the one position accepted. The comma is
// looked for during a window of WINDOW words. If a window has none, one
// RXSLIDE pulse is given, which moves the word boundary, and with it the
// recovered parallel clock, by one bit period (321.5 ps at 3.1104 Gb/s);
// then SLIDE_WAIT clocks pass before the next window, while the transceiver
// settles. After LOCK_WINDOWS windows in a row each holding a comma, aligned
// goes high. While aligned, LOSS_WINDOWS windows in a row without a comma drop
// alignment and the search starts again.
//
// Because the data word is never shifted in logic, only the clock, alignment
// always ends with the comma at the same bit of the same clock edge, so the
// recovered clock has the same phase relative to the transmitter after every
// relock: the link latency is deterministic.
//
// Interface: rx_word, bits [9:0] of the raw word (bit 0 first on the line), rxslide out (one-clock
// pulse), aligned, slide_cnt (slides since reset), relock (pulse on loss).
//
// Aligning by RXSLIDE, one bit at a time, by shifting the clock and not the
// word, follows the document. Window, wait and lock counts are this design's
// choice; SLIDE_WAIT = 32 follows the usual GTX requirement between slides.
module rxslide_aligner #(
  parameter int unsigned WINDOW       = 8,
  parameter int unsigned SLIDE_WAIT   = 32,
  parameter int unsigned LOCK_WINDOWS = 4,
  parameter int unsigned LOSS_WINDOWS = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  rx_word,     // first symbol of the raw word
  output logic        rxslide,
  output logic        aligned,
  output logic [7:0]  slide_cnt,
  output logic        relock
);

  import ucf_pkg::K28_5_RDN;
  import ucf_pkg::K28_5_RDP;

  typedef enum logic [1:0] {SEARCH, SLIDE, SETTLE, LOCKED} state_t;

  localparam int unsigned CW = $clog2(WINDOW + SLIDE_WAIT + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic          seen;
  logic [7:0]    good, miss;
  logic          comma;

  assign comma = (rx_word[9:0] == K28_5_RDN) || (rx_word[9:0] == K28_5_RDP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= SEARCH;
      cnt       <= '0;
      seen      <= 1'b0;
      good      <= '0;
      miss      <= '0;
      rxslide   <= 1'b0;
      aligned   <= 1'b0;
      slide_cnt <= '0;
      relock    <= 1'b0;
    end else begin
      rxslide <= 1'b0;
      relock  <= 1'b0;
      unique case (state)
        SEARCH, LOCKED: begin
          if (cnt == CW'(WINDOW - 1)) begin
            cnt  <= '0;
            seen <= 1'b0;
            if (state == SEARCH) begin
              if (seen || comma) begin
                if (good == 8'(LOCK_WINDOWS - 1)) begin
                  state   <= LOCKED;
                  aligned <= 1'b1;
                  miss    <= '0;
                end else begin
                  good <= good + 8'd1;
                end
              end else begin
                good    <= '0;
                state   <= SLIDE;
              end
            end else begin
              if (seen || comma) begin
                miss <= '0;
              end else if (miss == 8'(LOSS_WINDOWS - 1)) begin
                state   <= SEARCH;
                aligned <= 1'b0;
                good    <= '0;
                relock  <= 1'b1;
              end else begin
                miss <= miss + 8'd1;
              end
            end
          end else begin
            cnt  <= cnt + 1'b1;
            seen <= seen || comma;
          end
        end
        SLIDE: begin
          rxslide   <= 1'b1;
          slide_cnt <= slide_cnt + 8'd1;
          cnt       <= '0;
          state     <= SETTLE;
        end
        SETTLE: begin
          if (cnt == CW'(SLIDE_WAIT - 1)) begin
            cnt   <= '0;
            seen  <= 1'b0;
            state <= SEARCH;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  // a slide request is always a single-clock pulse
  assert property (@(posedge clk) disable iff (rst) rxslide |=> !rxslide);

endmodule
