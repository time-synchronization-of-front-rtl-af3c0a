// si5345_model: behavioural model of the external jitter-cleaning PLL, used
// as a zero-delay frequency multiplier. Not synthesizable; for testbenches
// only.
//
// It measures the period of ref_clk between rising edges and, from each
// rising edge on, produces MULT cycles of out_clk of period/MULT (38.88 MHz
// x 6 = 233.28 MHz FADC clock). 'locked' goes high after LOCK_EDGES reference
// edges in a row with the same period; a change of period drops it.
module si5345_model #(
  parameter int MULT       = 6,
  parameter int LOCK_EDGES = 4
) (
  input  logic ref_clk,
  output logic out_clk,
  output logic locked
);

  realtime last = 0;
  int      period_ps = 0;
  int      stable = 0;

  initial begin
    out_clk = 1'b0;
    locked  = 1'b0;
  end

  always @(posedge ref_clk) begin
    int p;
    p = int'(($realtime - last) / 1ps);     // period in whole picoseconds
    last = $realtime;
    if (p == period_ps) begin
      if (stable < LOCK_EDGES) stable++;
    end else begin
      stable = 0;
    end
    period_ps = p;
    locked = (stable >= LOCK_EDGES);
    if (locked) begin
      fork
        begin
          for (int i = 0; i < MULT; i++) begin
            out_clk = 1'b1;
            #((period_ps / (2 * MULT)) * 1ps);
            out_clk = 1'b0;
            #((period_ps / (2 * MULT)) * 1ps);
          end
        end
      join_none
    end
  end

endmodule
