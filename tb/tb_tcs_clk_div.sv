// tb_tcs_clk_div: self-checking test of the divide-by-4 TCS clock with SYNC
// phase recovery.
//
// Checks that tcs_clk has a period of 4 input clocks with a 2/2 duty cycle,
// that tcs_ce strobes in the clock before each rising edge, that after a
// SYNC at edge a the rising edge comes at edge a+4 whatever the phase before,
// that a SYNC arriving in phase causes no readjust and no change of phase,
// and that an out-of-phase SYNC does cause one.
module tb_tcs_clk_div;
  logic clk = 1'b0, rst = 1'b1, sync = 1'b0;
  logic tcs_clk, tcs_ce, readjust;
  int checks = 0, failures = 0, readjusts = 0, in_phase_syncs = 0;
  int edge_n = 0, last_rise = -1, sync_edge = -100;
  logic prev_clk = 1'b0;

  tcs_clk_div dut (.clk, .rst, .sync, .tcs_clk, .tcs_ce, .readjust);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor, sampled just after each edge
  int  expect_rise = -1;
  logic ce_prev = 1'b0;
  always @(posedge clk) begin
    #1;
    edge_n++;
    if (!rst) begin
      if (readjust) readjusts++;
      if (tcs_clk && !prev_clk) begin
        checks++;
        if (!ce_prev) begin failures++; $display("FAIL no tcs_ce before rise at %0d", edge_n); end
        if (expect_rise >= 0) begin
          checks++;
          if (edge_n != expect_rise) begin
            failures++; $display("FAIL rise at %0d expected %0d", edge_n, expect_rise);
          end
          expect_rise = -1;
        end else if (last_rise >= 0 && edge_n - sync_edge > 6) begin
          checks++;
          if (edge_n - last_rise != 4) begin
            failures++; $display("FAIL period %0d", edge_n - last_rise);
          end
        end
        last_rise = edge_n;
      end
      if (last_rise >= 0 && edge_n - sync_edge > 6 && edge_n - last_rise < 4) begin
        checks++;
        if (tcs_clk !== (edge_n - last_rise < 2)) begin
          failures++; $display("FAIL duty at %0d", edge_n);
        end
      end
    end
    prev_clk = tcs_clk;
    ce_prev = tcs_ce;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      int gap;
      logic in_ph;
      gap = 8 + ($urandom % 13);
      repeat (gap) @(posedge clk);
      // predict: in phase if the last rise was 2 edges before the one that
      // registers sync (rise at r: cnt 2 after r; sync registered at r)
      #2 sync = 1'b1;
      in_ph = (last_rise >= 0) && (edge_n - last_rise == 0);
      @(posedge clk);
      // this edge (edge a) registers sync into clr; rise expected at a+3
      // counting from edge_n before the monitor increments
      expect_rise = edge_n + 1 + 3;
      if (in_ph) begin
        in_phase_syncs++;
        expect_rise = -1;
      end
      sync_edge = edge_n + 1;
      #2 sync = 1'b0;
      checks++;
      if (readjust !== !in_ph) begin
        failures++; $display("FAIL readjust %b in_phase %b", readjust, in_ph);
      end
    end
    repeat (10) @(posedge clk);
    checks++;
    if (readjusts == 0 || in_phase_syncs == 0) begin
      failures++; $display("FAIL readjusts %0d in-phase syncs %0d", readjusts, in_phase_syncs);
    end
    $display("readjusts %0d, in-phase syncs %0d", readjusts, in_phase_syncs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
