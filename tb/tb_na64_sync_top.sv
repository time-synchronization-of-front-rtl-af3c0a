// tb_na64_sync_top: end-to-end test of the TCS clock and command
// distribution, one DHMux to 15 Waveboards, at the top's default parameters.
//
// Each Waveboard is joined to the DHMux by its own gtx_link_model (bit-level
// serializer, fiber, CDR and RXSLIDE), with fiber lengths that differ from
// board to board, and its TCS clock drives its own si5345_model, which makes
// the 233.28 MHz FADC clock. A TCS source sends a SYNC every 16 TCS periods,
// random triggers and a RESET in every trial.
//
// Eight trials disturb the system in the ways it has to survive: Waveboard
// resets at random times, a DHMux reset, and CDR relocks at a random bit on
// every link (fibers reattached). After each, once all links are aligned and
// a SYNC has passed, the test measures for every board, in picoseconds, the
// delay from the DHMux TCS clock edge to the board's recovered TCS clock edge
// and to its next FADC clock edge. Every board must show the same values in
// every trial, so the phase difference between any two boards' FADC clocks
// is constant. It also checks the TCS and FADC clock periods, that no decode
// error occurs while aligned, that each board's trigger counter holds the
// triggers since the RESET, and counts each mechanism - slides, relocks, SYNC
// readjusts, RESETs, triggers, PLL lock; one that never happened is a failure.
module tb_na64_sync_top;
  import ucf_pkg::*;

  localparam int BIT_PS = 321;
  localparam int N      = 15;      // the top's default N_SLAVES
  localparam int T_TCS  = 80 * BIT_PS;
  localparam int T_FADC = T_TCS / 6;

  logic                 tx_clk;
  logic [N-1:0]         tx_clk_unused;
  logic                 tx_rst = 1'b1;
  logic [N-1:0]         rx_rst = '1, cdr_restart = '0;
  logic                 cmd_valid = 1'b0;
  tcs_cmd_t             cmd = '0;
  logic [19:0]          tx_sym;
  logic                 tx_tcs_clk, pkt_sent;
  logic [N-1:0]         rx_clk, rxslide, aligned, relock, tcs_clk, sync, tcs_reset, trigger;
  logic [N-1:0]         readjust, pkt_err, link_err, trig_valid;
  logic [N-1:0][19:0]   rx_sym;
  logic [N-1:0][7:0]    slide_cnt;
  logic [N-1:0][31:0]   timer, trig_time;
  logic [N-1:0][23:0]   trig_cnt, trig_num;
  logic [N-1:0]         fadc_clk, pll_locked;
  int checks = 0, failures = 0;

  na64_sync_top dut (
    .tx_clk, .tx_rst, .cmd_valid, .cmd, .tx_sym, .tx_tcs_clk, .pkt_sent,
    .rx_clk, .rx_rst, .rx_sym, .rxslide, .aligned, .slide_cnt, .relock, .tcs_clk,
    .sync, .tcs_reset, .trigger, .readjust, .pkt_err, .link_err, .timer, .trig_cnt,
    .trig_valid, .trig_num, .trig_time
  );

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ps(input realtime t);
    return int'(t * 1000.0);      // time unit is 1 ns
  endfunction

  assign tx_clk = tx_clk_unused[0];   // all link models share one bit timing

  // ---- per-board link, PLL and measurements ----
  realtime t_tx = -1;
  int  d_tcs [N], d_fadc [N];
  int  n_slides = 0, n_relock = 0, n_readjust = 0, n_reset = 0, n_trig = 0, n_sync = 0;
  int  n_err = 0, n_period_bad = 0, n_tcs_periods = 0, n_fadc_bad = 0, n_fadc = 0;
  int  trig_since_reset [N];
  logic measuring = 1'b0;

  always @(posedge tx_tcs_clk) t_tx = $realtime;

  for (genvar i = 0; i < N; i++) begin : g_board
    gtx_link_model #(.BIT_PS(BIT_PS), .FIBER_BITS(23 + 15 * i)) u_link (
      .tx_clk(tx_clk_unused[i]), .tx_sym, .rx_clk(rx_clk[i]), .rx_sym(rx_sym[i]),
      .rxslide(rxslide[i]), .cdr_restart(cdr_restart[i])
    );
    si5345_model #(.MULT(6)) u_pll (.ref_clk(tcs_clk[i]), .out_clk(fadc_clk[i]),
                                    .locked(pll_locked[i]));

    realtime t_rx = -1, t_fadc = -1;
    always @(posedge tcs_clk[i]) begin
      if (measuring) begin
        n_tcs_periods++;
        if (t_rx >= 0 && ps($realtime - t_rx) != T_TCS) n_period_bad++;
      end
      t_rx = $realtime;
      if (t_tx >= 0) d_tcs[i] = ps(t_rx - t_tx);
    end
    always @(posedge fadc_clk[i]) begin
      if (measuring && pll_locked[i]) begin
        n_fadc++;
        if (t_fadc >= 0 && ps($realtime - t_fadc) != T_FADC) n_fadc_bad++;
      end
      t_fadc = $realtime;
      // FADC edge position within its own period, from the DHMux TCS clock
      if (t_tx >= 0) d_fadc[i] = ps(t_fadc - t_tx) % T_FADC;
    end
    always @(posedge rx_clk[i]) begin
      if (rxslide[i]) n_slides++;
      if (relock[i]) n_relock++;
      if (readjust[i]) n_readjust++;
      if (tcs_reset[i]) n_reset++;
      if (trigger[i]) n_trig++;
      if (sync[i]) n_sync++;
      if (measuring && (link_err[i] || pkt_err[i])) n_err++;
      if (rx_rst[i]) trig_since_reset[i] = 0;
      else if (tcs_reset[i]) trig_since_reset[i] = trigger[i] ? 1 : 0;
      else if (trigger[i]) trig_since_reset[i]++;
    end
  end

  // ---- TCS source, in the DHMux clock domain ----
  int   tx_cyc = 0;
  logic tcs_on = 1'b0, send_reset = 1'b0;
  always @(posedge tx_clk) begin
    tx_cyc <= tx_cyc + 1;
    cmd_valid <= 1'b0;
    cmd       <= '0;
    if (tcs_on && tx_cyc % 4 == 0) begin
      tcs_cmd_t c;
      c.sync    = (tx_cyc % 64 == 0);
      c.reset   = send_reset;
      c.trigger = ($urandom % 5 == 0);
      if (c != '0) begin
        cmd_valid <= 1'b1;
        cmd       <= c;
      end
      if (send_reset) send_reset <= 1'b0;
    end
  end

  task automatic wait_tx(input int n);
    repeat (n) @(posedge tx_clk);
  endtask

  int ref_tcs [N], ref_fadc [N];

  initial begin
    foreach (trig_since_reset[i]) trig_since_reset[i] = 0;
    wait_tx(3);
    tx_rst = 1'b0;
    tcs_on = 1'b1;
    wait_tx(8);
    rx_rst = '0;
    for (int trial = 0; trial < 8; trial++) begin
      int t;
      measuring = 1'b0;
      case (trial % 4)
        1: for (int i = 0; i < N; i++) begin   // Waveboard resets
          wait_tx($urandom % 9);
          rx_rst[i] = 1'b1; wait_tx(2); rx_rst[i] = 1'b0;
        end
        2: begin                               // DHMux reset
          wait_tx($urandom % 9);
          tx_rst = 1'b1; wait_tx(1); tx_rst = 1'b0;
        end
        3: begin                               // fibers reattached: CDR relock
          for (int i = 0; i < N; i++) begin
            wait_tx($urandom % 3);
            cdr_restart[i] = 1'b1;
          end
          wait_tx(2);
          cdr_restart = '0;
          wait_tx(40);
        end
        default: ;
      endcase
      t = 0;
      while (aligned != '1 && t < 20000) begin wait_tx(1); t++; end
      checks++;
      if (aligned != '1) begin failures++; $display("FAIL trial %0d: aligned %b", trial, aligned); end
      // a SYNC must pass and the PLLs settle
      wait_tx(200);
      measuring = 1'b1;
      send_reset = 1'b1;
      wait_tx(300);
      // pause the TCS source; each trigger counter must hold the triggers
      // received since the RESET
      tcs_on = 1'b0;
      wait_tx(60);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (trig_cnt[i] != 24'(trig_since_reset[i]) || trig_since_reset[i] == 0) begin
          failures++;
          $display("FAIL trial %0d board %0d: trigger count %0d, expected %0d", trial, i,
                   trig_cnt[i], trig_since_reset[i]);
        end
        checks++;
        if (trial == 0) begin
          ref_tcs[i] = d_tcs[i]; ref_fadc[i] = d_fadc[i];
        end else if (d_tcs[i] != ref_tcs[i] || d_fadc[i] != ref_fadc[i]) begin
          failures++;
          $display("FAIL trial %0d board %0d: TCS clock delay %0d ps, FADC %0d ps; first trial %0d / %0d",
                   trial, i, d_tcs[i], d_fadc[i], ref_tcs[i], ref_fadc[i]);
        end
      end
      tcs_on = 1'b1;
      $display("trial %0d: board 0 TCS clock delay %0d ps, board 1 %0d ps, FADC clock phase difference 1-0: %0d ps",
               trial, d_tcs[0], d_tcs[1], d_fadc[1] - d_fadc[0]);
    end
    measuring = 1'b0;
    checks++;
    if (n_err != 0 || n_period_bad != 0 || n_fadc_bad != 0 || n_tcs_periods == 0 || n_fadc == 0) begin
      failures++;
      $display("FAIL errors %0d, bad TCS periods %0d of %0d, bad FADC periods %0d of %0d",
               n_err, n_period_bad, n_tcs_periods, n_fadc_bad, n_fadc);
    end
    check_mech("slides", n_slides);
    check_mech("relocks", n_relock);
    check_mech("SYNC readjusts", n_readjust);
    check_mech("SYNCs", n_sync);
    check_mech("RESETs", n_reset);
    check_mech("triggers", n_trig);
    check_mech("PLLs locked", $countones(pll_locked) == N ? N : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mech(input string name, input int n);
    checks++;
    $display("%-15s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", name); end
  endtask
endmodule
