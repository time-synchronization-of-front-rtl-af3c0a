// tb_wb_ucf_rx: self-checking test of the Waveboard UCF receive side.
//
// The stimulus is a real DHMux word stream (dhmux_ucf_tx) seen through a
// word-level model of the deserializer: the receiver sees a 20-bit window of
// the line starting 'off' bits after the transmitted word of 4 clocks
// earlier, and each rxslide pulse moves the window one bit later. The
// physical time of a receive clock edge is therefore 20*cycle + off bits.
//
// Over several trials the link is disturbed (the window jumps back a random
// number of bits, as after a cable reattachment) and must realign; in some
// trials the receiver or the transmitter is also reset at a random time.
// Checked:
// alignment is found; every SYNC, RESET and trigger sent while aligned is
// received; after a RESET the timer restarts and the trigger count restarts;
// and - the point of the design - the phase of the recovered 38.88 MHz
// tcs_clk relative to the DHMux TCS clock is the same after every realignment.
module tb_wb_ucf_rx;
  import ucf_pkg::*;

  localparam int D = 4;   // base delay of the model, in words

  logic        clk = 1'b0, rst = 1'b1, tx_rst = 1'b1;
  logic        cmd_valid = 1'b0;
  tcs_cmd_t    cmd = '0;
  logic [19:0] tx_sym, rx_sym;
  logic        tx_tcs_clk, pkt_sent;
  logic        rxslide, aligned, relock, tcs_clk, sync, tcs_reset, trigger;
  logic        readjust, pkt_err, link_err, trig_valid;
  logic [7:0]  slide_cnt;
  logic [31:0] timer, trig_time;
  logic [23:0] trig_cnt, trig_num;
  int checks = 0, failures = 0;

  dhmux_ucf_tx u_tx (.clk, .rst(tx_rst), .cmd_valid, .cmd, .tx_sym, .tx_tcs_clk, .pkt_sent);

  wb_ucf_rx dut (.clk, .rst, .rx_sym, .rxslide, .aligned, .slide_cnt, .relock, .tcs_clk,
                 .sync, .tcs_reset, .trigger, .readjust, .pkt_err, .link_err, .timer,
                 .trig_cnt, .trig_valid, .trig_num, .trig_time);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- deserializer model ----
  logic [19:0] hist [64];
  longint cyc = 0;
  int     off = 30;
  longint tx_rise = -1;

  always @(posedge clk) begin
    hist[cyc % 64] <= tx_sym;
    cyc <= cyc + 1;
    if (rxslide) off <= off + 1;
    if (tx_tcs_clk) ; // sampled below
  end

  always_comb begin
    for (int i = 0; i < 20; i++) begin
      longint b;
      b = 20 * (cyc - D) + off + i;       // bit index in the line
      rx_sym[i] = hist[(b / 20) % 64][b % 20];
    end
  end

  // ---- monitors ----
  logic   prev_tx_tcs = 1'b0, prev_rx_tcs = 1'b0;
  int     phase_now = -1;
  int     n_sync = 0, n_reset = 0, n_trig = 0, n_readjust = 0, n_relock = 0;
  int     s_sync = 0, s_reset = 0, s_trig = 0;
  int     trig_since_reset = 0;
  logic   counting = 1'b0;

  always @(posedge clk) begin
    #1;
    if (!tx_rst && tx_tcs_clk && !prev_tx_tcs) tx_rise = cyc - 1;
    prev_tx_tcs = tx_tcs_clk;
    if (!rst && tcs_clk && !prev_rx_tcs && tx_rise >= 0)
      phase_now = int'((20 * (cyc - 1) + off - 20 * D - 20 * tx_rise + 8000) % 80);
    prev_rx_tcs = tcs_clk;
    if (rst) trig_since_reset = 0;
    if (readjust) n_readjust++;
    if (relock) n_relock++;
    // trig_cnt shows the triggers up to the previous clock
    if (aligned && !rst && counting) begin
      checks++;
      if (trig_cnt != 24'(trig_since_reset)) begin
        failures++; $display("FAIL trig_cnt %0d expected %0d", trig_cnt, trig_since_reset);
      end
    end
    if (counting) begin
      if (sync) n_sync++;
      if (trigger) begin n_trig++; trig_since_reset++; end
      if (tcs_reset) begin
        n_reset++;
        trig_since_reset = trigger ? 1 : 0;
      end
    end
  end

  // a RESET received: timer counts from 0 again
  logic reset_seen = 1'b0;
  always @(posedge clk) begin
    #1;
    if (reset_seen) begin
      checks++;
      if (timer != 0) begin
        failures++; $display("FAIL timer %0d after RESET", timer);
      end
    end
    reset_seen = tcs_reset && counting;
  end

  task automatic send_cmd(input tcs_cmd_t c);
    @(posedge clk); #2;
    while (u_tx.u_framer.phase != 2'd0) begin @(posedge clk); #2; end
    cmd_valid = 1'b1; cmd = c;
    if (c.sync) s_sync++;
    if (c.reset) s_reset++;
    if (c.trigger) s_trig++;
    @(posedge clk); #2;
    cmd_valid = 1'b0; cmd = '0;
  endtask

  int ref_phase = -1;

  initial begin
    repeat (3) @(posedge clk);
    #2 tx_rst = 1'b0;
    repeat (5) @(posedge clk);
    #2 rst = 1'b0;
    for (int trial = 0; trial < 12; trial++) begin
      int t;
      if (trial > 0) begin
        // disturb: window jumps back 1..19 bits
        @(posedge clk); #2;
        off = off - (1 + $urandom % 19);
        t = 0;
        while (aligned && t < 300) begin @(posedge clk); #2; t++; end
      end
      // Waveboard or DHMux reset at a random time: the TCS clock divider
      // (or the DHMux TCS phase) restarts with an arbitrary phase
      if (trial % 3 == 1) begin
        repeat ($urandom % 7) @(posedge clk);
        #2 rst = 1'b1;
        @(posedge clk); #2 rst = 1'b0;
      end else if (trial % 3 == 2) begin
        repeat ($urandom % 7) @(posedge clk);
        #2 tx_rst = 1'b1;
        @(posedge clk); #2 tx_rst = 1'b0;
      end
      t = 0;
      while (!aligned && t < 5000) begin @(posedge clk); #2; t++; end
      checks++;
      if (!aligned) begin failures++; $display("FAIL trial %0d: no alignment", trial); end
      repeat (10) @(posedge clk);
      counting = 1'b1;
      send_cmd(3'b001);                       // SYNC fixes the phase
      repeat (20) @(posedge clk);
      for (int n = 0; n < 40; n++) begin
        send_cmd(tcs_cmd_t'(($urandom % 20 == 0) ? 3'b010 : ($urandom % 8 == 0 ? 3'b001 : 3'b100)));
        repeat ($urandom % 12) @(posedge clk);
      end
      repeat (20) @(posedge clk);
      counting = 1'b0;
      checks++;
      if (phase_now < 0 || (ref_phase >= 0 && phase_now != ref_phase)) begin
        failures++; $display("FAIL trial %0d: TCS clock phase %0d, first trial %0d", trial,
                             phase_now, ref_phase);
      end
      if (ref_phase < 0) ref_phase = phase_now;
      $display("trial %0d: off %0d slides %0d TCS clock phase %0d bits", trial, off, slide_cnt, phase_now);
    end
    checks++;
    if (n_sync != s_sync || n_reset != s_reset || n_trig != s_trig) begin
      failures++;
      $display("FAIL commands sent %0d/%0d/%0d received %0d/%0d/%0d", s_sync, s_reset, s_trig,
               n_sync, n_reset, n_trig);
    end
    checks++;
    if (n_readjust == 0 || n_relock == 0 || n_reset == 0 || pkt_err) begin
      failures++; $display("FAIL readjust %0d relock %0d reset %0d", n_readjust, n_relock, n_reset);
    end
    $display("syncs %0d resets %0d triggers %0d readjusts %0d relocks %0d", n_sync, n_reset,
             n_trig, n_readjust, n_relock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
