// tb_tcs_timer: self-checking test of the trigger counter and timer.
//
// A testbench model counts tcs_ce strobes and triggers, both cleared by the
// TCS RESET, and every output is compared with it each clock: the timer, the
// trigger count, and for each trigger its number and time stamp.
module tb_tcs_timer;
  logic clk = 1'b0, rst = 1'b1, tcs_ce = 1'b0, tcs_reset = 1'b0, trigger = 1'b0;
  logic [31:0] timer, trig_time;
  logic [23:0] trig_cnt, trig_num;
  logic        trig_valid;
  int checks = 0, failures = 0, resets = 0, trigs = 0;

  tcs_timer dut (.clk, .rst, .tcs_ce, .tcs_reset, .trigger, .timer, .trig_cnt,
                 .trig_valid, .trig_num, .trig_time);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_timer, m_cnt, m_num, m_time;
  logic   m_valid;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m_timer = 0; m_cnt = 0; m_num = 0; m_time = 0; m_valid = 0;
    for (int c = 0; c < 20000; c++) begin
      tcs_ce    = (c % 4) == 1;
      trigger   = ($urandom % 23) == 0;
      tcs_reset = ($urandom % 1500) == 0;
      @(posedge clk); #1;
      if (tcs_reset) begin
        resets++;
        m_valid = trigger; m_num = 0; m_time = 0; m_timer = 0;
        m_cnt = trigger ? 1 : 0;
      end else begin
        m_valid = trigger;
        if (trigger) begin
          m_num = m_cnt; m_time = m_timer; m_cnt++;
        end
        if (tcs_ce) m_timer++;
      end
      if (trigger) trigs++;
      checks++;
      if (timer !== 32'(m_timer) || trig_cnt !== 24'(m_cnt) || trig_valid !== m_valid ||
          (m_valid && (trig_num !== 24'(m_num) || trig_time !== 32'(m_time)))) begin
        failures++;
        $display("FAIL c=%0d timer %0d/%0d cnt %0d/%0d num %0d/%0d time %0d/%0d", c, timer, m_timer,
                 trig_cnt, m_cnt, trig_num, m_num, trig_time, m_time);
      end
    end
    checks++;
    if (resets == 0 || trigs == 0) begin failures++; $display("FAIL no reset or no trigger"); end
    $display("resets %0d, triggers %0d", resets, trigs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
