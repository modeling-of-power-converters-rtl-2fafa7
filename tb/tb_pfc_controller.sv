// tb_pfc_controller: checks how the controller sequences its two loops and
// the PWM, and the direction of both loops.
//
// With fixed ADC codes applied, the testbench checks every cycle that
//   - sample pulses once every 1000 cycles (100 kHz at 10 ns steps),
//   - the current reference changes only two cycles after a sample and the
//     duty only three cycles after it,
//   - the gate is high, in each period, for exactly the duty held at the end
//     of the previous period.
// It then checks the loop directions: G_in rises while the output is below
// the reference and falls while it is above; the duty rises to its upper
// limit (950 steps, sat_hi) when the measured current is zero and falls to
// zero (sat_lo) when it is far above the reference.
module tb_pfc_controller;

  localparam int PERIOD = 1000;
  localparam int NPER = 600;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [11:0] vref_code, vout_code, vg_code, iin_code, iref_code;
  logic gate, sample, sat_hi, sat_lo;
  logic [9:0] duty;
  logic signed [63:0] g_in;

  pfc_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Cycle-by-cycle monitor, sampling between clock edges.
  int since_sample = -1, since_pend = 0, high_cnt = 0, nper_seen = 0;
  int duty_next = 0, duty_cur = 0;
  logic [11:0] iref_prev = '0;
  logic [9:0]  duty_prev = '0;
  bit mon_on = 0;
  always @(negedge clk) if (mon_on) begin
    if (since_sample >= 0) since_sample++;
    if (sample) begin
      check(since_sample == -1 || since_sample == PERIOD, $sformatf("sample spacing %0d", since_sample));
      since_sample = 0;
    end
    if (iref_code != iref_prev) check(since_sample == 2, "iref changes two cycles after sample");
    if (duty != duty_prev) check(since_sample == 3, "duty changes three cycles after sample");
    iref_prev = iref_code;
    duty_prev = duty;
    // Period bookkeeping: sample is at step PERIOD/2, so a period ends
    // PERIOD/2 - 1 cycles after it.
    if (gate) high_cnt++;
    if (since_sample == PERIOD / 2 - 1) begin
      check(high_cnt == duty_cur, $sformatf("high time %0d vs duty %0d", high_cnt, duty_cur));
      high_cnt = 0;
      duty_cur = int'(duty);
      nper_seen++;
    end
  end

  initial begin
    longint g_prev;
    vref_code = 12'd3200; vout_code = 12'd3100; vg_code = 12'd2000; iin_code = 12'd0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // Align the monitor with the first period: the counter restarts at 0,
    // so the first period end is PERIOD-1 cycles away.
    @(posedge sample);
    @(negedge clk);
    #1;
    mon_on = 1;
    since_sample = 0;
    high_cnt = 0;
    // Phase 1: output below reference, no current: G_in and duty rise.
    g_prev = g_in;
    repeat (300) @(posedge sample);
    repeat (4) @(negedge clk);
    check(g_in > g_prev, "G_in rises when v_out < v_ref");
    check(iref_code > 0, "current reference follows G_in * v_g");
    check(duty == 10'd950 && sat_hi, "duty at upper limit with zero current");
    // Phase 2: current far above reference: duty to zero.
    iin_code = 12'd4095;
    repeat (100) @(posedge sample);
    repeat (4) @(negedge clk);
    check(duty == 10'd0 && sat_lo, "duty at lower limit with excess current");
    // Phase 3: output above reference: G_in falls.
    vout_code = 12'd3210;
    repeat (2) @(posedge sample);
    repeat (4) @(negedge clk);
    g_prev = g_in;
    repeat (50) @(posedge sample);
    repeat (4) @(negedge clk);
    check(g_in < g_prev, "G_in falls when v_out > v_ref");
    check(nper_seen > 200, "periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NPER * PERIOD * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
