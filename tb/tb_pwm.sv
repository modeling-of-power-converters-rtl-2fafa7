// tb_pwm: checks the centre-aligned PWM cycle by cycle against an
// independently kept period counter.
//
// For each switching period the expected duty is the input value at the
// last step of the previous period (clamped to PERIOD). Every cycle the
// testbench checks gate (high from (PERIOD-d)/2 for d steps), sample (only at
// step PERIOD/2) and period_end (only at step PERIOD-1). The duty input is
// changed at random points inside periods, including 0, 1, PERIOD and values
// above PERIOD. It also checks that each period is exactly 1000 steps long
// (100 kHz with 10 ns steps) and that each period's high time equals its duty.
module tb_pwm;

  localparam int PERIOD = 1000;
  localparam int DW = 10;
  localparam int NPER = 60;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [DW-1:0] duty = '0;
  logic gate, sample, period_end;
  logic [DW-1:0] count;

  pwm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int d_cur, d_next, lo, high_cnt, change_at;
    int special [6] = '{0, 1, 500, 999, 1000, 1023};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    d_cur = 0;
    for (int p = 0; p < NPER; p++) begin
      d_next    = (p < 6) ? special[p] : int'($urandom % 1001);
      change_at = $urandom % PERIOD;
      high_cnt  = 0;
      lo        = (PERIOD - d_cur) / 2;
      for (int ph = 0; ph < PERIOD; ph++) begin
        // Sampled at the negative edge, between two steps.
        if (ph == change_at) duty = DW'(d_next);
        #1;
        check(gate == (ph >= lo && ph < lo + d_cur), $sformatf("gate p=%0d ph=%0d d=%0d", p, ph, d_cur));
        check(sample == (ph == PERIOD / 2), "sample strobe");
        check(period_end == (ph == PERIOD - 1), "period_end strobe");
        if (gate) high_cnt++;
        @(negedge clk);
      end
      check(high_cnt == d_cur, $sformatf("high time %0d vs duty %0d", high_cnt, d_cur));
      d_cur = (int'(duty) > PERIOD) ? PERIOD : int'(duty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NPER + 2) * PERIOD * 10 + 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
