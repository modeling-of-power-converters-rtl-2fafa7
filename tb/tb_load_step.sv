// tb_load_step: load-step transient of the closed-loop emulation with the
// ideal converter model.
//
// The system starts at 400 V with a 1176 ohm load (136 W), regulated from a
// 230 V rms, 50 Hz line. After 120 ms the load steps to 741 ohm (216 W). The
// testbench records the output voltage, prints its envelope every 10 ms and
// checks that
//   - before the step the mean output is within 1 % of 400 V,
//   - the step makes the output sag by more than 10 V below its pre-step
//     minimum (the voltage loop is slow on purpose: it must not follow the
//     100 Hz ripple),
//   - 100 ms after the step the output is back within 2 % of 400 V on average
//     over two line half-cycles,
//   - the controller's G_in has risen in proportion to the load, by a ratio
//     between 1.4 and 1.8 (the load power ratio is 216/136 = 1.59).
module tb_load_step;
  import hil_pkg::*;

  localparam real    VRMS     = 230.0;
  localparam real    PI       = 3.14159265358979;
  localparam longint STEPS_MS = 100_000;
  localparam longint T_STEP   = 120 * STEPS_MS;
  localparam longint TOTAL    = 240 * STEPS_MS;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sig_t v_g, i_r, vout_init, v_out, i_in;
  logic [11:0] vref_code, iref_code;
  plant_state_e state;
  logic gate, sample, sat_hi, sat_lo;
  logic [9:0] duty;
  logic signed [63:0] g_in;
  logic [2:0] adc_clipped;

  hil_top #(.LOSSES(1'b0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  real r_load = 1176.0;
  real v_min_pre = 1.0e9, v_min_post = 1.0e9, v_env_min = 1.0e9, v_env_max = 0.0;
  real sum_pre = 0.0, n_pre = 0.0, sum_end = 0.0, n_end = 0.0;
  real sum_g_pre = 0.0, sum_g_end = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always_comb begin
    real vg;
    vg = VRMS * 1.41421356237 * $sin(2.0 * PI * 50.0 * real'(cyc) * 10.0e-9);
    v_g = to_sig((vg < 0.0) ? -vg : vg);
    i_r = to_sig(real'(v_out) / 2.0**SIG_F / r_load);
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      real v;
      v = real'(v_out) / 2.0**SIG_F;
      cyc <= cyc + 1;
      if (cyc == T_STEP) r_load <= 741.0;
      if (v < v_env_min) v_env_min <= v;
      if (v > v_env_max) v_env_max <= v;
      if (cyc % (10 * STEPS_MS) == 0) begin
        $display("t = %0d ms: v_out between %f and %f V, G_in %e S", cyc / STEPS_MS,
                 v_env_min, v_env_max, real'(g_in) / 2.0**48);
        v_env_min <= 1.0e9;
        v_env_max <= 0.0;
      end
      if (cyc >= T_STEP - 20 * STEPS_MS && cyc < T_STEP) begin
        sum_pre   += v;
        sum_g_pre += real'(g_in) / 2.0**48;
        n_pre     += 1.0;
        if (v < v_min_pre) v_min_pre <= v;
      end
      if (cyc >= T_STEP && cyc < T_STEP + 60 * STEPS_MS && v < v_min_post) v_min_post <= v;
      if (cyc >= TOTAL - 20 * STEPS_MS) begin
        sum_end   += v;
        sum_g_end += real'(g_in) / 2.0**48;
        n_end     += 1.0;
      end
    end
  end

  initial begin
    real ratio;
    vout_init = to_sig(400.0);
    vref_code = 12'd3200;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (cyc == TOTAL);
    ratio = (sum_g_end / n_end) / (sum_g_pre / n_pre);
    $display("before step: mean %f V, min %f V; after step: min %f V; end: mean %f V; G_in ratio %f",
             sum_pre / n_pre, v_min_pre, v_min_post, sum_end / n_end, ratio);
    check(sum_pre / n_pre > 396.0 && sum_pre / n_pre < 404.0, "steady state before the step");
    check(v_min_post < v_min_pre - 10.0, "output sags after the load step");
    check(sum_end / n_end > 392.0 && sum_end / n_end < 408.0, "output recovers");
    check(ratio > 1.4 && ratio < 1.8, "G_in follows the load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(real'(TOTAL + 10_000) * 10.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
