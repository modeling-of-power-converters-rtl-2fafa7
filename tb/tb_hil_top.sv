// tb_hil_top: end-to-end steady-state run of the closed-loop emulation at its
// default parameters.
//
// The line is 230 V rms, 50 Hz, full-wave rectified; the load is a 533.3 ohm
// resistor (300 W at 400 V), applied as i_R = v_out / R every step. The
// output starts at 400 V with the reference at 400 V. After SETTLE_MS the
// testbench averages G_in and v_out over whole line half-cycles and checks:
//   - mean v_out within 1 % of 400 V,
//   - mean G_in within 3 % of P / V_rms^2 = 5.671e-3 S, and above it (the
//     model has losses, so the line must supply more than the load draws),
//   - input power factor: the input current correlates with the line voltage
//     (correlation coefficient above 0.98),
//   - each mechanism was seen: switch states (a), (b), (c) of the model,
//     duty saturation at its upper limit, and one ADC sample per 1000 steps.
module tb_hil_top;
  import hil_pkg::*;

  localparam real    VRMS      = 230.0;
  localparam real    F_LINE    = 50.0;
  localparam real    R_LOAD    = 400.0 * 400.0 / 300.0;
  localparam real    PI        = 3.14159265358979;
  localparam longint SETTLE_MS = 120;
  localparam longint MEAS_MS   = 40;
  localparam longint STEPS_MS  = 100_000;  // 10 ns steps per ms
  localparam longint TOTAL     = (SETTLE_MS + MEAS_MS) * STEPS_MS;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sig_t v_g, i_r, vout_init, v_out, i_in;
  logic [11:0] vref_code, iref_code;
  plant_state_e state;
  logic gate, sample, sat_hi, sat_lo;
  logic [9:0] duty;
  logic signed [63:0] g_in;
  logic [2:0] adc_clipped;

  hil_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint n_a = 0, n_b = 0, n_c = 0, n_sat = 0, n_sample = 0, n_clip = 0;
  longint cyc = 0;
  real sum_g = 0.0, sum_v = 0.0, n_meas = 0.0;
  real sxy = 0.0, sxx = 0.0, syy = 0.0;

  function automatic real sig2r(sig_t x);
    return real'(x) / 2.0**SIG_F;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Stimulus: line voltage and resistive load, updated every step.
  always_comb begin
    real t, vg;
    t  = real'(cyc) * 10.0e-9;
    vg = VRMS * 1.41421356237 * $sin(2.0 * PI * F_LINE * t);
    if (vg < 0.0) vg = -vg;
    v_g = to_sig(vg);
    i_r = to_sig(sig2r(v_out) / R_LOAD);
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      case (state)
        ST_A_SW_CLOSED: n_a++;
        ST_B_DIODE_ON:  n_b++;
        default:        n_c++;
      endcase
      if (sample) n_sample++;
      if (cyc >= SETTLE_MS * STEPS_MS) begin
        real ig, vg;
        sum_g  += real'(g_in) / 2.0**48;
        sum_v  += sig2r(v_out);
        n_meas += 1.0;
        ig = sig2r(i_in);
        vg = sig2r(v_g);
        sxy += ig * vg; sxx += vg * vg; syy += ig * ig;
        if (sample && sat_hi) n_sat++;
        if (sample && adc_clipped != 0) n_clip++;
      end
    end
  end

  initial begin
    real g_mean, v_mean, g_th, corr;
    vout_init = to_sig(400.0);
    vref_code = 12'd3200;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (cyc == TOTAL);
    g_mean = sum_g / n_meas;
    v_mean = sum_v / n_meas;
    g_th   = 300.0 / (VRMS * VRMS);
    corr   = sxy / $sqrt(sxx * syy);
    $display("mean v_out = %f V, mean G_in = %e S (ideal %e, %f %%), corr = %f",
             v_mean, g_mean, g_th, 100.0 * (g_mean / g_th - 1.0), corr);
    $display("steps in state a=%0d b=%0d c=%0d, samples=%0d, duty at upper limit=%0d, ADC clips=%0d",
             n_a, n_b, n_c, n_sample, n_sat, n_clip);
    check(v_mean > 396.0 && v_mean < 404.0, "mean output voltage");
    check(g_mean > g_th && g_mean < 1.03 * g_th, "mean G_in");
    check(corr > 0.98, "input current follows line voltage");
    check(n_a > 0, "state (a) seen");
    check(n_b > 0, "state (b) seen");
    check(n_c > 0, "state (c) seen");
    check(n_sat > 0, "duty saturation seen");
    check(n_clip == 0, "no ADC clipping");
    check(n_sample == TOTAL / 1000 || n_sample == TOTAL / 1000 + 1, "one sample per switching period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(real'(TOTAL + 10_000) * 10.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
