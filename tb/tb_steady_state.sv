// tb_steady_state: steady-state accuracy of the ideal and the lossy converter
// model in closed loop, measured through the controller's conductance G_in.
//
// Two complete emulations run side by side, one with the ideal model and one
// with losses, on the same line (230 V rms, 50 Hz) and load (300 W at 400 V,
// a 533.3 ohm resistor). The output voltage is regulated to 400 V; after
// 120 ms both G_in are averaged over four line half-cycles. With no losses
// the line must supply exactly the load power, so G_in should match
// P / V_rms^2 = 5.671e-3 S; the testbench accepts 1.5 %. With losses G_in must
// be higher by 0.3 % to 3 %, the extra power lost in the bridge, inductor,
// switch and diode.
module tb_steady_state;
  import hil_pkg::*;

  localparam real    VRMS      = 230.0;
  localparam real    R_LOAD    = 400.0 * 400.0 / 300.0;
  localparam real    PI        = 3.14159265358979;
  localparam longint STEPS_MS  = 100_000;
  localparam longint SETTLE    = 120 * STEPS_MS;
  localparam longint TOTAL     = 160 * STEPS_MS;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sig_t v_g, vout_init;
  sig_t i_r [2], v_out [2], i_in [2];
  logic [11:0] vref_code;
  logic signed [63:0] g_in [2];

  for (genvar m = 0; m < 2; m++) begin : g_sys
    plant_state_e state;
    logic gate, sample, sat_hi, sat_lo;
    logic [9:0] duty;
    logic [11:0] iref_code;
    logic [2:0] adc_clipped;
    hil_top #(.LOSSES(m == 1)) dut (
      .clk, .rst, .v_g, .i_r(i_r[m]), .vout_init, .vref_code,
      .v_out(v_out[m]), .i_in(i_in[m]), .state, .gate, .sample, .duty,
      .g_in(g_in[m]), .iref_code, .sat_hi, .sat_lo, .adc_clipped
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  real sum_g [2] = '{0.0, 0.0};
  real sum_v [2] = '{0.0, 0.0};
  real n_meas = 0.0;

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
    for (int m = 0; m < 2; m++)
      i_r[m] = to_sig(real'(v_out[m]) / 2.0**SIG_F / R_LOAD);
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      cyc <= cyc + 1;
      if (cyc >= SETTLE) begin
        for (int m = 0; m < 2; m++) begin
          sum_g[m] += real'(g_in[m]) / 2.0**48;
          sum_v[m] += real'(v_out[m]) / 2.0**SIG_F;
        end
        n_meas += 1.0;
      end
    end
  end

  initial begin
    real g0, g1, g_th;
    vout_init = to_sig(400.0);
    vref_code = 12'd3200;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (cyc == TOTAL);
    g0 = sum_g[0] / n_meas;
    g1 = sum_g[1] / n_meas;
    g_th = 300.0 / (VRMS * VRMS);
    $display("ideal model:  v_out %f V, G_in %e S, %f %% from P/Vrms^2", sum_v[0] / n_meas, g0, 100.0 * (g0 / g_th - 1.0));
    $display("lossy model:  v_out %f V, G_in %e S, %f %% from P/Vrms^2", sum_v[1] / n_meas, g1, 100.0 * (g1 / g_th - 1.0));
    check(g0 > 0.985 * g_th && g0 < 1.015 * g_th, "ideal model G_in");
    check(g1 > 1.003 * g0 && g1 < 1.03 * g0, "losses raise G_in");
    for (int m = 0; m < 2; m++)
      check(sum_v[m] / n_meas > 396.0 && sum_v[m] / n_meas < 404.0, "output regulated to 400 V");
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
