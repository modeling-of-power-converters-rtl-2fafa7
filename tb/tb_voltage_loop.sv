// tb_voltage_loop: checks the outer PI loop and the G_in x v_g multiplier
// against a real-arithmetic model.
//
// The testbench keeps its own integrator in real numbers, with the gains in
// physical units converted through the ADC step (512 V / 4096 codes), and
// limits it and the output to 0 .. 0.002 S (the limit is lowered from its
// default of 0.05 S so that the test reaches it). After each update it compares G_in
// (tolerance 1e-9 S) and the current reference, floor(G_in * v_g code *
// 512/8) clamped to 4095 (tolerance one code). It checks that outputs change
// only one cycle after an update strobe, with valid, and hold otherwise.
// Errors of both signs and large enough to hit both limits are applied.
module tb_voltage_loop;

  localparam real KP = 4.75e-5, KI = 3.0e-3, TS = 10.0e-6, GMAX = 0.002;
  localparam real LSB = 512.0 / 4096.0;
  localparam int  N = 4000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic update = 1'b0;
  logic [11:0] vref_code, vout_code, vg_code, iref_code;
  logic signed [63:0] g_in;
  logic valid;

  // A lower conductance limit than the default, so that it is reached quickly.
  voltage_loop #(.G_MAX(GMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real lim(real x);
    return (x < 0.0) ? 0.0 : ((x > GMAX) ? GMAX : x);
  endfunction

  initial begin
    real integ, g, gd, ir;
    int  e, iexp, n_top = 0, n_zero = 0;
    logic [11:0] iref_hold;
    vref_code = 12'd3200; vout_code = 12'd3200; vg_code = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    integ = 0.0;
    for (int k = 0; k < N; k++) begin
      // Slowly varying phases: long positive error, then negative, then small.
      case ((k / 500) % 4)
        0: vout_code = 12'(3200 - 200 + int'($urandom % 50));
        1: vout_code = 12'(3200 + 100 + int'($urandom % 50));
        2: vout_code = 12'(3200 - 3 + int'($urandom % 7));
        default: vout_code = 12'($urandom);
      endcase
      vg_code = 12'($urandom % 2700);
      e = 3200 - int'(vout_code);
      integ = lim(integ + KI * TS * LSB * real'(e));
      g = lim(integ + KP * LSB * real'(e));
      ir = $floor(g * real'(vg_code) * 64.0);
      iexp = (ir > 4095.0) ? 4095 : int'(ir);
      iref_hold = iref_code;
      update = 1'b1;
      #1;
      check(valid == 1'b0, "valid low before update");
      @(negedge clk);
      update = 1'b0;
      check(valid == 1'b1, "valid one cycle after update");
      gd = real'(g_in) / 2.0**48;
      check((gd - g) < 1.0e-9 && (g - gd) < 1.0e-9, $sformatf("G_in %e vs %e", gd, g));
      check(int'(iref_code) - iexp <= 1 && iexp - int'(iref_code) <= 1,
            $sformatf("iref %0d vs %0d", iref_code, iexp));
      if (g == GMAX) n_top++;
      if (g == 0.0) n_zero++;
      iref_hold = iref_code;
      vg_code = 12'($urandom);
      repeat (1 + $urandom % 3) @(negedge clk);
      check(iref_code == iref_hold && valid == 1'b0, "hold between updates");
    end
    check(n_top > 0, "upper limit reached");
    check(n_zero > 0, "lower limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N * 60 + 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
