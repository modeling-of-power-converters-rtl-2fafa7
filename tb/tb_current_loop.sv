// tb_current_loop: checks the inner PI loop against a real-arithmetic model.
//
// The testbench keeps its own integrator in real numbers (gains in physical
// units converted through the current-ADC step, 8 A / 4096 codes) and limits
// it and the output to the duty range 0 .. 0.95. After each update it
// compares the duty in PWM steps, d * 1000 rounded, within one step, and the
// saturation flags away from the limits' edges. It checks the one-cycle
// update latency, valid, hold between updates, and that both limits are hit.
module tb_current_loop;

  localparam real KP = 0.5, KI = 3100.0, TS = 10.0e-6, DMAX = 0.95;
  localparam real LSB = 8.0 / 4096.0;
  localparam int  N = 4000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic update = 1'b0;
  logic [11:0] iref_code, iin_code;
  logic [9:0] duty;
  logic sat_hi, sat_lo, valid;

  current_loop dut (.*);

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
    return (x < 0.0) ? 0.0 : ((x > DMAX) ? DMAX : x);
  endfunction

  initial begin
    real integ, dr, d;
    int  e, dexp, n_hi = 0, n_lo = 0;
    logic [9:0] hold;
    iref_code = '0; iin_code = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    integ = 0.0;
    for (int k = 0; k < N; k++) begin
      iref_code = 12'(1000 + int'($urandom % 200));
      case ((k / 300) % 4)
        0: iin_code = 12'(int'(iref_code) - 40 + int'($urandom % 30));
        1: iin_code = 12'(int'(iref_code) + 20 + int'($urandom % 30));
        2: iin_code = 12'(int'(iref_code) - 3 + int'($urandom % 7));
        default: iin_code = 12'($urandom % 2400);
      endcase
      e = int'(iref_code) - int'(iin_code);
      integ = lim(integ + KI * TS * LSB * real'(e));
      dr = integ + KP * LSB * real'(e);
      d = lim(dr);
      dexp = int'($floor(d * 1000.0 + 0.5));
      update = 1'b1;
      #1;
      check(valid == 1'b0, "valid low before update");
      @(negedge clk);
      update = 1'b0;
      check(valid == 1'b1, "valid one cycle after update");
      check(int'(duty) - dexp <= 1 && dexp - int'(duty) <= 1, $sformatf("duty %0d vs %0d", duty, dexp));
      if (dr > DMAX + 1.0e-6) begin
        check(sat_hi && !sat_lo, "sat_hi");
        n_hi++;
      end else if (dr < -1.0e-6) begin
        check(sat_lo && !sat_hi, "sat_lo");
        n_lo++;
      end else if (dr > 1.0e-6 && dr < DMAX - 1.0e-6) begin
        check(!sat_lo && !sat_hi, "no saturation");
      end
      hold = duty;
      iin_code = 12'($urandom);
      repeat (1 + $urandom % 3) @(negedge clk);
      check(duty == hold && valid == 1'b0, "hold between updates");
    end
    check(n_hi > 0, "upper limit reached");
    check(n_lo > 0, "lower limit reached");
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
