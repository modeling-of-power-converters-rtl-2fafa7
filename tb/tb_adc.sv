// tb_adc: checks the ADC model's transfer function, clamping, hold and
// latency.
//
// Two instances: a voltage channel (512 V full scale) and a current channel
// (8 A full scale), both 12 bits. Random inputs, a third of them outside the
// range, are sampled; the expected code is floor(x * 4096 / full scale)
// clamped to 0..4095, computed in real arithmetic. The code must appear on
// the clock edge that takes the sample and stay unchanged while sample is low.
module tb_adc;
  import hil_pkg::*;

  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic sample = 1'b0;
  sig_t xv, xi;
  logic [11:0] code_v, code_i;
  logic clip_v, clip_i;

  adc #(.BITS(12), .FULL_SCALE(512.0)) dut_v (
    .clk, .rst, .sample, .x(xv), .code(code_v), .clipped(clip_v));
  adc #(.BITS(12), .FULL_SCALE(8.0)) dut_i (
    .clk, .rst, .sample, .x(xi), .code(code_i), .clipped(clip_i));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int expect_code(sig_t x, real fs, output bit clip);
    real v;
    v = $floor(real'(x) / 2.0**SIG_F * 4096.0 / fs);
    clip = (v < 0.0) || (v > 4095.0);
    if (v < 0.0) return 0;
    if (v > 4095.0) return 4095;
    return int'(v);
  endfunction

  initial begin
    int ev, ei, hv, hi;
    bit cv, ci;
    int nclip = 0;
    xv = '0; xi = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(code_v == 0 && code_i == 0, "reset code");
    for (int k = 0; k < N; k++) begin
      xv = sig_t'(int'($urandom % (700 << 20)) - (100 << 20));
      xi = sig_t'(int'($urandom % (12 << 20)) - (2 << 20));
      ev = expect_code(xv, 512.0, cv);
      ei = expect_code(xi, 8.0, ci);
      if (cv) nclip++;
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      check(int'(code_v) == ev && clip_v == cv, $sformatf("voltage code %0d vs %0d", code_v, ev));
      check(int'(code_i) == ei && clip_i == ci, $sformatf("current code %0d vs %0d", code_i, ei));
      // Hold: change the input without a sample strobe.
      hv = int'(code_v); hi = int'(code_i);
      xv = sig_t'($urandom);
      xi = sig_t'($urandom);
      repeat (1 + $urandom % 3) @(negedge clk);
      check(int'(code_v) == hv && int'(code_i) == hi, "code held without sample");
    end
    check(nclip > 0, "clipping exercised");
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
