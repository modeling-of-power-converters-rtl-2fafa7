// tb_boost_plant: step-by-step check of the boost converter model against a
// floating-point evaluation of its difference equations.
//
// Two instances run side by side on the same stimulus, one with losses and
// one ideal. Before every step the testbench reads each instance's scaled
// state, evaluates the update for the present switch, line voltage and load
// current in real arithmetic (equations (7)/(8) with R* = (dt/L)R and
// v_g' = max(v_g - v_B, 0)), and after the step compares the new state, the
// reported switch state and the v_out / i_in outputs. The switch is driven
// in random bursts, so all three states (a), (b) and (c) occur; the test
// counts them and fails if one never happens. It also checks that reset
// loads vout_init.
module tb_boost_plant;
  import hil_pkg::*;

  localparam real DT = 10.0e-9, L = 5.0e-3, C = 100.0e-6;
  localparam real RL = 0.6965, RM = 0.4, VD = 1.03, VB = 1.14;
  localparam int  NSTEPS = 40000;
  localparam real TOL = 1.0e-4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic sw = 1'b0;
  sig_t v_g, i_r, vout_init;
  sig_t v_out [2], i_in [2];
  plant_state_e state [2];
  st_t vout_s [2], iin_s [2];

  boost_plant #(.LOSSES(1'b1)) dut_loss (
    .clk, .rst, .en(1'b1), .sw, .v_g, .i_r, .vout_init,
    .v_out(v_out[0]), .i_in(i_in[0]), .state(state[0]),
    .vout_s(vout_s[0]), .iin_s(iin_s[0])
  );
  boost_plant #(.LOSSES(1'b0)) dut_ideal (
    .clk, .rst, .en(1'b1), .sw, .v_g, .i_r, .vout_init,
    .v_out(v_out[1]), .i_in(i_in[1]), .state(state[1]),
    .vout_s(vout_s[1]), .iin_s(iin_s[1])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [2][3];

  function automatic real r(longint x);
    return real'(x) / 2.0**20;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Expected next state of instance m, from its present state and inputs.
  task automatic predict(int m, output real iin_n, output real vout_n, output int st);
    real is, vs, vg, ir, vgp, ra, rb, vd, vb, cand;
    is = r(iin_s[m]);  vs = r(vout_s[m]);
    vg = r(v_g);       ir = r(i_r);
    vb = (m == 0) ? VB : 0.0;
    vd = (m == 0) ? VD : 0.0;
    ra = (m == 0) ? DT / L * (RL + RM) : 0.0;
    rb = (m == 0) ? DT / L * RL : 0.0;
    vgp = (vg > vb) ? vg - vb : 0.0;
    if (sw) begin
      st = 0;
      iin_n = is + vgp - is * ra;
      if (iin_n < 0.0) iin_n = 0.0;
      vout_n = vs - ir;
    end else begin
      cand = is + vgp - (vs * DT / C + vd + is * rb);
      if (cand > 0.0) begin
        st = 1;  iin_n = cand;  vout_n = vs + is * DT / L - ir;
      end else begin
        st = 2;  iin_n = 0.0;   vout_n = vs - ir;
      end
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real ei [2], ev [2];
    int  es [2];
    int  burst;
    real vg_r;
    vout_init = to_sig(250.0);
    v_g = to_sig(0.0);
    i_r = to_sig(0.0);
    repeat (3) @(posedge clk);
    #1;
    for (int m = 0; m < 2; m++) begin
      check(absr(r(v_out[m]) - 250.0) < TOL, "reset loads vout_init");
      check(i_in[m] == 0, "reset clears i_in");
    end
    rst = 1'b0;
    burst = 0;
    vg_r = 200.0;
    for (int k = 0; k < NSTEPS; k++) begin
      // New stimulus, applied away from the clock edge.
      if (burst == 0) begin
        sw    = ($urandom % 100) < 45;
        burst = 1 + ($urandom % 400);
        if (($urandom % 8) == 0) vg_r = real'($urandom % 3500) / 10.0;
        i_r   = to_sig(real'($urandom % 2000) / 1000.0);
      end
      burst--;
      v_g = to_sig(vg_r);
      #1;
      for (int m = 0; m < 2; m++) predict(m, ei[m], ev[m], es[m]);
      @(posedge clk);
      #1;
      for (int m = 0; m < 2; m++) begin
        check(absr(r(iin_s[m]) - ei[m]) < TOL, $sformatf("i_in* step %0d model %0d", k, m));
        check(absr(r(vout_s[m]) - ev[m]) < TOL, $sformatf("v_out* step %0d model %0d", k, m));
        check(int'(state[m]) == es[m], $sformatf("state step %0d model %0d", k, m));
        check(absr(r(v_out[m]) - r(vout_s[m]) * DT / C) < TOL, "v_out output");
        check(absr(r(i_in[m]) - r(iin_s[m]) * DT / L) < TOL, "i_in output");
        seen[m][es[m]]++;
      end
      @(negedge clk);
    end
    for (int m = 0; m < 2; m++) begin
      $display("model %0d: steps in state a=%0d b=%0d c=%0d", m, seen[m][0], seen[m][1], seen[m][2]);
      for (int s = 0; s < 3; s++) check(seen[m][s] > 0, "every state reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NSTEPS + 100) * 20);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
