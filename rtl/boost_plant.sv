// boost_plant: fixed-point, cycle-stepped model of a boost converter with
// first-order losses, for closing the loop around a digital controller.
//
// Each enabled clock cycle is one time step k of length DT. The model keeps
// two scaled state variables instead of the physical ones,
//   iin_s  = (L/DT) * i_in     and     vout_s = (C/DT) * v_out,
// so the integration needs no multiplication by DT/L or DT/C:
//   (a) switch closed          iin_s += v_g' - iin_s*(R_L*+R_M*)
//                              vout_s -= i_R
//   (b) switch open, D on      iin_s += v_g' - (v_out + v_D + iin_s*R_L*)
//                              vout_s += i_in - i_R
//   (c) switch open, D off     iin_s  = 0
//                              vout_s -= i_R
// with R* = (DT/L)*R and v_g' = v_g - v_B when v_g > v_B, else 0. The three
// products (iin_s*R*, v_out = vout_s*DT/C and i_in = iin_s*DT/L) all read the
// state registers, so they run side by side and no product feeds another.
// These equations, the three states and the Table-I component values
// (parameter defaults) follow the source.
//
// Choices of this design: every right-hand side uses the values of step k-1
// (explicit Euler), also where the equations write i_in(k) or v_out(k);
// state (c) is taken when the open-switch update of (b) would leave the
// current at or below zero; a closed-switch update cannot drive the current
// negative either (the diode bridge blocks reverse current), so it is
// clamped at zero. With LOSSES = 0 the model is the ideal one of Fig. 2(a).
// The load current i_R is a free input, so any load can be modelled.
//
// Interface: sw = 1 closes the switch Q for the step. v_g is the rectified
// line voltage, i_r the load current, both in hil_pkg::sig_t (volts,
// amperes). v_out and i_in are combinational functions of the state
// registers and show the result of the last step; state is the state that
// step was in. A synchronous reset sets i_in to 0 and v_out to vout_init.
module boost_plant
  import hil_pkg::*;
#(
  parameter real DT      = 10.0e-9,  // step length, s
  parameter real L_H     = 5.0e-3,   // inductance L, H
  parameter real C_F     = 100.0e-6, // output capacitance C, F
  parameter real R_L_OHM = 0.6965,   // inductor series resistance, ohm
  parameter real R_M_OHM = 0.4,      // MOSFET on resistance, ohm
  parameter real V_D_V   = 1.03,     // diode D forward drop, V
  parameter real V_B_V   = 1.14,     // diode bridge drop, V
  parameter bit  LOSSES  = 1'b1      // 1: model with losses, 0: ideal model
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         sw,
  input  sig_t         v_g,
  input  sig_t         i_r,
  input  sig_t         vout_init,
  output sig_t         v_out,
  output sig_t         i_in,
  output plant_state_e state,
  output st_t          vout_s,
  output st_t          iin_s
);

  // Coefficients, computed at elaboration from the physical values.
  localparam coef_t K_DT_L = to_coef(DT / L_H);
  localparam coef_t K_DT_C = to_coef(DT / C_F);
  localparam coef_t K_RA   = LOSSES ? to_coef(DT / L_H * (R_L_OHM + R_M_OHM)) : '0;
  localparam coef_t K_RB   = LOSSES ? to_coef(DT / L_H * R_L_OHM) : '0;
  localparam sig_t  VB     = LOSSES ? to_sig(V_B_V) : '0;
  localparam st_t   VD     = LOSSES ? to_st(V_D_V) : '0;
  // C/DT with 16 fractional bits, only used to load the initial voltage.
  localparam int    CDT_F  = 16;
  localparam longint CDT   = longint'(C_F / DT * 2.0**CDT_F);

  localparam int PW = COEF_F + ST_W;  // wide enough for every slice below

  logic signed [PW-1:0] p_vout, p_iin, p_drop_a, p_drop_b;
  logic signed [ST_W+CDT_F-1:0] p_init;
  st_t  drop_a, drop_b, vout_v, iin_a, vgp, cand_a, cand_b;
  sig_t vgp_sig;
  st_t  iin_n, vout_n;
  plant_state_e state_n;

  function automatic st_t sig2st(sig_t x);
    return st_t'(x);  // sign extension, same binary point
  endfunction

  always_comb begin
    // Parallel products on the state registers.
    p_vout   = vout_s * $signed({1'b0, K_DT_C});
    p_iin    = iin_s  * $signed({1'b0, K_DT_L});
    p_drop_a = iin_s  * $signed({1'b0, K_RA});
    p_drop_b = iin_s  * $signed({1'b0, K_RB});
    v_out    = p_vout[COEF_F +: SIG_W];
    i_in     = p_iin[COEF_F +: SIG_W];
    vout_v   = p_vout[COEF_F +: ST_W];
    iin_a    = p_iin[COEF_F +: ST_W];
    drop_a   = p_drop_a[COEF_F +: ST_W];
    drop_b   = p_drop_b[COEF_F +: ST_W];

    // Output of the diode bridge.
    vgp_sig  = (v_g > VB) ? v_g - VB : '0;
    vgp      = sig2st(vgp_sig);

    cand_a   = iin_s + vgp - drop_a;
    cand_b   = iin_s + vgp - (vout_v + VD + drop_b);

    if (sw) begin
      state_n = ST_A_SW_CLOSED;
      iin_n   = (cand_a > 0) ? cand_a : '0;
      vout_n  = vout_s - sig2st(i_r);
    end else if (cand_b > 0) begin
      state_n = ST_B_DIODE_ON;
      iin_n   = cand_b;
      vout_n  = vout_s + iin_a - sig2st(i_r);
    end else begin
      state_n = ST_C_DIODE_OFF;
      iin_n   = '0;
      vout_n  = vout_s - sig2st(i_r);
    end

    p_init = (ST_W+CDT_F)'(vout_init) * (ST_W+CDT_F)'(CDT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      iin_s  <= '0;
      vout_s <= p_init[CDT_F +: ST_W];
      state  <= ST_C_DIODE_OFF;
    end else if (en) begin
      iin_s  <= iin_n;
      vout_s <= vout_n;
      state  <= state_n;
    end
  end

  // The inductor current never reverses, and it is zero whenever the diode
  // blocks with the switch open.
  a_iin_nonneg: assert property (@(posedge clk) disable iff (rst) iin_s >= 0);
  a_state_c:    assert property (@(posedge clk) disable iff (rst)
                                 state == ST_C_DIODE_OFF |-> iin_s == 0);

endmodule
