// simo_controller_top: digital feedback and control stage of a single-inductor
// multiple-output (SIMO) boost converter, with smooth loop handover.
//
// One control loop serves all N_OUT outputs by time multiplexing. Each
// switching period Ts belongs to one output (phase Phi_k from the clock
// divider); in that period the external ADC delivers the scaled voltage of
// output k (Mux_SEN, selected by v_sel), the Type-III compensator turns the
// error Vref - A/D into a duty word D_T3, the limiter keeps it inside the
// 5 %..90 % window, and the delay-line DPWM turns it into a pulse. The SLH
// block first forwards the clock itself (50 % duty) for TCMD_CYCLES periods
// after start, then hands over to the inverted DPWM output. That signal, S0,
// goes out to the level shifter; its level-shifted copy V_LS comes back and
// drives the NMOS switch directly and, through the phase control, the PMOS
// switch of the active output. The dead-time block keeps NMOS and PMOS from
// conducting together.
//
// Ports: clk = fs (5 MHz), reset (active high), start, vref and ad (6-bit
// codes); s0 out / v_ls in (level shifter); v_lg1 (NMOS drive, 1 = on),
// v_hg (PMOS gate levels, 0 = on), v_sel (Mux_SEN select); d_t3, lim, phi,
// v_dpwm and v_slh are brought out for observation.
// The level shifter, ADC, Mux_SEN and sensors, gate drivers and power stage
// are analog and outside this module. Block structure and connections follow
// the source's top-level diagram; the defaults of the limiter window, the
// unit delay and the dead time are this design's choices.
module simo_controller_top
  import simo_pkg::*;
#(
  parameter int unsigned N_OUT         = 2,
  parameter logic [5:0]  HI_LIM        = HI_LIM_DEF,
  parameter logic [5:0]  LO_LIM        = LO_LIM_DEF,
  parameter int unsigned TCMD_CYCLES   = 100,
  parameter int unsigned UNIT_DELAY    = UNIT_DELAY_PS,
  parameter int unsigned DEAD_TIME_PS  = 1000,
  localparam int unsigned SEL_W        = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              start,
  input  logic [WORD_W-1:0] vref,
  input  logic [WORD_W-1:0] ad,
  output logic              s0,
  input  logic              v_ls,
  output logic              v_lg1,
  output logic [N_OUT-1:0]  v_hg,
  output logic [SEL_W-1:0]  v_sel,
  output logic [N_OUT-1:0]  phi,
  output logic              v_slh,
  output logic              v_dpwm,
  output logic [WORD_W-1:0] d_t3,
  output logic [WORD_W-1:0] lim
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_OUT-1:0] v_hg_pre;

  type3_compensator #(.N_CH(N_OUT)) u_comp (
    .clk(clk), .reset(reset), .start(start), .vref(vref), .ad(ad), .d_t3(d_t3));

  digital_limiter u_lim (
    .d_t3(d_t3), .hi_lim(HI_LIM), .lo_lim(LO_LIM), .lim(lim));

  dpwm #(.UNIT_DELAY(UNIT_DELAY)) u_dpwm (
    .clk(clk), .reset(reset), .lim(lim), .v_dpwm(v_dpwm));

  slh_block #(.TCMD_CYCLES(TCMD_CYCLES)) u_slh (
    .clk(clk), .reset(reset), .start(start), .v_dpwm(v_dpwm), .s0(s0), .v_slh(v_slh));

  clock_divider #(.N_OUT(N_OUT)) u_div (
    .clk(clk), .reset(reset), .phi(phi));

  phase_control #(.N_OUT(N_OUT)) u_phase (
    .phi(phi), .v_ls(v_ls), .v_hg_pre(v_hg_pre));

  dead_time_control #(.N_OUT(N_OUT), .DEAD_TIME_PS(DEAD_TIME_PS)) u_dt (
    .v_ls(v_ls), .v_hg_pre(v_hg_pre), .phi(phi),
    .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel));
endmodule
