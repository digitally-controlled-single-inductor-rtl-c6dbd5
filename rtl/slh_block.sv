// slh_block: smooth loop handover (SLH).
// At start-up the loop is open: the SLH multiplexer forwards the switching
// clock itself (50 % duty) to S0, so the converter runs at a fixed duty and
// whatever the compensator and limiter produce is ignored (masking period).
// When the timing command V_SLH rises (TCMD_CYCLES periods after start), the
// mux switches to the inverted DPWM output and the loop is closed
// (effective period):  S0 = V_SLH ? ~V_DPWM : clk.
// The handover happens on a rising clk edge, where the clock and ~V_DPWM are
// both high, so S0 does not glitch. The mux, inverter and timing generator
// follow the source.
module slh_block #(
  parameter int unsigned TCMD_CYCLES = 100
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic v_dpwm,
  output logic s0,
  output logic v_slh
);
  timeunit 1ps; timeprecision 1ps;

  t_cmd #(.TCMD_CYCLES(TCMD_CYCLES)) u_tcmd (
    .clk(clk), .reset(reset), .start(start), .v_slh(v_slh));

  logic v_dpwm_n;
  assign v_dpwm_n = ~v_dpwm;
  assign s0       = v_slh ? v_dpwm_n : clk;   // SLH_MUX
endmodule
