// simo_power_stage_model: behavioural model, for testbenches only, of the
// analog side of the converter: the single-inductor dual-output boost power
// stage, the output sensors k1, k2, the sensing multiplexer and the 6-bit ADC.
//
// Power stage (explicit Euler, 1 ns step): with the NMOS on the inductor
// charges from Vin; with PMOS k on it discharges into output k; with every
// switch off (dead time) it discharges through the body diode of the
// high-side switch into the lower output, with a 0.5 V drop; the current is
// not allowed to reverse. Each output is a capacitor with a resistive load.
// Values: Vin 1.8 V, L 600 nH (DCR 190 mOhm), C 2 uF; the load
// resistances r1, r2 are inputs (nominal 45 Ohm) so that a bench can step them.
// Sensing: V_SEN = Vo_k * k_k, k_k = 0.48 V / target_k (targets 2.0 V and
// 2.2 V), selected by v_sel. ADC: full scale 1 V, 6 bits, sampled at the
// falling clk edge and held, so the compensator sees the sample taken in the
// middle of the current phase at the next rising edge.
module simo_power_stage_model #(
  parameter real VIN    = 1.8,
  parameter real L_H    = 600e-9,
  parameter real DCR    = 0.19,
  parameter real C_F    = 2e-6,
  parameter real VTGT1  = 2.0,
  parameter real VTGT2  = 2.2,
  parameter real VREF_V = 0.48,
  parameter real ADC_FS = 1.0
) (
  input  logic       clk,
  input  logic       v_lg1,     // NMOS drive, 1 = on
  input  logic [1:0] v_hg,      // PMOS gates, 0 = on
  input  logic       v_sel,
  input  real        r1,        // load resistance of output 1, ohm
  input  real        r2,        // load resistance of output 2, ohm
  output logic [5:0] ad,
  output real        vo1,
  output real        vo2,
  output real        il
);
  timeunit 1ps; timeprecision 1ps;
  localparam real DT = 1e-9;

  real i1, i2, vx, dil;

  initial begin vo1 = VIN; vo2 = VIN; il = 0.0; ad = '0; end

  always #1000 begin
    i1 = 0.0; i2 = 0.0;
    if (v_lg1)            vx = 0.0;
    else if (!v_hg[0])    begin vx = vo1; i1 = il; end
    else if (!v_hg[1])    begin vx = vo2; i2 = il; end
    else if (il > 0.0)    begin
      if (vo1 < vo2) begin vx = vo1 + 0.5; i1 = il; end
      else           begin vx = vo2 + 0.5; i2 = il; end
    end else vx = VIN;
    dil = (VIN - vx - il * DCR) / L_H * DT;
    il  = il + dil;
    if (il < 0.0) il = 0.0;
    vo1 = vo1 + (i1 - vo1 / r1) / C_F * DT;
    vo2 = vo2 + (i2 - vo2 / r2) / C_F * DT;
  end

  function automatic logic [5:0] quantise(real v);
    real c = v / ADC_FS * 64.0;
    if (c < 0.0) return 6'd0;
    if (c > 63.0) return 6'd63;
    return 6'($rtoi(c + 0.5));
  endfunction

  always @(negedge clk)
    ad <= quantise(v_sel ? vo2 * (VREF_V / VTGT2) : vo1 * (VREF_V / VTGT1));
endmodule
