// phase_control: phase steering of the high-side (PMOS) pre-drive signals.
// In phase Phi_k the level-shifted PWM signal V_LS goes to V_HGk_PRE; every
// other pre-drive is tied to V_supply (logic 1, PMOS gate high = off), so
// only the output of the active phase can take the inductor energy:
//   V_HGk_PRE = Phi_k ? V_LS : 1.
// This follows the source's switch diagram. Purely combinational.
module phase_control #(
  parameter int unsigned N_OUT = 2
) (
  input  logic [N_OUT-1:0] phi,
  input  logic             v_ls,
  output logic [N_OUT-1:0] v_hg_pre
);
  timeunit 1ps; timeprecision 1ps;

  always_comb
    for (int k = 0; k < N_OUT; k++) v_hg_pre[k] = phi[k] ? v_ls : 1'b1;
endmodule
