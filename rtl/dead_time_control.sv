// dead_time_control: behavioural model of the dead-time block between the
// phase control and the gate drivers.
//
// V_LS high means "charge the inductor": the NMOS switch is on and all PMOS
// switches are off. V_LS low in phase k lets PMOS k deliver the energy to
// output k. To keep the NMOS and the PMOS from conducting together, each
// switch turns on DEAD_TIME_PS after the other has turned off:
//   v_lg1   = V_LS & V_LS(t - DT)              NMOS drive, 1 = on
//   v_hg[k] = V_HGk_PRE | V_HGk_PRE(t - DT)    PMOS gate, 0 = on
// Turn-off is immediate, turn-on delayed. v_sel is the index of the active
// phase (0 in Phi_1, 1 in Phi_2) and selects the sensed output in Mux_SEN.
//
// The source names this block and draws its inputs and outputs, but gives
// neither its circuit nor the dead time; the equations, the 1 ns default and
// taking v_sel from the phase signals are this design's choices. The delay
// is analog, so this is a behavioural model (inertial delays).
module dead_time_control #(
  parameter int unsigned N_OUT        = 2,
  parameter int unsigned DEAD_TIME_PS = 1000,
  localparam int unsigned SEL_W       = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             v_ls,
  input  logic [N_OUT-1:0] v_hg_pre,
  input  logic [N_OUT-1:0] phi,
  output logic             v_lg1,
  output logic [N_OUT-1:0] v_hg,
  output logic [SEL_W-1:0] v_sel
);
  timeunit 1ps; timeprecision 1ps;

  logic             v_ls_d;
  logic [N_OUT-1:0] pre_d;

  assign #(DEAD_TIME_PS) v_ls_d = v_ls;
  assign #(DEAD_TIME_PS) pre_d  = v_hg_pre;

  assign v_lg1 = v_ls & v_ls_d;
  assign v_hg  = v_hg_pre | pre_d;

  always_comb begin
    v_sel = '0;
    for (int k = 0; k < N_OUT; k++)
      if (phi[k]) v_sel = SEL_W'(k);
  end
endmodule
