// dpwm_mux4: 4-to-1 tap selector of one DPWM delay segment. sel picks tap[sel].
// Purely combinational.
module dpwm_mux4 (
  input  logic [3:0] tap,
  input  logic [1:0] sel,
  output logic       y
);
  timeunit 1ps; timeprecision 1ps;

  always_comb y = tap[sel];
endmodule
