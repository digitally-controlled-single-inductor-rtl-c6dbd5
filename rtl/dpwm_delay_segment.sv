// dpwm_delay_segment: one segment (coarse, moderate or fine) of the DPWM.
// The segment input drives a chain of three delay groups of level LEVEL
// (delay 4^LEVEL unit delays each). Taps 0..3 are the segment input and the
// outputs of the three groups. The source draws four cells per segment; the
// fourth would only load the last tap and drives nothing, so it is left out.
// sel (two bits of the duty code) picks the tap, so the segment adds sel * 4^LEVEL unit delays.
module dpwm_delay_segment
  import simo_pkg::*;
#(
  parameter int unsigned LEVEL    = 0,
  parameter int unsigned DELAY_PS = UNIT_DELAY_PS
) (
  input  logic       in_sig,
  input  logic [1:0] sel,
  output logic       out_sig
);
  timeunit 1ps; timeprecision 1ps;

  logic [3:0] node;
  assign node[0] = in_sig;
  for (genvar i = 0; i < 3; i++) begin : g_cell
    delay_group #(.LEVEL(LEVEL), .DELAY_PS(DELAY_PS)) u_grp (
      .in_sig (node[i]),
      .out_sig(node[i+1])
    );
  end

  dpwm_mux4 u_mux (.tap(node[3:0]), .sel(sel), .y(out_sig));
endmodule
