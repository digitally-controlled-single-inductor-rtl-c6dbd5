// unit_delay_cell: behavioural model of the DPWM unit delay cell.
//
// The cell itself is analog: two current-starved inverters (series R in the
// supply and ground legs) each loaded by a capacitor C, so that a transition
// at in_sig reaches out_sig, with the same polarity, after a delay set by R, C
// and the transistor widths. This model keeps the ports of the cell and
// reproduces only that delay, as an inertial delay of DELAY_PS picoseconds:
// each edge reaches out_sig DELAY_PS later, and a pulse shorter than the
// delay is swallowed, as the RC node of the real cell would do. The default 3125 ps
// makes 64 unit delays equal to one 5 MHz switching period; the source does
// not give the value.
module unit_delay_cell
  import simo_pkg::*;
#(
  parameter int unsigned DELAY_PS = UNIT_DELAY_PS
) (
  input  logic in_sig,
  output logic out_sig
);
  timeunit 1ps; timeprecision 1ps;

  assign #(DELAY_PS) out_sig = in_sig;
endmodule
