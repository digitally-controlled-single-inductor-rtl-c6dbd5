// dpwm_sr_latch: the DPWM output latch, built as an edge-triggered set
// flip-flop with an asynchronous clear.
// A rising edge on r (the switching clock) clears q: r is turned into a short
// clear pulse, r AND NOT (r delayed by CLR_PULSE_PS), that drives the
// asynchronous clear of a flip-flop. A later rising edge on s (the clock edge
// after its trip through the delay line) clocks a 1 into the flip-flop and
// sets q. An s edge that arrives while the clear pulse is still high (a delay
// shorter than CLR_PULSE_PS, which only code 0 gives) does not set q, so a
// zero delay leaves q low for the whole period. reset also clears q.
// Interface: s, r, reset in; q out. Default clear pulse 1.5625 ns (dt0 / 2).
// The source names an SR latch with S on the delayed signal and R on the
// clock; the edge-triggered flip-flop form and the clear-pulse width are this
// design's choices.
module dpwm_sr_latch
  import simo_pkg::*;
#(
  parameter int unsigned CLR_PULSE_PS = UNIT_DELAY_PS / 2
) (
  input  logic s,
  input  logic r,
  input  logic reset,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;

  logic r_d, clr;
  unit_delay_cell #(.DELAY_PS(CLR_PULSE_PS)) u_clr_dly (.in_sig(r), .out_sig(r_d));
  assign clr = reset | (r & ~r_d);

  always_ff @(posedge s or posedge clr)
    if (clr) q <= 1'b0;
    else     q <= 1'b1;
endmodule
