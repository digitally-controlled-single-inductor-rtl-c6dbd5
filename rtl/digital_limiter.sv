// digital_limiter: passes the compensator word D_T3 to the DPWM only inside
// the window [lo_lim, hi_lim]; above the window it outputs hi_lim, below it
// lo_lim. With the default window (4..57 of 64) the DPWM duty stays between
// 5 % and 90 %, as the source requires.
// Interface: all words 6-bit unsigned; lim is combinational in d_t3, so the
// limited word follows D_T3 in the same clock period.
// The comparison order follows the source's flowchart; a word equal to a
// limit is treated as inside the window (the source's text says "falls
// within the limit"), which is this design's reading. The window comes in on
// ports so that it can be trimmed.
module digital_limiter
  import simo_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic [W-1:0] d_t3,
  input  logic [W-1:0] hi_lim,
  input  logic [W-1:0] lo_lim,
  output logic [W-1:0] lim
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    if (d_t3 <= hi_lim && d_t3 >= lo_lim) lim = d_t3;
    else if (d_t3 > hi_lim)               lim = hi_lim;
    else                                  lim = lo_lim;
  end
endmodule
