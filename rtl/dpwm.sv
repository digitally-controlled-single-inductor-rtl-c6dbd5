// dpwm: 6-bit segmented delay-line digital pulse-width modulator.
//
// The clock edge travels through three segments, each with taps after
// 0..3 delay elements: coarse (dt2 = 16 dt0 each), moderate (dt1 = 4 dt0) and fine (dt0).
// LIM[5:4] picks the coarse tap, LIM[3:2] the moderate tap and LIM[1:0] the
// fine tap; the coarse output feeds the moderate segment and that feeds the
// fine one, so the clock edge leaves the fine mux LIM * dt0 after it entered
// (MSBs nearest the input, LSBs nearest the output). An SR latch (a set flip-flop),
// cleared by the clock edge and set by the delayed edge, then gives
//   V_DPWM = 0 for LIM * dt0 after each rising clk edge, 1 for the rest,
// so the inverted output (used by the handover mux) is high for LIM/64 of the
// period with dt0 = Ts/64. No counter is used.
//
// Line input and tap-select timing. A delay line fed with the 50 % clock
// has some coarse taps high and others low at any moment, so no instant
// exists at which all three selects can change without dropping the edge or
// inserting a false one. The line is therefore fed with a short pulse that
// starts at the rising clock edge and lasts 2 dt0 (clk AND NOT clk delayed by
// 2 dt0). The pulse has left every coarse and moderate tap before the next
// clock edge, so:
//   coarse and moderate selects load on the rising clock edge (all their
//     taps are low then except tap 0, which carries the new edge itself);
//   fine select loads at 63.5 dt0, after the latest possible set edge
//     (63 dt0). Any step the switch causes at the fine output can only hit a
//     latch that is already set, so it is invisible.
// The strobe comes from clk through a fixed chain of the same delay cells.
// So the word lim present during one period sets the pulse of the next one,
// and every period is exact even when the code changes at every edge.
//
// Interface: clk (fs), reset (active high, clears the selects and the
// latch), lim[5:0] (must be stable from 63 dt0 to the clock edge that ends
// each period; it changes only at clock edges in this design); v_dpwm out.
//
// This is a behavioural model: the delay elements are analog (see
// unit_delay_cell). A synthesis run that drops the # delays turns every
// delay into a wire, so the line pulse clk & ~clk becomes 0 and v_dpwm a
// constant there; the line has to be built from real delay cells. The segmentation, tap order and latch follow the source;
// the pulse-shaped line input, the select-load timing and the value of dt0
// are this design's choices.
module dpwm
  import simo_pkg::*;
#(
  parameter int unsigned UNIT_DELAY = UNIT_DELAY_PS
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [WORD_W-1:0] lim,
  output logic              v_dpwm
);
  timeunit 1ps; timeprecision 1ps;

  // ---- line input: 2 dt0 pulse at each rising clock edge ------------
  logic clk_d2, line_in;
  unit_delay_cell #(.DELAY_PS(2 * UNIT_DELAY)) u_pw (.in_sig(clk), .out_sig(clk_d2));
  assign line_in = clk & ~clk_d2;

  // ---- delay line ----------------------------------------------------
  logic [1:0] sel_c, sel_m, sel_f;
  logic coarse_out, moderate_out, fine_out;

  dpwm_delay_segment #(.LEVEL(2), .DELAY_PS(UNIT_DELAY)) u_coarse (
    .in_sig(line_in), .sel(sel_c), .out_sig(coarse_out));
  dpwm_delay_segment #(.LEVEL(1), .DELAY_PS(UNIT_DELAY)) u_moderate (
    .in_sig(coarse_out), .sel(sel_m), .out_sig(moderate_out));
  dpwm_delay_segment #(.LEVEL(0), .DELAY_PS(UNIT_DELAY)) u_fine (
    .in_sig(moderate_out), .sel(sel_f), .out_sig(fine_out));

  dpwm_sr_latch #(.CLR_PULSE_PS(UNIT_DELAY / 2)) u_latch (.s(fine_out), .r(clk), .reset(reset), .q(v_dpwm));

  // ---- fine select strobe: clk delayed by 63.5 dt0 --------------------
  logic [7:0] s_node;           // clk after 16, 32, 48, 52, 56, 60, 61, 62 dt0
  logic t63, stb_f;

  delay_group #(.LEVEL(2), .DELAY_PS(UNIT_DELAY)) u_s16a (.in_sig(clk),       .out_sig(s_node[0]));
  delay_group #(.LEVEL(2), .DELAY_PS(UNIT_DELAY)) u_s16b (.in_sig(s_node[0]), .out_sig(s_node[1]));
  delay_group #(.LEVEL(2), .DELAY_PS(UNIT_DELAY)) u_s16c (.in_sig(s_node[1]), .out_sig(s_node[2]));
  delay_group #(.LEVEL(1), .DELAY_PS(UNIT_DELAY)) u_s4a  (.in_sig(s_node[2]), .out_sig(s_node[3]));
  delay_group #(.LEVEL(1), .DELAY_PS(UNIT_DELAY)) u_s4b  (.in_sig(s_node[3]), .out_sig(s_node[4]));
  delay_group #(.LEVEL(1), .DELAY_PS(UNIT_DELAY)) u_s4c  (.in_sig(s_node[4]), .out_sig(s_node[5]));
  delay_group #(.LEVEL(0), .DELAY_PS(UNIT_DELAY)) u_s1a  (.in_sig(s_node[5]), .out_sig(s_node[6]));
  delay_group #(.LEVEL(0), .DELAY_PS(UNIT_DELAY)) u_s1b  (.in_sig(s_node[6]), .out_sig(s_node[7]));
  delay_group #(.LEVEL(0), .DELAY_PS(UNIT_DELAY)) u_s1c  (.in_sig(s_node[7]), .out_sig(t63));
  unit_delay_cell #(.DELAY_PS(UNIT_DELAY / 2)) u_h_f (.in_sig(t63), .out_sig(stb_f));

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      sel_c <= '0;
      sel_m <= '0;
    end else begin
      sel_c <= lim[5:4];
      sel_m <= lim[3:2];
    end

  always_ff @(posedge stb_f or posedge reset)
    if (reset) sel_f <= '0; else sel_f <= lim[1:0];
endmodule
