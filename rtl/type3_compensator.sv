// type3_compensator: Type-III digital compensator shared by all outputs.
//
// Each clock (fs) it takes one error sample u = Vref[n] - A/D[n] from the
// time-multiplexed feedback (output 1 and output 2 samples alternate) and runs
// the third-order difference equation of the source
//   y[n] = b0 u[n] + b1 u[n-1] + b2 u[n-2] + b3 u[n-3]
//        - a1 y[n-1] - a2 y[n-2] - a3 y[n-3]
// with the coefficients of simo_pkg, separately for every output: each
// history register is an N_CH-deep shift chain, so the sample of output k is
// filtered with the past samples and results of output k only (one filter
// datapath, N_CH sets of state, interleaved). As in the source's compensator
// model, the result passes a delay register and is added to Vref[n], so the
// word never starts at zero:  D_T3 = sat_0..63(Vref[n] + round(y_k)).
// D_T3 always shows the newest result of the output whose phase comes next
// (chain position N_CH-2; for one output, the plain z^-1), so that the DPWM,
// which takes the word at the following clock edge, applies each output's
// duty in that output's own phase.
//
// Interface: vref and ad are 6-bit unsigned codes; d_t3 is 6-bit unsigned.
// Timing: one sample per rising clk edge, first at the edge after `start`
// was seen high; d_t3 is combinational from the registered state and vref.
// Reset (active high, asynchronous) clears all state, so before start d_t3
// equals Vref.
//
// Design choices not fixed by the source: the fixed-point format (STATE_FRAC
// fractional bits in y, coefficients per simo_pkg), clamping each y state to
// +-Y_LIM codes (anti-windup for the integrator pole at z = 1), saturation of
// D_T3 to 6 bits, and the per-output interleaving of the state.
module type3_compensator
  import simo_pkg::*;
#(
  parameter int unsigned W          = WORD_W,
  parameter int unsigned N_CH       = 2,
  parameter int unsigned STATE_FRAC = 8,
  parameter int          Y_LIM      = 64
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [W-1:0] vref,
  input  logic [W-1:0] ad,
  output logic [W-1:0] d_t3
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned U_W   = W + 1;                          // signed error
  localparam int unsigned Y_W   = $clog2(Y_LIM) + 2 + STATE_FRAC; // signed state
  localparam int unsigned ACC_W = COEF_W + Y_W + 4;
  localparam int unsigned SUM_W = W + 3 + 1;
  localparam int unsigned DEPTH = 3 * N_CH;                       // history per chain
  localparam int unsigned OUT_IDX = (N_CH >= 2) ? N_CH - 2 : 0;

  typedef logic signed [U_W-1:0]   u_t;
  typedef logic signed [Y_W-1:0]   y_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam y_t Y_MAX = y_t'(Y_LIM)  <<< STATE_FRAC;
  localparam y_t Y_MIN = -(y_t'(Y_LIM) <<< STATE_FRAC);

  logic run;
  u_t   u0;
  u_t   u_hist [DEPTH];   // u_hist[0] newest
  y_t   y_hist [DEPTH];
  u_t   u1, u2, u3;       // same output, 1..3 of its samples back
  y_t   y1, y2, y3;
  acc_t acc;
  acc_t y_new_full;
  y_t   y_new;

  assign u0 = u_t'({1'b0, vref}) - u_t'({1'b0, ad});
  assign u1 = u_hist[N_CH - 1];
  assign u2 = u_hist[2 * N_CH - 1];
  assign u3 = u_hist[3 * N_CH - 1];
  assign y1 = y_hist[N_CH - 1];
  assign y2 = y_hist[2 * N_CH - 1];
  assign y3 = y_hist[3 * N_CH - 1];

  // acc carries COEF_FRAC + STATE_FRAC fractional bits
  always_comb begin
    acc = (acc_t'(B0) * acc_t'(u0) + acc_t'(B1) * acc_t'(u1)
         + acc_t'(B2) * acc_t'(u2) + acc_t'(B3) * acc_t'(u3)) <<< STATE_FRAC;
    acc = acc - acc_t'(A1) * acc_t'(y1) - acc_t'(A2) * acc_t'(y2)
              - acc_t'(A3) * acc_t'(y3);
    // round to STATE_FRAC fractional bits (add half, arithmetic shift)
    y_new_full = (acc + (acc_t'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (y_new_full > acc_t'(Y_MAX))      y_new = Y_MAX;
    else if (y_new_full < acc_t'(Y_MIN)) y_new = Y_MIN;
    else                                 y_new = y_t'(y_new_full);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      run <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        u_hist[i] <= '0;
        y_hist[i] <= '0;
      end
    end else begin
      if (start) run <= 1'b1;
      if (run) begin
        u_hist[0] <= u0;
        y_hist[0] <= y_new;
        for (int i = 1; i < int'(DEPTH); i++) begin
          u_hist[i] <= u_hist[i-1];
          y_hist[i] <= y_hist[i-1];
        end
      end
    end
  end

  // D_T3 = Vref + round(y of the next phase's output), saturated
  logic signed [SUM_W-1:0] y_int;
  logic signed [SUM_W-1:0] sum;
  always_comb begin
    y_int = SUM_W'((y_hist[OUT_IDX] + (y_t'(1) <<< (STATE_FRAC - 1))) >>> STATE_FRAC);
    sum   = SUM_W'($signed({1'b0, vref})) + y_int;
    if (sum < 0)                          d_t3 = '0;
    else if (sum > SUM_W'((1 << W) - 1))  d_t3 = '1;
    else                                  d_t3 = W'(sum);
  end
endmodule
