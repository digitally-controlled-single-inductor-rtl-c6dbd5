// clock_divider: divides the switching clock fs by the number of outputs
// N_OUT and produces the phases Phi_1..Phi_N. The phases are one-hot; each is
// high for one switching period Ts and they follow each other in order, so
// each repeats every Tph = N_OUT * Ts (fs/n, 2.5 MHz for two outputs).
// It is a one-hot ring of N_OUT flip-flops rather than a counter. Phi_1 is
// high in the first period after reset; phases advance on rising clk edges.
// The source draws the divider fed from node S0, whose rising edges coincide
// with the clock's; clocking it from fs is this design's choice.
module clock_divider #(
  parameter int unsigned N_OUT = 2
) (
  input  logic             clk,
  input  logic             reset,
  output logic [N_OUT-1:0] phi
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) phi <= N_OUT'(1);
    else if (N_OUT == 1) phi <= phi;
    else       phi <= {phi[N_OUT-2:0], phi[N_OUT-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot(phi));
endmodule
