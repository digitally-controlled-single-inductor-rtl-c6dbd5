// t_cmd: timing command of the smooth loop handover.
// V_SLH is 0 from reset until TCMD_CYCLES switching periods after start was
// first seen high, and 1 from then on (held until reset). With fs = 5 MHz the
// default of 100 periods is the 20 us handover time of the source.
// The source makes this delay with delay cells or an RC charge followed by
// inverters; here it is counted in switching-clock periods, which gives the
// same time from the same clock and is this design's choice.
// Timing: v_slh rises on a rising clk edge (registered output).
module t_cmd #(
  parameter int unsigned TCMD_CYCLES = 100
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  output logic v_slh
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CW = $clog2(TCMD_CYCLES + 1);

  logic          started;
  logic [CW-1:0] elapsed;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      started <= 1'b0;
      elapsed <= '0;
      v_slh   <= 1'b0;
    end else begin
      if (start) started <= 1'b1;
      if ((started || start) && !v_slh) begin
        elapsed <= elapsed + 1'b1;
        if (elapsed == CW'(TCMD_CYCLES)) v_slh <= 1'b1;
      end
    end
  end
endmodule
