// delay_group: one delay element of the segmented DPWM, built recursively
// from the unit delay cell. A group of LEVEL 0 is a single unit cell (dt0);
// a group of LEVEL k is four groups of LEVEL k-1 in series, so its delay is
// 4^k unit delays (dt1 = 4 dt0, dt2 = 16 dt0), as the source builds its
// intermediate and coarse cells from the unit cell.
// Interface: in_sig -> out_sig, same polarity, delayed by 4^LEVEL * DELAY_PS.
module delay_group
  import simo_pkg::*;
#(
  parameter int unsigned LEVEL    = 0,
  parameter int unsigned DELAY_PS = UNIT_DELAY_PS
) (
  input  logic in_sig,
  output logic out_sig
);
  timeunit 1ps; timeprecision 1ps;

  if (LEVEL == 0) begin : g_unit
    unit_delay_cell #(.DELAY_PS(DELAY_PS)) u_cell (.in_sig(in_sig), .out_sig(out_sig));
  end else begin : g_group
    logic [4:0] node;
    assign node[0] = in_sig;
    for (genvar i = 0; i < 4; i++) begin : g_sub
      delay_group #(.LEVEL(LEVEL - 1), .DELAY_PS(DELAY_PS)) u_sub (
        .in_sig (node[i]),
        .out_sig(node[i+1])
      );
    end
    assign out_sig = node[4];
  end
endmodule
