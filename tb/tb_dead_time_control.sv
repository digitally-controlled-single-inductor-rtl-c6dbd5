// tb_dead_time_control: drives phase_control and dead_time_control with a
// 5 MHz phase sequence and a PWM V_LS of varying duty. Checks, sampled every
// 100 ps: NMOS on (v_lg1 = 1) and any PMOS on (v_hg[k] = 0) never overlap;
// only the PMOS of the active phase ever turns on; each turn-on waits 1 ns
// (the dead time) after the opposite switch turned off; v_sel names the
// active phase.
module tb_dead_time_control;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000, DT = 1000;
  logic v_ls = 0;
  logic [1:0] phi = 2'b01, pre, v_hg;
  logic v_lg1, v_sel;
  int checks = 0, failures = 0;
  int nmos_on = 0, pmos_on[2] = '{0, 0};

  phase_control #(.N_OUT(2)) pc (.phi(phi), .v_ls(v_ls), .v_hg_pre(pre));
  dead_time_control #(.N_OUT(2), .DEAD_TIME_PS(DT)) dut (
    .v_ls(v_ls), .v_hg_pre(pre), .phi(phi), .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel));

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // PWM source: new phase and V_LS rise at each period start
  int duty_ps = 20000;
  initial begin
    #(TS/2);
    forever begin
      int d;
      d = duty_ps;
      phi = {phi[0], phi[1]};
      v_ls = 1;
      #(d) v_ls = 0;
      #(TS - d);
    end
  end

  realtime t_ls_rise, t_ls_fall;
  always @(posedge v_ls) t_ls_rise = $realtime;
  always @(negedge v_ls) t_ls_fall = $realtime;
  always @(posedge v_lg1) begin
    nmos_on++;
    chk($realtime - t_ls_rise == DT, "NMOS turn-on waits the dead time");
  end
  for (genvar k = 0; k < 2; k++) begin : g_p
    always @(negedge v_hg[k]) begin
      pmos_on[k]++;
      chk($realtime - t_ls_fall == DT, "PMOS turn-on waits the dead time");
      chk(phi[k] == 1'b1, "only the active phase's PMOS turns on");
    end
  end

  initial begin
    #(TS * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TS + 550);
    for (int n = 0; n < 40000; n++) begin
      #100;
      if (n % 2000 == 0) duty_ps = $urandom_range(10, 90) * 2000;
      chk(!(v_lg1 && (v_hg != 2'b11)), "no NMOS/PMOS overlap");
      chk(v_sel == (phi == 2'b10), "v_sel names the phase");
    end
    chk(nmos_on > 10 && pmos_on[0] > 5 && pmos_on[1] > 5, $sformatf("both switches used %0d %0d %0d", nmos_on, pmos_on[0], pmos_on[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
