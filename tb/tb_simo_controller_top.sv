// tb_simo_controller_top: end-to-end test of the control stage at its
// default parameters (5 MHz clock, 6-bit words, 100-period handover, limiter
// window 4..57), closed around a behavioural power stage and ADC.
//
// Sequence: reset; idle periods before start (D_T3 must equal Vref); start;
// 100 masking periods in which S0 must equal the clock; the handover; closed
// loop running on the plant model; then the ADC reading is forced to 0 and
// to 63 for a while (a collapsed and an overshooting output) so that the
// limiter clamps at both ends; then the plant is reconnected.
// Every period it checks, against values computed here: LIM = clamp(D_T3);
// after the handover, S0 is high for exactly LIM * 3125 ps from the rising
// edge, LIM being the word of the previous period (the DPWM takes the word
// present at the clock edge that starts a period); phases alternate and
// V_SEL follows them;
// NMOS and PMOS never conduct together; only the active phase's PMOS turns
// on. It counts how often each mechanism happened (masking period, handover,
// DPWM pulse, hi clamp, lo clamp, in-window pass, PMOS 1 and 2 deliveries,
// dead-time gaps) and fails any that never happened.
module tb_simo_controller_top;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000, D0 = 3125;
  localparam int NPER = 3000;

  logic clk = 0, reset = 1, start = 0;
  logic [5:0] vref = 6'd31;
  logic [5:0] ad, ad_plant;
  logic s0, v_ls, v_lg1, v_slh, v_dpwm;
  logic [1:0] v_hg, phi;
  logic v_sel;
  logic [5:0] d_t3, lim;
  real vo1, vo2, il;
  int checks = 0, failures = 0;
  int force_mode = 0;   // 0 plant, 1 ad = 0, 2 ad = 63

  simo_controller_top dut (
    .clk(clk), .reset(reset), .start(start), .vref(vref), .ad(ad),
    .s0(s0), .v_ls(v_ls), .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel),
    .phi(phi), .v_slh(v_slh), .v_dpwm(v_dpwm), .d_t3(d_t3), .lim(lim));

  // level shifter: same logic level, other supply
  assign v_ls = s0;

  simo_power_stage_model plant (
    .clk(clk), .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel), .r1(45.0), .r2(45.0),
    .ad(ad_plant), .vo1(vo1), .vo2(vo2), .il(il));

  assign ad = (force_mode == 1) ? 6'd0 : (force_mode == 2) ? 6'd63 : ad_plant;

  always #(TS/2) clk = ~clk;

  // mechanism counters
  int n_mask = 0, n_handover = 0, n_pulse = 0, n_hi = 0, n_lo = 0, n_pass = 0;
  int n_pmos[2] = '{0, 0}, n_gap = 0, n_prestart = 0, n_change = 0, n_top = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // continuous safety checks on the gate drives (100 ps grid)
  initial begin
    #(TS * 3 + 50);
    forever begin
      #100;
      chk(!(v_lg1 && v_hg != 2'b11), "NMOS and PMOS on together");
    end
  end
  for (genvar k = 0; k < 2; k++) begin : g_pm
    always @(negedge v_hg[k]) if (!reset) begin
      n_pmos[k]++;
      chk(phi[k], "PMOS outside its phase");
    end
  end
  realtime t_lg_fall;
  always @(negedge v_lg1) t_lg_fall = $realtime;
  always @(negedge v_hg[0] or negedge v_hg[1]) if (!reset && $realtime - t_lg_fall >= 999) n_gap++;

  // watchdog
  initial begin
    #(TS * (NPER + 2000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int started_edge, p;
    logic [5:0] lim_prev, lim_now, lim_last;
    logic [1:0] phi_prev;
    realtime t0, t_fall;
    repeat (3) @(negedge clk);
    reset = 0;
    // idle, not started
    repeat (10) begin
      @(negedge clk);
      n_prestart++;
      chk(d_t3 == vref, "D_T3 = Vref before start");
    end
    start = 1;
    phi_prev = phi;
    lim_prev = lim;
    p = 0;
    while (p < NPER) begin
      @(posedge clk);
      t0 = $realtime;
      #1;
      if (p == 0) started_edge = 0;
      lim_now = lim_prev;   // the word of the last period sets this pulse
      lim_prev = lim;
      chk(phi == {phi_prev[0], phi_prev[1]}, "phases alternate");
      chk(v_sel == phi[1], "V_SEL follows the phase");
      phi_prev = phi;
      // fault injection windows (in closed loop)
      if (p == 1500) force_mode = 1;
      if (p == 1600) force_mode = 0;
      if (p == 2000) force_mode = 2;
      if (p == 2100) force_mode = 0;
      // limiter, against the clamp rule
      if (d_t3 > 6'd57) begin chk(lim == 6'd57, "hi clamp"); n_hi++; end
      else if (d_t3 < 6'd4) begin chk(lim == 6'd4, "lo clamp"); n_lo++; end
      else begin chk(lim == d_t3, "pass"); n_pass++; end
      if (!v_slh) begin
        // masking: S0 is the clock
        #(TS/4); chk(s0 == 1'b1, "masking: S0 high in first half");
        #(TS/2); chk(s0 == 1'b0, "masking: S0 low in second half");
        n_mask++;
        chk(p < 100, "handover no later than 100 periods");
      end else begin
        if (p == 100) n_handover++;
        chk(p >= 100, "handover no earlier than 100 periods");
        // S0 = ~V_DPWM: high from the edge for LIM * dt0, LIM of the last period
        t_fall = -1;
        fork
          begin @(negedge s0); t_fall = $realtime; end
          #(TS - 1000);
        join_any
        disable fork;
        chk(t_fall - t0 == real'(lim_now) * D0,
            $sformatf("S0 width %0t for code %0d", t_fall - t0, lim_now));
        n_pulse++;
        if (lim_now != lim_last) n_change++;
        if (lim_now >= 6'd48) n_top++;
        lim_last = lim_now;
      end
      p++;
      if (p % 200 == 0) $display("period %0d: Vo1=%f Vo2=%f IL=%f D_T3=%0d LIM=%0d", p, vo1, vo2, il, d_t3, lim);
    end
    chk(n_prestart > 0, "pre-start hold seen");
    chk(n_mask == 100, $sformatf("masking periods %0d", n_mask));
    chk(n_handover == 1, "handover seen");
    chk(n_pulse > 100, $sformatf("DPWM pulses checked %0d", n_pulse));
    chk(n_change > 50, $sformatf("code changes checked %0d", n_change));
    chk(n_top > 0, "top coarse tap used");
    chk(n_hi > 0, "hi clamp seen");
    chk(n_lo > 0, "lo clamp seen");
    chk(n_pass > 0, "in-window pass seen");
    chk(n_pmos[0] > 100 && n_pmos[1] > 100, "both outputs served");
    chk(n_gap > 100, "dead time seen");
    chk(vo1 > 1.8 && vo1 < 4.0 && vo2 > 1.8 && vo2 < 4.0, "outputs bounded");
    $display("mechanisms: prestart=%0d mask=%0d handover=%0d pulses=%0d changes=%0d top-tap=%0d hi=%0d lo=%0d pass=%0d pmos1=%0d pmos2=%0d gaps=%0d",
             n_prestart, n_mask, n_handover, n_pulse, n_change, n_top, n_hi, n_lo, n_pass, n_pmos[0], n_pmos[1], n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
