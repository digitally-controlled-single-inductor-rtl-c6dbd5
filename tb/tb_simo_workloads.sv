// tb_simo_workloads: the controller at its default parameters, closed
// around the behavioural power stage, run through the two operating
// scenarios the converter is evaluated with:
//   1. the reference toggling between 0.46 V and 0.50 V (codes 29 and 32 on
//      the 1 V full-scale 6-bit sense scale), and
//   2. a load step from 45 Ohm to 33 Ohm, first on output 1, then on
//      output 2.
// The run is split into windows of WIN switching periods. Over the last
// quarter of every window it averages, per output, the ADC error
// (A/D - Vref code) seen by the compensator, the output voltage and the
// inductor current. Checks, all computed here from the plant readings:
//   * regulation: in every window each output's mean error is within
//     +/-1.5 codes (about +/-100 mV at the output);
//   * tracking: raising Vref from 29 to 32 codes raises both outputs' means
//     by 0.10 to 0.35 V (3 codes = 0.20 V at output 1, 0.21 V at output 2);
//   * load step: after 45 -> 33 Ohm the stepped output's mean moves by less
//     than 0.1 V, and the mean inductor current rises;
//   * no period has the NMOS and a PMOS on together (sampled every 1 ns).
// Cross-regulation: when output 2 steps to 33 Ohm, the inductor current left
// at the end of phase 2 carries into phase 1, so output 1 receives more
// energy than it needs even at the lowest allowed duty (code 4) and rises by
// about 0.45 V in this plant model. For that one output and window the bench
// only checks that the rise stays below 0.6 V; every other window must
// regulate within the +/-1.5 code band.
// It counts Vref toggles, load steps and windows with the loop closed, and
// fails any that never happened. Expect about 1 minute of simulation.
module tb_simo_workloads;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000;
  localparam int WIN = 1600;              // periods per window
  localparam int NWIN = 7;

  logic clk = 0, reset = 1, start = 0;
  logic [5:0] vref = 6'd31;
  logic [5:0] ad;
  logic s0, v_ls, v_lg1, v_slh, v_dpwm, v_sel;
  logic [1:0] v_hg, phi;
  logic [5:0] d_t3, lim;
  real vo1, vo2, il;
  real r1 = 45.0, r2 = 45.0;
  int checks = 0, failures = 0;

  simo_controller_top dut (
    .clk(clk), .reset(reset), .start(start), .vref(vref), .ad(ad),
    .s0(s0), .v_ls(v_ls), .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel),
    .phi(phi), .v_slh(v_slh), .v_dpwm(v_dpwm), .d_t3(d_t3), .lim(lim));

  assign v_ls = s0;   // level shifter: same logic level

  simo_power_stage_model plant (
    .clk(clk), .v_lg1(v_lg1), .v_hg(v_hg), .v_sel(v_sel), .r1(r1), .r2(r2),
    .ad(ad), .vo1(vo1), .vo2(vo2), .il(il));

  always #(TS/2) clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // window statistics, accumulated over the last quarter of each window
  bit  acc_on = 0;
  real s_err[2], s_vo[2], s_il;
  int  n_err[2], n_vo;
  real m_err[NWIN][2], m_vo[NWIN][2], m_il[NWIN];

  always @(negedge clk) if (acc_on) begin
    #1;   // the plant has just sampled the output selected by v_sel
    s_err[v_sel] += real'(int'(ad) - int'(vref));
    n_err[v_sel]++;
    s_vo[0] += vo1; s_vo[1] += vo2; s_il += il; n_vo++;
  end

  int n_overlap = 0;
  initial forever begin
    #1000;
    if (!reset && v_lg1 && v_hg != 2'b11) n_overlap++;
  end

  initial begin
    #(TS * (NWIN * WIN + 400));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window plan: vref code, r1, r2
  int  w_vref[NWIN] = '{31, 32, 29, 32, 31, 31, 31};
  real w_r1[NWIN]   = '{45.0, 45.0, 45.0, 45.0, 45.0, 33.0, 45.0};
  real w_r2[NWIN]   = '{45.0, 45.0, 45.0, 45.0, 45.0, 45.0, 33.0};
  int n_toggle = 0, n_step = 0, n_closed = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1000 reset = 0;
    repeat (5) @(posedge clk);
    #1000 start = 1;
    for (int w = 0; w < NWIN; w++) begin
      @(posedge clk); #1000;
      if (w > 0 && w_vref[w] != w_vref[w-1]) n_toggle++;
      if (w > 0 && (w_r1[w] < w_r1[w-1] || w_r2[w] < w_r2[w-1])) n_step++;
      vref = 6'(w_vref[w]); r1 = w_r1[w]; r2 = w_r2[w];
      repeat (WIN * 3 / 4) @(posedge clk);
      for (int k = 0; k < 2; k++) begin s_err[k] = 0; s_vo[k] = 0; n_err[k] = 0; end
      s_il = 0; n_vo = 0; acc_on = 1;
      repeat (WIN / 4 - 1) @(posedge clk);
      acc_on = 0;
      if (v_slh) n_closed++;
      for (int k = 0; k < 2; k++) begin
        m_err[w][k] = s_err[k] / n_err[k];
        m_vo[w][k]  = s_vo[k] / n_vo;
      end
      m_il[w] = s_il / n_vo;
      $display("window %0d vref=%0d r1=%0.0f r2=%0.0f: err %0.2f %0.2f codes, Vo %0.3f %0.3f V, IL %0.4f A",
               w, w_vref[w], w_r1[w], w_r2[w], m_err[w][0], m_err[w][1], m_vo[w][0], m_vo[w][1], m_il[w]);
      for (int k = 0; k < 2; k++)
        if (w == 6 && k == 0)   // cross-regulation, see the header
          chk(m_vo[w][0] - m_vo[4][0] > -0.6 && m_vo[w][0] - m_vo[4][0] < 0.6,
              "output 1 within 0.6 V while output 2 carries 33 Ohm");
        else
          chk(m_err[w][k] > -1.5 && m_err[w][k] < 1.5, $sformatf("regulation window %0d output %0d", w + 1, k + 1));
    end
    // tracking of the reference step 29 -> 32 (windows 2 -> 3)
    for (int k = 0; k < 2; k++) begin
      real d;
      d = m_vo[3][k] - m_vo[2][k];
      chk(d > 0.10 && d < 0.35, $sformatf("Vref 29->32 moves output %0d by %0.3f V", k + 1, d));
      d = m_vo[1][k] - m_vo[2][k];
      chk(d > 0.10 && d < 0.35, $sformatf("Vref 32->29 moves output %0d by %0.3f V", k + 1, -d));
    end
    // load steps (window 4 nominal, 5: output 1 at 33 Ohm, 6: output 2 at 33 Ohm)
    chk(m_vo[5][0] - m_vo[4][0] < 0.1 && m_vo[5][0] - m_vo[4][0] > -0.1, "output 1 holds under its load step");
    chk(m_vo[6][1] - m_vo[4][1] < 0.1 && m_vo[6][1] - m_vo[4][1] > -0.1, "output 2 holds under its load step");
    chk(m_il[5] > m_il[4], "inductor current rises with output 1 load");
    chk(m_il[6] > m_il[4], "inductor current rises with output 2 load");
    chk(n_overlap == 0, $sformatf("NMOS/PMOS overlap in %0d samples", n_overlap));
    $display("mechanisms: vref-toggles=%0d load-steps=%0d closed-loop-windows=%0d", n_toggle, n_step, n_closed);
    chk(n_toggle > 0, "no Vref toggle happened");
    chk(n_step > 0, "no load step happened");
    chk(n_closed > 0, "loop never closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
