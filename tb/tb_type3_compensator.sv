// tb_type3_compensator: checks the Type-III compensator against a reference
// model of the difference equation written here with 64-bit integers. The
// reference quantises the transfer-function coefficients itself from their
// decimal values and keeps one independent filter per output: sample i of
// the stream belongs to output i mod N. Two instances are checked, N = 2
// (the default) and N = 3. Checks: (1) D_T3 = Vref before start; (2) the word
// before and after every edge for random sequences; (3) a sample first shows
// in D_T3 right after its edge (N = 2); (4) sustained positive / negative
// errors drive D_T3 up / down; (5) with one output's samples in error and the
// other's not, only the first output's word moves (the state is per output);
// (6) the impulse response of one output follows a floating-point H(z).
module tb_type3_compensator;
  timeunit 1ps; timeprecision 1ps;
  localparam int FRAC = 14, SF = 8, YLIM = 64;
  localparam real BR[4] = '{2.985, -2.696, -2.9785, 2.7031275};
  localparam real AR[4] = '{1.0, -1.962301, 1.193807, -0.231506};
  localparam int NCH[2] = '{2, 3};

  logic clk = 0, reset = 1, start = 0;
  logic [5:0] vref, ad, d_t3, d_t3_3;
  int checks = 0, failures = 0;

  type3_compensator dut (.clk(clk), .reset(reset), .start(start), .vref(vref), .ad(ad), .d_t3(d_t3));
  type3_compensator #(.N_CH(3)) dut3 (.clk(clk), .reset(reset), .start(start), .vref(vref), .ad(ad), .d_t3(d_t3_3));

  always #100000 clk = ~clk;

  longint bq[4], aq[4];
  longint um[2][3][4], ym[2][3][4];   // [model][output][k], k = 1..3 history
  int     edge_n;                     // samples taken since start

  function automatic longint rnd(real r);
    return (r >= 0) ? longint'($floor(r + 0.5)) : -longint'($floor(-r + 0.5));
  endfunction

  function automatic int expected_out(int m, int vr);
    int ch = (edge_n + 1) % NCH[m];    // output whose phase comes next
    longint yi = (ym[m][ch][1] + (64'sd1 <<< (SF-1))) >>> SF;
    longint s  = vr + yi;
    if (s < 0) return 0;
    if (s > 63) return 63;
    return int'(s);
  endfunction

  task automatic model_step(longint u0);
    for (int m = 0; m < 2; m++) begin
      int ch = edge_n % NCH[m];
      longint acc, yn;
      acc = (bq[0]*u0 + bq[1]*um[m][ch][1] + bq[2]*um[m][ch][2] + bq[3]*um[m][ch][3]) * (64'sd1 <<< SF);
      acc = acc - aq[1]*ym[m][ch][1] - aq[2]*ym[m][ch][2] - aq[3]*ym[m][ch][3];
      yn  = (acc + (64'sd1 <<< (FRAC-1))) >>> FRAC;
      if (yn > YLIM*256)  yn = YLIM*256;
      if (yn < -YLIM*256) yn = -YLIM*256;
      um[m][ch][3] = um[m][ch][2]; um[m][ch][2] = um[m][ch][1]; um[m][ch][1] = u0;
      ym[m][ch][3] = ym[m][ch][2]; ym[m][ch][2] = ym[m][ch][1]; ym[m][ch][1] = yn;
    end
    edge_n++;
  endtask

  task automatic restart();
    reset = 1; #1; reset = 0;
    for (int m = 0; m < 2; m++) for (int c = 0; c < 3; c++) for (int k = 0; k < 4; k++) begin
      um[m][c][k] = 0; ym[m][c][k] = 0;
    end
    edge_n = 0;
    @(negedge clk); start = 1; @(posedge clk); #1; start = 0;
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic chk_outputs(string what);
    chk(int'(d_t3) == expected_out(0, int'(vref)), $sformatf("%s N=2 d_t3=%0d exp=%0d", what, d_t3, expected_out(0, int'(vref))));
    chk(int'(d_t3_3) == expected_out(1, int'(vref)), $sformatf("%s N=3 d_t3=%0d exp=%0d", what, d_t3_3, expected_out(1, int'(vref))));
  endtask

  // mode 0 random, 1 small positive error, 2 small negative error,
  // 3 error only on output 0 (even samples)
  task automatic run_cycles(int n, int mode);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      case (mode)
        0: begin vref = 6'($urandom_range(20, 44)); ad = 6'($urandom_range(20, 44)); end
        1: begin vref = 6'd31; ad = 6'd29; end
        2: begin vref = 6'd31; ad = 6'd33; end
        3: begin vref = 6'd31; ad = (edge_n % 2 == 0) ? 6'd27 : 6'd31; end
        default: ;
      endcase
      #1;
      chk_outputs("pre-edge");
      @(posedge clk);
      model_step(longint'(vref) - longint'(ad));
      #1;
      chk_outputs("post-edge");
    end
  endtask

  initial begin
    #(200000 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d_before, w0, w1;
    for (int i = 0; i < 4; i++) begin bq[i] = rnd(BR[i] * 16384.0); aq[i] = rnd(AR[i] * 16384.0); end
    vref = 6'd30; ad = 6'd10;
    repeat (3) @(posedge clk);
    #1; reset = 0;
    // (1) not started: state frozen, output equals Vref
    repeat (5) @(posedge clk);
    #1; chk(d_t3 == 30 && d_t3_3 == 30, "before start");
    // (3) start: the edge that sees start takes no sample yet
    restart();
    chk(d_t3 == 30, "start edge");
    @(negedge clk); @(posedge clk); #1;
    chk(d_t3 != 30, "sample shows right after its edge");
    // (2) random sequences
    restart();
    run_cycles(3000, 0);
    // (4) sustained small positive / negative error
    restart();
    d_before = d_t3;
    run_cycles(60, 1);
    chk(int'(d_t3) > d_before, "positive error raises D_T3");
    restart();
    run_cycles(60, 2);
    chk(int'(d_t3) < 31, "negative error lowers D_T3");
    // (5) independent state per output
    restart();
    run_cycles(80, 3);
    w0 = d_t3;             // 80 samples taken: shows output 1
    run_cycles(1, 3);
    w1 = d_t3;             // shows output 0
    chk(w0 == 31 && w1 > 31, $sformatf("only output 0 moved (%0d, %0d)", w0, w1));
    // (6) impulse response of output 0 against floating point
    begin
      real ur[4], yr[4], yn;
      for (int i = 0; i < 4; i++) begin ur[i] = 0; yr[i] = 0; end
      restart();
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        vref = 6'd32; ad = (n == 0) ? 6'd24 : 6'd32;   // impulse of 8 codes on output 0
        @(posedge clk);
        model_step(longint'(vref) - longint'(ad));
        #1;
        if (n % 2 == 0) begin
          ur[0] = (n == 0) ? 8.0 : 0.0;
          yn = BR[0]*ur[0] + BR[1]*ur[1] + BR[2]*ur[2] + BR[3]*ur[3] - AR[1]*yr[1] - AR[2]*yr[2] - AR[3]*yr[3];
          ur[3] = ur[2]; ur[2] = ur[1]; ur[1] = ur[0];
          yr[3] = yr[2]; yr[2] = yr[1]; yr[1] = yn;
          if (!((yn + 32.0 > 63.0 && d_t3 == 63) || (yn + 32.0 < 0.0 && d_t3 == 0)))
            chk((real'(d_t3) - 32.0 - yn) <= 1.01 && (real'(d_t3) - 32.0 - yn) >= -1.01,
                $sformatf("impulse n=%0d d_t3=%0d float=%f", n, d_t3, yn + 32.0));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
