// tb_dpwm: drives every 6-bit code into the DPWM at the 5 MHz switching
// clock and measures the inverted output. For each code held for several
// periods, the steady periods must show exactly one low pulse of V_DPWM per
// period that starts at the rising clk edge and lasts code * 3125 ps
// (code/64 of the period); code 0 keeps V_DPWM low. Then a new random code is
// presented in every period (as the two outputs' codes alternate in the
// converter): each period must carry exactly the pulse of the code presented
// during the period before.
module tb_dpwm;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000, D0 = 3125;
  logic clk = 0, reset = 1;
  logic [5:0] lim = 0;
  logic v_dpwm;
  int checks = 0, failures = 0;

  dpwm dut (.clk(clk), .reset(reset), .lim(lim), .v_dpwm(v_dpwm));

  always #(TS/2) clk = ~clk;

  // measure low time of v_dpwm and count its rising edges in one period
  realtime t_start, t_low_end;
  int rises;
  always @(posedge v_dpwm) begin rises++; t_low_end = $realtime; end

  task automatic measure(input int code, input bit check);
    realtime width;
    @(posedge clk);
    t_start = $realtime; rises = 0; t_low_end = -1;
    #(TS - 10);
    if (check) begin
      checks++;
      if (code == 0) begin
        if (v_dpwm !== 1'b0 || rises != 0) begin failures++; $display("FAIL code 0: rises=%0d", rises); end
      end else begin
        width = t_low_end - t_start;
        if (rises != 1 || width != real'(code * D0) || v_dpwm !== 1'b1) begin
          failures++;
          $display("FAIL code %0d: rises=%0d width=%0t exp=%0d", code, rises, width, code * D0);
        end
      end
    end
  endtask

  initial begin
    #(TS * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[$];
    repeat (3) @(negedge clk);
    reset = 0;
    for (int c = 0; c < 64; c++) codes.push_back(c);
    for (int i = 0; i < 40; i++) codes.push_back($urandom_range(4, 57));
    foreach (codes[i]) begin
      @(negedge clk);
      lim = 6'(codes[i]);
      measure(codes[i], 1'b0);   // transition period
      measure(codes[i], 1'b1);
      measure(codes[i], 1'b1);
    end
    // a different code every period: the code present during one period
    // sets the next period's pulse
    begin
      int prev_code;
      @(negedge clk); lim = 6'd10;
      prev_code = 10;
      for (int i = 0; i < 400; i++) begin
        int c;
        c = (i % 3 == 0) ? $urandom_range(0, 63) : (i % 2 == 0) ? $urandom_range(48, 63) : $urandom_range(0, 15);
        fork
          measure(prev_code, 1'b1);
          begin @(posedge clk); #(TS/2); lim = 6'(c); end
        join
        prev_code = c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
