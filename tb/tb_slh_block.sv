// tb_slh_block: checks the smooth loop handover. A stand-in DPWM signal with
// a 25 % low pulse after each rising clk edge is applied. Before the handover
// S0 must equal the clock (50 % duty); from the 100th period after start it
// must equal the inverted DPWM signal (25 % duty), with no extra S0 edge at
// the handover instant.
module tb_slh_block;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000;
  logic clk = 0, reset = 1, start = 0, v_dpwm = 1, s0, v_slh;
  int checks = 0, failures = 0;
  int s0_rises = 0, clk_rises = 0;

  slh_block dut (.clk(clk), .reset(reset), .start(start), .v_dpwm(v_dpwm), .s0(s0), .v_slh(v_slh));

  always #(TS/2) clk = ~clk;
  always @(posedge clk) begin v_dpwm <= 1'b0; v_dpwm <= #(TS/4) 1'b1; end
  always @(posedge s0) s0_rises++;
  always @(posedge clk) clk_rises++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    #(TS * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi;
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk); start = 1;
    for (int p = 0; p < 100; p++) begin
      @(posedge clk); hi = 0;
      for (int k = 0; k < 8; k++) begin #((k == 0) ? TS/16 : TS/8); if (s0) hi++; chk(s0 == clk, "masking: S0 = clk"); end
      chk(hi == 4, "masking: 50 % duty");
    end
    chk(v_slh == 0, "V_SLH still low in the 100th period");
    @(posedge clk); #1;
    chk(v_slh == 1, "V_SLH high after 100 periods");
    s0_rises = 0; clk_rises = 0;
    #(TS - 2);
    for (int p = 0; p < 50; p++) begin
      @(posedge clk); hi = 0;
      for (int k = 0; k < 8; k++) begin #((k == 0) ? TS/16 : TS/8); if (s0) hi++; chk(s0 == !v_dpwm, "effective: S0 = ~V_DPWM"); end
      chk(hi == 2, "effective: 25 % duty");
    end
    chk(s0_rises == clk_rises, $sformatf("one S0 edge per period (%0d/%0d)", s0_rises, clk_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
