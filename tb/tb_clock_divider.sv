// tb_clock_divider: for 2 outputs (and 3, to exercise the parameter) checks
// that the phases are one-hot, start with Phi_1 after reset, advance by one
// each switching period, and that each phase repeats every N periods
// (fs/N: 2.5 MHz at fs = 5 MHz for two outputs).
module tb_clock_divider;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000;
  logic clk = 0, reset = 1;
  logic [1:0] phi2;
  logic [2:0] phi3;
  int checks = 0, failures = 0;

  clock_divider #(.N_OUT(2)) d2 (.clk(clk), .reset(reset), .phi(phi2));
  clock_divider #(.N_OUT(3)) d3 (.clk(clk), .reset(reset), .phi(phi3));
  always #(TS/2) clk = ~clk;

  initial begin
    #(TS * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime last_rise;
    repeat (2) @(negedge clk);
    checks++; if (phi2 != 2'b01 || phi3 != 3'b001) failures++;
    reset = 0;
    last_rise = -1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      checks++;
      if (phi2 != (2'b01 << ((n + 1) % 2))) begin failures++; $display("FAIL n=%0d phi2=%b", n, phi2); end
      checks++;
      if (phi3 != (3'b001 << ((n + 1) % 3))) begin failures++; $display("FAIL n=%0d phi3=%b", n, phi3); end
    end
    // period of Phi_1 = 2 Ts
    @(posedge phi2[0]); last_rise = $realtime;
    @(posedge phi2[0]);
    checks++; if ($realtime - last_rise != 2.0 * TS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
