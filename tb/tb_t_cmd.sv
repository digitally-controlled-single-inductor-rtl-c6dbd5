// tb_t_cmd: checks that V_SLH stays low through reset and before start, rises
// exactly 100 switching periods (20 us at 5 MHz) after the edge that sees
// start, and then stays high even when start falls; repeats after a reset
// with a one-cycle start pulse.
module tb_t_cmd;
  timeunit 1ps; timeprecision 1ps;
  localparam int TS = 200000, N = 100;
  logic clk = 0, reset = 1, start = 0, v_slh;
  int checks = 0, failures = 0;

  t_cmd dut (.clk(clk), .reset(reset), .start(start), .v_slh(v_slh));
  always #(TS/2) clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic run_once(bit pulse);
    realtime t0;
    int cycles;
    @(negedge clk); reset = 1; start = 0;
    @(negedge clk); reset = 0;
    repeat (20) begin @(negedge clk); chk(v_slh == 0, "low before start"); end
    start = 1;
    @(posedge clk); t0 = $realtime;
    @(negedge clk); if (pulse) start = 0;
    cycles = 0;
    while (v_slh == 0 && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    chk(cycles == N, $sformatf("handover after %0d periods", cycles));
    chk($realtime - t0 > 19.9e6 && $realtime - t0 < 20.1e6, "20 us");
    start = 0;
    repeat (50) begin @(negedge clk); chk(v_slh == 1, "stays high"); end
  endtask

  initial begin
    #(TS * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_once(1'b0);
    run_once(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
