// tb_unit_delay_cell: applies pulses of several widths to the unit delay cell
// and to delay groups of level 1 and 2, and checks that every edge arrives
// after exactly 1, 4 and 16 unit delays (3125 ps each) with its polarity,
// and that a pulse shorter than one unit delay does not pass.
module tb_unit_delay_cell;
  timeunit 1ps; timeprecision 1ps;
  localparam int D0 = 3125;
  logic a = 0;
  logic y0, y1, y2;
  int checks = 0, failures = 0;

  unit_delay_cell dut (.in_sig(a), .out_sig(y0));
  delay_group #(.LEVEL(1)) g1 (.in_sig(a), .out_sig(y1));
  delay_group #(.LEVEL(2)) g2 (.in_sig(a), .out_sig(y2));


  task automatic expect_at(ref logic sig, input logic lvl, input realtime t, input string nm);
    checks++;
    if (sig !== lvl) begin failures++; $display("FAIL %s level %0b at %0t", nm, sig, $time); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    for (int w = 1; w <= 3; w++) begin
      int width;
      width = w * 60000;
      a = 1;
      #(D0 - 1);   expect_at(y0, 1'b0, $realtime, "unit before");
      #2;          expect_at(y0, 1'b1, $realtime, "unit after");
      #(4*D0 - D0 - 2); expect_at(y1, 1'b0, $realtime, "dt1 before");
      #2;          expect_at(y1, 1'b1, $realtime, "dt1 after");
      #(16*D0 - 4*D0 - 2); expect_at(y2, 1'b0, $realtime, "dt2 before");
      #2;          expect_at(y2, 1'b1, $realtime, "dt2 after");
      #(width - 16*D0 - 1);
      a = 0;
      #(D0 - 1);   expect_at(y0, 1'b1, $realtime, "unit fall before");
      #2;          expect_at(y0, 1'b0, $realtime, "unit fall after");
      #(16*D0 - D0 - 2); expect_at(y2, 1'b1, $realtime, "dt2 fall before");
      #2;          expect_at(y2, 1'b0, $realtime, "dt2 fall after");
      #100000;
    end
    // a pulse shorter than the delay is swallowed (inertial delay)
    a = 1; #1000; a = 0;
    #(D0 - 1000 + 10); expect_at(y0, 1'b0, $realtime, "short pulse");
    #1000;             expect_at(y0, 1'b0, $realtime, "short pulse end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
