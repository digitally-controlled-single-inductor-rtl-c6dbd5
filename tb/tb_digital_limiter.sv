// tb_digital_limiter: exhaustive check of the limiter. Every 6-bit input is
// applied with the default 5 %..90 % window (4..57) and with random windows;
// the expected output is worked out here from the window rule.
module tb_digital_limiter;
  timeunit 1ps; timeprecision 1ps;
  logic [5:0] d, hi, lo, lim;
  int checks = 0, failures = 0;

  digital_limiter dut (.d_t3(d), .hi_lim(hi), .lo_lim(lo), .lim(lim));

  task automatic check_all(input logic [5:0] h, input logic [5:0] l);
    int exp;
    hi = h; lo = l;
    for (int v = 0; v < 64; v++) begin
      d = 6'(v);
      #1;
      exp = (v > int'(h)) ? int'(h) : (v < int'(l)) ? int'(l) : v;
      checks++;
      if (int'(lim) != exp) begin
        failures++;
        $display("FAIL d=%0d hi=%0d lo=%0d lim=%0d exp=%0d", v, h, l, lim, exp);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, l;
    check_all(6'd57, 6'd4);
    // duty window: 4/64 >= 5 %, 57/64 <= 90 %
    checks++;
    if (!(4.0/64.0 >= 0.05 && 3.0/64.0 < 0.05 && 57.0/64.0 <= 0.90 && 58.0/64.0 > 0.90)) failures++;
    for (int i = 0; i < 20; i++) begin
      l = $urandom_range(0, 40);
      h = $urandom_range(l, 63);
      check_all(6'(h), 6'(l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
