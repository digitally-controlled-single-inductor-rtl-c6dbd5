// tb_phase_control: exhaustive check of the phase steering for two and three
// outputs: the pre-drive of the active phase follows V_LS, every other one is
// held at 1 (PMOS off).
module tb_phase_control;
  timeunit 1ps; timeprecision 1ps;
  logic [1:0] phi2, pre2;
  logic [2:0] phi3, pre3;
  logic v_ls;
  int checks = 0, failures = 0;

  phase_control #(.N_OUT(2)) p2 (.phi(phi2), .v_ls(v_ls), .v_hg_pre(pre2));
  phase_control #(.N_OUT(3)) p3 (.phi(phi3), .v_ls(v_ls), .v_hg_pre(pre3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++)
      for (int l = 0; l < 2; l++) begin
        v_ls = l[0];
        phi2 = (k < 2) ? 2'(1 << k) : 2'b00;
        phi3 = 3'(1 << k);
        #1;
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (pre3[j] != ((j == k) ? v_ls : 1'b1)) begin failures++; $display("FAIL N3 k=%0d j=%0d", k, j); end
          if (j < 2) begin
            checks++;
            if (pre2[j] != ((j == k) ? v_ls : 1'b1)) begin failures++; $display("FAIL N2 k=%0d j=%0d", k, j); end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
