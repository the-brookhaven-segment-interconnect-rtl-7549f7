// tb_si_al_expander: drives random logical AL values and random values on the
// two physical receivers, and checks that both physical drivers carry the
// logical drive and that the logical line seen is the OR of both receivers
// and the own drive.
module tb_si_al_expander;
  import si_pkg::*;
  al_t drv, a_o, b_o, a_i, b_i, seen;
  int  checks = 0, failures = 0;

  si_al_expander dut (.al_drive_i(drv), .al_a_o(a_o), .al_b_o(b_o),
                      .al_a_i(a_i), .al_b_i(b_i), .al_o(seen));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      drv = al_t'($urandom); a_i = al_t'($urandom); b_i = al_t'($urandom);
      if (i % 3 == 0) a_i = '0;
      if (i % 5 == 0) b_i = '0;
      #1;
      for (int k = 0; k < AL_W; k++) begin
        checks++;
        if (a_o[k] != drv[k] || b_o[k] != drv[k] || seen[k] != (a_i[k] || b_i[k] || drv[k])) begin
          failures++;
          $display("FAIL bit %0d drv=%b a_i=%b b_i=%b a_o=%b b_o=%b seen=%b",
                   k, drv[k], a_i[k], b_i[k], a_o[k], b_o[k], seen[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
