// tb_or_logic: exhaustive check of the invert decision.
//
// All 32 detector-output vectors are applied to the default block (all five types
// enabled) and to one restricted to the RC worst cases (Type-3 and Type-4).
module tb_or_logic;
  import codec_pkg::*;

  int checks = 0;
  int failures = 0;

  type_vec_t hit;
  logic      ctrl_all, ctrl_rc;

  or_logic dut_all (.hit(hit), .ctrl(ctrl_all));
  or_logic #(.TYPE_MASK(RC_WORST_TYPES)) dut_rc (.hit(hit), .ctrl(ctrl_rc));

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic e_all, e_rc;
      hit = type_vec_t'(v);
      #1;
      e_all = (v != 0);
      e_rc = ((v >> 3) != 0);
      checks += 2;
      if (ctrl_all !== e_all) begin
        failures++;
        $display("FAIL all-types hit=%b ctrl=%b expected=%b", hit, ctrl_all, e_all);
      end
      if (ctrl_rc !== e_rc) begin
        failures++;
        $display("FAIL RC-only hit=%b ctrl=%b expected=%b", hit, ctrl_rc, e_rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
