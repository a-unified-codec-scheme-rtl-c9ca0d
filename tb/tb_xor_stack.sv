// tb_xor_stack: exhaustive check of the conditional inverter.
//
// All 4-bit words with the control low (word passes) and high (word inverted), and
// encode-then-decode through two stacks must return the original word.
module tb_xor_stack;
  int checks = 0;
  int failures = 0;

  logic [3:0] din, mid, dout;
  logic       ctrl;

  xor_stack dut1 (.din(din), .ctrl(ctrl), .dout(mid));
  xor_stack dut2 (.din(mid), .ctrl(ctrl), .dout(dout));

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [3:0] exp;
      din = 4'(v);
      ctrl = v[4];
      #1;
      for (int k = 0; k < 4; k++) exp[k] = ctrl ? !din[k] : din[k];
      checks += 2;
      if (mid !== exp) begin
        failures++;
        $display("FAIL din=%b ctrl=%b dout=%b expected=%b", din, ctrl, mid, exp);
      end
      if (dout !== din) begin
        failures++;
        $display("FAIL round trip din=%b ctrl=%b got=%b", din, ctrl, dout);
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
