// tb_transition_detector: exhaustive check of the per-line transition flags.
//
// All 256 (present, previous) pairs of the 4-line bus are applied. For each line
// exactly one flag must be set: rise for 0->1, fall for 1->0, hold otherwise.
// The worst case of the published measurements (previous 0111, present 1000) is
// also checked by name: line 4 rises, lines 1-3 fall.
module tb_transition_detector;
  int checks = 0;
  int failures = 0;

  logic [3:0] cur, prev, rise, fall, hold;

  transition_detector dut (.cur, .prev, .rise, .fall, .hold);

  initial begin
    for (int c = 0; c < 16; c++) begin
      for (int p = 0; p < 16; p++) begin
        cur = 4'(c);
        prev = 4'(p);
        #1;
        for (int k = 0; k < 4; k++) begin
          logic er, ef, eh;
          er = (cur[k] == 1'b1) && (prev[k] == 1'b0);
          ef = (cur[k] == 1'b0) && (prev[k] == 1'b1);
          eh = (cur[k] == prev[k]);
          checks++;
          if (rise[k] !== er || fall[k] !== ef || hold[k] !== eh) begin
            failures++;
            $display("FAIL cur=%b prev=%b line %0d: r/f/h=%b%b%b expected %b%b%b",
                     cur, prev, k, rise[k], fall[k], hold[k], er, ef, eh);
          end
        end
      end
    end
    cur = 4'b1000;
    prev = 4'b0111;
    #1;
    checks++;
    if (rise !== 4'b1000 || fall !== 4'b0111 || hold !== 4'b0000) begin
      failures++;
      $display("FAIL worst case: rise=%b fall=%b hold=%b", rise, fall, hold);
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
