// tb_type1_detector: exhaustive check of the Type-1 coupling detector.
//
// Every line of the bus is given each of its three behaviours (hold, rise, fall),
// for all 3^W combinations, on the default 4-line bus and on a 6-line bus. The
// expected output comes from codec_ref_pkg, which computes the coupling of each
// three-line group arithmetically rather than from a pattern list.
module tb_type1_detector;
  import codec_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int fired = 0;

  logic [3:0] rise4, fall4, hold4;
  logic [5:0] rise6, fall6, hold6;
  logic       hit4, hit6;

  type1_detector dut4 (.rise(rise4), .fall(fall4), .hold(hold4), .hit(hit4));
  type1_detector #(.W(6)) dut6 (.rise(rise6), .fall(fall6), .hold(hold6), .hit(hit6));

  // Build cur/prev words from a base-3 code: digit 0 hold, 1 rise, 2 fall.
  task automatic make_words(input int code, input int w, output logic [MAXW-1:0] cur,
                            output logic [MAXW-1:0] prev);
    cur = '0; prev = '0;
    for (int k = 0; k < w; k++) begin
      int dig = code % 3;
      code = code / 3;
      case (dig)
        0: begin cur[k] = 1'($urandom_range(1)); prev[k] = cur[k]; end
        1: begin cur[k] = 1'b1; prev[k] = 1'b0; end
        default: begin cur[k] = 1'b0; prev[k] = 1'b1; end
      endcase
    end
  endtask

  initial begin
    logic [MAXW-1:0] cur, prev;
    logic exp;
    for (int code = 0; code < 81; code++) begin
      make_words(code, 4, cur, prev);
      rise4 = cur[3:0] & ~prev[3:0];
      fall4 = ~cur[3:0] & prev[3:0];
      hold4 = ~(cur[3:0] ^ prev[3:0]);
      #1;
      exp = ref_hits(cur, prev, 4)[1];
      checks++;
      if (hit4 !== exp) begin
        failures++;
        $display("FAIL W=4 cur=%b prev=%b hit=%b expected=%b", cur[3:0], prev[3:0], hit4, exp);
      end
      if (exp) fired++;
    end
    for (int code = 0; code < 729; code++) begin
      make_words(code, 6, cur, prev);
      rise6 = cur[5:0] & ~prev[5:0];
      fall6 = ~cur[5:0] & prev[5:0];
      hold6 = ~(cur[5:0] ^ prev[5:0]);
      #1;
      exp = ref_hits(cur, prev, 6)[1];
      checks++;
      if (hit6 !== exp) begin
        failures++;
        $display("FAIL W=6 cur=%b prev=%b hit=%b expected=%b", cur[5:0], prev[5:0], hit6, exp);
      end
    end
    checks++;
    if (fired == 0) begin
      failures++;
      $display("FAIL Type-1 never expected on the 4-line bus");
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
