// tb_codec_encoder: cycle-accurate check of the transmitter.
//
// A reference model keeps its own copy of the word on the lines. For each new word
// it computes the coupling types against that copy (codec_ref_pkg), decides on
// inversion and predicts the lines one clock later. Two encoders run side by side
// on the same stream: the default one (all five types) and one limited to the RC
// worst cases (Type-3/4). The stream starts with the measured worst case
// (lines 0111, then data 1000), continues with random words, and is reset once in
// the middle. Checked: detector outputs, lines and control, one-cycle latency.
module tb_codec_encoder;
  import codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int unsigned NWORDS = 3000;

  int checks = 0;
  int failures = 0;
  int n_inv = 0, n_pass = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] data_in;
  logic [3:0] bus_a, bus_r;
  logic       ctrl_a, ctrl_r;
  type_vec_t  hit_a, hit_r;

  codec_encoder dut_all (.clk, .rst_n, .data_in, .bus_data(bus_a), .bus_ctrl(ctrl_a), .hit(hit_a));
  codec_encoder #(.TYPE_MASK(RC_WORST_TYPES)) dut_rc (
    .clk, .rst_n, .data_in, .bus_data(bus_r), .bus_ctrl(ctrl_r), .hit(hit_r));

  always #5 clk = ~clk;

  logic [3:0] m_bus_a = '0, m_bus_r = '0;
  logic       m_ctl_a = 1'b0, m_ctl_r = 1'b0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: data=%b bus_a=%b/%b model=%b/%b bus_r=%b/%b model=%b/%b hit_a=%b",
               what, $time, data_in, bus_a, ctrl_a, m_bus_a, m_ctl_a, bus_r, ctrl_r,
               m_bus_r, m_ctl_r, hit_a);
    end
  endtask

  // Drive one word, check the combinational detector outputs, clock it, check the lines.
  task automatic send(input logic [3:0] d);
    logic [4:0] ha, hr;
    logic ca, cr;
    @(negedge clk);
    data_in = d;
    #1;
    ha = ref_hits(MAXW'(d), MAXW'(m_bus_a), 4);
    hr = ref_hits(MAXW'(d), MAXW'(m_bus_r), 4);
    check(hit_a === ha, "hit (all types)");
    check(hit_r === hr, "hit (RC types)");
    // Before the edge the lines still carry the previous word.
    check(bus_a === m_bus_a && ctrl_a === m_ctl_a, "lines held before edge");
    ca = (ha != 0);
    cr = (hr[4:3] != 0);
    m_bus_a = ca ? ~d : d;
    m_ctl_a = ca;
    m_bus_r = cr ? ~d : d;
    m_ctl_r = cr;
    if (ca) n_inv++; else n_pass++;
    @(posedge clk);
    #1;
    check(bus_a === m_bus_a && ctrl_a === m_ctl_a, "lines (all types)");
    check(bus_r === m_bus_r && ctrl_r === m_ctl_r, "lines (RC types)");
  endtask

  initial begin
    rst_n = 1'b0;
    data_in = '0;
    repeat (2) @(posedge clk);
    #1;
    check(bus_a === 4'b0000 && ctrl_a === 1'b0, "reset value");
    @(negedge clk);
    rst_n = 1'b1;
    // Reach lines = 0111, then send the worst-case word 1000.
    send(4'b1000);
    check(bus_a === 4'b0111 && ctrl_a === 1'b1, "lines 0111 reached");
    send(4'b1000);
    check(hit_a === 5'b00101, "worst case hits Type-0 and Type-2");
    check(bus_a === 4'b0111 && ctrl_a === 1'b1, "worst case sent inverted, lines quiet");
    for (int i = 0; i < NWORDS; i++) begin
      if (i == NWORDS / 2) begin
        @(negedge clk);
        rst_n = 1'b0;
        data_in = '0;  // equals the reset lines, so the free edge below changes nothing
        #1;
        m_bus_a = '0; m_ctl_a = 1'b0; m_bus_r = '0; m_ctl_r = 1'b0;
        check(bus_a === 4'b0000 && bus_r === 4'b0000 && !ctrl_a && !ctrl_r, "mid-run reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
      // Repeat the current line word now and then, so the quiet (no-invert) case occurs.
      send(($urandom_range(3) == 0) ? (m_ctl_a ? ~m_bus_a : m_bus_a) : 4'($urandom));
    end
    checks++;
    if (n_inv == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL invert/pass not both seen: inv=%0d pass=%0d", n_inv, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NWORDS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
