// tb_unified_codec: end-to-end test of the complete codec at its default size.
//
// The transmitter's lines are tied straight to the receiver's (an ideal shielded
// interconnect). Random 4-bit words are sent, one per clock, and every word must
// come out of the decoder one clock after it went in. An independent model of the
// lines checks the encoded word and the control line as well.
//
// Coverage counted, each must happen at least once:
//   - inverted words (control high) and plain words (control low);
//   - each of the five coupling-type detectors firing;
//   - the measured worst case: lines carrying 0111 when data 1000 arrives;
//   - every one of the 16 data words arriving on every one of the 16 line states
//     (the 16 input combinations of the published measurements, from every start);
//   - a reset in the middle of traffic.
// It also prints, for information, how many switching events and worst-case
// three-line groups the raw data would have caused and how many the coded lines saw.
module tb_unified_codec;
  import codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int unsigned NWORDS = 20000;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] data_in, tx_data, data_out;
  logic       tx_ctrl;
  type_vec_t  hit;

  // Ideal interconnect: the receiving end sees the driven lines.
  logic [3:0] rx_data;
  logic       rx_ctrl;
  assign rx_data = tx_data;
  assign rx_ctrl = tx_ctrl;

  unified_codec dut (
    .clk, .rst_n, .data_in, .tx_data, .tx_ctrl, .rx_data, .rx_ctrl, .data_out, .hit
  );

  always #5 clk = ~clk;

  // Coverage and statistics.
  int n_inv = 0, n_pass = 0, n_worst = 0, n_reset = 0;
  int n_type[5] = '{default: 0};
  bit seen[16][16];
  int raw_toggles = 0, line_toggles = 0;
  int raw_rc = 0, line_rc = 0, raw_rlc = 0, line_rlc = 0;

  logic [3:0] m_line = '0;   // model of the lines
  logic       m_ctl = 1'b0;
  logic [3:0] raw_prev = '0; // previous raw data word

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: data_in=%b tx=%b/%b model=%b/%b data_out=%b hit=%b",
               what, $time, data_in, tx_data, tx_ctrl, m_line, m_ctl, data_out, hit);
    end
  endtask

  task automatic send(input logic [3:0] d);
    logic [4:0] h;
    logic       c;
    logic [3:0] nxt;
    @(negedge clk);
    data_in = d;
    #1;
    h = ref_hits(MAXW'(d), MAXW'(m_line), 4);
    check(hit === h, "detector outputs");
    c = (h != 0);
    nxt = c ? ~d : d;
    seen[m_line][d] = 1'b1;
    if (m_line == 4'b0111 && d == 4'b1000) n_worst++;
    for (int k = 0; k < 5; k++) if (h[k]) n_type[k]++;
    if (c) n_inv++; else n_pass++;
    raw_toggles += $countones(d ^ raw_prev);
    line_toggles += $countones(nxt ^ m_line) + int'(c != m_ctl);
    raw_rc += count_type(MAXW'(d), MAXW'(raw_prev), 4, 3) + count_type(MAXW'(d), MAXW'(raw_prev), 4, 4);
    line_rc += count_type(MAXW'(nxt), MAXW'(m_line), 4, 3) + count_type(MAXW'(nxt), MAXW'(m_line), 4, 4);
    raw_rlc += count_type(MAXW'(d), MAXW'(raw_prev), 4, 0) + count_type(MAXW'(d), MAXW'(raw_prev), 4, 1);
    line_rlc += count_type(MAXW'(nxt), MAXW'(m_line), 4, 0) + count_type(MAXW'(nxt), MAXW'(m_line), 4, 1);
    raw_prev = d;
    m_line = nxt;
    m_ctl = c;
    @(posedge clk);
    #1;
    check(tx_data === m_line && tx_ctrl === m_ctl, "encoded lines");
    check(data_out === d, "decoded word one cycle later");
  endtask

  initial begin
    rst_n = 1'b0;
    data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(tx_data === 4'b0000 && tx_ctrl === 1'b0 && data_out === 4'b0000, "after reset");
    send(4'b1000);  // lines become 0111
    send(4'b1000);  // worst case: 1000 against 0111
    for (int i = 0; i < NWORDS; i++) begin
      if (i == NWORDS / 2) begin
        @(negedge clk);
        rst_n = 1'b0;
        data_in = '0;
        #1;
        m_line = '0;
        m_ctl = 1'b0;
        raw_prev = '0;
        check(tx_data === 4'b0000 && tx_ctrl === 1'b0, "mid-run reset");
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
      send(($urandom_range(5) == 0) ? (m_ctl ? ~m_line : m_line) : 4'($urandom));
    end

    // Coverage.
    checks++;
    if (n_inv == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL inverted=%0d plain=%0d: both must occur", n_inv, n_pass);
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_type[k] == 0) begin
        failures++;
        $display("FAIL Type-%0d detector never fired", k);
      end
    end
    checks++;
    if (n_worst == 0) begin
      failures++;
      $display("FAIL worst case 0111 -> 1000 never sent");
    end
    checks++;
    if (n_reset == 0) begin
      failures++;
      $display("FAIL no reset during traffic");
    end
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (!seen[a][b]) begin
          failures++;
          $display("FAIL data %b never sent on lines %b", 4'(b), 4'(a));
        end
      end
    end
    $display("words=%0d inverted=%0d plain=%0d type hits 0..4 = %0d %0d %0d %0d %0d worst-case=%0d",
             n_inv + n_pass, n_inv, n_pass, n_type[0], n_type[1], n_type[2], n_type[3],
             n_type[4], n_worst);
    $display("switching events: raw data %0d, coded lines incl. control %0d", raw_toggles, line_toggles);
    $display("Type-3/4 groups: raw %0d, coded %0d; Type-0/1 groups: raw %0d, coded %0d",
             raw_rc, line_rc, raw_rlc, line_rlc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NWORDS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
