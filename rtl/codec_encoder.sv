// codec_encoder: transmitter side of the crosstalk-avoiding bus-invert codec.
//
// Each clock it takes a new W-bit word, compares it with the word last driven onto
// the lines (transition_detector), classifies every group of three adjacent lines
// into coupling Type-0 .. Type-4 (type0_detector .. type4_detector), ORs the
// enabled types into the invert decision (or_logic) and sends the word, inverted
// when the decision is high, through an XOR row (xor_stack). The encoded word and
// the control bit are registered; the registered word is also the "previous word"
// of the next comparison, so the comparison is against what the lines really carry.
//
// Timing: data_in is sampled on the rising clock edge; bus_data/bus_ctrl change one
// cycle later and stay until the next edge. One word per clock, no handshake.
// hit shows the detector outputs for the word now on data_in.
// Reset (active low, asynchronous) clears the lines and the control line to 0.
// The block structure follows the published scheme; the register placement,
// reset and the type mask are this design's choices.
module codec_encoder #(
  parameter int unsigned          W         = codec_pkg::BUS_W,
  parameter codec_pkg::type_vec_t TYPE_MASK = codec_pkg::ALL_TYPES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         data_in,   // present data word
  output logic [W-1:0]         bus_data,  // encoded data lines
  output logic                 bus_ctrl,  // shielded control line
  output codec_pkg::type_vec_t hit        // Type-k detector outputs
);

  logic [W-1:0] rise, fall, hold;
  logic         ctrl;
  logic [W-1:0] enc;

  transition_detector #(.W(W)) u_trans (
    .cur (data_in),
    .prev(bus_data),
    .rise(rise),
    .fall(fall),
    .hold(hold)
  );

  type0_detector #(.W(W)) u_type0 (.rise, .fall, .hit(hit[codec_pkg::TYPE0]));
  type1_detector #(.W(W)) u_type1 (.rise, .fall, .hold, .hit(hit[codec_pkg::TYPE1]));
  type2_detector #(.W(W)) u_type2 (.rise, .fall, .hold, .hit(hit[codec_pkg::TYPE2]));
  type3_detector #(.W(W)) u_type3 (.rise, .fall, .hold, .hit(hit[codec_pkg::TYPE3]));
  type4_detector #(.W(W)) u_type4 (.rise, .fall, .hit(hit[codec_pkg::TYPE4]));

  or_logic #(.TYPE_MASK(TYPE_MASK)) u_or (
    .hit (hit),
    .ctrl(ctrl)
  );

  // XOR stack 1: encoder.
  xor_stack #(.W(W)) u_xor1 (
    .din (data_in),
    .ctrl(ctrl),
    .dout(enc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_data <= '0;
      bus_ctrl <= 1'b0;
    end else begin
      bus_data <= enc;
      bus_ctrl <= ctrl;
    end
  end

endmodule
