// unified_codec: complete crosstalk-avoiding bus-invert codec, transmitter and receiver.
//
// The transmitter (codec_encoder) drives W encoded data lines and one control line
// (tx_data, tx_ctrl). Between them and the receiver lies the interconnect: the data
// lines run between supply/ground shield rails and the control line is routed
// behind its own shield, so the control line never takes part in the coupling
// patterns. That routing is physical, not logic, so the lines leave this module on
// tx_* and come back on rx_*; tie them together for a direct connection. The
// receiver is XOR stack 2: data_out = rx_data XOR {W{rx_ctrl}}.
//
// Timing: data_in sampled at a rising edge appears on tx_* one cycle later; with
// rx_* tied to tx_*, data_out equals that data_in in the same cycle (the decoder is
// combinational). One word per clock. Reset is active low and asynchronous.
// The block diagram follows the published scheme; see codec_encoder and or_logic
// for the choices made here.
module unified_codec #(
  parameter int unsigned          W         = codec_pkg::BUS_W,
  parameter codec_pkg::type_vec_t TYPE_MASK = codec_pkg::ALL_TYPES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [W-1:0]         data_in,   // word to send
  output logic [W-1:0]         tx_data,   // encoded data lines, driven end
  output logic                 tx_ctrl,   // control line, driven end
  input  logic [W-1:0]         rx_data,   // encoded data lines, receiving end
  input  logic                 rx_ctrl,   // control line, receiving end
  output logic [W-1:0]         data_out,  // decoded word
  output codec_pkg::type_vec_t hit        // coupling-detector outputs (Type-0 .. Type-4)
);

  codec_encoder #(.W(W), .TYPE_MASK(TYPE_MASK)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .data_in (data_in),
    .bus_data(tx_data),
    .bus_ctrl(tx_ctrl),
    .hit     (hit)
  );

  // XOR stack 2: decoder.
  xor_stack #(.W(W)) u_xor2 (
    .din (rx_data),
    .ctrl(rx_ctrl),
    .dout(data_out)
  );

endmodule
