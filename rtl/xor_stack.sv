// xor_stack: conditional inverter, one XOR gate per line.
//
// dout = din XOR {W{ctrl}}. The codec uses two of them: on the transmitter side it
// encodes the data word under the invert control, on the receiver side it undoes
// that inversion using the received control line. Purely combinational.
module xor_stack #(
  parameter int unsigned W = codec_pkg::BUS_W
) (
  input  logic [W-1:0] din,
  input  logic         ctrl,
  output logic [W-1:0] dout
);

  assign dout = din ^ {W{ctrl}};

endmodule
