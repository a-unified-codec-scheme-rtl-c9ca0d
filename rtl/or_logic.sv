// or_logic: bus-invert decision.
//
// ORs the Type-0 .. Type-4 coupling-detector outputs into the one-bit control
// signal. When it is high the transmitter sends the inverted word and raises the
// shielded control line.
//
// hit[k] is the Type-k detector output. TYPE_MASK selects which types take part;
// its default ORs all five, as the published scheme does. The mask is this design's
// addition: codec_pkg::RC_WORST_TYPES (Type-3/4) or codec_pkg::RLC_WORST_TYPES
// (Type-0/1) give codecs aimed at one line model only. Purely combinational.
module or_logic #(
  parameter codec_pkg::type_vec_t TYPE_MASK = codec_pkg::ALL_TYPES
) (
  input  codec_pkg::type_vec_t hit,   // detector outputs, bit k = Type-k
  output logic                 ctrl   // 1: invert the word
);

  assign ctrl = |(hit & TYPE_MASK);

endmodule
