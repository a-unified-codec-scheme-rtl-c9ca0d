// codec_pkg: constants shared by the blocks of the crosstalk-avoiding bus-invert codec.
//
// The codec sends a BUS_W-bit word over BUS_W coupled interconnect lines plus one
// shielded control line. Every clock the transmitter classifies how each group of
// three adjacent lines would switch (coupling Type-0 .. Type-4), and if any enabled
// type is present it sends the inverted word and raises the control line. The
// receiver XORs the lines with the control line to recover the data.
//
// The 4-bit bus width and the five coupling types follow the document; the type
// mask is this design's own addition (see or_logic).
package codec_pkg;

  // Width of the data bus (number of coupled data lines).
  parameter int unsigned BUS_W = 4;

  // Number of coupling classes, Type-0 .. Type-4.
  parameter int unsigned N_TYPES = 5;

  // Bit index of each coupling class in the detector-output vector.
  typedef enum int unsigned {
    TYPE0 = 0,
    TYPE1 = 1,
    TYPE2 = 2,
    TYPE3 = 3,
    TYPE4 = 4
  } coupling_type_e;

  typedef logic [N_TYPES-1:0] type_vec_t;

  // OR all five detector outputs into the invert decision.
  parameter type_vec_t ALL_TYPES = 5'b11111;
  // Worst cases of RC lines (opposite transitions on neighbours).
  parameter type_vec_t RC_WORST_TYPES = 5'b11000;
  // Worst cases of RLC lines (same-direction transitions on neighbours).
  parameter type_vec_t RLC_WORST_TYPES = 5'b00011;

endpackage
