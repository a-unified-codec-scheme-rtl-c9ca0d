// transition_detector: per-line transition flags between the present word and the
// word last sent on the bus.
//
// For each line k it raises exactly one of three flags:
//   rise[k]  prev 0 -> cur 1   (Sa..Sd in the 4-line design)
//   fall[k]  prev 1 -> cur 0   (Se..Sh)
//   hold[k]  no change         (Si..Sl)
// The coupling detectors read these 3*W flags. The rise/fall/hold split follows the
// document; the hold flags are given explicitly so that every detector pattern,
// including its "no transition" positions, is a plain AND of three flags.
//
// Purely combinational: the previous word comes from the transmitter's bus register.
// Line 1 of the bus is bit 0.
module transition_detector #(
  parameter int unsigned W = codec_pkg::BUS_W
) (
  input  logic [W-1:0] cur,   // present data word
  input  logic [W-1:0] prev,  // word last driven onto the lines
  output logic [W-1:0] rise,
  output logic [W-1:0] fall,
  output logic [W-1:0] hold
);

  always_comb begin
    rise = cur & ~prev;
    fall = ~cur & prev;
    hold = ~(cur ^ prev);
  end

endmodule
