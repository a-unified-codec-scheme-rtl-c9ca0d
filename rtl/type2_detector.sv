// type2_detector: Type-2 crosstalk coupling detector.
//
// Looks at every group of three adjacent lines (l, m, r) = (k, k+1, k+2) and raises
// hit when any group switches in one of the Type-2 patterns below, written as
// (l m r) with ^ = rising, v = falling, - = no transition:
//   -^-  -v-  ^-^  v-v  ^-v  v-^  ^^v  vv^  ^vv  v^^
// Type-k means the middle line of the group is coupled k units by its neighbours
// (a unit per neighbour for each step of difference between its change and the
// middle line's change). The patterns follow the document's coupling table.
// Each pattern is an AND of three transition flags; the window results are ORed.
// Purely combinational. A 4-line bus has two windows: lines 1-3 and lines 2-4.
module type2_detector #(
  parameter int unsigned W = codec_pkg::BUS_W
) (
  input  logic [W-1:0] rise,  // from transition_detector
  input  logic [W-1:0] fall,
  input  logic [W-1:0] hold,
  output logic         hit    // Type-2 coupling present in some window
);

  localparam int unsigned NWIN = W - 2;

  logic [NWIN-1:0] win_hit;

  for (genvar k = 0; k < NWIN; k++) begin : g_win
    // Shorthand for the three lines of this window.
    logic ul, um, ur, dl, dm, dr, hl, hm, hr;
    assign {ul, um, ur} = {rise[k], rise[k+1], rise[k+2]};
    assign {dl, dm, dr} = {fall[k], fall[k+1], fall[k+2]};
    assign {hl, hm, hr} = {hold[k], hold[k+1], hold[k+2]};

    assign win_hit[k] =
        (hl & um & hr)    // -^-
      | (hl & dm & hr)    // -v-
      | (ul & hm & ur)    // ^-^
      | (dl & hm & dr)    // v-v
      | (ul & hm & dr)    // ^-v
      | (dl & hm & ur)    // v-^
      | (ul & um & dr)    // ^^v
      | (dl & dm & ur)    // vv^
      | (ul & dm & dr)    // ^vv
      | (dl & um & ur);   // v^^
  end

  assign hit = |win_hit;

  initial begin
    if (W < 3) $error("type2_detector needs at least three lines, W=%0d", W);
  end

endmodule
