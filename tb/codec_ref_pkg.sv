// codec_ref_pkg: reference model used by the codec testbenches.
//
// It classifies coupling from first principles instead of from a pattern list:
// each line changes by +1 (rising), -1 (falling) or 0, and the middle line of a
// three-line group is coupled |dm-dl| + |dm-dr| units by its neighbours. That sum
// is the coupling type (0..4). A group where nothing switches is not reported.
package codec_ref_pkg;

  parameter int unsigned MAXW = 16;

  function automatic int line_delta(logic cur, logic prev);
    return int'(cur) - int'(prev);
  endfunction

  function automatic int iabs(int x);
    return (x < 0) ? -x : x;
  endfunction

  // Expected Type-0..Type-4 detector outputs for a w-line bus.
  function automatic logic [4:0] ref_hits(logic [MAXW-1:0] cur, logic [MAXW-1:0] prev, int w);
    logic [4:0] h = '0;
    for (int k = 0; k + 2 < w; k++) begin
      int dl = line_delta(cur[k],   prev[k]);
      int dm = line_delta(cur[k+1], prev[k+1]);
      int dr = line_delta(cur[k+2], prev[k+2]);
      int t  = iabs(dm - dl) + iabs(dm - dr);
      if (dl != 0 || dm != 0 || dr != 0) h[t] = 1'b1;
    end
    return h;
  endfunction

  // Number of three-line groups of the given type in one bus step.
  function automatic int count_type(logic [MAXW-1:0] cur, logic [MAXW-1:0] prev, int w, int ty);
    int n = 0;
    for (int k = 0; k + 2 < w; k++) begin
      int dl = line_delta(cur[k],   prev[k]);
      int dm = line_delta(cur[k+1], prev[k+1]);
      int dr = line_delta(cur[k+2], prev[k+2]);
      if ((dl != 0 || dm != 0 || dr != 0) && iabs(dm - dl) + iabs(dm - dr) == ty) n++;
    end
    return n;
  endfunction

endpackage
