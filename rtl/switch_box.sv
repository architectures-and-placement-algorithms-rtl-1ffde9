// Disjoint switch box at the crossing of a horizontal and a vertical channel.
//
// Track t of each of the four sides (0 left, 1 top, 2 right, 3 bottom) can
// only be joined to track t of the other sides, so a net keeps its track
// number everywhere (disjoint topology, flexibility Fs = 3). For every
// side s and track t the box offers one candidate value to the segment on
// side s: nothing (0), or the segment on side (s+k) mod 4 for k = 1..3.
// The segment driver (track_driver) decides whether it takes this
// candidate. Purely combinational.
//
// HALF = 0 is the full box: each basic fragment joins any pair of its four
// segments (six switches). HALF = 1 is the half box with three switches per
// fragment: the two straight pairs (left-right, top-bottom) and one turn.
// On track t the turn is right-bottom rotated by 90 degrees t mod 4 times
// (t mod 4 = 0: right-bottom, 1: bottom-left, 2: left-top, 3: top-right),
// so every turn direction exists on some track; other turns are made
// through a third segment (on track 0, left to bottom goes left-right-
// bottom). A selection of a missing switch gives 0.
//
// The disjoint topology and the two fragments follow the published
// fragment drawings; rotating the half fragment from track to track is this
// design's choice, as the source draws one fragment only. Bidirectional pass switches are modelled as selectable
// one-way paths (the segment's driver decides the direction), which is this
// design's choice for a two-state logic model. Chained switch boxes form
// combinational paths that can close into loops under a bad configuration;
// the structure itself necessarily contains such cycles.
module switch_box
  import fpga_pkg::*;
#(
  parameter int W    = 12,
  parameter bit HALF = 0
) (
  input  logic [3:0][W-1:0]          seg,   // current value of each side's segment
  input  logic [3:0][W-1:0][1:0]     sel,   // per side and track
  output logic [3:0][W-1:0]          cand   // value offered to each side's segment
);
  function automatic bit has_switch(int a, int b, int t);
    int ra, rb;
    if (!HALF) return 1'b1;
    ra = (a - t % 4 + 4) % 4;   // sides as seen by the unrotated fragment
    rb = (b - t % 4 + 4) % 4;
    return ((ra + rb) == 2 && ra != rb) ||    // left-right
           ((ra + rb) == 4 && ra != rb) ||    // top-bottom
           ((ra + rb) == 5);                  // right-bottom
  endfunction

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < W; t++) begin
        int o;
        o = (s + int'(sel[s][t])) % 4;
        if (sel[s][t] == 2'd0 || !has_switch(s, o, t)) cand[s][t] = 1'b0;
        else                                        cand[s][t] = seg[o][t];
      end
    end
  end
endmodule
