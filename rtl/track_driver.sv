// Driver of one channel segment (all W tracks of a single-length segment).
//
// Each track of the segment has one source: nothing (0), the switch box at
// its low end (left or bottom), the switch box at its high end (right or
// top), or one of the NOP output pins that face this channel segment (logic
// block outputs and I/O pads). Every output pin can drive every track
// (output connection box with Fc = 1). Select encoding per track: 0 none,
// 1 low switch box, 2 high switch box, 3+k output pin k; codes past the
// last pin give 0. Purely combinational.
//
// Fc = 1 output connections follow the architecture; merging the output
// connection switches and the switch-box switches of a segment into one
// driver multiplexer is this design's two-state model of the pass-transistor
// and tri-state wiring.
module track_driver #(
  parameter int W    = 12,
  parameter int NOP  = 4,
  parameter int SELW = $clog2(3 + NOP)
) (
  input  logic [W-1:0]            from_lo,  // candidates of the low-end switch box
  input  logic [W-1:0]            from_hi,  // candidates of the high-end switch box
  input  logic [NOP-1:0]          opin,     // output pins facing the segment
  input  logic [W-1:0][SELW-1:0]  sel,
  output logic [W-1:0]            seg
);
  always_comb begin
    for (int t = 0; t < W; t++) begin
      if (sel[t] == 0)                  seg[t] = 1'b0;
      else if (sel[t] == 1)             seg[t] = from_lo[t];
      else if (sel[t] == 2)             seg[t] = from_hi[t];
      else if (int'(sel[t]) < 3 + NOP)  seg[t] = opin[int'(sel[t]) - 3];
      else                              seg[t] = 1'b0;
    end
  end
endmodule
