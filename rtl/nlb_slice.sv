// One slice of the nlb: a 4-input, 2-output look-up table with carry logic.
//
// LUT mode: out0 and out1 are two independent functions of the four inputs
// i[3:0], each given by a 16-entry truth table indexed by {i3,i2,i1,i0}.
// Arithmetic mode: the slice is a 2-bit ripple-carry adder of x = {i1,i0}
// and y = {i3,i2} (pins 0/1 carry x, pins 2/3 carry y); when addsub is 1
// the y operand is inverted first, so x - y is obtained with cin = 1
// (two's complement). out0/out1 are then the two sum bits and cout the
// carry out of bit 1. cout is computed in both modes.
// f5 is the 5-input LUT output: the two LUT outputs multiplexed by the
// slice's control pin (c5 = 0 selects out0). Purely combinational.
//
// The operand-to-pin assignment, the inversion of y under ADD/SUB and the
// 5-input multiplexer follow the block description; the internal carry
// structure (generate/propagate ripple) is this design's simplest choice.
// Inside the nlb, cin may come from the other slice's cout, so lint tools
// see the carry path as part of a combinational cycle; the nlb comment
// explains why a valid configuration never closes it.
module nlb_slice
  import fpga_pkg::*;
(
  input  logic [3:0]  i,       // major inputs after the AND plane
  input  logic        cin,     // carry in
  input  logic        addsub,  // 1: invert the y operand
  input  logic        c5,      // control pin selecting the 5-input LUT half
  input  logic [15:0] lut0,
  input  logic [15:0] lut1,
  input  logic        arith,
  output logic        out0,
  output logic        out1,
  output logic        f5,
  output logic        cout
);
  logic [1:0] x, yv;
  logic       c1;

  always_comb begin
    x    = i[1:0];
    yv   = i[3:2] ^ {2{addsub}};
    c1   = (x[0] & yv[0]) | (cin & (x[0] ^ yv[0]));
    cout = (x[1] & yv[1]) | (c1 & (x[1] ^ yv[1]));
    if (arith) begin
      out0 = x[0] ^ yv[0] ^ cin;
      out1 = x[1] ^ yv[1] ^ c1;
    end else begin
      out0 = lut0[i];
      out1 = lut1[i];
    end
    f5 = c5 ? out1 : out0;
  end
endmodule
