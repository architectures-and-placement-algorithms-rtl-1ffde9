// Local crossbar of the nlb.
//
// Routes the seven logic outputs of the block (two LUT outputs and the
// 5-input LUT output of each slice, and the 6-input LUT output) to the four
// major outputs O0-O3. Each major output has its own 8:1 multiplexer, so any
// source can reach any output and the four outputs are equivalent for the
// router. Select value 7 gives a constant 0 for an unused output.
// Purely combinational.
//
// The crossbar's sources and its four outputs follow the block diagram; a
// full multiplexer per output is this design's choice for "crossbar".
module local_crossbar
  import fpga_pkg::*;
(
  input  logic [6:0]            src,  // indexed by xbar_src_e
  input  xbar_src_e [3:0]       sel,
  output logic [3:0]            o
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      o[k] = (sel[k] == X_ZERO) ? 1'b0 : src[sel[k]];
    end
  end
endmodule
