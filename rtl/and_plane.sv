// AND plane in front of one nlb slice.
//
// The four major inputs m[3:0] of a slice either pass straight through or are
// gated by an extension pin. Inputs 0 and 2 share one gate signal, selected
// from extension pin e0 or e1; inputs 1 and 3 share a second gate signal,
// selected from e0 or e1 and inverted. With the same extension pin as
// "sel" on both, the slice sees {x, 0} or {0, y} and can build a 2-bit 2:1
// multiplexer from two ORs (MUX mode). Purely combinational.
//
// The two selecting multiplexers, the inversion on the odd pair and the
// pairing of the inputs follow the published schematic of the AND plane.
// The pass-through setting (gate forced to 1) stands for the "passed
// through" use the block description mentions; how it is built is this
// design's choice.
module and_plane
  import fpga_pkg::*;
(
  input  logic [3:0] m,        // major input pins
  input  logic       e0,       // extension pin 0
  input  logic       e1,       // extension pin 1
  input  ap_sel_e    sel_even, // gate source of inputs 0 and 2
  input  ap_sel_e    sel_odd,  // gate source of inputs 1 and 3 (inverted)
  output logic [3:0] y         // to the slice
);
  logic g_even, g_odd;

  always_comb begin
    unique case (sel_even)
      AP_E0:   g_even = e0;
      AP_E1:   g_even = e1;
      default: g_even = 1'b1;
    endcase
    unique case (sel_odd)
      AP_E0:   g_odd = ~e0;
      AP_E1:   g_odd = ~e1;
      default: g_odd = 1'b1;
    endcase
    y = m & {g_odd, g_even, g_odd, g_even};
  end
endmodule
