// I/O pad of the array's periphery.
//
// An input pad takes pad_i from outside and offers it, directly or through
// a flip-flop, as an output pin to its I/O channel segment (opin). An output
// pad reads one track of that segment and drives pad_o, directly or through
// a flip-flop, with pad_oe = 1. An unused pad drives nothing (opin = 0,
// pad_oe = 0). The flip-flop adds one clock of latency and resets to 0
// (asynchronous, active-low rst_n).
//
// Pads on all four edges, connected to the I/O channel ring with Fc = 1,
// follow the architecture; the optional register (the pad delay is quoted
// as clock-to-Q plus a 2:1 multiplexer) and the configuration fields are
// this design's reading.
module io_pad
  import fpga_pkg::*;
#(
  parameter int W = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pad_cfg_t      cfg,
  input  logic [W-1:0]  tracks,  // I/O channel segment
  input  logic          pad_i,   // from outside
  output logic          pad_o,   // to outside
  output logic          pad_oe,  // pad_o is valid
  output logic          opin     // to the channel
);
  logic d, q, v;

  always_comb begin
    if (cfg.mode == PAD_IN)                    d = pad_i;
    else if (cfg.mode == PAD_OUT && int'(cfg.track) < W) d = tracks[cfg.track];
    else                                       d = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign v      = cfg.reg_en ? q : d;
  assign opin   = (cfg.mode == PAD_IN)  ? v : 1'b0;
  assign pad_o  = (cfg.mode == PAD_OUT) ? v : 1'b0;
  assign pad_oe = (cfg.mode == PAD_OUT);
endmodule
