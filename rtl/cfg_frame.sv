// One configuration frame: the configuration memory of a programmable
// element (a logic tile, a switch box, a channel segment or a group of I/O
// pads).
//
// The frame is loaded from the array's configuration bus: when cfg_we is
// high and cfg_addr equals ADDR, the low WIDTH bits of cfg_data are stored
// on the rising clock edge. The frame clears to all zeros on rst_n low
// (asynchronous), which leaves every multiplexer of the element unused.
// The word-addressed bus is this design's choice; the source describes the
// configuration memory only as what selects the function and routing.
module cfg_frame
  import fpga_pkg::*;
#(
  parameter int WIDTH = 8,
  parameter int ADDR  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CFG_AW-1:0] cfg_addr,
  input  logic [CFG_W-1:0]  cfg_data,
  output logic [WIDTH-1:0]  q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      q <= '0;
    else if (cfg_we && cfg_addr == CFG_AW'(ADDR))    q <= cfg_data[WIDTH-1:0];
  end
endmodule
