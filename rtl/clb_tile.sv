// Logic tile: one nlb with its input connection boxes and configuration.
//
// Each of the 15 logic input pins of the nlb has a multiplexer that picks
// one track of the channel on the pin's side, or a constant (ipin_cbox).
// The carry-in pin ICA additionally receives the east direct connection
// from the carry out OCB of the tile to the west (direct_in), so ripple
// carries pass from tile to tile without using tracks. Output pins are
// handed to the fabric, which connects them to the channels. The tile's
// configuration (tile_cfg_t: the nlb configuration and the pin selects) is
// one frame at address ADDR of the configuration bus.
// Channels are indexed by side: 0 left, 1 top, 2 right, 3 bottom.
//
// The pin-to-side assignment (A0 EA0 B0 IC on top, A1 B1 EB0 ICB on the
// right, A2 EA1 B2 at the bottom, A3 ICA B3 EB1 on the left) and the
// OCB-to-ICA direct connection follow the architecture; the frame layout is
// this design's choice.
module clb_tile
  import fpga_pkg::*;
#(
  parameter int ADDR = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  logic [CFG_AW-1:0]        cfg_addr,
  input  logic [CFG_W-1:0]         cfg_data,
  input  logic [3:0][CHAN_W-1:0]   ch,        // channel tracks by side
  input  logic                     direct_in, // OCB of the west neighbour
  output logic [3:0]               o,         // O0 top, O1 right, O2 bottom, O3 left
  output logic                     oca,       // left side
  output logic                     ocb        // right side
);
  tile_cfg_t              cfg;
  logic [NUM_IPINS-1:0]   pins;

  cfg_frame #(.WIDTH($bits(tile_cfg_t)), .ADDR(ADDR)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(cfg)
  );

  for (genvar p = 0; p < NUM_IPINS; p++) begin : g_ipin
    ipin_cbox #(.W(CHAN_W), .DIRECT(p == P_ICA), .SELW(IPIN_SELW)) u_cb (
      .tracks(ch[ipin_side(p)]), .direct_in(direct_in),
      .sel(cfg.ipin_sel[p]), .pin(pins[p])
    );
  end

  nlb u_nlb (
    .clk, .rst_n, .cfg(cfg.nlb), .pins, .o, .oca, .ocb
  );
endmodule
