// Island-style fine-grained reconfigurable array built from nlb tiles.
//
// NX x NY logic tiles (clb_tile) sit between horizontal channels chx(x,y)
// (above tile row y, y = 0..NY) and vertical channels chy(x,y) (right of
// tile column x, x = 0..NX). Every channel holds CHAN_W single-length
// tracks. At each channel crossing a disjoint switch box (switch_box, full
// or, with HALF_SB = 1, half) joins equal-numbered tracks; every channel
// segment has a driver (track_driver) that takes its value from one of its
// two switch boxes or from one of the output pins facing it. Logic tiles
// read the channels on their four sides through their input connection
// boxes; the carry out OCB of tile (x,y) reaches the carry in ICA of tile
// (x+1,y) directly. IO_RAT I/O pads per position line the four edges and
// attach to the outermost channels (the I/O ring).
//
// Configuration: every tile, switch box, channel segment and pad position
// owns one frame on the configuration bus; the address map is given by the
// addr_* functions of fpga_pkg. Frames clear to zero on reset, which leaves
// the array idle. After loading, the array behaves as the configured
// circuit: paths through routing are combinational; flip-flops exist at the
// nlb major outputs and in the pads, all clocked by clk.
//
// Output-pin order seen by a segment driver (select 3+k picks pin k):
//   horizontal channel: 0 = O0 of the tile below, 1 = O2 of the tile above,
//                       2.. = pads (bottom or top edge only)
//   vertical channel:   0 = O1, 1 = OCB of the tile to the left,
//                       2 = O3, 3 = OCA of the tile to the right,
//                       4.. = pads (left or right edge only)
//
// The array size 6 x 23, channel width 12 (package), 24 pads per position,
// single-length segments, Fc = 1 boxes, the disjoint switch box and the east
// carry connection follow the architecture used for the direction-detector
// experiments. The configuration bus, the directional model of the
// pass-transistor routing and reset are this design's choices. Because
// routing is a mesh of multiplexers, the netlist contains combinational
// cycles by construction; a configuration must not close one.
module fpga_fabric
  import fpga_pkg::*;
#(
  parameter int NX      = 6,
  parameter int NY      = 23,
  parameter int IO_RAT  = 24,
  parameter bit HALF_SB = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [CFG_AW-1:0]       cfg_addr,
  input  logic [CFG_W-1:0]        cfg_data,
  input  logic [IO_RAT-1:0]       pad_bot_i [NX],
  output logic [IO_RAT-1:0]       pad_bot_o [NX],
  output logic [IO_RAT-1:0]       pad_bot_oe[NX],
  input  logic [IO_RAT-1:0]       pad_top_i [NX],
  output logic [IO_RAT-1:0]       pad_top_o [NX],
  output logic [IO_RAT-1:0]       pad_top_oe[NX],
  input  logic [IO_RAT-1:0]       pad_lft_i [NY],
  output logic [IO_RAT-1:0]       pad_lft_o [NY],
  output logic [IO_RAT-1:0]       pad_lft_oe[NY],
  input  logic [IO_RAT-1:0]       pad_rgt_i [NY],
  output logic [IO_RAT-1:0]       pad_rgt_o [NY],
  output logic [IO_RAT-1:0]       pad_rgt_oe[NY]
);
  localparam int W   = CHAN_W;
  localparam int NOP = 4 + IO_RAT;

  initial begin
    assert (NOP <= MAX_OPINS) else $fatal(1, "IO_RAT too large for the segment select field");
    assert (IO_RAT * $bits(pad_cfg_t) <= CFG_W) else $fatal(1, "IO_RAT too large for one frame");
    assert (num_frames(NX, NY) <= (1 << CFG_AW)) else $fatal(1, "array too large for the address bus");
  end

  // Channel segments and switch-box candidates.
  logic [W-1:0]      chx  [1:NX][0:NY];
  logic [W-1:0]      chy  [0:NX][1:NY];
  logic [3:0][W-1:0] cand [0:NX][0:NY];

  // Tile outputs.
  logic [3:0] t_o   [1:NX][1:NY];
  logic       t_oca [1:NX][1:NY];
  logic       t_ocb [1:NX][1:NY];

  // Pad output pins toward the channels.
  logic [IO_RAT-1:0] op_bot [1:NX];
  logic [IO_RAT-1:0] op_top [1:NX];
  logic [IO_RAT-1:0] op_lft [1:NY];
  logic [IO_RAT-1:0] op_rgt [1:NY];

  // ------------------------------------------------------------ switch boxes
  for (genvar x = 0; x <= NX; x++) begin : g_sbx
    for (genvar y = 0; y <= NY; y++) begin : g_sby
      logic [3:0][W-1:0] seg;
      sb_cfg_t           sbc;
      if (x >= 1)  begin : g_l assign seg[S_LEFT]   = chx[x][y];   end
      else         begin : g_nl assign seg[S_LEFT]  = '0;          end
      if (y < NY)  begin : g_t assign seg[S_TOP]    = chy[x][y+1]; end
      else         begin : g_nt assign seg[S_TOP]   = '0;          end
      if (x < NX)  begin : g_r assign seg[S_RIGHT]  = chx[x+1][y]; end
      else         begin : g_nr assign seg[S_RIGHT] = '0;          end
      if (y >= 1)  begin : g_b assign seg[S_BOTTOM] = chy[x][y];   end
      else         begin : g_nb assign seg[S_BOTTOM]= '0;          end

      cfg_frame #(.WIDTH($bits(sb_cfg_t)), .ADDR(addr_sb(NX, NY, x, y))) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(sbc)
      );
      switch_box #(.W(W), .HALF(HALF_SB)) u_sb (.seg(seg), .sel(sbc), .cand(cand[x][y]));
    end
  end

  // ---------------------------------------------------- horizontal channels
  for (genvar x = 1; x <= NX; x++) begin : g_cxx
    for (genvar y = 0; y <= NY; y++) begin : g_cxy
      logic [NOP-1:0] op;
      chan_cfg_t      cc;
      if (y >= 1) begin : g_below assign op[0] = t_o[x][y][0]; end
      else        begin : g_nbelow assign op[0] = 1'b0; end
      if (y < NY) begin : g_above assign op[1] = t_o[x][y+1][2]; end
      else        begin : g_nabove assign op[1] = 1'b0; end
      if (y == 0)       begin : g_pb assign op[2 +: IO_RAT] = op_bot[x]; end
      else if (y == NY) begin : g_pt assign op[2 +: IO_RAT] = op_top[x]; end
      else              begin : g_pn assign op[2 +: IO_RAT] = '0; end
      assign op[NOP-1 -: 2] = '0;

      cfg_frame #(.WIDTH($bits(chan_cfg_t)), .ADDR(addr_chx(NX, NY, x, y))) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(cc)
      );
      track_driver #(.W(W), .NOP(NOP), .SELW(TD_SELW)) u_td (
        .from_lo(cand[x-1][y][S_RIGHT]), .from_hi(cand[x][y][S_LEFT]),
        .opin(op), .sel(cc), .seg(chx[x][y])
      );
    end
  end

  // ------------------------------------------------------ vertical channels
  for (genvar x = 0; x <= NX; x++) begin : g_cyx
    for (genvar y = 1; y <= NY; y++) begin : g_cyy
      logic [NOP-1:0] op;
      chan_cfg_t      cc;
      if (x >= 1) begin : g_lt
        assign op[0] = t_o[x][y][1];
        assign op[1] = t_ocb[x][y];
      end else begin : g_nlt
        assign op[1:0] = '0;
      end
      if (x < NX) begin : g_rt
        assign op[2] = t_o[x+1][y][3];
        assign op[3] = t_oca[x+1][y];
      end else begin : g_nrt
        assign op[3:2] = '0;
      end
      if (x == 0)       begin : g_pl assign op[4 +: IO_RAT] = op_lft[y]; end
      else if (x == NX) begin : g_pr assign op[4 +: IO_RAT] = op_rgt[y]; end
      else              begin : g_pn assign op[4 +: IO_RAT] = '0; end

      cfg_frame #(.WIDTH($bits(chan_cfg_t)), .ADDR(addr_chy(NX, NY, x, y))) u_cfg (
        .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(cc)
      );
      track_driver #(.W(W), .NOP(NOP), .SELW(TD_SELW)) u_td (
        .from_lo(cand[x][y-1][S_TOP]), .from_hi(cand[x][y][S_BOTTOM]),
        .opin(op), .sel(cc), .seg(chy[x][y])
      );
    end
  end

  // ----------------------------------------------------------- logic tiles
  for (genvar x = 1; x <= NX; x++) begin : g_tx
    for (genvar y = 1; y <= NY; y++) begin : g_ty
      logic [3:0][W-1:0] ch;
      logic              dir_in;
      assign ch[S_LEFT]   = chy[x-1][y];
      assign ch[S_TOP]    = chx[x][y];
      assign ch[S_RIGHT]  = chy[x][y];
      assign ch[S_BOTTOM] = chx[x][y-1];
      if (x > 1) begin : g_dc assign dir_in = t_ocb[x-1][y]; end
      else       begin : g_ndc assign dir_in = 1'b0; end

      clb_tile #(.ADDR(addr_clb(NX, NY, x, y))) u_tile (
        .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
        .ch(ch), .direct_in(dir_in),
        .o(t_o[x][y]), .oca(t_oca[x][y]), .ocb(t_ocb[x][y])
      );
    end
  end

  // -------------------------------------------------------------- I/O pads
  for (genvar x = 1; x <= NX; x++) begin : g_pcol
    pad_cfg_t [IO_RAT-1:0] pc_b, pc_t;
    cfg_frame #(.WIDTH(IO_RAT * $bits(pad_cfg_t)), .ADDR(addr_pad(NX, NY, 0, x))) u_cfg_b (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(pc_b)
    );
    cfg_frame #(.WIDTH(IO_RAT * $bits(pad_cfg_t)), .ADDR(addr_pad(NX, NY, 1, x))) u_cfg_t (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(pc_t)
    );
    for (genvar k = 0; k < IO_RAT; k++) begin : g_k
      io_pad #(.W(W)) u_b (
        .clk, .rst_n, .cfg(pc_b[k]), .tracks(chx[x][0]), .pad_i(pad_bot_i[x-1][k]),
        .pad_o(pad_bot_o[x-1][k]), .pad_oe(pad_bot_oe[x-1][k]), .opin(op_bot[x][k])
      );
      io_pad #(.W(W)) u_t (
        .clk, .rst_n, .cfg(pc_t[k]), .tracks(chx[x][NY]), .pad_i(pad_top_i[x-1][k]),
        .pad_o(pad_top_o[x-1][k]), .pad_oe(pad_top_oe[x-1][k]), .opin(op_top[x][k])
      );
    end
  end

  for (genvar y = 1; y <= NY; y++) begin : g_prow
    pad_cfg_t [IO_RAT-1:0] pc_l, pc_r;
    cfg_frame #(.WIDTH(IO_RAT * $bits(pad_cfg_t)), .ADDR(addr_pad(NX, NY, 2, y))) u_cfg_l (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(pc_l)
    );
    cfg_frame #(.WIDTH(IO_RAT * $bits(pad_cfg_t)), .ADDR(addr_pad(NX, NY, 3, y))) u_cfg_r (
      .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .q(pc_r)
    );
    for (genvar k = 0; k < IO_RAT; k++) begin : g_k
      io_pad #(.W(W)) u_l (
        .clk, .rst_n, .cfg(pc_l[k]), .tracks(chy[0][y]), .pad_i(pad_lft_i[y-1][k]),
        .pad_o(pad_lft_o[y-1][k]), .pad_oe(pad_lft_oe[y-1][k]), .opin(op_lft[y][k])
      );
      io_pad #(.W(W)) u_r (
        .clk, .rst_n, .cfg(pc_r[k]), .tracks(chy[NX][y]), .pad_i(pad_rgt_i[y-1][k]),
        .pad_o(pad_rgt_o[y-1][k]), .pad_oe(pad_rgt_oe[y-1][k]), .opin(op_rgt[y][k])
      );
    end
  end
endmodule
