// Shared types and constants of the nlb-based fine-grained array.
//
// The array is an island-style FPGA: a grid of new logic blocks (nlb), each
// with 16 input pins and 6 output pins, surrounded by routing channels of
// CHAN_W single-length tracks that meet in disjoint switch boxes. Every
// programmable element owns a configuration frame that is written over a
// word-addressed configuration bus (cfg_we / cfg_addr / cfg_data). The
// frame layouts and the address map used by the fabric are defined here so
// that the testbenches can build bitstreams with the same definitions.
//
// Channel width 12, single-length segments, full (Fc = 1) connection boxes,
// the pin sides of the nlb and the east carry direct connection follow the
// architecture used for the direction-detector experiments. The
// configuration bus and the frame layouts are this design's own choice.
package fpga_pkg;

  // Routing channel width (tracks per channel).
  localparam int CHAN_W = 12;

  // Width of the configuration data word; one frame per programmable element.
  localparam int CFG_W = 256;
  localparam int CFG_AW = 16;

  // ---------------------------------------------------------------- nlb pins
  // Input pins of the nlb, in the order of the pin list of the architecture.
  typedef enum logic [3:0] {
    P_A0 = 4'd0, P_A1 = 4'd1, P_A2 = 4'd2, P_A3 = 4'd3,
    P_EA0 = 4'd4, P_EA1 = 4'd5, P_ICA = 4'd6,
    P_B0 = 4'd7, P_B1 = 4'd8, P_B2 = 4'd9, P_B3 = 4'd10,
    P_EB0 = 4'd11, P_EB1 = 4'd12, P_ICB = 4'd13, P_IC = 4'd14
  } ipin_e;
  localparam int NUM_IPINS = 15;

  // Block sides; also the side numbering of the switch-box fragment.
  typedef enum logic [1:0] {S_LEFT = 2'd0, S_TOP = 2'd1, S_RIGHT = 2'd2, S_BOTTOM = 2'd3} side_e;

  // Side on which each input pin meets the routing.
  function automatic side_e ipin_side(int p);
    case (ipin_e'(p))
      P_A0, P_EA0, P_B0, P_IC: return S_TOP;
      P_A1, P_B1, P_EB0, P_ICB: return S_RIGHT;
      P_A2, P_EA1, P_B2:        return S_BOTTOM;
      default:                  return S_LEFT;   // A3, ICA, B3, EB1
    endcase
  endfunction

  // ------------------------------------------------------------- AND plane
  // Source of the gating signal of one AND-plane gate pair.
  typedef enum logic [1:0] {AP_PASS = 2'd0, AP_E0 = 2'd1, AP_E1 = 2'd2} ap_sel_e;

  // Source of the ADD/SUB control of a slice.
  typedef enum logic [1:0] {AS_ADD = 2'd0, AS_SUB = 2'd1, AS_IC = 2'd2} addsub_e;

  typedef struct packed {
    logic [15:0] lut1;      // truth table of output 1 (index = {i3,i2,i1,i0})
    logic [15:0] lut0;      // truth table of output 0
    logic        arith;     // 1: outputs are the sum bits of the 2-bit adder
    addsub_e     addsub;    // ADD/SUB control source
    logic        cin_pin;   // 1: carry-in from the control pin, 0: from the other slice
    ap_sel_e     ap_even;   // gate of major inputs 0 and 2
    ap_sel_e     ap_odd;    // gate of major inputs 1 and 3 (inverted)
  } slice_cfg_t;

  // Sources of the local crossbar.
  typedef enum logic [2:0] {
    X_A0 = 3'd0, X_A1 = 3'd1, X_A5 = 3'd2, X_B0 = 3'd3,
    X_B1 = 3'd4, X_B5 = 3'd5, X_F6 = 3'd6, X_ZERO = 3'd7
  } xbar_src_e;

  typedef struct packed {
    slice_cfg_t            slice_b;
    slice_cfg_t            slice_a;
    xbar_src_e [3:0]       xbar;    // source of major output k
    logic [3:0]            ff_en;   // 1: major output k is registered
  } nlb_cfg_t;

  // ------------------------------------------------------ connection boxes
  // Input pin multiplexer select: 0 -> '0', 1 -> '1', 2+t -> track t,
  // CHAN_W+2 -> direct connection (carry-in pin only).
  localparam int IPIN_SELW = $clog2(CHAN_W + 3);

  typedef struct packed {
    logic [NUM_IPINS-1:0][IPIN_SELW-1:0] ipin_sel;
    nlb_cfg_t                   nlb;
  } tile_cfg_t;

  // Switch box: per side and track, 0 = undriven, k = side (s+k)%4.
  localparam int SB_SELW = 2;
  typedef logic [3:0][CHAN_W-1:0][SB_SELW-1:0] sb_cfg_t;

  // Segment driver: 0 = undriven, 1 = switch box at the low end,
  // 2 = switch box at the high end, 3+k = output pin k.
  localparam int MAX_OPINS = 28;
  localparam int TD_SELW = $clog2(3 + MAX_OPINS);
  typedef logic [CHAN_W-1:0][TD_SELW-1:0] chan_cfg_t;

  // I/O pad.
  typedef enum logic [1:0] {PAD_OFF = 2'd0, PAD_IN = 2'd1, PAD_OUT = 2'd2} pad_mode_e;
  localparam int TRK_SELW = $clog2(CHAN_W);
  typedef struct packed {
    pad_mode_e             mode;
    logic                  reg_en;   // register the pad signal
    logic [TRK_SELW-1:0]   track;    // track read by an output pad
  } pad_cfg_t;

  // ------------------------------------------------------------ address map
  // Frames are numbered: logic tiles, switch boxes, horizontal channels,
  // vertical channels, then I/O pad locations (bottom, top, left, right).
  // Each function returns -1 for a position outside the array.
  function automatic int addr_clb(int nx, int ny, int x, int y);
    if (x < 1 || x > nx || y < 1 || y > ny) return -1;
    return (y - 1) * nx + (x - 1);
  endfunction
  function automatic int addr_sb(int nx, int ny, int x, int y);
    return nx * ny + y * (nx + 1) + x;
  endfunction
  function automatic int addr_chx(int nx, int ny, int x, int y);
    return nx * ny + (nx + 1) * (ny + 1) + y * nx + (x - 1);
  endfunction
  function automatic int addr_chy(int nx, int ny, int x, int y);
    return nx * ny + (nx + 1) * (ny + 1) + nx * (ny + 1) + (y - 1) * (nx + 1) + x;
  endfunction
  // side: 0 bottom (x = 1..nx), 1 top (x), 2 left (y = 1..ny), 3 right (y)
  function automatic int addr_pad(int nx, int ny, int side, int pos);
    int base;
    base = nx * ny + (nx + 1) * (ny + 1) + nx * (ny + 1) + ny * (nx + 1);
    case (side)
      0: return base + (pos - 1);
      1: return base + nx + (pos - 1);
      2: return base + 2 * nx + (pos - 1);
      default: return base + 2 * nx + ny + (pos - 1);
    endcase
  endfunction
  function automatic int num_frames(int nx, int ny);
    return addr_pad(nx, ny, 3, ny) + 1;
  endfunction

endpackage
