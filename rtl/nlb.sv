// New logic block (nlb): two slices with AND planes, carry chain, wide-LUT
// multiplexers, local crossbar and registered major outputs.
//
// Slice A takes major inputs A0-A3 through its AND plane (extension pins
// EA0/EA1), slice B takes B0-B3 (EB0/EB1). Each slice is a 4-input 2-output
// LUT or a 2-bit adder/subtractor. Control pins: ICA/ICB are the fifth LUT
// input of slice A/B (and may be their carry in); IC is the sixth LUT input
// and may drive ADD/SUB of both slices. The carry in of each slice is either
// its control pin or the carry out of the other slice, so the block is one
// 4-bit adder (A = bits 1:0, B = bits 3:2, cin on ICA, cout on OCB).
// OCA/OCB carry the slices' carry outs to the routing. The seven logic
// outputs go through the local crossbar to O0-O3; each of those can be
// taken from a flip-flop (one clock of latency) or directly.
// Interface: pins[] in fpga_pkg::ipin_e order, configuration as an
// nlb_cfg_t held outside. Flip-flops reset to 0 on rst_n low
// (asynchronous).
//
// Pins, slices, AND planes, the carry-in multiplexers, the 5/6-input LUT
// multiplexers, the crossbar and the registered outputs follow the block
// diagram, as do ADD/SUB forced to 1 or taken from IC. Reset, the polarity
// of the wide-LUT multiplexers and the added constant-0 ADD/SUB setting are
// this design's choices. If both slices are
// configured to take their carry from the other one, the two carry paths
// form a combinational loop; a valid configuration never does that.
module nlb
  import fpga_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  nlb_cfg_t             cfg,
  input  logic [NUM_IPINS-1:0] pins,
  output logic [3:0]           o,     // major outputs O0-O3
  output logic                 oca,   // carry out of slice A
  output logic                 ocb    // carry out of slice B
);
  logic [3:0] ia, ib;
  logic cin_a, cin_b, cout_a, cout_b;
  logic as_a, as_b;
  logic a0, a1, a5, b0, b1, b5, f6;
  logic [3:0] xo, q;

  function automatic logic addsub_of(addsub_e s, logic ic);
    case (s)
      AS_SUB:  return 1'b1;
      AS_IC:   return ic;
      default: return 1'b0;
    endcase
  endfunction

  and_plane u_ap_a (
    .m(pins[P_A3:P_A0]), .e0(pins[P_EA0]), .e1(pins[P_EA1]),
    .sel_even(cfg.slice_a.ap_even), .sel_odd(cfg.slice_a.ap_odd), .y(ia)
  );
  and_plane u_ap_b (
    .m(pins[P_B3:P_B0]), .e0(pins[P_EB0]), .e1(pins[P_EB1]),
    .sel_even(cfg.slice_b.ap_even), .sel_odd(cfg.slice_b.ap_odd), .y(ib)
  );

  assign cin_a = cfg.slice_a.cin_pin ? pins[P_ICA] : cout_b;
  assign cin_b = cfg.slice_b.cin_pin ? pins[P_ICB] : cout_a;
  assign as_a  = addsub_of(cfg.slice_a.addsub, pins[P_IC]);
  assign as_b  = addsub_of(cfg.slice_b.addsub, pins[P_IC]);

  nlb_slice u_slice_a (
    .i(ia), .cin(cin_a), .addsub(as_a), .c5(pins[P_ICA]),
    .lut0(cfg.slice_a.lut0), .lut1(cfg.slice_a.lut1), .arith(cfg.slice_a.arith),
    .out0(a0), .out1(a1), .f5(a5), .cout(cout_a)
  );
  nlb_slice u_slice_b (
    .i(ib), .cin(cin_b), .addsub(as_b), .c5(pins[P_ICB]),
    .lut0(cfg.slice_b.lut0), .lut1(cfg.slice_b.lut1), .arith(cfg.slice_b.arith),
    .out0(b0), .out1(b1), .f5(b5), .cout(cout_b)
  );

  assign f6 = pins[P_IC] ? b5 : a5;

  local_crossbar u_xbar (
    .src({f6, b5, b1, b0, a5, a1, a0}), .sel(cfg.xbar), .o(xo)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= xo;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) o[k] = cfg.ff_en[k] ? q[k] : xo[k];
  end

  assign oca = cout_a;
  assign ocb = cout_b;
endmodule
