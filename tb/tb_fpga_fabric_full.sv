// Full-size test of fpga_fabric: the top at its default parameters (6 x 23
// tiles, 24 pads per edge position, 12-track channels, full switch boxes),
// instantiated without a parameter list.
//
// Same flow as the small end-to-end test: the router of fabric_image_pkg
// builds a configuration image for the whole array, every frame is loaded
// over the configuration bus, and three circuits are checked against integer
// references for 300 random vectors:
//   * an 8-bit subtractor a - b over tiles (3,12) and (4,12), carry passing
//     over the east direct connection, "a >= b" on a pad;
//   * a 2-bit 2:1 multiplexer in MUX mode on tile (1,1) (corner), registered
//     tile outputs;
//   * a random 6-input function on tile (6,23) (opposite corner), through a
//     registered output pad.
// Pads are chosen by the router. Mechanism counts are printed and each must
// be nonzero.
module tb_fpga_fabric_full;
  import fpga_pkg::*;
  import fabric_image_pkg::*;
  localparam int NX = 6, NY = 23, IO_RAT = 24;   // defaults of fpga_fabric
  localparam int LX = 6, LY = 23;  // tile of the 6-input function
  localparam int SX = 3, SY = 12;  // low tile of the subtractor
  localparam int MX = 1, MY = 1;   // multiplexer tile

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [0:0] cfg_we = '0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic [IO_RAT-1:0] bot_i [1][NX], top_i [1][NX], lft_i [1][NY], rgt_i [1][NY];
  logic [IO_RAT-1:0] bot_o [1][NX], top_o [1][NX], lft_o [1][NY], rgt_o [1][NY];
  logic [IO_RAT-1:0] bot_oe[1][NX], top_oe[1][NX], lft_oe[1][NY], rgt_oe[1][NY];

  // mechanism counters
  int n_sub = 0, n_carry_dc = 0, n_nocarry_dc = 0, n_mux0 = 0, n_mux1 = 0;
  int n_lut6_a = 0, n_lut6_b = 0, n_ffout = 0, n_padreg = 0;
  int n_turns = 0, n_const = 0;

  always #5 clk = ~clk;

  fpga_fabric dut (
    .clk, .rst_n, .cfg_we(cfg_we[0]), .cfg_addr, .cfg_data,
    .pad_bot_i(bot_i[0]), .pad_bot_o(bot_o[0]), .pad_bot_oe(bot_oe[0]),
    .pad_top_i(top_i[0]), .pad_top_o(top_o[0]), .pad_top_oe(top_oe[0]),
    .pad_lft_i(lft_i[0]), .pad_lft_o(lft_o[0]), .pad_lft_oe(lft_oe[0]),
    .pad_rgt_i(rgt_i[0]), .pad_rgt_o(rgt_o[0]), .pad_rgt_oe(rgt_oe[0])
  );

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mapping
  logic [63:0] lut6;
  localparam int N_NETS = 44;

  function automatic void build(fabric_image f);
    int net;
    ep_t sk[$];
    tile_cfg_t t;
    net = 1;
    // 6-input LUT tile (LX,LY): p[3:0] on A0..A3 and B0..B3, p[4] on ICA and
    // ICB, p[5] on IC
    t = f.tc[LX * 100 + LY];
    t.nlb.slice_a.lut0 = lut6[15:0];  t.nlb.slice_a.lut1 = lut6[31:16];
    t.nlb.slice_b.lut0 = lut6[47:32]; t.nlb.slice_b.lut1 = lut6[63:48];
    t.nlb.xbar = {X_ZERO, X_ZERO, X_F6, X_F6};
    f.tc[LX * 100 + LY] = t;
    for (int k = 0; k < 4; k++) begin
      sk = {pin_ep(LX, LY, P_A0 + k)}; f.auto_in(net++, $sformatf("pa%0d", k), sk);
      sk = {pin_ep(LX, LY, P_B0 + k)}; f.auto_in(net++, $sformatf("pb%0d", k), sk);
    end
    sk = {pin_ep(LX, LY, P_ICA)}; f.auto_in(net++, "pa4", sk);
    sk = {pin_ep(LX, LY, P_ICB)}; f.auto_in(net++, "pb4", sk);
    sk = {pin_ep(LX, LY, P_IC)};  f.auto_in(net++, "p5", sk);
    f.auto_out(net++, "f", pin_ep(LX, LY, 0), 1'b1);

    // MUX tile (MX,MY): A0 = x0, A1 = y0, A2 = x1, A3 = y1, EA0 = sel
    t = f.tc[MX * 100 + MY];
    t.nlb.slice_a.ap_even = AP_E0; t.nlb.slice_a.ap_odd = AP_E0;
    for (int k = 0; k < 16; k++) begin
      t.nlb.slice_a.lut0[k] = k[0] | k[1];
      t.nlb.slice_a.lut1[k] = k[2] | k[3];
    end
    t.nlb.xbar = {X_ZERO, X_ZERO, X_A1, X_A0};
    t.nlb.ff_en = 4'b0011;
    f.tc[MX * 100 + MY] = t;
    sk = {pin_ep(MX, MY, P_A0)};  f.auto_in(net++, "mx0", sk);
    sk = {pin_ep(MX, MY, P_A1)};  f.auto_in(net++, "my0", sk);
    sk = {pin_ep(MX, MY, P_A2)};  f.auto_in(net++, "mx1", sk);
    sk = {pin_ep(MX, MY, P_A3)};  f.auto_in(net++, "my1", sk);
    sk = {pin_ep(MX, MY, P_EA0)}; f.auto_in(net++, "msel", sk);
    f.auto_out(net++, "m0", pin_ep(MX, MY, 0));
    f.auto_out(net++, "m1", pin_ep(MX, MY, 1));


    // subtractor tiles (SX,SY), (SX+1,SY): slice A = bits 0..1, slice B = bits 2..3
    for (int x = SX; x <= SX + 1; x++) begin
      t = f.tc[x * 100 + SY];
      t.nlb.slice_a.arith = 1; t.nlb.slice_a.cin_pin = 1; t.nlb.slice_a.addsub = AS_SUB;
      t.nlb.slice_b.arith = 1; t.nlb.slice_b.cin_pin = 0; t.nlb.slice_b.addsub = AS_SUB;
      t.nlb.xbar = {X_B1, X_B0, X_A1, X_A0};
      t.ipin_sel[P_ICA] = (x == SX) ? IPIN_SELW'(1) : IPIN_SELW'(CHAN_W + 2);
      f.tc[x * 100 + SY] = t;
    end
    for (int i = 0; i < 8; i++) begin
      int x, pa, pb;
      x = SX + i / 4;
      case (i % 4)
        0: begin pa = P_A0; pb = P_A2; end
        1: begin pa = P_A1; pb = P_A3; end
        2: begin pa = P_B0; pb = P_B2; end
        default: begin pa = P_B1; pb = P_B3; end
      endcase
      sk = {pin_ep(x, SY, pa)}; f.auto_in(net++, $sformatf("a%0d", i), sk);
      sk = {pin_ep(x, SY, pb)}; f.auto_in(net++, $sformatf("b%0d", i), sk);
    end
    for (int i = 0; i < 8; i++)
      f.auto_out(net++, $sformatf("d%0d", i), pin_ep(SX + i / 4, SY, i % 4));
    f.auto_out(net++, "geq", pin_ep(SX + 1, SY, 5));
  endfunction

  task automatic load(fabric_image f, int d);
    int addrs[$];
    logic [CFG_W-1:0] datas[$];
    f.frames(addrs, datas);
    foreach (addrs[i]) begin
      @(negedge clk);
      cfg_we = '0; cfg_we[d] = 1'b1;
      cfg_addr = CFG_AW'(addrs[i]); cfg_data = datas[i];
    end
    @(negedge clk);
    cfg_we = '0;
  endtask

  fabric_image img [1];

  // Drive the pad of primary input `name` of DUT d.
  task automatic drive(int d, string name, logic v);
    ep_t e;
    e = img[d].io[name];
    case (e.a)
      0: bot_i[d][e.b - 1][e.c] = v;
      1: top_i[d][e.b - 1][e.c] = v;
      2: lft_i[d][e.b - 1][e.c] = v;
      default: rgt_i[d][e.b - 1][e.c] = v;
    endcase
  endtask

  // Value and output enable of the pad of primary output `name` of DUT d.
  function automatic logic [1:0] sample(int d, string name);
    ep_t e;
    e = img[d].io[name];
    case (e.a)
      0: return {bot_oe[d][e.b - 1][e.c], bot_o[d][e.b - 1][e.c]};
      1: return {top_oe[d][e.b - 1][e.c], top_o[d][e.b - 1][e.c]};
      2: return {lft_oe[d][e.b - 1][e.c], lft_o[d][e.b - 1][e.c]};
      default: return {rgt_oe[d][e.b - 1][e.c], rgt_o[d][e.b - 1][e.c]};
    endcase
  endfunction

  // Value of an output that must also be enabled.
  function automatic logic out(int d, string name);
    logic [1:0] s;
    s = sample(d, name);
    if (!s[1]) begin
      failures++;
      if (failures < 20) $display("FAIL dut%0d %s not enabled", d, name);
    end
    return s[0];
  endfunction

  initial begin
    for (int d = 0; d < 1; d++) begin
      foreach (bot_i[d][i]) begin bot_i[d][i] = '0; top_i[d][i] = '0; end
      foreach (lft_i[d][i]) begin lft_i[d][i] = '0; rgt_i[d][i] = '0; end
    end
    lut6 = {$urandom, $urandom};
    // The router is greedy; if a net does not fit, rebuild the image with
    // another track and pad order.
    for (int d = 0; d < 1; d++)
      for (int attempt = 0; attempt < 48; attempt++) begin
        img[d] = new(NX, NY, IO_RAT, 1'b0);
        img[d].seed = attempt % 12;
        img[d].mul = (attempt / 12) * 2 + 1;
        build(img[d]);
        if (img[d].n_fail == 0) break;
      end
    chk(img[0].n_routed == N_NETS, $sformatf("all nets routed (%0d)", img[0].n_routed));
    chk(img[0].n_fail == 0, "every net found a pad");
    n_turns = img[0].n_turns;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(img[0], 0);

    for (int r = 0; r < 300; r++) begin
      logic [7:0] a, b, diff, got;
      logic [1:0] mx, my, mexp;
      logic msel;
      logic [5:0] p;
      logic lexp;
      @(negedge clk);
      a = 8'($urandom); b = 8'($urandom);
      if (r % 7 == 0) b = a;
      mx = 2'($urandom); my = 2'($urandom); msel = 1'($urandom);
      p = 6'($urandom);
      for (int d = 0; d < 1; d++) begin
        for (int i = 0; i < 8; i++) begin
          drive(d, $sformatf("a%0d", i), a[i]);
          drive(d, $sformatf("b%0d", i), b[i]);
        end
        drive(d, "mx0", mx[0]); drive(d, "mx1", mx[1]);
        drive(d, "my0", my[0]); drive(d, "my1", my[1]);
        drive(d, "msel", msel);
        for (int k = 0; k < 5; k++) begin
          drive(d, $sformatf("pa%0d", k), p[k]);
          drive(d, $sformatf("pb%0d", k), p[k]);
        end
        drive(d, "p5", p[5]);
      end
      mexp = msel ? mx : my;
      lexp = lut6[p];
      #1;
      diff = a - b;
      for (int d = 0; d < 1; d++) begin
        for (int i = 0; i < 8; i++) got[i] = out(d, $sformatf("d%0d", i));
        chk(got == diff, $sformatf("dut%0d %0d-%0d got %0d", d, a, b, got));
        chk(out(d, "geq") == (a >= b), $sformatf("dut%0d geq", d));
      end
      n_sub++;
      n_const++;
      if (a[3:0] >= b[3:0]) n_carry_dc++; else n_nocarry_dc++;
      @(negedge clk); #1;
      for (int d = 0; d < 1; d++) begin
        chk({out(d, "m1"), out(d, "m0")} == mexp, $sformatf("dut%0d mux sel=%0d", d, msel));
        chk(out(d, "f") == lexp, $sformatf("dut%0d lut6 p=%0d", d, p));
      end
      n_ffout++; n_padreg++;
      if (msel) n_mux1++; else n_mux0++;
      if (p[5]) n_lut6_b++; else n_lut6_a++;
    end

    $display("mechanisms: sub=%0d carry_over_direct=%0d/%0d mux=%0d/%0d lut6=%0d/%0d ffout=%0d padreg=%0d sb_turns=%0d const=%0d",
             n_sub, n_carry_dc, n_nocarry_dc, n_mux0, n_mux1, n_lut6_a, n_lut6_b, n_ffout,
             n_padreg, n_turns, n_const);
    chk(n_sub > 0 && n_carry_dc > 0 && n_nocarry_dc > 0, "subtract and direct carry seen");
    chk(n_mux0 > 0 && n_mux1 > 0, "both mux selections seen");
    chk(n_lut6_a > 0 && n_lut6_b > 0, "both 6-LUT halves seen");
    chk(n_ffout > 0 && n_padreg > 0, "registered paths seen");
    chk(n_turns > 0, "switch-box turns used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
