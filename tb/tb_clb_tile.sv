// Self-checking test of clb_tile: the configuration frame is written over
// the configuration bus, operand bits arrive on tracks of the channels on
// the pins' sides, and the tile is checked as a 4-bit adder whose carry in
// comes over the direct connection, then as a 4-bit subtractor whose
// ADD/SUB and carry-in pins are tied to constant 1 in the connection boxes.
// A frame written to another address must not change the tile.
module tb_clb_tile;
  import fpga_pkg::*;
  localparam int W = CHAN_W;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [CFG_AW-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic [3:0][W-1:0] ch;
  logic direct_in;
  logic [3:0] o;
  logic oca, ocb;
  tile_cfg_t tc;
  int trk [NUM_IPINS];

  clb_tile #(.ADDR(5)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_frame(int addr, tile_cfg_t v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = CFG_AW'(addr); cfg_data = CFG_W'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Drive pin p's value onto its track on its side.
  task automatic drive(int p, logic v);
    ch[ipin_side(p)][trk[p]] = v;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch = '0; direct_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // distinct track per pin within its side
    for (int p = 0; p < NUM_IPINS; p++) trk[p] = (p * 5 + 1) % W;
    tc = '0;
    tc.nlb.slice_a.arith = 1; tc.nlb.slice_a.cin_pin = 1;
    tc.nlb.slice_b.arith = 1; tc.nlb.slice_b.cin_pin = 0;
    tc.nlb.xbar = {X_B1, X_B0, X_A1, X_A0};
    for (int p = 0; p < NUM_IPINS; p++) tc.ipin_sel[p] = IPIN_SELW'(2 + trk[p]);
    tc.ipin_sel[P_ICA] = IPIN_SELW'(W + 2);      // carry in over the direct connection
    write_frame(5, tc);
    for (int v = 0; v < 512; v++) begin
      logic [3:0] x, y;
      logic [4:0] s;
      x = v[3:0]; y = v[7:4];
      ch = 48'($urandom) ^ {16'($urandom), 32'($urandom)};
      drive(P_A0, x[0]); drive(P_A1, x[1]); drive(P_A2, y[0]); drive(P_A3, y[1]);
      drive(P_B0, x[2]); drive(P_B1, x[3]); drive(P_B2, y[2]); drive(P_B3, y[3]);
      drive(P_EA0, 1); drive(P_EA1, 1); drive(P_EB0, 1); drive(P_EB1, 1);
      direct_in = v[8];
      #1;
      s = 5'(x) + 5'(y) + 5'(v[8]);
      chk({ocb, o} == s, $sformatf("add %0d+%0d+%0d got %0d", x, y, v[8], {ocb, o}));
    end
    // frame for another address is ignored
    begin
      tile_cfg_t other;
      other = '0;
      write_frame(6, other);
      drive(P_A0, 1); drive(P_A1, 0); drive(P_A2, 0); drive(P_A3, 0);
      drive(P_B0, 0); drive(P_B1, 0); drive(P_B2, 0); drive(P_B3, 0);
      direct_in = 0; #1;
      chk(o == 4'd1, "frame for other address ignored");
    end
    // subtractor: IC and ICA tied to constant 1
    tc.nlb.slice_a.addsub = AS_IC; tc.nlb.slice_b.addsub = AS_IC;
    tc.ipin_sel[P_IC] = IPIN_SELW'(1);
    tc.ipin_sel[P_ICA] = IPIN_SELW'(1);
    write_frame(5, tc);
    for (int v = 0; v < 256; v++) begin
      logic [3:0] x, y;
      x = v[3:0]; y = v[7:4];
      drive(P_A0, x[0]); drive(P_A1, x[1]); drive(P_A2, y[0]); drive(P_A3, y[1]);
      drive(P_B0, x[2]); drive(P_B1, x[3]); drive(P_B2, y[2]); drive(P_B3, y[3]);
      direct_in = 1'($urandom);
      #1;
      chk(o == 4'(x - y) && ocb == (x >= y), $sformatf("sub %0d-%0d got %0d", x, y, o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
