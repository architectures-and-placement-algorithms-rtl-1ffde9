// Self-checking test of the nlb: a 4-bit adder (carry A to B), a 4-bit
// add/subtract controlled by IC, the reverse carry order (B to A), the
// 5- and 6-input LUTs, the 2-bit multiplexer of MUX mode through the AND
// plane, and the registered outputs (one clock of latency).
module tb_nlb;
  import fpga_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  nlb_cfg_t cfg;
  logic [NUM_IPINS-1:0] pins;
  logic [3:0] o;
  logic oca, ocb;

  nlb dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Place operand bits on the major pins in ADD-mode order.
  task automatic set_ops(logic [3:0] x, logic [3:0] y);
    pins[P_A0] = x[0]; pins[P_A1] = x[1]; pins[P_A2] = y[0]; pins[P_A3] = y[1];
    pins[P_B0] = x[2]; pins[P_B1] = x[3]; pins[P_B2] = y[2]; pins[P_B3] = y[3];
  endtask

  function automatic slice_cfg_t arith_slice(addsub_e as, logic cin_pin);
    slice_cfg_t s;
    s = '0;
    s.arith = 1'b1; s.addsub = as; s.cin_pin = cin_pin;
    s.ap_even = AP_PASS; s.ap_odd = AP_PASS;
    return s;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; pins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- 4-bit adder, carry A -> B, cin on ICA, cout on OCB
    cfg.slice_a = arith_slice(AS_ADD, 1'b1);
    cfg.slice_b = arith_slice(AS_ADD, 1'b0);
    cfg.xbar = {X_B1, X_B0, X_A1, X_A0};
    cfg.ff_en = 4'b0000;
    for (int v = 0; v < 512; v++) begin
      logic [4:0] s;
      set_ops(v[3:0], v[7:4]); pins[P_ICA] = v[8]; #1;
      s = 5'(v[3:0]) + 5'(v[7:4]) + 5'(v[8]);
      chk({ocb, o} == s, $sformatf("add %0d+%0d+%0d got %0d", v[3:0], v[7:4], v[8], {ocb, o}));
    end

    // ---- add/subtract controlled by IC (IC = 1 subtracts, ICA carries the +1)
    cfg.slice_a = arith_slice(AS_IC, 1'b1);
    cfg.slice_b = arith_slice(AS_IC, 1'b0);
    for (int v = 0; v < 512; v++) begin
      logic [3:0] d;
      set_ops(v[3:0], v[7:4]); pins[P_IC] = v[8]; pins[P_ICA] = v[8]; #1;
      d = v[8] ? (v[3:0] - v[7:4]) : (v[3:0] + v[7:4]);
      chk(o == d, $sformatf("addsub ic=%0d %0d,%0d got %0d", v[8], v[3:0], v[7:4], o));
      if (v[8]) chk(ocb == (v[3:0] >= v[7:4]), "borrow");
    end
    pins[P_IC] = 0;

    // ---- reverse order: slice B holds bits 1:0 (cin ICB), slice A bits 3:2
    cfg.slice_a = arith_slice(AS_SUB, 1'b0);
    cfg.slice_b = arith_slice(AS_SUB, 1'b1);
    cfg.xbar = {X_A1, X_A0, X_B1, X_B0};
    for (int v = 0; v < 256; v++) begin
      logic [3:0] x, y;
      x = v[3:0]; y = v[7:4];
      pins[P_B0] = x[0]; pins[P_B1] = x[1]; pins[P_B2] = y[0]; pins[P_B3] = y[1];
      pins[P_A0] = x[2]; pins[P_A1] = x[3]; pins[P_A2] = y[2]; pins[P_A3] = y[3];
      pins[P_ICB] = 1'b1; #1;
      chk(o == 4'(x - y) && oca == (x >= y), "sub B->A");
    end

    // ---- 5- and 6-input LUTs
    cfg = '0;
    cfg.slice_a.lut0 = 16'($urandom); cfg.slice_a.lut1 = 16'($urandom);
    cfg.slice_b.lut0 = 16'($urandom); cfg.slice_b.lut1 = 16'($urandom);
    cfg.xbar = {X_F6, X_B5, X_A5, X_A0};
    for (int v = 0; v < 2048; v++) begin
      logic ea, eb, e5a, e5b, e6;
      pins = '0;
      pins[P_A3:P_A0] = v[3:0]; pins[P_B3:P_B0] = v[7:4];
      pins[P_ICA] = v[8]; pins[P_ICB] = v[9]; pins[P_IC] = v[10]; #1;
      ea  = cfg.slice_a.lut0[v[3:0]];
      e5a = v[8] ? cfg.slice_a.lut1[v[3:0]] : cfg.slice_a.lut0[v[3:0]];
      e5b = v[9] ? cfg.slice_b.lut1[v[7:4]] : cfg.slice_b.lut0[v[7:4]];
      e6  = v[10] ? e5b : e5a;
      chk(o == {e6, e5b, e5a, ea}, "lut");
    end

    // ---- MUX mode on slice A: A0=x0 A1=y0 A2=x1 A3=y1, sel on EA0
    cfg = '0;
    cfg.slice_a.ap_even = AP_E0; cfg.slice_a.ap_odd = AP_E0;
    for (int k = 0; k < 16; k++) begin
      cfg.slice_a.lut0[k] = k[0] | k[1];   // OR of inputs 0,1
      cfg.slice_a.lut1[k] = k[2] | k[3];   // OR of inputs 2,3
    end
    cfg.xbar = {X_ZERO, X_ZERO, X_A1, X_A0};
    for (int v = 0; v < 32; v++) begin
      logic [1:0] x, y, e;
      x = v[1:0]; y = v[3:2];
      pins = '0;
      pins[P_A0] = x[0]; pins[P_A1] = y[0]; pins[P_A2] = x[1]; pins[P_A3] = y[1];
      pins[P_EA0] = v[4]; #1;
      e = v[4] ? x : y;
      chk(o[1:0] == e, "mux mode");
    end

    // ---- registered outputs: one clock of latency
    cfg.ff_en = 4'b0011;
    for (int r = 0; r < 20; r++) begin
      logic [1:0] x, y, e;
      @(negedge clk);
      x = 2'($urandom); y = 2'($urandom);
      pins[P_A0] = x[0]; pins[P_A1] = y[0]; pins[P_A2] = x[1]; pins[P_A3] = y[1];
      pins[P_EA0] = 1'b1; e = x;
      @(negedge clk); #1;
      chk(o[1:0] == e, "registered output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
