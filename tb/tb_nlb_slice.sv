// Self-checking test of nlb_slice: random LUT contents in LUT mode, and
// every operand/carry/ADD-SUB combination in arithmetic mode, checked
// against integer arithmetic.
module tb_nlb_slice;
  int checks = 0, failures = 0;
  logic [3:0] i;
  logic cin, addsub, c5, arith, out0, out1, f5, cout;
  logic [15:0] lut0, lut1;

  nlb_slice dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arith = 1'b0; cin = 1'b0; addsub = 1'b0;
    for (int r = 0; r < 20; r++) begin
      lut0 = 16'($urandom); lut1 = 16'($urandom);
      for (int v = 0; v < 32; v++) begin
        i = v[3:0]; c5 = v[4]; #1;
        checks++;
        if (out0 !== lut0[v[3:0]] || out1 !== lut1[v[3:0]] ||
            f5 !== (v[4] ? lut1[v[3:0]] : lut0[v[3:0]])) begin
          failures++;
          $display("FAIL lut i=%h out=%b%b f5=%b", i, out1, out0, f5);
        end
      end
    end
    arith = 1'b1; c5 = 1'b0;
    for (int v = 0; v < 64; v++) begin
      int x, yy, s;
      i = v[3:0]; cin = v[4]; addsub = v[5]; #1;
      x = v & 3; yy = (v >> 2) & 3;
      if (v[5]) yy = (~yy) & 3;
      s = x + yy + int'(v[4]);
      checks++;
      if ({cout, out1, out0} !== 3'(s)) begin
        failures++;
        $display("FAIL arith i=%h cin=%b as=%b got=%b exp=%0d", i, cin, addsub, {cout, out1, out0}, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
