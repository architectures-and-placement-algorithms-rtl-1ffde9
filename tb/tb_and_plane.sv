// Self-checking test of and_plane: every input value, every extension-pin
// value and every gate-source setting, against an independent reference.
module tb_and_plane;
  import fpga_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] m, y;
  logic e0, e1;
  ap_sel_e se, so;

  and_plane dut (.m, .e0, .e1, .sel_even(se), .sel_odd(so), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        for (int v = 0; v < 64; v++) begin
          logic ge, go;
          logic [3:0] exp;
          se = ap_sel_e'(a); so = ap_sel_e'(b);
          m = v[3:0]; e0 = v[4]; e1 = v[5];
          ge = (a == 0) ? 1'b1 : (a == 1) ? v[4] : v[5];
          go = (b == 0) ? 1'b1 : (b == 1) ? !v[4] : !v[5];
          exp = {v[3] & go, v[2] & ge, v[1] & go, v[0] & ge};
          #1;
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL se=%0d so=%0d m=%b e=%b%b y=%b exp=%b", a, b, m, e1, e0, y, exp);
          end
        end
    // MUX-mode use: sel on EA0 for both pairs gives {x,0} or {0,y}
    se = AP_E0; so = AP_E0;
    m = 4'b1111; e0 = 1'b1; #1; checks++; if (y !== 4'b0101) failures++;
    e0 = 1'b0; #1; checks++; if (y !== 4'b1010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
