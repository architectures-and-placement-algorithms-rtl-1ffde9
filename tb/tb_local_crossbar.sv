// Self-checking test of local_crossbar: random sources and selects.
module tb_local_crossbar;
  import fpga_pkg::*;
  int checks = 0, failures = 0;
  logic [6:0] src;
  xbar_src_e [3:0] sel;
  logic [3:0] o;

  local_crossbar dut (.src, .sel, .o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      src = 7'($urandom);
      for (int k = 0; k < 4; k++) sel[k] = xbar_src_e'($urandom_range(0, 7));
      #1;
      for (int k = 0; k < 4; k++) begin
        logic e;
        e = (int'(sel[k]) == 7) ? 1'b0 : src[int'(sel[k])];
        checks++;
        if (o[k] !== e) begin
          failures++;
          $display("FAIL k=%0d sel=%0d src=%b o=%b", k, sel[k], src, o[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
