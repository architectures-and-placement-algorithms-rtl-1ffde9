// Self-checking test of track_driver: random candidates, output pins and
// selections, checked against the select encoding.
module tb_track_driver;
  localparam int W = 12, NOP = 28, SELW = $clog2(3 + NOP);
  int checks = 0, failures = 0;
  logic [W-1:0] from_lo, from_hi, seg;
  logic [NOP-1:0] opin;
  logic [W-1:0][SELW-1:0] sel;

  track_driver #(.W(W), .NOP(NOP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      from_lo = W'($urandom); from_hi = W'($urandom); opin = NOP'($urandom);
      for (int t = 0; t < W; t++) sel[t] = SELW'($urandom);
      #1;
      for (int t = 0; t < W; t++) begin
        int s;
        logic e;
        s = int'(sel[t]);
        if (s == 0) e = 1'b0;
        else if (s == 1) e = from_lo[t];
        else if (s == 2) e = from_hi[t];
        else if (s < 3 + NOP) e = opin[s - 3];
        else e = 1'b0;
        checks++;
        if (seg[t] !== e) begin
          failures++;
          $display("FAIL t=%0d sel=%0d seg=%b exp=%b", t, s, seg[t], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
