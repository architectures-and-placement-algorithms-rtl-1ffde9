// Self-checking test of switch_box: random segment values and selections on
// a full and a half box, checked against the fragment connectivity (full:
// every pair of sides; half: the straight pairs and one turn per track).
module tb_switch_box;
  localparam int W = 12;
  int checks = 0, failures = 0;
  int used_half_pairs = 0, blocked_half_pairs = 0;
  logic [3:0][W-1:0] seg, cand_f, cand_h;
  logic [3:0][W-1:0][1:0] sel;

  switch_box #(.W(W), .HALF(0)) dut_f (.seg, .sel, .cand(cand_f));
  switch_box #(.W(W), .HALF(1)) dut_h (.seg, .sel, .cand(cand_h));

  // Half fragment of track t: straight pairs plus the turn right-bottom
  // rotated by t mod 4 quarter turns.
  function automatic bit half_pair(int a, int b, int t);
    int turn_a, turn_b;
    if ((a == 0 && b == 2) || (a == 2 && b == 0) || (a == 1 && b == 3) || (a == 3 && b == 1))
      return 1;
    case (t % 4)
      0: begin turn_a = 2; turn_b = 3; end
      1: begin turn_a = 3; turn_b = 0; end
      2: begin turn_a = 0; turn_b = 1; end
      default: begin turn_a = 1; turn_b = 2; end
    endcase
    return (a == turn_a && b == turn_b) || (a == turn_b && b == turn_a);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 300; r++) begin
      for (int s = 0; s < 4; s++) begin
        seg[s] = W'($urandom);
        for (int t = 0; t < W; t++) sel[s][t] = 2'($urandom);
      end
      #1;
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < W; t++) begin
          int o;
          logic ef, eh;
          o = (s + int'(sel[s][t])) % 4;
          ef = (sel[s][t] == 0) ? 1'b0 : seg[o][t];
          eh = (sel[s][t] != 0 && half_pair(s, o, t)) ? seg[o][t] : 1'b0;
          if (sel[s][t] != 0) begin
            if (half_pair(s, o, t)) used_half_pairs++;
            else blocked_half_pairs++;
          end
          checks++;
          if (cand_f[s][t] !== ef || cand_h[s][t] !== eh) begin
            failures++;
            $display("FAIL s=%0d t=%0d sel=%0d full=%b/%b half=%b/%b", s, t, sel[s][t],
                     cand_f[s][t], ef, cand_h[s][t], eh);
          end
        end
    end
    checks++;
    if (used_half_pairs == 0 || blocked_half_pairs == 0) failures++;
    // Half box, track 4: left to bottom is not direct, it goes through the
    // right-side segment.
    seg = '0; sel = '0;
    seg[0][4] = 1'b1;          // value on the left segment
    sel[3][4] = 2'd1;          // bottom takes left directly (3+1)%4 = 0
    #1;
    checks++;
    if (cand_h[3][4] !== 1'b0 || cand_f[3][4] !== 1'b1) failures++;
    sel[2][4] = 2'd2;          // right segment takes left   (2+2)%4 = 0
    #1;
    seg[2][4] = cand_h[2][4];  // the right segment now carries it
    sel[3][4] = 2'd3;          // bottom takes right         (3+3)%4 = 2
    #1;
    checks++;
    if (cand_h[3][4] !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
