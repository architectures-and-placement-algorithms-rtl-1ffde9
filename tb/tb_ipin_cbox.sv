// Self-checking test of ipin_cbox: constants, every track and the direct
// connection, for a pin with and a pin without a direct connection.
module tb_ipin_cbox;
  localparam int W = 12;
  localparam int SELW = $clog2(W + 3);
  int checks = 0, failures = 0;
  logic [W-1:0] tracks;
  logic direct_in;
  logic [SELW-1:0] sel;
  logic pin_d, pin_n;

  ipin_cbox #(.W(W), .DIRECT(1)) dut_d (.tracks, .direct_in, .sel, .pin(pin_d));
  ipin_cbox #(.W(W), .DIRECT(0)) dut_n (.tracks, .direct_in, .sel, .pin(pin_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      tracks = W'($urandom);
      direct_in = 1'($urandom);
      for (int s = 0; s < (1 << SELW); s++) begin
        logic ed, en;
        sel = SELW'(s);
        #1;
        if (s == 0) en = 1'b0;
        else if (s == 1) en = 1'b1;
        else if (s < W + 2) en = tracks[s - 2];
        else en = 1'b0;
        ed = (s == W + 2) ? direct_in : en;
        checks++;
        if (pin_d !== ed || pin_n !== en) begin
          failures++;
          $display("FAIL sel=%0d pin_d=%b/%b pin_n=%b/%b", s, pin_d, ed, pin_n, en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
