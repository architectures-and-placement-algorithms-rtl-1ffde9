// Self-checking test of io_pad: input and output modes, with and without
// the pad register (one clock of latency), and the unused setting.
module tb_io_pad;
  import fpga_pkg::*;
  localparam int W = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  pad_cfg_t cfg;
  logic [W-1:0] tracks;
  logic pad_i, pad_o, pad_oe, opin;

  io_pad #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; tracks = '0; pad_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // input, combinational
    cfg.mode = PAD_IN; cfg.reg_en = 0;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk); pad_i = 1'($urandom); #1;
      chk(opin == pad_i && !pad_oe && !pad_o, "input comb");
    end
    // input, registered: opin follows pad_i one clock later
    cfg.reg_en = 1;
    for (int r = 0; r < 20; r++) begin
      logic prev;
      @(negedge clk); pad_i = 1'($urandom); prev = pad_i;
      @(negedge clk); pad_i = ~prev; #1;   // new input must not show yet
      chk(opin == prev, "input registered");
    end
    // output, combinational, every track
    cfg.mode = PAD_OUT; cfg.reg_en = 0;
    for (int t = 0; t < W; t++) begin
      cfg.track = TRK_SELW'(t);
      tracks = W'($urandom); #1;
      chk(pad_o == tracks[t] && pad_oe && !opin, "output comb");
    end
    // output registered
    cfg.reg_en = 1; cfg.track = 3;
    for (int r = 0; r < 20; r++) begin
      logic prev;
      @(negedge clk); tracks = W'($urandom); prev = tracks[3];
      @(negedge clk); tracks[3] = ~prev; #1;
      chk(pad_o == prev && pad_oe, "output registered");
    end
    cfg.mode = PAD_OFF; #1;
    chk(!pad_oe && !opin && !pad_o, "off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
