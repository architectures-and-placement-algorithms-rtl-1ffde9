// Self-checking test of direct_mux: all input combinations.
module tb_direct_mux;
  int checks = 0, failures = 0;
  logic from_tracks, from_direct, use_direct, pin;

  direct_mux dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {use_direct, from_direct, from_tracks} = v[2:0];
      #1;
      checks++;
      if (pin !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL v=%b pin=%b", v[2:0], pin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
