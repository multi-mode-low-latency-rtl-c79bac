// tb_cnu: exhaustive check of the check node unit.
// Every input pattern of a DC = 6 check node is applied; the expected value is
// the parity counted bit by bit in the testbench.
module tb_cnu;
  localparam int unsigned DC = 6;
  logic [DC-1:0] v;
  logic          c;
  int checks = 0, failures = 0;

  cnu #(.DC(DC)) dut (.v, .c);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << DC); p++) begin
      int ones;
      v = DC'(p);
      #1;
      ones = 0;
      for (int b = 0; b < int'(DC); b++) if (p & (1 << b)) ones++;
      checks++;
      if (c !== logic'(ones % 2)) begin
        failures++;
        $display("FAIL v=%b c=%b expected %0d", v, c, ones % 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
