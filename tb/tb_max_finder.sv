// tb_max_finder: random and corner-case energies for a 50-node max finder
// (DV = 3, energies 0 .. 4). The expected maximum is a plain running maximum.
module tb_max_finder;
  localparam int unsigned N  = 50;
  localparam int unsigned DV = 3;
  localparam int unsigned EW = pgdbf_pkg::energy_width(DV);
  logic [N-1:0][EW-1:0] energy;
  logic [EW-1:0]        e_max;
  int checks = 0, failures = 0;

  max_finder #(.N(N), .DV(DV)) dut (.energy, .e_max);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int mx = 0;
    #1;
    for (int n = 0; n < int'(N); n++) if (int'(energy[n]) > mx) mx = int'(energy[n]);
    checks++;
    if (int'(e_max) != mx) begin
      failures++;
      $display("FAIL e_max=%0d expected %0d", e_max, mx);
    end
  endtask

  initial begin
    energy = '0;
    check();                                   // all zero
    for (int l = 1; l <= int'(DV) + 1; l++)    // single node at each level, each end
      for (int pos = 0; pos < int'(N); pos += int'(N) - 1) begin
        energy = '0;
        energy[pos] = EW'(l);
        check();
      end
    for (int t = 0; t < 2000; t++) begin       // random, with a random ceiling
      int ceil_v;
      ceil_v = $urandom_range(int'(DV) + 1, 0);
      for (int n = 0; n < int'(N); n++) energy[n] = EW'($urandom_range(ceil_v, 0));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
