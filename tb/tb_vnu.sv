// tb_vnu: random stimulus for one DV = 3 variable node unit against a
// cycle-level model of its two registers, its energy and its flip rule.
module tb_vnu;
  localparam int unsigned DV = 3;
  localparam int unsigned EW = pgdbf_pkg::energy_width(DV);
  logic          clk = 0, rst, load, update, y_in, v_in, rand_bit;
  logic [DV-1:0] c;
  logic [EW-1:0] e_max;
  logic          y, v;
  logic [EW-1:0] energy;
  logic          my, mv;  // model registers
  int checks = 0, failures = 0, flips = 0, loads = 0;

  vnu #(.DV(DV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_energy();
    int e = int'(mv ^ my);
    for (int d = 0; d < int'(DV); d++) e += int'(c[d]);
    return e;
  endfunction

  initial begin
    rst = 1; load = 0; update = 0; y_in = 0; v_in = 0; rand_bit = 0; c = '0; e_max = '0;
    @(posedge clk); #1;
    rst = 0; my = 0; mv = 0;
    for (int t = 0; t < 5000; t++) begin
      int e;
      load     = ($urandom_range(3, 0) == 0);
      update   = $urandom_range(1, 0);
      y_in     = $urandom_range(1, 0);
      v_in     = $urandom_range(1, 0);
      rand_bit = $urandom_range(1, 0);
      c        = DV'($urandom);
      e        = model_energy();
      // e_max is never below a node's own energy in the decoder
      e_max    = EW'($urandom_range(int'(DV) + 1, e));
      #1;
      checks++;
      if (int'(energy) != e || y !== my || v !== mv) begin
        failures++;
        $display("FAIL t=%0d energy=%0d/%0d y=%b/%b v=%b/%b", t, energy, e, y, my, v, mv);
      end
      @(posedge clk);
      if (load) begin
        my = y_in; mv = v_in; loads++;
      end else if (update && e == int'(e_max) && rand_bit) begin
        mv = ~mv; flips++;
      end
      #1;
    end
    checks++;
    if (flips == 0 || loads == 0) begin
      failures++;
      $display("FAIL stimulus never flipped or loaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
