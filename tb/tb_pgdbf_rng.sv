// tb_pgdbf_rng: checks the random-bit source against an independent model.
// The model keeps the 32-bit LFSR as an integer and advances it with the
// feedback of x^32 + x^22 + x^2 + x + 1; the Bernoulli bit is 1 when the low
// byte is below P0_NUM. Every clock the whole N-bit register is compared.
// The fraction of ones over a long run must be close to P0_NUM/256.
module tb_pgdbf_rng;
  localparam int unsigned N      = 40;
  localparam int unsigned P0_NUM = 230;
  localparam logic [31:0] SEED   = 32'h1357_9BDF;
  localparam int unsigned CYCLES = 20000;
  logic         clk = 0, rst;
  logic [N-1:0] rbits;
  logic [31:0]  ml;
  logic [N-1:0] mr;
  int checks = 0, failures = 0, ones = 0;

  pgdbf_rng #(.N(N), .P0_NUM(P0_NUM), .SEED(SEED)) dut (.clk, .rst, .rbits);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    ml = SEED; mr = '0;
    for (int t = 0; t < int'(CYCLES); t++) begin
      logic b, fb;
      checks++;
      if (rbits !== mr) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d rbits=%h expected %h", t, rbits, mr);
      end
      @(posedge clk);
      b  = (int'(ml & 32'hFF) < int'(P0_NUM));
      fb = ml[31] ^ ml[21] ^ ml[1] ^ ml[0];
      ml = (ml << 1) | 32'(fb);
      mr = (mr << 1) | N'(b);
      ones += int'(b);
      #1;
    end
    // p0 = 230/256 = 0.898; accept 0.88 .. 0.92 over 20000 draws
    checks++;
    if (ones * 100 < 88 * int'(CYCLES) || ones * 100 > 92 * int'(CYCLES)) begin
      failures++;
      $display("FAIL fraction of ones %0d / %0d", ones, CYCLES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
