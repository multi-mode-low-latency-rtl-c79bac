// pgdbf_rng: random-bit source for the probabilistic flips.
//
// A 32-bit Fibonacci LFSR (polynomial x^32 + x^22 + x^2 + x + 1, maximal
// length) advances one step per clock. Each clock one Bernoulli bit is drawn
// from it, 1 when the low 8 LFSR bits are below P0_NUM, so P(1) = P0_NUM/256;
// P0_NUM = 256 gives constant ones. That bit is shifted into an N-bit
// register whose bit n is the random input of variable node n. The register
// shifts on every clock, during loading and during the iterations, so it is
// full of random bits by the time decoding starts and the nodes see a new
// pattern in every iteration.
//
// The LFSR, its 32-bit size, one new bit per clock and the N-bit shift
// register feeding the nodes follow the decoder description. The polynomial,
// seed and the threshold used to set p0 are this design's own choices
// (default P0_NUM = 230, p0 ~ 0.9, the value used in the error-rate study).
// Synchronous active-high reset loads SEED and clears the shift register.
module pgdbf_rng #(
  parameter int unsigned N      = pgdbf_pkg::DEF_DC * pgdbf_pkg::DEF_Z,
  parameter int unsigned P0_NUM = 230,           // p0 = P0_NUM / 256, 0 .. 256
  parameter logic [31:0] SEED   = 32'hACE1_2468  // must be non-zero
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] rbits  // one random bit per variable node
);

  logic [31:0] lfsr;
  logic        fb;
  logic        bern;

  assign fb   = lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0];
  assign bern = {1'b0, lfsr[7:0]} < 9'(P0_NUM);

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr  <= SEED;
      rbits <= '0;
    end else begin
      lfsr  <= {lfsr[30:0], fb};
      if (N > 1)
        rbits <= {rbits[N-2:0], bern};
      else
        rbits <= N'(bern);
    end
  end

endmodule
