// vnu: variable node unit of the PGDBF decoder.
//
// Each variable node keeps two bits: y, the bit read from the channel, and v,
// the current estimate of the code bit. Its energy (inversion function) is
//     E = (v xor y) + (number of unsatisfied check nodes it is wired to),
// an integer from 0 to DV+1. In an iteration the node flips v when E reaches
// the global maximum E_max and its random bit is 1 (the random bit is forced
// to 1 by the decoder in GDBF mode). Energy, comparison and flip are
// combinational; v changes on the clock edge where `update` is high, so one
// iteration takes one clock.
//
// Both registers are also stages of the decoder's serial shift chains: while
// `load` is high, y takes y_in and v takes v_in (the neighbouring node's bits),
// so a new channel word enters while the previous corrected word leaves.
// `load` has priority over `update`. Synchronous active-high reset clears both
// bits.
//
// The energy formula, the ">= E_max" comparator, the AND with the random bit
// and the XOR that flips v follow the decoder's node architecture; the
// reset style and the priority between load and update are this design's own.
module vnu #(
  parameter int unsigned DV = pgdbf_pkg::DEF_DV,
  localparam int unsigned EW = pgdbf_pkg::energy_width(DV)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,      // shift chains by one position
  input  logic          update,    // perform one bit-flipping iteration
  input  logic          y_in,      // channel-bit chain input
  input  logic          v_in,      // estimate chain input
  input  logic [DV-1:0] c,         // values of the connected check nodes
  input  logic [EW-1:0] e_max,     // global maximum energy of this iteration
  input  logic          rand_bit,  // Bernoulli(p0) bit (1 in GDBF mode)
  output logic          y,         // stored channel bit
  output logic          v,         // current estimate (corrected data)
  output logic [EW-1:0] energy     // energy of this node
);

  logic flip;

  always_comb begin
    energy = EW'(v ^ y);
    for (int d = 0; d < int'(DV); d++)
      energy = energy + EW'(c[d]);
  end

  assign flip = (energy >= e_max) && rand_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      y <= 1'b0;
      v <= 1'b0;
    end else if (load) begin
      y <= y_in;
      v <= v_in;
    end else if (update) begin
      v <= v ^ flip;
    end
  end

endmodule
