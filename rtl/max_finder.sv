// max_finder: maximum of the N node energies, combinational.
//
// Energies are small integers (0 .. DV+1), so instead of a tree of N-1
// comparators the maximum is found by thresholds: for every level L in
// 1 .. DV+1 one wide OR tells whether any node has energy >= L, and E_max is
// the highest level whose OR is set (0 if none). Cost is DV+1 comparisons per
// node plus DV+1 N-input ORs, and the depth grows with log(N) only through
// the OR trees.
//
// The decoder needs E_max in the same cycle as the energies (one iteration
// per clock). That a maximum finder exists and what it computes follow the
// decoder description; the threshold structure is this design's own choice.
module max_finder #(
  parameter int unsigned N  = pgdbf_pkg::DEF_DC * pgdbf_pkg::DEF_Z,
  parameter int unsigned DV = pgdbf_pkg::DEF_DV,
  localparam int unsigned EW = pgdbf_pkg::energy_width(DV),
  localparam int unsigned LEVELS = DV + 1
) (
  input  logic [N-1:0][EW-1:0] energy,
  output logic [EW-1:0]        e_max
);

  logic [LEVELS:1] any_ge;  // any_ge[L]: some energy >= L

  for (genvar l = 1; l <= int'(LEVELS); l++) begin : g_level
    logic [N-1:0] ge;  // ge[n]: energy[n] >= l
    for (genvar n = 0; n < int'(N); n++) begin : g_node
      assign ge[n] = (energy[n] >= EW'(l));
    end
    assign any_ge[l] = |ge;
  end

  always_comb begin
    e_max = '0;
    for (int l = 1; l <= int'(LEVELS); l++)
      if (any_ge[l])
        e_max = EW'(l);
  end

endmodule
