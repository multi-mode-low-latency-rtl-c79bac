// pgdbf_decoder: Probabilistic Gradient Descent Bit-Flipping (PGDBF) LDPC
// decoder for a binary symmetric channel, one decoding iteration per clock.
//
// Structure: N variable node units (vnu), M = N*DV/DC check node units (cnu)
// wired by the fixed quasi-cyclic Tanner graph of pgdbf_pkg, a max_finder
// over the N energies, a random-bit source (pgdbf_rng) and a controller
// (pgdbf_ctrl). In one clock the check nodes XOR the current estimates, every
// variable node forms its energy, the max finder gives E_max, and each node
// whose energy equals E_max and whose random bit is 1 flips its estimate on
// the clock edge. The syndrome is zero when no check node is set; that stops
// decoding with done. For the first GDBF_ITERS iterations the random mask is
// ignored (deterministic GDBF), then PGDBF is used.
//
// Interface (as in the decoder's top-level view):
//   data_in / load_data_in : while load_data_in is high, one channel bit per
//       clock enters the node chains; after N clocks bit 0 of the word (the
//       first bit sent) sits in node 0. At the same time the estimates of the
//       previous word leave on data_out, bit 0 first (data_out = estimate of
//       node 0), so unloading overlaps loading.
//   start : pulse in IDLE; decoding begins on the next clock.
//   max_iteration[7:0] : iteration limit, sampled at start.
//   done : converged to a codeword; iteration[7:0] = flipping iterations used.
//   give_up : max_iteration iterations done without reaching a codeword.
// Timing: a word that needs k iterations raises done k+1 clocks after the
// start edge; N load clocks per word.
//
// Following the decoder description: ports, shift-register loading, one
// iteration per clock, the node datapath, the LFSR-fed N-bit random register
// and the GDBF-first schedule. This design's own choices: the parity-check
// matrix (see pgdbf_pkg), serial unloading through data_out, the p0 threshold
// encoding, the reset style and the FSM details.
//
// The channel bit held by node 0 is the end of the y chain; it is used only
// inside that node, so lint reports y[0] as unread at this level.
module pgdbf_decoder #(
  parameter int unsigned Z          = pgdbf_pkg::DEF_Z,   // circulant size
  parameter int unsigned DV         = pgdbf_pkg::DEF_DV,  // variable-node degree
  parameter int unsigned DC         = pgdbf_pkg::DEF_DC,  // check-node degree
  parameter int unsigned P0_NUM     = 230,                // p0 = P0_NUM/256
  parameter int unsigned GDBF_ITERS = 10,                 // deterministic iterations first
  parameter logic [31:0] SEED       = 32'hACE1_2468,      // LFSR seed, non-zero
  localparam int unsigned N  = DC * Z,
  localparam int unsigned M  = DV * Z,
  localparam int unsigned EW = pgdbf_pkg::energy_width(DV),
  localparam int unsigned IW = pgdbf_pkg::ITER_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          data_in,
  input  logic          load_data_in,
  input  logic [IW-1:0] max_iteration,
  input  logic          start,
  output logic          data_out,
  output logic [IW-1:0] iteration,
  output logic          done,
  output logic          give_up
);

  logic [N-1:0]         v;       // estimates
  logic [N-1:0]         y;       // channel bits
  logic [M-1:0]         c;       // check-node values
  logic [N-1:0][EW-1:0] energy;
  logic [EW-1:0]        e_max;
  logic [N-1:0]         rbits;
  logic                 load, update, gdbf_mode, syndrome_zero;

  // Check nodes.
  for (genvar m = 0; m < int'(M); m++) begin : g_cn
    logic [DC-1:0] cv;
    for (genvar e = 0; e < int'(DC); e++) begin : g_e
      assign cv[e] = v[pgdbf_pkg::vn_of_cn(m, e, Z)];
    end
    cnu #(.DC(DC)) u_cnu (.v(cv), .c(c[m]));
  end

  assign syndrome_zero = ~|c;

  // Variable nodes; node N-1 takes the serial input, node n takes node n+1.
  for (genvar n = 0; n < int'(N); n++) begin : g_vn
    logic [DV-1:0] vc;
    logic          y_in, v_in, r;
    for (genvar d = 0; d < int'(DV); d++) begin : g_d
      assign vc[d] = c[pgdbf_pkg::cn_of_vn(n, d, Z)];
    end
    if (n == int'(N) - 1) begin : g_head
      assign y_in = data_in;
      assign v_in = data_in;
    end else begin : g_body
      assign y_in = y[n+1];
      assign v_in = v[n+1];
    end
    assign r = rbits[n] | gdbf_mode;
    vnu #(.DV(DV)) u_vnu (
      .clk, .rst, .load, .update,
      .y_in, .v_in, .c(vc), .e_max, .rand_bit(r),
      .y(y[n]), .v(v[n]), .energy(energy[n])
    );
  end

  max_finder #(.N(N), .DV(DV)) u_max (.energy, .e_max);

  pgdbf_rng #(.N(N), .P0_NUM(P0_NUM), .SEED(SEED)) u_rng (.clk, .rst, .rbits);

  pgdbf_ctrl #(.GDBF_ITERS(GDBF_ITERS)) u_ctrl (
    .clk, .rst, .load_data_in, .start, .max_iteration, .syndrome_zero,
    .load, .update, .gdbf_mode, .iteration, .done, .give_up
  );

  assign data_out = v[0];

endmodule
