// cnu: check node unit of the bit-flipping LDPC decoder.
//
// A check node holds one parity-check equation. Its value is the XOR of the
// DC variable-node estimates wired to it: 0 when the equation is satisfied,
// 1 when it is not. Purely combinational; the decoder evaluates every check
// node in the same cycle as the variable-node update (one iteration per
// clock). The XOR structure is the one described for the decoder; nothing
// here is a design choice beyond the port names.
module cnu #(
  parameter int unsigned DC = pgdbf_pkg::DEF_DC
) (
  input  logic [DC-1:0] v,  // estimates of the connected variable nodes
  output logic          c   // 1 = parity check unsatisfied
);
  assign c = ^v;
endmodule
