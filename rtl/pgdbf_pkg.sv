// pgdbf_pkg: shared constants and constant functions of the PGDBF LDPC decoder.
//
// The decoder works on a regular (DV, DC) LDPC code of length N = DC*Z with
// M = DV*Z parity checks (rate 1 - DV/DC). The parity-check matrix H is
// quasi-cyclic: a DV x DC array of Z x Z circulant permutation matrices, the
// block in block-row i and block-column j being the identity rotated by
// s(i,j) = (i*j) mod Z. Row r of block (i,j) has its one in column
// (r + s(i,j)) mod Z. With Z > (DV-1)*(DC-1) the matrix has no 4-cycles.
//
// Code length 1296, rate 0.5 and dv = 3 (or 4) follow the hardware evaluation
// of the decoder; the circulant shifts are this design's own choice, since the
// matrix used there is not reproduced. The functions below are evaluated at
// elaboration time and give the fixed wiring of the Tanner graph.
package pgdbf_pkg;

  // Default code: N = 1296, dv = 3, dc = 6, rate 0.5.
  localparam int unsigned DEF_Z  = 216;
  localparam int unsigned DEF_DV = 3;
  localparam int unsigned DEF_DC = 6;

  // Iteration counter / max_iteration width (8 bits, as on the decoder ports).
  localparam int unsigned ITER_W = 8;

  // Bits needed for an energy value 0 .. dv+1.
  function automatic int unsigned energy_width(input int unsigned dv);
    return $clog2(dv + 2);
  endfunction

  // Rotation of circulant block (i, j).
  function automatic int unsigned qc_shift(input int unsigned i, input int unsigned j,
                                           input int unsigned z);
    return (i * j) % z;
  endfunction

  // Index of the check node that variable node n reaches through its d-th edge
  // (d = block-row index 0 .. DV-1).
  function automatic int unsigned cn_of_vn(input int unsigned n, input int unsigned d,
                                           input int unsigned z);
    int unsigned j, t, s;
    j = n / z;
    t = n % z;
    s = qc_shift(d, j, z);
    return d * z + ((t + z - s) % z);
  endfunction

  // Index of the variable node that check node m reaches through its e-th edge
  // (e = block-column index 0 .. DC-1).
  function automatic int unsigned vn_of_cn(input int unsigned m, input int unsigned e,
                                           input int unsigned z);
    int unsigned i, r, s;
    i = m / z;
    r = m % z;
    s = qc_shift(i, e, z);
    return e * z + ((r + s) % z);
  endfunction

endpackage
