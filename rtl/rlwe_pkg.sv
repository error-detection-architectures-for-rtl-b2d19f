// rlwe_pkg: types and helpers shared by the error-detecting ring-LWE datapaths.
//
// recomp_mode_e selects how an operation of the modular-reduction datapaths is
// computed: plainly (MODE_NORM), with both additive operands shifted left by one
// bit (MODE_RESO, recomputing with shifted operands) or with the two multiplier
// operands exchanged (MODE_RESWO, recomputing with swapped operands).
// half_mod() is the RESO decoder: it divides an already reduced value by two
// modulo an odd modulus, i.e. (v + (v odd ? q : 0)) >> 1.
package rlwe_pkg;

  typedef enum logic [1:0] {
    MODE_NORM  = 2'd0,
    MODE_RESO  = 2'd1,
    MODE_RESWO = 2'd2
  } recomp_mode_e;

  // Multiply a residue v in [0, q) by 2^-1 mod q (q odd). The result is in [0, q).
  function automatic logic [31:0] half_mod(input logic [31:0] v, input logic [31:0] q);
    logic [32:0] s;
    s = {1'b0, v} + (v[0] ? {1'b0, q} : 33'd0);
    return 32'(s >> 1);
  endfunction

endpackage
