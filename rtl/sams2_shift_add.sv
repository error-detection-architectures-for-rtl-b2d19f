// sams2_shift_add: quotient estimate of the SAMS2 reduction modulo 12289.
//
// 1/12289 is close to 2^-14 * 4/3 = 2^-14 + 2^-16 + 2^-18 + ..., so the
// quotient t of x / 12289 is approximated by the sum of seven right shifts
// x>>14 + x>>16 + ... + x>>26. Only shifts and adds, combinational. The
// estimate may differ from floor(x/q) by -7..+1; the Subt stage corrects it.
module sams2_shift_add #(
  parameter int XW = 29
) (
  input  logic [XW-1:0] x,
  output logic [XW-1:0] t
);

  always_comb begin
    t = '0;
    for (int k = 0; k < 7; k++) t += x >> (14 + 2 * k);
  end

endmodule
