// sams2_multq: multiplication by q = 12289 = 2^13 + 2^12 + 1 with shifts and
// adds only: tq = (t << 13) + (t << 12) + t. Combinational.
module sams2_multq #(
  parameter int TW = 29,
  parameter int OW = 31
) (
  input  logic [TW-1:0] t,
  output logic [OW-1:0] tq
);

  always_comb tq = (OW'(t) << 13) + (OW'(t) << 12) + OW'(t);

endmodule
