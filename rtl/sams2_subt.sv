// sams2_subt: final correction of the SAMS2 reduction modulo 12289.
//
// Forms r = x - tq and, in parallel, r - q, r - 2q, ..., r - 7q, plus r + q
// for the case where the quotient estimate was one too high, and returns the
// candidate that lies in [0, q). Combinational: one subtractor per multiple
// and a priority select. The parallel subtractions of q..7q follow SAMS2;
// the r + q candidate is this design's addition.
module sams2_subt #(
  parameter int OW = 31
) (
  input  logic [OW-1:0] x,
  input  logic [OW-1:0] tq,
  output logic [13:0]   r
);

  localparam int Q = 12289;

  logic signed [OW:0] r0, cand;

  always_comb begin
    r0 = $signed({1'b0, x}) - $signed({1'b0, tq});
    r  = '0;
    for (int k = -1; k <= 7; k++) begin
      cand = r0 - (OW+1)'(k * Q);
      if (cand >= 0 && cand < Q) r = 14'(cand);
    end
  end

endmodule
