// mod_mult: modular multiplier z = (a * b) mod P, the product box of each
// column of the polynomial multiplier.
//
// The reduction method for a general modulus is left open (the reduction
// units of this library, for q = 16381 and q = 12289, are separate blocks), so
// this block forms the full 2W-bit product and reduces it with a constant
// modulo, which synthesis turns into a constant divider. Combinational.
// Inputs may be any W-bit value (a stuck-at fault may push an operand past P).
module mod_mult #(
  parameter int unsigned P = 1049089,
  localparam int W = $clog2(P)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] z
);

  localparam logic [2*W-1:0] PX = (2*W)'(P);

  logic [2*W-1:0] prod;

  always_comb begin
    prod = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    z    = W'(prod % PX);
  end

endmodule
