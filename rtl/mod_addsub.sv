// mod_addsub: multiplexing modular adder/subtractor ("+-mod p" box of each
// column of the polynomial multiplier).
//
// z = (x + y) mod P when sub = 0 and z = (x - y) mod P when sub = 1. The
// multiplier's sign term floor((i+j)/n) drives sub, so one unit both adds the
// positive and subtracts the wrapped (negated) partial products. Purely
// combinational: one add, one subtract-and-correct. The operands may lie in
// [0, P]; the value P itself is accepted so that the decode step can form
// P - e directly, and it is folded back into [0, P).
module mod_addsub #(
  parameter int unsigned P = 1049089,
  localparam int W = $clog2(P)
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         sub,
  output logic [W-1:0] z
);

  localparam logic [W+1:0] PX = (W+2)'(P);

  logic [W+1:0] s;

  always_comb begin
    if (sub) s = {2'b00, x} - {2'b00, y};
    else     s = {2'b00, x} + {2'b00, y};
    // a negative difference shows as bit W+1 set (two's complement)
    if (s[W+1])        z = W'(s + PX);
    else if (s >= PX)  z = W'(s - PX);
    else               z = W'(s);
  end

endmodule
