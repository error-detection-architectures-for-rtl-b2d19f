// rpm_column: one column of the modified-RENO ring polynomial multiplier.
//
// Column k accumulates coefficient c_k of c = a*b mod (x^n + 1). Each cycle it
// multiplies its a-coefficient by the broadcast b-coefficient (mod P) and adds
// the product to, or subtracts it from, its accumulator e_k; sel carries the
// sign term floor((i+j)/n) of the negacyclic product. Two Enc/Dec multiplexers
// sit in front of the +-mod p unit: in encode cycles (dec = 0) its operands are
// (e_k, a*b) with the operation chosen by sel; in the single decode cycle
// (dec = 1) they are (P, e_k) with subtraction, so the unit itself forms
// d_k = (P - e_k) mod P and no separate negation unit is needed.
// first = 1 makes the accumulator read as zero, starting a new run.
// Timing: the accumulator is updated at the clock edge where en = 1.
// The structure follows the modified RENO column; the 'first' clear and the
// synchronous enable are this design's own choices.
module rpm_column #(
  parameter int unsigned P = 1049089,
  localparam int W = $clog2(P)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // update the accumulator this cycle
  input  logic         first,   // first cycle of a run: accumulator reads as 0
  input  logic         dec,     // Enc/Dec select: 1 = decode cycle (P - e)
  input  logic         sel,     // floor((i+j)/n): 1 = subtract the product
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] e        // accumulator e_k (d_k after decode)
);

  logic [W-1:0] prod, acc_fb, opx, opy, sum;
  logic         op_sub;

  mod_mult #(.P(P)) u_mul (.a(a), .b(b), .z(prod));

  always_comb begin
    acc_fb = first ? '0 : e;
    // Enc/Dec multiplexers in front of the +-mod p unit
    opx    = dec ? W'(P) : acc_fb;
    opy    = dec ? e     : prod;
    op_sub = dec ? 1'b1  : sel;
  end

  mod_addsub #(.P(P)) u_addsub (.x(opx), .y(opy), .sub(op_sub), .z(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  e <= '0;
    else if (en) e <= sum;
  end

endmodule
