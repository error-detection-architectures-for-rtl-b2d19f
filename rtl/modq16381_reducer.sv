// modq16381_reducer: reduction of a 29-bit value modulo q = 16381, with the
// RESO decoding step at its output.
//
// Because 2^14 = 3 (mod q), x = 2^14*H + L with H = x[28:14], L = x[13:0]
// folds to s = L + H + (H << 1) < 2^17. Conditional subtractions of 4q, 2q
// and q then bring s into [0, q). The last stage either passes the residue
// (normal operation) or, for a RESO-encoded input 2y, returns y mod q by a
// one-bit right shift made exact for odd q: an odd residue first has q added.
// Pipeline: fold -> register [16:0] -> subtractions -> register -> decode
// (combinational). out_valid/out_r follow in_valid/in_x by 2 clock edges.
// The fold (two adders, H and H<<1), the 2q and q subtractions, the
// register placement and the >>1 decode follow the q = 16381 reducer. The
// extra 4q subtraction is needed because a RESO-encoded input reaches up
// to 7q after the fold, and the add-q-if-odd correction makes the shift an
// exact division by two modulo q; both are this design's additions.
module modq16381_reducer
  import rlwe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_reso,   // 1: input is RESO-encoded, decode at output
  input  logic [28:0] in_x,
  output logic        out_valid,
  output logic        out_reso,
  output logic [13:0] out_r
);

  localparam logic [16:0] Q = 17'd16381;

  logic [16:0] fold, fold_r, s4, s2;
  logic [13:0] s1;
  logic [13:0] r_r;
  logic        v1, v2, reso1, reso2;

  always_comb fold = 17'(in_x[13:0]) + 17'(in_x[28:14]) + {1'b0, in_x[28:14], 1'b0};

  always_comb begin
    s4 = (fold_r >= 4 * Q) ? fold_r - 4 * Q : fold_r;
    s2 = (s4 >= 2 * Q) ? s4 - 2 * Q : s4;
    s1 = 14'((s2 >= Q) ? s2 - Q : s2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fold_r <= '0; r_r <= '0; v1 <= 1'b0; v2 <= 1'b0; reso1 <= 1'b0; reso2 <= 1'b0;
    end else begin
      fold_r <= fold;  v1 <= in_valid; reso1 <= in_reso;
      r_r    <= s1; v2 <= v1;   reso2 <= reso1;
    end
  end

  // Norm/RESO output multiplexer
  always_comb begin
    out_r     = reso2 ? 14'(half_mod(32'(r_r), 32'(Q))) : r_r;
    out_valid = v2;
    out_reso  = reso2;
  end

endmodule
