// dsp_mac: DSP-style multiply-accumulate stage for q = 16381 with operand
// encoding for recomputation.
//
// Computes x = A*B + C (neg = 0) or x = (D - A)*B + C (neg = 1, with D = q
// this multiplies by -A mod q). Operands are 14-bit residues (A, C < q and
// D = q for the signed form). The mode selects the encoding applied at the
// inputs:
//   MODE_NORM : operands as given.
//   MODE_RESO : A and C are shifted left by one bit (15-bit registers), so
//               x = 2(A*B + C); D is shifted as well so that the signed form
//               gives 2((D - A)*B + C).
//   MODE_RESWO: the A and B operands trade places (A*B = B*A); only
//               meaningful for neg = 0.
// Pipeline: input registers (A, D, B, C and the control), then the pre-adder,
// multiplier and adder, then the 29-bit output register. out_valid, out_x,
// out_mode and out_neg appear 2 clock edges after in_valid is sampled.
// flt_sa0 / flt_sa1 force bits of the encoded A operand to 0 / 1 at the
// multiplier side (fault injection; tie to 0 in normal use).
// The register placement, widths ([14:0] encoded A and C, [28:0] product)
// and the pre-adder follow the DSP block of the q = 16381 construction;
// shifting D in RESO mode and the RESwO swap point are this design's choices.
module dsp_mac
  import rlwe_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  recomp_mode_e in_mode,
  input  logic         in_neg,      // 1: (D - A)*B + C
  input  logic [13:0]  a,
  input  logic [13:0]  b,
  input  logic [13:0]  c,
  input  logic [13:0]  d,
  input  logic [14:0]  flt_sa0,
  input  logic [14:0]  flt_sa1,
  output logic         out_valid,
  output recomp_mode_e out_mode,
  output logic         out_neg,
  output logic [28:0]  out_x
);

  logic [14:0]  a_enc, c_enc, d_enc;
  logic [13:0]  b_enc;
  logic [14:0]  a_r, c_r, d_r;
  logic [13:0]  b_r;
  logic         v_r, neg_r;
  recomp_mode_e mode_r;
  logic [14:0]  pre;
  logic [28:0]  mac;

  // Norm/RESO (and RESwO) input multiplexers
  always_comb begin
    a_enc = {1'b0, a};
    b_enc = b;
    c_enc = {1'b0, c};
    d_enc = {1'b0, d};
    unique case (in_mode)
      MODE_RESO: begin
        a_enc = {a, 1'b0};
        c_enc = {c, 1'b0};
        d_enc = {d, 1'b0};
      end
      MODE_RESWO: begin
        a_enc = {1'b0, b};
        b_enc = a;
      end
      default: ;
    endcase
    a_enc = (a_enc & ~flt_sa0) | flt_sa1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; c_r <= '0; d_r <= '0;
      v_r <= 1'b0; neg_r <= 1'b0; mode_r <= MODE_NORM;
    end else begin
      a_r <= a_enc; b_r <= b_enc; c_r <= c_enc; d_r <= d_enc;
      v_r <= in_valid; neg_r <= in_neg; mode_r <= in_mode;
    end
  end

  // pre-adder, multiplier and post-adder
  always_comb begin
    pre = neg_r ? (d_r - a_r) : a_r;
    mac = 29'(pre) * 29'(b_r) + 29'(c_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_x <= '0; out_valid <= 1'b0; out_mode <= MODE_NORM; out_neg <= 1'b0;
    end else begin
      out_x <= mac; out_valid <= v_r; out_mode <= mode_r; out_neg <= neg_r;
    end
  end

endmodule
