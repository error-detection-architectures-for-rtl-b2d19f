// dsp_modq_ed: error-detecting modular multiply-accumulate for q = 16381.
//
// Each accepted operation y = (A*B + C) mod q, or y = (-A*B + C) mod q when
// neg = 1 (computed as (q - A)*B + C), runs twice through the same hardware:
// the DSP stage (dsp_mac) followed by the modulo q reducer
// (modq16381_reducer). The first pass is normal; the second is recomputed
// with shifted operands (RESO: A, C and D doubled, the result halved mod q at
// the reducer output) or, if swap = 1 and neg = 0, with swapped operands
// (RESwO: A and B exchanged). recompute_checker compares the two results; a
// difference raises err. A fault that is present in one pass but not the
// other, or that hurts the encoded operands differently, shows as a mismatch.
// Interface: in_valid/in_ready handshake (an operation is taken when both are
// 1); in_ready is low in the cycle after an acceptance, while the second pass
// is issued, so at most one operation enters every two cycles. res_valid
// pulses 6 cycles after acceptance with res = the normal result and err.
// D is tied to q inside this block. flt_sa0/flt_sa1 inject stuck-at faults on
// the encoded A operand of the DSP stage (tie to 0 in normal use).
// The two-pass schedule, the handshake and tying D to q are this design's
// choices; the datapath follows the q = 16381 construction.
module dsp_modq_ed
  import rlwe_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [13:0] a,
  input  logic [13:0] b,
  input  logic [13:0] c,
  input  logic        neg,
  input  logic        swap,       // 1: recompute with RESwO (neg = 0 only)
  input  logic [14:0] flt_sa0,
  input  logic [14:0] flt_sa1,
  output logic        res_valid,
  output logic [13:0] res,
  output logic        err,
  output logic        err_sticky
);

  localparam logic [13:0] Q = 14'd16381;

  logic         second;
  logic [13:0]  a_h, b_h, c_h;
  logic         neg_h, swap_h;
  logic         issue;
  recomp_mode_e mode;
  logic [13:0]  a_m, b_m, c_m;
  logic         neg_m;

  assign in_ready = !second;
  assign issue    = (in_valid && in_ready) || second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0;
      a_h <= '0; b_h <= '0; c_h <= '0; neg_h <= 1'b0; swap_h <= 1'b0;
    end else if (second) begin
      second <= 1'b0;
    end else if (in_valid) begin
      second <= 1'b1;
      a_h <= a; b_h <= b; c_h <= c; neg_h <= neg; swap_h <= swap;
    end
  end

  always_comb begin
    a_m   = second ? a_h : a;
    b_m   = second ? b_h : b;
    c_m   = second ? c_h : c;
    neg_m = second ? neg_h : neg;
    if (!second)                mode = MODE_NORM;
    else if (swap_h && !neg_h)  mode = MODE_RESWO;
    else                        mode = MODE_RESO;
  end

  logic         x_valid;
  recomp_mode_e x_mode;
  logic [28:0]  x;

  dsp_mac u_dsp (
    .clk, .rst_n, .in_valid(issue), .in_mode(mode), .in_neg(neg_m),
    .a(a_m), .b(b_m), .c(c_m), .d(Q), .flt_sa0, .flt_sa1,
    .out_valid(x_valid), .out_mode(x_mode), .out_neg(), .out_x(x)
  );

  logic        r_valid;
  logic [13:0] r;
  logic [1:0]  recomp_d;

  modq16381_reducer u_red (
    .clk, .rst_n, .in_valid(x_valid), .in_reso(x_mode == MODE_RESO), .in_x(x),
    .out_valid(r_valid), .out_reso(), .out_r(r)
  );

  // carry the "second pass" tag alongside the reducer's two stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) recomp_d <= '0;
    else        recomp_d <= {recomp_d[0], x_mode != MODE_NORM};
  end

  recompute_checker #(.W(14)) u_chk (
    .clk, .rst_n, .in_valid(r_valid), .in_recomp(recomp_d[1]), .in_data(r),
    .res_valid, .res, .err, .err_sticky
  );

endmodule
