// sams2_reducer: SAMS2 (shift-addition-multiplication-subtraction-subtraction)
// reduction of an XW-bit value modulo q = 12289, with RESO encoding.
//
// Norm mode: xe = x. RESO mode: xe = x << 1, and the residue of 2x is halved
// modulo q at the output (a right shift with q added first when the residue
// is odd), which returns x mod q again. Inside: Shift-Add estimates the
// quotient t from seven right shifts of xe, Multq forms t*q with shifts and
// adds, and Subt subtracts t*q and the multiples of q in parallel and keeps
// the residue in [0, q).
// Pipeline: the x path has three registers before Subt; the t path has a
// register, Multq, and two more registers. out_valid/out_r follow
// in_valid/in_x by 3 clock edges; Subt and the output multiplexer are
// combinational. flt_sa0/flt_sa1 force bits of the encoded input xe (fault
// injection; tie to 0 in normal use).
// The block order, the shift amounts and the RESO multiplexers follow the
// SAMS2 error-detection construction; the second register on the t path
// (to line it up with the x path), the add-q-if-odd correction of the
// right shift and XW = 28 (a product of two 14-bit residues) are this
// design's choices.
module sams2_reducer
  import rlwe_pkg::*;
#(
  parameter int XW = 28
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_reso,
  input  logic [XW-1:0] in_x,
  input  logic [XW:0]   flt_sa0,
  input  logic [XW:0]   flt_sa1,
  output logic          out_valid,
  output logic          out_reso,
  output logic [13:0]   out_r
);

  localparam int EW = XW + 1;   // encoded input width
  localparam int OW = XW + 3;   // width of x, t*q and the differences

  logic [EW-1:0] xe, t;
  logic [EW-1:0] x1, x2, x3, t1;
  logic [OW-1:0] tq, tq2, tq3;
  logic [2:0]    v, reso;
  logic [13:0]   r;

  // Norm/RESO input multiplexer, then fault injection
  always_comb begin
    xe = in_reso ? {in_x, 1'b0} : {1'b0, in_x};
    xe = (xe & ~flt_sa0) | flt_sa1;
  end

  sams2_shift_add #(.XW(EW)) u_sa (.x(xe), .t(t));

  sams2_multq #(.TW(EW), .OW(OW)) u_mq (.t(t1), .tq(tq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0; t1 <= '0; tq2 <= '0; tq3 <= '0;
      v <= '0; reso <= '0;
    end else begin
      x1 <= xe; x2 <= x1; x3 <= x2;
      t1 <= t;  tq2 <= tq; tq3 <= tq2;
      v    <= {v[1:0], in_valid};
      reso <= {reso[1:0], in_reso};
    end
  end

  sams2_subt #(.OW(OW)) u_sub (.x(OW'(x3)), .tq(tq3), .r(r));

  // Norm/RESO output multiplexer
  always_comb begin
    out_r     = reso[2] ? 14'(half_mod(32'(r), 32'd12289)) : r;
    out_valid = v[2];
    out_reso  = reso[2];
  end

endmodule
