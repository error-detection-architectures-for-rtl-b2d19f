// sams2_ed: error-detecting SAMS2 reduction modulo q = 12289.
//
// Each accepted input x is reduced twice by the same sams2_reducer: once
// normally and once RESO-encoded (x doubled at the input, halved modulo q at
// the output). Since the reduction is linear, a fault-free circuit gives the
// same residue both times; recompute_checker compares them and raises err on
// a difference.
// Interface: in_valid/in_ready handshake; in_ready is low in the cycle after
// an acceptance while the RESO pass is issued. res_valid pulses 5 cycles after
// acceptance with res = x mod q and err. flt_sa0/flt_sa1 inject stuck-at
// faults on the encoded reducer input (tie to 0 in normal use).
// The two-pass schedule and the handshake are this design's choices.
module sams2_ed #(
  parameter int XW = 28
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [XW-1:0] x,
  input  logic [XW:0]   flt_sa0,
  input  logic [XW:0]   flt_sa1,
  output logic          res_valid,
  output logic [13:0]   res,
  output logic          err,
  output logic          err_sticky
);

  logic          second;
  logic [XW-1:0] x_h;
  logic          r_valid, r_reso;
  logic [13:0]   r;

  assign in_ready = !second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0;
      x_h    <= '0;
    end else if (second) begin
      second <= 1'b0;
    end else if (in_valid) begin
      second <= 1'b1;
      x_h    <= x;
    end
  end

  sams2_reducer #(.XW(XW)) u_red (
    .clk, .rst_n,
    .in_valid((in_valid && in_ready) || second), .in_reso(second),
    .in_x(second ? x_h : x), .flt_sa0, .flt_sa1,
    .out_valid(r_valid), .out_reso(r_reso), .out_r(r)
  );

  recompute_checker #(.W(14)) u_chk (
    .clk, .rst_n, .in_valid(r_valid), .in_recomp(r_reso), .in_data(r),
    .res_valid, .res, .err, .err_sticky
  );

endmodule
