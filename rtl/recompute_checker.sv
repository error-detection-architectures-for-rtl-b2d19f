// recompute_checker: comparator of a time-redundant (recomputing) datapath.
//
// The datapath delivers each result twice: first the normal result
// (in_recomp = 0), then the decoded recomputed one (in_recomp = 1). The
// normal result is held; when the recomputed one arrives, res_valid pulses
// for one cycle with res = the normal result and err = 1 if the two differ.
// err_sticky stays set from the first mismatch until reset.
// A recomputed result must follow a normal one (checked by an assertion).
// Timing: res_valid, res and err are registered, one edge after the
// recomputed result is presented. The comparison itself is the design's
// fault-detection rule; holding the first result in a register and the
// sticky flag are this design's choices. The comparator is assumed to be
// hardened against faults (it is the trusted part of the scheme).
module recompute_checker #(
  parameter int W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_recomp,
  input  logic [W-1:0] in_data,
  output logic         res_valid,
  output logic [W-1:0] res,
  output logic         err,
  output logic         err_sticky
);

  logic [W-1:0] held;
  logic         have_norm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0; have_norm <= 1'b0;
      res_valid <= 1'b0; res <= '0; err <= 1'b0; err_sticky <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (in_valid && !in_recomp) begin
        held      <= in_data;
        have_norm <= 1'b1;
      end else if (in_valid && in_recomp) begin
        have_norm <= 1'b0;
        res_valid <= 1'b1;
        res       <= held;
        err       <= (held != in_data);
        if (held != in_data) err_sticky <= 1'b1;
      end
    end
  end

  a_pair: assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_recomp) |-> have_norm)
    else $error("recompute_checker: recomputed result without a normal one");

endmodule
