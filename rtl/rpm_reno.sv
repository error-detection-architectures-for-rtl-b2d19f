// rpm_reno: ring polynomial multiplier c = a*b in Z_P[x]/(x^N + 1) with
// error detection by recomputing with a negated operand (modified RENO).
//
// Datapath: N columns (rpm_column) work in parallel, one per coefficient c_k.
// The a operand sits in a rotating register, so in cycle j column k sees
// a_{(k-j) mod N}; the b operand sits in a second rotating register whose head
// b_j is broadcast to all columns. Column k subtracts its product when k < j,
// which is the sign (-1)^floor((i+j)/N) of the negacyclic product.
// Error detection: run1 computes c normally (N cycles). run2 recomputes with b
// replaced by P - b_j (Norm/RENO multiplexer at the b input), giving e = -c,
// and one extra decode cycle makes each column form d = P - e with its own
// +-mod p unit. The run1 results are held in res1 and compared with d column
// by column; err is the OR of all N comparisons. With NEG_BOTH = 1 both
// operands are negated in run2 ((P - a_i)(P - b_j) = a_i b_j), so no decode
// cycle is needed. zero_alarm flags the one input the recomputation cannot
// check, both operands all-zero, by OR-ing every input bit.
// Fault injection: flt_sa0 / flt_sa1 force bits of the broadcast b operand to
// 0 / 1 at the multiplier inputs (drive both with 0 in normal use).
// Interface and timing: a start pulse with a_in/b_in valid in the same cycle
// loads the operands; done pulses 2N+3 cycles later (2N+2 with NEG_BOTH),
// with c_out = run1 result and err valid from then until the next done.
// Everything above follows the modified RENO architecture except the
// operand registers, the handshake and the fault-injection ports, which are
// this design's own.
module rpm_reno #(
  parameter int unsigned N        = 256,
  parameter int unsigned P        = 1049089,
  parameter bit          NEG_BOTH = 1'b0,
  localparam int         W        = $clog2(P),
  localparam int         JW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a_in  [N],
  input  logic [W-1:0] b_in  [N],
  input  logic [W-1:0] flt_sa0,     // 1 = force this bit of b to 0
  input  logic [W-1:0] flt_sa1,     // 1 = force this bit of b to 1
  output logic         busy,
  output logic         done,
  output logic [W-1:0] c_out [N],
  output logic         err,
  output logic         zero_alarm
);

  logic          load, en, first, reno, dec, store1, cmp;
  logic [JW-1:0] j;

  rpm_ctrl #(.N(N), .NEG_BOTH(NEG_BOTH)) u_ctrl (
    .clk, .rst_n, .start, .load, .en, .first, .reno, .dec, .store1, .cmp,
    .j, .busy, .done
  );

  function automatic logic [W-1:0] negmod(input logic [W-1:0] v);
    return (v == '0) ? '0 : W'(P) - v;
  endfunction

  logic [W-1:0] areg [N];
  logic [W-1:0] breg [N];
  logic [W-1:0] e    [N];
  logic [W-1:0] res1 [N];
  logic [W-1:0] b_enc, b_op;
  logic [N-1:0] mismatch;

  // operand registers: load, then rotate once per accumulation cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        areg[k] <= '0;
        breg[k] <= '0;
      end
    end else if (load) begin
      areg <= a_in;
      breg <= b_in;
    end else if (en && !dec) begin
      for (int k = 0; k < N; k++) begin
        areg[k] <= areg[(k + N - 1) % N];
        breg[k] <= breg[(k + 1) % N];
      end
    end
  end

  // Norm/RENO multiplexer on the broadcast b operand, then fault injection
  always_comb begin
    b_enc = reno ? negmod(breg[0]) : breg[0];
    b_op  = (b_enc & ~flt_sa0) | flt_sa1;
  end

  for (genvar k = 0; k < N; k++) begin : g_col
    logic [W-1:0] a_op;
    logic         sel;
    assign a_op = (NEG_BOTH && reno) ? negmod(areg[k]) : areg[k];
    // column k subtracts while k < j; the last column never wraps
    if (k == N - 1) begin : g_last
      assign sel = 1'b0;
    end else begin : g_rest
      assign sel = (JW'(k) < j);
    end
    rpm_column #(.P(P)) u_col (
      .clk, .rst_n, .en, .first, .dec, .sel,
      .a(a_op), .b(b_op), .e(e[k])
    );
    assign mismatch[k] = (res1[k] != e[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) res1[k] <= '0;
      err        <= 1'b0;
      zero_alarm <= 1'b0;
    end else begin
      if (store1) res1 <= e;
      if (cmp)    err  <= |mismatch;
      if (load) begin
        zero_alarm <= 1'b1;
        for (int k = 0; k < N; k++)
          if ((a_in[k] != '0) || (b_in[k] != '0)) zero_alarm <= 1'b0;
      end
    end
  end

  assign c_out = res1;

  // a new operation may only start when the multiplier is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("rpm_reno: start while busy");

endmodule
