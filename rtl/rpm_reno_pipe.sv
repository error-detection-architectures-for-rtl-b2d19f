// rpm_reno_pipe: sub-pipelined variant of the error-detecting ring polynomial
// multiplier in Z_P[x]/(x^N + 1).
//
// Recomputation doubles the work, so each column is split into two stages of
// roughly equal delay, H1 (modular multiply) and H2 (+-mod p accumulate),
// with a register between them (rpm_pipe_column). Normal and recomputed
// products are interleaved: H1 computes N_1, R_1, N_2, R_2, ..., N_N, R_N and
// H2 follows one cycle behind, so R_i and N_i are in flight in the same cycle
// in different stages and N_{i+1} enters H1 while R_i is in H2. R_i uses the
// negated operand P - b_j (modified RENO); after the last R a decode cycle
// forms d = P - e_r in every column, and a compare cycle ORs the N column
// comparisons into err.
// Interface and timing: a start pulse with a_in/b_in valid loads the
// operands; done pulses 2N+4 cycles later with c_out (normal result) and err;
// c_out holds until the next start.
// flt_sa0/flt_sa1 force bits of the broadcast b operand (fault injection;
// tie to 0 in normal use). zero_alarm flags all-zero operands, the one
// input the recomputation cannot check. Only the one-negated-operand form
// is built here.
// The stage split, the N/R interleaving and the decode step follow the
// sub-pipelined schedule; the two accumulators per column, the drain,
// compare cycles and the handshake are this design's own choices.
module rpm_reno_pipe #(
  parameter int unsigned N = 256,
  parameter int unsigned P = 1049089,
  localparam int         W = $clog2(P),
  localparam int         JW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a_in  [N],
  input  logic [W-1:0] b_in  [N],
  input  logic [W-1:0] flt_sa0,
  input  logic [W-1:0] flt_sa1,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] c_out [N],
  output logic         err,
  output logic         zero_alarm
);

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_DRAIN, S_DEC, S_CMP} state_e;
  state_e        state;
  logic [JW-1:0] j;
  logic          is_r;     // odd slot: recomputed product R_j
  logic          issue, dec, cmp, load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; j <= '0; is_r <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ISSUE; j <= '0; is_r <= 1'b0;
        end
        S_ISSUE: begin
          is_r <= !is_r;
          if (is_r) begin
            j <= (j == JW'(N - 1)) ? '0 : j + 1'b1;
            if (j == JW'(N - 1)) state <= S_DRAIN;
          end
        end
        S_DRAIN: state <= S_DEC;
        S_DEC:   state <= S_CMP;
        S_CMP: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load  = (state == S_IDLE) && start;
  assign issue = (state == S_ISSUE);
  assign dec   = (state == S_DEC);
  assign cmp   = (state == S_CMP);
  assign busy  = (state != S_IDLE);

  function automatic logic [W-1:0] negmod(input logic [W-1:0] v);
    return (v == '0) ? '0 : W'(P) - v;
  endfunction

  logic [W-1:0] areg [N];
  logic [W-1:0] breg [N];
  logic [W-1:0] e_n  [N];
  logic [W-1:0] e_r  [N];
  logic [W-1:0] b_op;
  logic [N-1:0] mismatch;

  // operand registers rotate after each R slot
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        areg[k] <= '0;
        breg[k] <= '0;
      end
    end else if (load) begin
      areg <= a_in;
      breg <= b_in;
    end else if (issue && is_r) begin
      for (int k = 0; k < N; k++) begin
        areg[k] <= areg[(k + N - 1) % N];
        breg[k] <= breg[(k + 1) % N];
      end
    end
  end

  // Norm/RENO multiplexer on the broadcast b operand, then fault injection
  always_comb b_op = ((is_r ? negmod(breg[0]) : breg[0]) & ~flt_sa0) | flt_sa1;

  for (genvar k = 0; k < N; k++) begin : g_col
    logic sel;
    // column k subtracts while k < j; the last column never wraps
    if (k == N - 1) begin : g_last
      assign sel = 1'b0;
    end else begin : g_rest
      assign sel = (JW'(k) < j);
    end
    rpm_pipe_column #(.P(P)) u_col (
      .clk, .rst_n, .h1_valid(issue), .h1_is_r(is_r), .h1_sel(sel), .h1_first(j == '0),
      .a(areg[k]), .b(b_op), .dec, .e_n(e_n[k]), .e_r(e_r[k])
    );
    assign mismatch[k] = (e_n[k] != e_r[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err        <= 1'b0;
      zero_alarm <= 1'b0;
    end else begin
      if (cmp) err <= |mismatch;
      if (load) begin
        zero_alarm <= 1'b1;
        for (int k = 0; k < N; k++)
          if ((a_in[k] != '0) || (b_in[k] != '0)) zero_alarm <= 1'b0;
      end
    end
  end

  assign c_out = e_n;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("rpm_reno_pipe: start while busy");

endmodule
