// dsp_polymul: schoolbook polynomial multiplier c = a*b in Z_q[x]/(x^N + 1),
// q = 16381, built around the error-detecting multiply-accumulate unit.
//
// Coefficient c_k is accumulated over j = 0..N-1 as
//   acc <= (a_i * b_j + acc) mod q       when i = k - j >= 0,
//   acc <= ((q - a_i) * b_j + acc) mod q when k - j < 0 (i = k - j + N),
// i.e. the MAC's C input carries the running sum and its signed form
// (D - A)*B + C with D = q supplies the negacyclic sign. Every MAC runs twice
// inside dsp_modq_ed (normal, then RESO or RESwO) and is compared there; err
// is the OR of all comparisons of the current product. The operands sit in
// register arrays loaded at start and read through N:1 multiplexers.
// Interface and timing: start (with a_in/b_in valid) loads the operands; the
// MACs run strictly one after another (a new one is issued when the previous
// result returns), 7 cycles each, so done pulses 7*N*N + 1 cycles after
// start. c_out and err hold from done until the next start. swap = 1 uses
// RESwO for the unsigned MACs. N must be a power of two.
// The MAC-based schoolbook scheme follows the q = 16381 construction; the
// loop order, the operand arrays and the handshake are this design's choices.
module dsp_polymul #(
  parameter int unsigned N  = 256,
  localparam int         JW = (N > 1) ? $clog2(N) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [13:0] a_in [N],
  input  logic [13:0] b_in [N],
  input  logic        swap,
  input  logic [14:0] flt_sa0,
  input  logic [14:0] flt_sa1,
  output logic        busy,
  output logic        done,
  output logic [13:0] c_out [N],
  output logic        err
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e        state;
  logic [JW-1:0] k, j, i;
  logic [13:0]   areg [N];
  logic [13:0]   breg [N];
  logic [13:0]   acc;
  logic          mac_ready, mac_valid, mac_err;
  logic [13:0]   mac_res;
  logic          last_j, last_k;

  assign i      = k - j;                 // wraps modulo N (N is a power of two)
  assign last_j = (j == JW'(N - 1));
  assign last_k = (k == JW'(N - 1));
  assign busy   = (state != S_IDLE);

  dsp_modq_ed u_mac (
    .clk, .rst_n,
    .in_valid(state == S_ISSUE), .in_ready(mac_ready),
    .a(areg[i]), .b(breg[j]), .c((j == '0) ? 14'd0 : acc),
    .neg(j > k), .swap, .flt_sa0, .flt_sa1,
    .res_valid(mac_valid), .res(mac_res), .err(mac_err), .err_sticky()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; j <= '0; acc <= '0; err <= 1'b0; done <= 1'b0;
      for (int n = 0; n < N; n++) begin
        areg[n] <= '0; breg[n] <= '0; c_out[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          areg  <= a_in;
          breg  <= b_in;
          k     <= '0;
          j     <= '0;
          err   <= 1'b0;
          state <= S_ISSUE;
        end
        S_ISSUE: if (mac_ready) state <= S_WAIT;
        S_WAIT: if (mac_valid) begin
          acc <= mac_res;
          if (mac_err) err <= 1'b1;
          j   <= j + 1'b1;
          if (last_j) begin
            c_out[k] <= mac_res;
            k        <= k + 1'b1;
            if (last_k) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ISSUE;
            end
          end else begin
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  if ((1 << JW) != N) begin : g_bad_n
    $error("dsp_polymul: N must be a power of two");
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("dsp_polymul: start while busy");

endmodule
