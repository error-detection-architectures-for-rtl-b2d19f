// rpm_ctrl: sequencer of the modified-RENO polynomial multiplier.
//
// A start pulse in IDLE loads the operands (load = 1) and begins run1, N
// cycles of normal accumulation (j = 0..N-1). run2 follows: N cycles with the
// negated operand (reno = 1); in its first cycle store1 = 1 copies the run1
// results out of the accumulators. Unless NEG_BOTH is set, one decode cycle
// (dec = 1, the (N+1)th cycle of run2) turns e into d = P - e. A compare cycle
// (cmp = 1) follows, then done pulses for one cycle, 2N+3 cycles after start
// (2N+2 with NEG_BOTH). j counts the coefficient index within a run; first
// marks j = 0. start is ignored while busy.
// The run1/run2/decode order follows the modified RENO schedule; the load and
// compare cycles and the handshake are this design's own choices.
module rpm_ctrl #(
  parameter int unsigned N        = 256,
  parameter bit          NEG_BOTH = 1'b0,
  localparam int         JW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          load,    // capture operands (IDLE and start)
  output logic          en,      // accumulate this cycle
  output logic          first,   // j == 0 of a run
  output logic          reno,    // run2: Norm/RENO select = RENO
  output logic          dec,     // Enc/Dec select = Dec
  output logic          store1,  // copy run1 results (first cycle of run2)
  output logic          cmp,     // compare cycle
  output logic [JW-1:0] j,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {S_IDLE, S_RUN1, S_RUN2, S_DEC, S_CMP} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN1;
          j     <= '0;
        end
        S_RUN1: begin
          j <= (j == JW'(N - 1)) ? '0 : j + 1'b1;
          if (j == JW'(N - 1)) state <= S_RUN2;
        end
        S_RUN2: begin
          j <= (j == JW'(N - 1)) ? '0 : j + 1'b1;
          if (j == JW'(N - 1)) state <= NEG_BOTH ? S_CMP : S_DEC;
        end
        S_DEC: state <= S_CMP;
        S_CMP: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    load   = (state == S_IDLE) && start;
    en     = (state == S_RUN1) || (state == S_RUN2) || (state == S_DEC);
    first  = ((state == S_RUN1) || (state == S_RUN2)) && (j == '0);
    reno   = (state == S_RUN2) || (state == S_DEC);
    dec    = (state == S_DEC);
    store1 = (state == S_RUN2) && (j == '0);
    cmp    = (state == S_CMP);
    busy   = (state != S_IDLE);
  end

endmodule
