// rpm_pipe_column: one column of the sub-pipelined RENO polynomial multiplier.
//
// The column is cut into two stages by a register after the multiplier:
// H1 = modular multiplication, H2 = +-mod p accumulation. Normal (N) and
// recomputed (R) products alternate in H1, so the column keeps two
// accumulators: e_n for the normal run and e_r for the run with the negated
// operand. Each product carries its tag (is_r), its sign (sel) and a
// 'first' mark (accumulator reads as zero) through the pipeline register.
// In the decode cycle (dec = 1, H2 only) the +-mod p unit forms
// e_r <= (P - e_r) mod P through its Enc/Dec multiplexers.
// Timing: a product issued to H1 at edge t is accumulated at edge t+1.
module rpm_pipe_column #(
  parameter int unsigned P = 1049089,
  localparam int W = $clog2(P)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         h1_valid,
  input  logic         h1_is_r,
  input  logic         h1_sel,
  input  logic         h1_first,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         dec,
  output logic [W-1:0] e_n,
  output logic [W-1:0] e_r
);

  logic [W-1:0] prod, prod_r, acc, opx, opy, sum;
  logic         v_r, is_r_r, sel_r, first_r, op_sub;

  mod_mult #(.P(P)) u_mul (.a(a), .b(b), .z(prod));

  // H1/H2 pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_r <= '0; v_r <= 1'b0; is_r_r <= 1'b0; sel_r <= 1'b0; first_r <= 1'b0;
    end else begin
      prod_r <= prod; v_r <= h1_valid; is_r_r <= h1_is_r; sel_r <= h1_sel; first_r <= h1_first;
    end
  end

  always_comb begin
    acc    = is_r_r ? e_r : e_n;
    opx    = dec ? W'(P) : (first_r ? '0 : acc);
    opy    = dec ? e_r : prod_r;
    op_sub = dec ? 1'b1 : sel_r;
  end

  mod_addsub #(.P(P)) u_addsub (.x(opx), .y(opy), .sub(op_sub), .z(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_n <= '0; e_r <= '0;
    end else if (dec) begin
      e_r <= sum;
    end else if (v_r) begin
      if (is_r_r) e_r <= sum;
      else        e_n <= sum;
    end
  end

endmodule
