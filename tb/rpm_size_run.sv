// rpm_size_run: test driver for one rpm_reno instance at a given size, used by
// tb_rpm_reno_sizes to run the larger published parameter sets. It holds its
// own rpm_reno #(N, P, NEG_BOTH) and, after reset, runs: one product with every
// coefficient P - 1, two random products (checked coefficient by coefficient
// against a schoolbook negacyclic reference, err = 0 and the latency 2N+3, or
// 2N+2 with NEG_BOTH), two permanent single-bit stuck-at faults on b and one
// transient fault during run1 only (err checked against a model that
// recomputes both runs with the faulty operand). It then raises fin and
// reports its counts on checks / failures / detected.
module rpm_size_run #(
  parameter int unsigned N        = 512,
  parameter int unsigned P        = 4206593,
  parameter bit          NEG_BOTH = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   detected
);
  localparam int W = $clog2(P);
  localparam int LAT = NEG_BOTH ? 2 * N + 2 : 2 * N + 3;

  logic         start, busy, done, err, zero;
  logic [W-1:0] a_in [N], b_in [N], c [N];
  logic [W-1:0] sa0, sa1;

  rpm_reno #(.N(N), .P(P), .NEG_BOTH(NEG_BOTH)) dut (
    .clk, .rst_n, .start, .a_in, .b_in, .flt_sa0(sa0), .flt_sa1(sa1),
    .busy, .done, .c_out(c), .err, .zero_alarm(zero));

  typedef longint poly_t [N];

  function automatic poly_t negacyclic(poly_t a, poly_t b);
    poly_t r;
    for (int k = 0; k < N; k++) r[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint pr;
        pr = (a[i] * b[j]) % P;
        if (i + j < N) r[i + j]     = (r[i + j] + pr) % P;
        else           r[i + j - N] = (r[i + j - N] - pr + P) % P;
      end
    return r;
  endfunction

  function automatic longint neg(longint v);
    return (P - v) % P;
  endfunction

  function automatic longint fault(longint v, logic [W-1:0] m0, logic [W-1:0] m1);
    return longint'((W'(v) & ~m0) | m1);
  endfunction

  task automatic fail(string s);
    failures++;
    $display("FAIL N=%0d P=%0d NEG_BOTH=%0d: %s", N, P, NEG_BOTH, s);
  endtask

  // kind: 0 fault-free, 1 permanent fault, 2 transient fault in run1
  task automatic run_one(string tag, int kind, logic [W-1:0] m0, logic [W-1:0] m1);
    poly_t a, b, a2, bf1, bf2, c_ref, r1, r2;
    bit exp_err;
    int cyc, bad;
    for (int k = 0; k < N; k++) begin
      a[k] = longint'(a_in[k]);
      b[k] = longint'(b_in[k]);
      bf1[k] = (kind != 0) ? fault(b[k], m0, m1) : b[k];
      bf2[k] = (kind == 1) ? fault(neg(b[k]), m0, m1) : neg(b[k]);
      a2[k]  = NEG_BOTH ? neg(a[k]) : a[k];
    end
    c_ref = negacyclic(a, b);
    r1 = negacyclic(a, bf1);
    r2 = negacyclic(a2, bf2);
    exp_err = 0;
    for (int k = 0; k < N; k++)
      if (r1[k] != (NEG_BOTH ? r2[k] : neg(r2[k]))) exp_err = 1;
    @(negedge clk);
    start = 1; sa0 = m0; sa1 = m1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 3 * N + 10) begin
      if (kind == 2 && cyc == N + 1) begin sa0 = '0; sa1 = '0; end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != LAT) fail($sformatf("%s latency %0d", tag, cyc));
    checks++;
    if (err != exp_err) fail($sformatf("%s err=%0d exp=%0d", tag, err, exp_err));
    if (kind != 0 && err) detected++;
    if (kind == 0) begin
      bad = 0;
      for (int k = 0; k < N; k++) if (longint'(c[k]) != c_ref[k]) bad++;
      checks++;
      if (bad != 0) fail($sformatf("%s %0d wrong coefficients", tag, bad));
    end
    sa0 = '0; sa1 = '0;
  endtask

  task automatic rand_ops();
    for (int k = 0; k < N; k++) begin
      a_in[k] = W'($urandom % P);
      b_in[k] = W'($urandom % P);
    end
  endtask

  initial begin
    fin = 0; checks = 0; failures = 0; detected = 0;
    start = 0; sa0 = '0; sa1 = '0;
    for (int k = 0; k < N; k++) begin a_in[k] = W'(P - 1); b_in[k] = W'(P - 1); end
    @(posedge rst_n);
    run_one("max", 0, '0, '0);
    rand_ops(); run_one("rand0", 0, '0, '0);
    rand_ops(); run_one("rand1", 0, '0, '0);
    rand_ops(); run_one("sa0", 1, W'(1) << ($urandom % W), '0);
    rand_ops(); run_one("sa1", 1, '0, W'(1) << ($urandom % W));
    rand_ops(); run_one("trans", 2, W'(1) << ($urandom % W), '0);
    fin = 1;
  end
endmodule
