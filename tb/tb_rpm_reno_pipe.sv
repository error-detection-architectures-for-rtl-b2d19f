// tb_rpm_reno_pipe: self-checking test of the sub-pipelined error-detecting
// polynomial multiplier (N = 8, P = 1049089). Random products are checked
// against a schoolbook negacyclic reference with err = 0 and a latency of
// 2N+4 cycles; then permanent stuck-at faults on the b operand are injected
// and err is compared with a model that recomputes both interleaved runs with
// the faulty operand. At least one fault must be detected.
module tb_rpm_reno_pipe;
  localparam int unsigned N = 8;
  localparam int unsigned P = 1049089;
  localparam int W = $clog2(P);

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a_in [N], b_in [N], c [N];
  logic [W-1:0] sa0, sa1;
  logic         busy, done, err, zero_alarm;
  int checks = 0, failures = 0, detected = 0;

  rpm_reno_pipe #(.N(N), .P(P)) dut (
    .clk, .rst_n, .start, .a_in, .b_in, .flt_sa0(sa0), .flt_sa1(sa1),
    .busy, .done, .c_out(c), .err, .zero_alarm);

  always #5 clk = ~clk;

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

  task automatic run_one(string tag, logic [W-1:0] m0, logic [W-1:0] m1);
    poly_t a, b, bf1, bf2, c_ref, r1, r2;
    bit exp_err;
    int cyc;
    for (int k = 0; k < N; k++) begin
      a_in[k] = W'($urandom % P);
      b_in[k] = W'($urandom % P);
      a[k] = longint'(a_in[k]);
      b[k] = longint'(b_in[k]);
      bf1[k] = longint'((b_in[k] & ~m0) | m1);
      bf2[k] = longint'((W'((P - b[k]) % P) & ~m0) | m1);
    end
    c_ref = negacyclic(a, b);
    r1 = negacyclic(a, bf1);
    r2 = negacyclic(a, bf2);
    exp_err = 0;
    for (int k = 0; k < N; k++) if (r1[k] != (P - r2[k]) % P) exp_err = 1;
    @(negedge clk);
    start = 1; sa0 = m0; sa1 = m1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 4 * N + 10) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * N + 4) begin failures++; $display("FAIL %s latency %0d", tag, cyc); end
    checks++;
    if (zero_alarm) begin failures++; $display("FAIL %s zero_alarm", tag); end
    checks++;
    if (err != exp_err) begin failures++; $display("FAIL %s err=%0d exp=%0d", tag, err, exp_err); end
    if (err) detected++;
    if (m0 == '0 && m1 == '0)
      for (int k = 0; k < N; k++) begin
        checks++;
        if (longint'(c[k]) != c_ref[k]) begin
          failures++; $display("FAIL %s c[%0d]=%0d exp=%0d", tag, k, c[k], c_ref[k]);
        end
      end
    sa0 = '0; sa1 = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa0 = '0; sa1 = '0;
    for (int k = 0; k < N; k++) begin a_in[k] = '0; b_in[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) run_one($sformatf("rand%0d", t), '0, '0);
    for (int t = 0; t < 30; t++) begin
      logic [W-1:0] m;
      m = W'(1) << ($urandom % W);
      if (t % 2 == 0) run_one($sformatf("sa0_%0d", t), m, '0);
      else            run_one($sformatf("sa1_%0d", t), '0, m);
    end
    checks++;
    if (detected == 0) begin failures++; $display("FAIL no fault detected"); end
    $display("detected faults: %0d of 30", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
