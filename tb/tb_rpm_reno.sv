// tb_rpm_reno: self-checking test of the error-detecting polynomial multiplier.
// Two instances (N = 8, P = 1049089): one recomputes with b negated (decode
// cycle), one with both operands negated. For random polynomials it checks the
// product against a schoolbook negacyclic reference, err = 0 and the latency
// (2N+3 / 2N+2 cycles from start to done). It then injects stuck-at faults on
// the b operand, permanent (whole operation) and transient (run1 only), and
// checks err against a reference that recomputes both runs with the faulty
// operand. An all-zero operand pair must raise zero_alarm.
module tb_rpm_reno;
  localparam int unsigned N = 8;
  localparam int unsigned P = 1049089;
  localparam int W = $clog2(P);

  logic clk = 0, rst_n = 0, start = 0;
  logic [W-1:0] a_in [N], b_in [N];
  logic [W-1:0] sa0, sa1;
  logic         busy0, done0, err0, zero0, busy1, done1, err1, zero1;
  logic [W-1:0] c0 [N], c1 [N];
  int checks = 0, failures = 0;
  int errs_seen = 0;

  rpm_reno #(.N(N), .P(P), .NEG_BOTH(1'b0)) dut0 (
    .clk, .rst_n, .start, .a_in, .b_in, .flt_sa0(sa0), .flt_sa1(sa1),
    .busy(busy0), .done(done0), .c_out(c0), .err(err0), .zero_alarm(zero0));
  rpm_reno #(.N(N), .P(P), .NEG_BOTH(1'b1)) dut1 (
    .clk, .rst_n, .start, .a_in, .b_in, .flt_sa0(sa0), .flt_sa1(sa1),
    .busy(busy1), .done(done1), .c_out(c1), .err(err1), .zero_alarm(zero1));

  always #5 clk = ~clk;

  typedef longint poly_t [N];

  function automatic longint fault(longint v, logic [W-1:0] m0, logic [W-1:0] m1);
    return longint'((W'(v) & ~m0) | m1);
  endfunction

  // schoolbook negacyclic product, coefficients reduced mod P
  function automatic poly_t negacyclic(poly_t a, poly_t b);
    poly_t c;
    for (int k = 0; k < N; k++) c[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint pr;
        pr = (a[i] * b[j]) % P;
        if (i + j < N) c[i + j]     = (c[i + j] + pr) % P;
        else           c[i + j - N] = (c[i + j - N] - pr + P) % P;
      end
    return c;
  endfunction

  function automatic longint neg(longint v);
    return (P - v) % P;
  endfunction

  task automatic run_one(string tag, bit perm, bit trans, logic [W-1:0] m0, logic [W-1:0] m1);
    poly_t a, b, bf1, bf2, an, c_ref, r1, r2a, r2b;
    bit exp_err0, exp_err1;
    int cyc;
    bit got0, got1;
    for (int k = 0; k < N; k++) begin
      a[k] = longint'(a_in[k]);
      b[k] = longint'(b_in[k]);
    end
    c_ref = negacyclic(a, b);
    // run1 operand (faulty for permanent or transient), run2 operands (faulty for permanent)
    for (int k = 0; k < N; k++) begin
      bf1[k] = (perm || trans) ? fault(b[k], m0, m1) : b[k];
      bf2[k] = perm ? fault(neg(b[k]), m0, m1) : neg(b[k]);
      an[k]  = neg(a[k]);
    end
    r1  = negacyclic(a, bf1);
    r2a = negacyclic(a, bf2);   // e = a * (-b)'
    r2b = negacyclic(an, bf2);  // (-a) * (-b)'
    exp_err0 = 0; exp_err1 = 0;
    for (int k = 0; k < N; k++) begin
      if (r1[k] != neg(r2a[k])) exp_err0 = 1;
      if (r1[k] != r2b[k])      exp_err1 = 1;
    end
    @(negedge clk);
    start = 1;
    sa0 = (perm || trans) ? m0 : '0;
    sa1 = (perm || trans) ? m1 : '0;
    @(negedge clk);
    start = 0;
    cyc = 1; got0 = 0; got1 = 0;
    while (!(got0 && got1) && cyc < 4 * N + 10) begin
      if (trans && cyc == N + 1) begin sa0 = '0; sa1 = '0; end
      if (done0) begin
        got0 = 1;
        checks++;
        if (cyc != 2 * N + 3) begin failures++; $display("FAIL %s latency0 %0d", tag, cyc); end
        checks++;
        if (err0 != exp_err0) begin failures++; $display("FAIL %s err0=%0d exp=%0d", tag, err0, exp_err0); end
        if (err0) errs_seen++;
        if (!perm && !trans)
          for (int k = 0; k < N; k++) begin
            checks++;
            if (longint'(c0[k]) != c_ref[k]) begin
              failures++; $display("FAIL %s c0[%0d]=%0d exp=%0d", tag, k, c0[k], c_ref[k]);
            end
          end
      end
      if (done1) begin
        got1 = 1;
        checks++;
        if (cyc != 2 * N + 2) begin failures++; $display("FAIL %s latency1 %0d", tag, cyc); end
        checks++;
        if (err1 != exp_err1) begin failures++; $display("FAIL %s err1=%0d exp=%0d", tag, err1, exp_err1); end
        if (!perm && !trans)
          for (int k = 0; k < N; k++) begin
            checks++;
            if (longint'(c1[k]) != c_ref[k]) begin
              failures++; $display("FAIL %s c1[%0d]=%0d exp=%0d", tag, k, c1[k], c_ref[k]);
            end
          end
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (!(got0 && got1)) begin failures++; $display("FAIL %s no done", tag); end
    sa0 = '0; sa1 = '0;
  endtask

  task automatic rand_ops();
    for (int k = 0; k < N; k++) begin
      a_in[k] = W'($urandom % P);
      b_in[k] = W'($urandom % P);
    end
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
    // fault-free operations, including extreme coefficients
    for (int k = 0; k < N; k++) begin a_in[k] = W'(P - 1); b_in[k] = W'(P - 1); end
    run_one("max", 0, 0, '0, '0);
    for (int t = 0; t < 20; t++) begin
      rand_ops();
      run_one($sformatf("rand%0d", t), 0, 0, '0, '0);
    end
    // permanent single-bit stuck-at-0 / stuck-at-1 faults on b
    for (int t = 0; t < 20; t++) begin
      logic [W-1:0] m;
      rand_ops();
      m = W'(1) << ($urandom % W);
      if (t % 2 == 0) run_one($sformatf("sa0_%0d", t), 1, 0, m, '0);
      else            run_one($sformatf("sa1_%0d", t), 1, 0, '0, m);
    end
    // permanent multi-bit faults and transient faults during run1 only
    for (int t = 0; t < 10; t++) begin
      rand_ops();
      run_one($sformatf("multi%0d", t), 1, 0, W'($urandom) & W'($urandom), W'($urandom) & W'($urandom) & W'($urandom));
      rand_ops();
      run_one($sformatf("trans%0d", t), 0, 1, W'(1) << ($urandom % W), '0);
    end
    checks++;
    if (errs_seen == 0) begin failures++; $display("FAIL no fault detected at all"); end
    // all-zero operands
    for (int k = 0; k < N; k++) begin a_in[k] = '0; b_in[k] = '0; end
    run_one("zero", 0, 0, '0, '0);
    checks++;
    if (!zero0 || !zero1) begin failures++; $display("FAIL zero_alarm not raised"); end
    rand_ops();
    run_one("nonzero", 0, 0, '0, '0);
    checks++;
    if (zero0 || zero1) begin failures++; $display("FAIL zero_alarm raised"); end
    $display("detected faults: %0d", errs_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
