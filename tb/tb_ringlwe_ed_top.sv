// tb_ringlwe_ed_top: end-to-end test of the whole design at its default
// parameters (N = 256, P = 1049089; q = 16381; q = 12289, 28-bit input).
// The three datapaths run concurrently:
//  * polynomial multiplier: two random products checked against a schoolbook
//    negacyclic reference (latency 2N+3, err = 0), one product with a
//    permanent stuck-at fault on b (err predicted by a faulty-datapath model),
//    and an all-zero operand pair (zero_alarm);
//  * schoolbook multiplier mod 16381 (N = 256, 65 536 MACs per product): one
//    product recomputed with RESO, one with RESwO, both checked against a
//    negacyclic reference, and one with a stuck-at fault on the MAC's A
//    operand, whose outputs and err are predicted by replaying the faulty
//    MAC chain;
//  * SAMS2 mod 12289: a stream of reductions, fault-free then faulty.
// Each mechanism (RENO decode run, fault detection in each datapath,
// zero alarm, RESO, RESwO, signed MAC, SAMS2 in_ready stall) is counted; one
// that never happened is a failure.
module tb_ringlwe_ed_top;
  localparam int N = 256;
  localparam longint P = 1049089;
  localparam int W = $clog2(P);
  localparam longint Q1 = 16381;
  localparam longint Q2 = 12289;

  logic clk = 0, rst_n = 0;
  logic rpm_start, rpm_busy, rpm_done, rpm_err, rpm_zero;
  logic [W-1:0] rpm_a [N], rpm_b [N], rpm_c [N];
  logic [W-1:0] rpm_sa0, rpm_sa1;
  localparam int PMN = 256;
  logic pm_start, pm_swap, pm_busy, pm_done, pm_err;
  logic [13:0] pm_a [PMN], pm_b [PMN], pm_c [PMN];
  logic [14:0] pm_sa0, pm_sa1;
  logic sams_in_valid, sams_in_ready, sams_res_valid, sams_err, sams_err_sticky;
  logic [27:0] sams_x;
  logic [28:0] sams_sa0, sams_sa1;
  logic [13:0] sams_res;

  int checks = 0, failures = 0;
  int n_rpm_ok = 0, n_rpm_det = 0, n_zero = 0, n_reso = 0, n_reswo = 0, n_signed = 0;
  int n_dsp_det = 0, n_sams_det = 0, n_stall = 0, n_sams_ok = 0, n_pm_ok = 0;

  ringlwe_ed_top dut (
    .clk, .rst_n,
    .rpm_start, .rpm_a, .rpm_b, .rpm_flt_sa0(rpm_sa0), .rpm_flt_sa1(rpm_sa1),
    .rpm_busy, .rpm_done, .rpm_c, .rpm_err, .rpm_zero_alarm(rpm_zero),
    .pm_start, .pm_a, .pm_b, .pm_swap, .pm_flt_sa0(pm_sa0), .pm_flt_sa1(pm_sa1),
    .pm_busy, .pm_done, .pm_c, .pm_err,
    .sams_in_valid, .sams_in_ready, .sams_x, .sams_flt_sa0(sams_sa0), .sams_flt_sa1(sams_sa1),
    .sams_res_valid, .sams_res, .sams_err, .sams_err_sticky
  );

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- polynomial multiplier ----------------
  typedef longint poly_t [N];

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

  task automatic rpm_op(string tag, int kind);  // 0 random, 1 faulty, 2 zero
    poly_t a, b, bf1, bf2, c_ref, r1, r2;
    bit exp_err;
    int cyc;
    logic [W-1:0] m0, m1;
    m0 = '0; m1 = '0;
    if (kind == 1) m0 = W'(1) << ($urandom % W);
    for (int k = 0; k < N; k++) begin
      a[k] = (kind == 2) ? 0 : longint'($urandom % P);
      b[k] = (kind == 2) ? 0 : longint'($urandom % P);
      rpm_a[k] = W'(a[k]);
      rpm_b[k] = W'(b[k]);
      bf1[k] = longint'((W'(b[k]) & ~m0) | m1);
      bf2[k] = longint'((W'((P - b[k]) % P) & ~m0) | m1);
    end
    c_ref = negacyclic(a, b);
    r1 = negacyclic(a, bf1);
    r2 = negacyclic(a, bf2);
    exp_err = 0;
    for (int k = 0; k < N; k++) if (r1[k] != (P - r2[k]) % P) exp_err = 1;
    @(negedge clk);
    rpm_start = 1; rpm_sa0 = m0; rpm_sa1 = m1;
    @(negedge clk);
    rpm_start = 0;
    cyc = 1;
    while (!rpm_done && cyc < 3 * N) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * N + 3) fail($sformatf("%s latency %0d", tag, cyc));
    checks++;
    if (rpm_err != exp_err) fail($sformatf("%s err=%0d exp=%0d", tag, rpm_err, exp_err));
    if (kind == 1 && rpm_err) n_rpm_det++;
    if (kind != 1) begin
      int bad = 0;
      for (int k = 0; k < N; k++) if (longint'(rpm_c[k]) != c_ref[k]) bad++;
      checks++;
      if (bad != 0) fail($sformatf("%s %0d wrong coefficients", tag, bad));
      else if (kind == 0) n_rpm_ok++;
    end
    checks++;
    if (rpm_zero != (kind == 2)) fail($sformatf("%s zero_alarm=%0d", tag, rpm_zero));
    if (kind == 2 && rpm_zero) n_zero++;
    rpm_sa0 = '0; rpm_sa1 = '0;
  endtask

  // ---------------- polynomial multiplier mod 16381 on the MAC ----------------
  typedef struct { longint r; bit e; } exp_t;
  exp_t sq[$];

  function automatic longint dsp_pass(int mode, bit n, longint av, longint bv, longint cv,
                                      logic [14:0] m0, logic [14:0] m1);
    longint ae, be, ce, de, x, r;
    ae = av; be = bv; ce = cv; de = Q1;
    if (mode == 1) begin ae = 2 * av; ce = 2 * cv; de = 2 * Q1; end
    if (mode == 2) begin ae = bv; be = av; end
    ae = longint'((15'(ae) & ~m0) | m1);
    x = (((n ? ((de - ae) & 32767) : ae) * be) + ce) & ((longint'(1) << 29) - 1);
    r = x % Q1;
    if (mode == 1) r = (r % 2 == 1) ? (r + Q1) / 2 : r / 2;
    return r;
  endfunction

  // kind: 0 fault-free with RESO, 1 fault-free with RESwO, 2 permanent fault
  task automatic pm_op(string tag, int kind);
    longint a [PMN], b [PMN], cf [PMN], cref [PMN];
    logic [14:0] m0;
    bit sw, exp_err;
    int cyc, bad;
    m0 = (kind == 2) ? 15'(1) << ($urandom % 14) : '0;
    sw = (kind == 1);
    for (int k = 0; k < PMN; k++) begin
      a[k] = $urandom % Q1; b[k] = $urandom % Q1;
      pm_a[k] = 14'(a[k]); pm_b[k] = 14'(b[k]);
    end
    exp_err = 0;
    for (int k = 0; k < PMN; k++) begin
      longint acc, accf;
      acc = 0; accf = 0;
      for (int j = 0; j < PMN; j++) begin
        int i;
        bit n;
        longint r1, r2;
        i = (k - j + PMN) % PMN;
        n = (j > k);
        if (n) n_signed++;
        if (sw && !n) n_reswo++; else n_reso++;
        acc = n ? ((Q1 - a[i]) * b[j] + acc) % Q1 : (a[i] * b[j] + acc) % Q1;
        r1 = dsp_pass(0, n, a[i], b[j], accf, m0, '0);
        r2 = dsp_pass((sw && !n) ? 2 : 1, n, a[i], b[j], accf, m0, '0);
        if (r1 != r2) exp_err = 1;
        accf = r1;
      end
      cref[k] = acc;
      cf[k] = accf;
    end
    @(negedge clk);
    pm_start = 1; pm_sa0 = m0; pm_sa1 = '0; pm_swap = sw;
    @(negedge clk);
    pm_start = 0;
    cyc = 1;
    while (!pm_done && cyc < 8 * PMN * PMN + 20) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 7 * PMN * PMN + 1) fail($sformatf("%s latency %0d", tag, cyc));
    checks++;
    if (pm_err != exp_err) fail($sformatf("%s err=%0d exp=%0d", tag, pm_err, exp_err));
    if (kind == 2 && pm_err) n_dsp_det++;
    bad = 0;
    for (int k = 0; k < PMN; k++) begin
      if (longint'(pm_c[k]) != cf[k]) bad++;
      if (kind != 2 && cf[k] != cref[k]) bad++;
    end
    checks++;
    if (bad != 0) fail($sformatf("%s %0d wrong coefficients", tag, bad));
    else if (kind != 2) n_pm_ok++;
    pm_sa0 = '0;
  endtask

  // ---------------- SAMS2 mod 12289 ----------------
  always @(negedge clk) if (rst_n && sams_res_valid) begin
    exp_t e;
    checks++;
    if (sq.size() == 0) fail("sams: unexpected result");
    else begin
      e = sq.pop_front();
      if (longint'(sams_res) != e.r || sams_err != e.e)
        fail($sformatf("sams res=%0d exp=%0d err=%0d exp=%0d", sams_res, e.r, sams_err, e.e));
      if (sams_err) n_sams_det++;
      else n_sams_ok++;
    end
  end

  task automatic sams_op(bit faulty);
    longint xv, r1, r2;
    logic [28:0] m1;
    @(negedge clk);
    xv = (longint'($urandom) % Q2) * (longint'($urandom) % Q2);
    m1 = faulty ? 29'(1) << ($urandom % 29) : '0;
    sams_in_valid = 1; sams_x = 28'(xv); sams_sa0 = '0; sams_sa1 = m1;
    #1;
    while (!sams_in_ready) begin n_stall++; @(negedge clk); #1; end
    r1 = longint'(29'(xv) | m1) % Q2;
    r2 = longint'(29'(2 * xv) | m1) % Q2;
    r2 = (r2 % 2 == 1) ? (r2 + Q2) / 2 : r2 / 2;
    sq.push_back('{r1, r1 != r2});
    @(negedge clk);   // offered again while the RESO pass issues: stalls
    #1;
    if (!sams_in_ready) n_stall++;
    sams_in_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    rpm_start = 0; rpm_sa0 = '0; rpm_sa1 = '0;
    for (int k = 0; k < N; k++) begin rpm_a[k] = '0; rpm_b[k] = '0; end
    pm_start = 0; pm_swap = 0; pm_sa0 = '0; pm_sa1 = '0;
    for (int k = 0; k < PMN; k++) begin pm_a[k] = '0; pm_b[k] = '0; end
    sams_in_valid = 0; sams_x = 0; sams_sa0 = '0; sams_sa1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        rpm_op("rpm0", 0);
        rpm_op("rpm1", 0);
        rpm_op("rpm_fault", 1);
        rpm_op("rpm_zero", 2);
      end
      begin
        pm_op("pm_reso", 0);
        pm_op("pm_reswo", 1);
        pm_op("pm_fault", 2);
      end
      begin
        for (int i = 0; i < 200; i++) sams_op(0);
        for (int i = 0; i < 200; i++) sams_op(1);
      end
    join
    repeat (10) @(negedge clk);
    checks++;
    if (sq.size() != 0) fail("results missing");
    $display("rpm ok=%0d rpm detected=%0d zero_alarm=%0d", n_rpm_ok, n_rpm_det, n_zero);
    $display("pm ok=%0d RESO MACs=%0d RESwO MACs=%0d signed MACs=%0d detected=%0d", n_pm_ok, n_reso, n_reswo, n_signed, n_dsp_det);
    $display("sams ok=%0d detected=%0d stalls=%0d", n_sams_ok, n_sams_det, n_stall);
    checks++; if (n_rpm_ok == 0)   fail("no fault-free RENO product");
    checks++; if (n_rpm_det == 0)  fail("no RPM fault detected");
    checks++; if (n_zero == 0)     fail("zero alarm never raised");
    checks++; if (n_pm_ok == 0)    fail("no fault-free q = 16381 product");
    checks++; if (n_reso == 0)     fail("no RESO recomputation");
    checks++; if (n_reswo == 0)    fail("no RESwO recomputation");
    checks++; if (n_signed == 0)   fail("no signed MAC");
    checks++; if (n_dsp_det == 0)  fail("no fault detected in the q = 16381 multiplier");
    checks++; if (n_sams_det == 0) fail("no SAMS2 fault detected");
    checks++; if (n_stall == 0)    fail("no in_ready stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
