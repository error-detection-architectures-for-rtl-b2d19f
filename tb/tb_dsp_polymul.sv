// tb_dsp_polymul: self-checking test of the MAC-based schoolbook polynomial
// multiplier mod 16381 (N = 8). Fault-free products (with and without RESwO)
// are checked against a negacyclic reference with err = 0 and the latency
// 7*N*N + 1 cycles. With a permanent stuck-at fault on the MAC's A operand,
// the whole chain of MACs (both passes of each) is replayed by an integer
// model of the faulty datapath, which predicts every output coefficient and
// the error flag.
module tb_dsp_polymul;
  localparam int N = 8;
  localparam longint Q = 16381;

  logic clk = 0, rst_n = 0, start = 0, swap = 0;
  logic [13:0] a_in [N], b_in [N], c [N];
  logic [14:0] sa0, sa1;
  logic busy, done, err;
  int checks = 0, failures = 0, detected = 0;

  dsp_polymul #(.N(N)) dut (.clk, .rst_n, .start, .a_in, .b_in, .swap, .flt_sa0(sa0), .flt_sa1(sa1),
                            .busy, .done, .c_out(c), .err);

  always #5 clk = ~clk;

  function automatic longint dsp_pass(int mode, bit n, longint av, longint bv, longint cv,
                                      logic [14:0] m0, logic [14:0] m1);
    longint ae, be, ce, de, x, r;
    ae = av; be = bv; ce = cv; de = Q;
    if (mode == 1) begin ae = 2 * av; ce = 2 * cv; de = 2 * Q; end
    if (mode == 2) begin ae = bv; be = av; end
    ae = longint'((15'(ae) & ~m0) | m1);
    x = (((n ? ((de - ae) & 32767) : ae) * be) + ce) & ((longint'(1) << 29) - 1);
    r = x % Q;
    if (mode == 1) r = (r % 2 == 1) ? (r + Q) / 2 : r / 2;
    return r;
  endfunction

  task automatic run_one(string tag, logic [14:0] m0, logic [14:0] m1, bit sw);
    longint a [N], b [N], cref [N], cf [N];
    bit exp_err;
    int cyc;
    for (int k = 0; k < N; k++) begin
      a[k] = $urandom % Q; b[k] = $urandom % Q;
      a_in[k] = 14'(a[k]); b_in[k] = 14'(b[k]);
    end
    exp_err = 0;
    for (int k = 0; k < N; k++) begin
      longint acc, accf;
      acc = 0; accf = 0;
      for (int j = 0; j < N; j++) begin
        int i;
        bit n;
        longint r1, r2;
        i = (k - j + N) % N;
        n = (j > k);
        acc = n ? ((Q - a[i]) * b[j] + acc) % Q : (a[i] * b[j] + acc) % Q;
        r1 = dsp_pass(0, n, a[i], b[j], accf, m0, m1);
        r2 = dsp_pass((sw && !n) ? 2 : 1, n, a[i], b[j], accf, m0, m1);
        if (r1 != r2) exp_err = 1;
        accf = r1;
      end
      cref[k] = acc;
      cf[k] = accf;
    end
    @(negedge clk);
    start = 1; sa0 = m0; sa1 = m1; swap = sw;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 8 * N * N + 20) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 7 * N * N + 1) begin failures++; $display("FAIL %s latency %0d", tag, cyc); end
    checks++;
    if (err != exp_err) begin failures++; $display("FAIL %s err=%0d exp=%0d", tag, err, exp_err); end
    if (err) detected++;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(c[k]) != cf[k]) begin failures++; $display("FAIL %s c[%0d]=%0d exp=%0d", tag, k, c[k], cf[k]); end
      if (m0 == '0 && m1 == '0) begin
        checks++;
        if (cf[k] != cref[k]) begin failures++; $display("FAIL %s model c[%0d]", tag, k); end
      end
    end
    sa0 = '0; sa1 = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sa0 = '0; sa1 = '0;
    for (int k = 0; k < N; k++) begin a_in[k] = '0; b_in[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) run_one($sformatf("rand%0d", t), '0, '0, t % 2);
    for (int t = 0; t < 12; t++) begin
      logic [14:0] m;
      m = 15'(1) << ($urandom % 15);
      if (t % 2 == 0) run_one($sformatf("sa0_%0d", t), m, '0, t % 4 == 0);
      else            run_one($sformatf("sa1_%0d", t), '0, m, t % 4 == 1);
    end
    checks++;
    if (detected == 0) begin failures++; $display("FAIL no fault detected"); end
    $display("detected faults: %0d of 12", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
