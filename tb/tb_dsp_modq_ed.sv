// tb_dsp_modq_ed: self-checking test of the error-detecting mod 16381
// multiply-accumulate. Operations are offered every cycle (in_ready paces
// them to one per two cycles) with random neg / swap; each result must equal
// (+-A*B + C) mod q, arrive 6 cycles after acceptance, with err = 0. Then
// stuck-at faults on the A operand are injected for whole operations and the
// result of both passes is predicted by a model of the faulty datapath; err
// must match that prediction and at least one fault must be detected.
module tb_dsp_modq_ed;
  localparam longint Q = 16381;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, neg, swap, res_valid, err, err_sticky;
  logic [13:0] a, b, c, res;
  logic [14:0] sa0, sa1;
  int checks = 0, failures = 0, detected = 0, resos = 0, reswos = 0;
  longint cyc = 0;

  typedef struct { longint r; bit e; longint t; } exp_t;
  exp_t q[$];

  dsp_modq_ed dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .c, .neg, .swap,
                   .flt_sa0(sa0), .flt_sa1(sa1), .res_valid, .res, .err, .err_sticky);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint fa(longint v, logic [14:0] m0, logic [14:0] m1);
    return longint'((15'(v) & ~m0) | m1);
  endfunction

  // one pass through the faulty datapath, reduced result after decoding
  function automatic longint pass(int mode, bit n, longint av, longint bv, longint cv,
                                  logic [14:0] m0, logic [14:0] m1);
    longint ae, be, ce, de, x, r;
    ae = av; be = bv; ce = cv; de = Q;
    if (mode == 1) begin ae = 2 * av; ce = 2 * cv; de = 2 * Q; end
    if (mode == 2) begin ae = bv; be = av; end
    ae = fa(ae, m0, m1);
    x = (((n ? ((de - ae) & 32767) : ae) * be) + ce) & ((longint'(1) << 29) - 1);
    r = x % Q;
    if (mode == 1) r = (r % 2 == 1) ? (r + Q) / 2 : r / 2;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(negedge clk) if (rst_n && res_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      e = q.pop_front();
      if (longint'(res) != e.r || err != e.e || cyc - e.t != 6) begin
        failures++;
        $display("FAIL res=%0d exp=%0d err=%0d exp=%0d lat=%0d", res, e.r, err, e.e, cyc - e.t);
      end
      if (err) detected++;
    end
  end

  task automatic offer(bit faulty);
    longint r1, r2;
    int mode2;
    @(negedge clk);
    in_valid = 1;
    a = 14'($urandom % Q); b = 14'($urandom % Q); c = 14'($urandom % Q);
    neg = 1'($urandom); swap = 1'($urandom);
    if (faulty) begin
      sa0 = 15'($urandom) & 15'($urandom) & 15'($urandom);
      sa1 = 15'($urandom) & 15'($urandom) & 15'($urandom) & ~sa0;
    end else begin
      sa0 = '0; sa1 = '0;
    end
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    mode2 = (swap && !neg) ? 2 : 1;
    if (mode2 == 1) resos++; else reswos++;
    r1 = pass(0, neg, a, b, c, sa0, sa1);
    r2 = pass(mode2, neg, a, b, c, sa0, sa1);
    if (!faulty) begin
      longint ref_r;
      ref_r = neg ? ((Q - a) * b + c) % Q : (a * b + c) % Q;
      checks++;
      if (r1 != ref_r) begin failures++; $display("FAIL model"); end
    end
    q.push_back('{r1, r1 != r2, cyc});
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);   // keep the fault masks through the second pass
  endtask

  initial begin
    in_valid = 0; a = 0; b = 0; c = 0; neg = 0; swap = 0; sa0 = 0; sa1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) offer(0);
    repeat (10) @(negedge clk);
    checks++;
    if (err_sticky) begin failures++; $display("FAIL false alarm"); end
    for (int i = 0; i < 300; i++) offer(1);
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || detected == 0 || resos == 0 || reswos == 0) begin
      failures++; $display("FAIL pending=%0d detected=%0d reso=%0d reswo=%0d", q.size(), detected, resos, reswos);
    end
    $display("faults detected: %0d, RESO %0d, RESwO %0d", detected, resos, reswos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
