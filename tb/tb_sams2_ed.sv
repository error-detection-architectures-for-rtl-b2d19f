// tb_sams2_ed: self-checking test of the error-detecting SAMS2 reduction.
// Fault-free inputs must give x mod 12289 with err = 0, 5 cycles after
// acceptance. Then stuck-at faults on the encoded reducer input are injected
// for whole operations (permanent) or only for the normal pass (transient);
// the expected err comes from reducing the faulty encoded values with
// integer arithmetic. At least one fault must be detected.
module tb_sams2_ed;
  localparam longint Q = 12289;
  localparam int XW = 28;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, res_valid, err, err_sticky;
  logic [XW-1:0] x;
  logic [XW:0]   sa0, sa1;
  logic [13:0]   res;
  int checks = 0, failures = 0, detected = 0;
  longint cyc = 0;
  typedef struct { longint r; bit e; longint t; } exp_t;
  exp_t q[$];

  sams2_ed #(.XW(XW)) dut (.clk, .rst_n, .in_valid, .in_ready, .x, .flt_sa0(sa0), .flt_sa1(sa1),
                           .res_valid, .res, .err, .err_sticky);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && res_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      e = q.pop_front();
      if (longint'(res) != e.r || err != e.e || cyc - e.t != 5) begin
        failures++;
        $display("FAIL res=%0d exp=%0d err=%0d exp=%0d lat=%0d", res, e.r, err, e.e, cyc - e.t);
      end
      if (err) detected++;
    end
  end

  function automatic longint f(longint v, logic [XW:0] m0, logic [XW:0] m1);
    return longint'(((XW+1)'(v) & ~m0) | m1);
  endfunction

  // kind: 0 fault-free, 1 permanent, 2 transient (normal pass only)
  task automatic offer(int kind);
    longint xv, r1, r2;
    logic [XW:0] m0, m1;
    @(negedge clk);
    xv = (longint'($urandom) % Q) * (longint'($urandom) % Q);
    m0 = '0; m1 = '0;
    if (kind != 0) begin
      if ($urandom % 2) m0 = (XW+1)'(1) << ($urandom % (XW + 1));
      else              m1 = (XW+1)'(1) << ($urandom % (XW + 1));
    end
    in_valid = 1; x = XW'(xv); sa0 = m0; sa1 = m1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    r1 = f(xv, m0, m1) % Q;
    r2 = (kind == 1) ? f(2 * xv, m0, m1) % Q : (2 * xv) % Q;
    r2 = (r2 % 2 == 1) ? (r2 + Q) / 2 : r2 / 2;
    q.push_back('{r1, r1 != r2, cyc});
    @(negedge clk);
    in_valid = 0;
    if (kind == 2) begin sa0 = '0; sa1 = '0; end
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; x = 0; sa0 = '0; sa1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) offer(0);
    repeat (10) @(negedge clk);
    checks++;
    if (err_sticky) begin failures++; $display("FAIL false alarm"); end
    for (int i = 0; i < 300; i++) offer(1);
    for (int i = 0; i < 300; i++) offer(2);
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0 || detected == 0) begin failures++; $display("FAIL pending=%0d detected=%0d", q.size(), detected); end
    $display("faults detected: %0d of 600", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
