// tb_rpm_reno_sizes: the error-detecting polynomial multiplier at the two
// larger published parameter sets, n = 512 with p = 4206593 (23-bit
// coefficients) and n = 1024 with p = 536903681 (30-bit coefficients), each
// with one negated operand (decode cycle) and with both operands negated.
// Each instance runs in its own rpm_size_run driver (fault-free products
// against a negacyclic reference, latency, and detection of permanent and
// transient stuck-at faults on b); this module sums their counts and also
// requires that each instance detected at least one fault.
module tb_rpm_reno_sizes;
  logic clk = 0, rst_n = 0;
  logic fin [4];
  int   chk [4], fl [4], det [4];
  int   checks, failures;

  rpm_size_run #(.N(512),  .P(4206593),   .NEG_BOTH(1'b0)) r0 (.clk, .rst_n, .fin(fin[0]), .checks(chk[0]), .failures(fl[0]), .detected(det[0]));
  rpm_size_run #(.N(512),  .P(4206593),   .NEG_BOTH(1'b1)) r1 (.clk, .rst_n, .fin(fin[1]), .checks(chk[1]), .failures(fl[1]), .detected(det[1]));
  rpm_size_run #(.N(1024), .P(536903681), .NEG_BOTH(1'b0)) r2 (.clk, .rst_n, .fin(fin[2]), .checks(chk[2]), .failures(fl[2]), .detected(det[2]));
  rpm_size_run #(.N(1024), .P(536903681), .NEG_BOTH(1'b1)) r3 (.clk, .rst_n, .fin(fin[3]), .checks(chk[3]), .failures(fl[3]), .detected(det[3]));

  always #5 clk = ~clk;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report();
    for (int i = 0; i < 4; i++) begin
      $display("instance %0d: checks=%0d failures=%0d detected=%0d", i, chk[i], fl[i], det[i]);
      checks++;
      if (det[i] == 0) begin failures++; $display("FAIL instance %0d detected no fault", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
