// tb_recompute_checker: self-checking test of the result comparator.
// Random pairs (normal result, recomputed result) are presented with random
// gaps; every second pair is corrupted in one bit. res, err and res_valid are
// checked one edge after the recomputed result, and err_sticky at the end.
module tb_recompute_checker;
  localparam int W = 14;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_recomp, res_valid, err, err_sticky;
  logic [W-1:0] in_data, res;
  int checks = 0, failures = 0;

  recompute_checker #(.W(W)) dut (.clk, .rst_n, .in_valid, .in_recomp, .in_data,
                                  .res_valid, .res, .err, .err_sticky);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_recomp = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (err_sticky || res_valid) begin failures++; $display("FAIL after reset"); end
    for (int i = 0; i < 1000; i++) begin
      logic [W-1:0] v, v2;
      bit bad;
      v   = W'($urandom);
      bad = (i % 2) == 1;
      v2  = bad ? v ^ (W'(1) << ($urandom % W)) : v;
      in_valid = 1; in_recomp = 0; in_data = v;
      @(negedge clk);
      checks++;
      if (res_valid) begin failures++; $display("FAIL res_valid after normal result"); end
      in_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
      in_valid = 1; in_recomp = 1; in_data = v2;
      @(negedge clk);
      in_valid = 0; in_recomp = 0;
      checks++;
      if (!res_valid || res != v || err != bad) begin
        failures++;
        $display("FAIL i=%0d valid=%0d res=%0h exp=%0h err=%0d exp=%0d", i, res_valid, res, v, err, bad);
      end
      if (i == 0) begin
        checks++;
        if (err_sticky) begin failures++; $display("FAIL sticky set without error"); end
      end
    end
    checks++;
    if (!err_sticky) begin failures++; $display("FAIL sticky flag not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
