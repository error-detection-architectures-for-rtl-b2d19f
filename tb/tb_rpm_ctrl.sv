// tb_rpm_ctrl: self-checking test of the multiplier sequencer.
// For N = 5 with and without the decode cycle, one operation is started and
// every output is compared, cycle by cycle, with the expected schedule:
// load, N run1 cycles, N run2 cycles (store1 in the first), the decode cycle,
// the compare cycle and the done pulse. A start while busy must be ignored.
module tb_rpm_ctrl;
  localparam int N = 5;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  logic       load0, en0, first0, reno0, dec0, store0, cmp0, busy0, done0;
  logic [2:0] j0;
  logic       load1, en1, first1, reno1, dec1, store1, cmp1, busy1, done1;
  logic [2:0] j1;

  rpm_ctrl #(.N(N), .NEG_BOTH(1'b0)) dut0 (
    .clk, .rst_n, .start, .load(load0), .en(en0), .first(first0), .reno(reno0), .dec(dec0),
    .store1(store0), .cmp(cmp0), .j(j0), .busy(busy0), .done(done0));
  rpm_ctrl #(.N(N), .NEG_BOTH(1'b1)) dut1 (
    .clk, .rst_n, .start, .load(load1), .en(en1), .first(first1), .reno(reno1), .dec(dec1),
    .store1(store1), .cmp(cmp1), .j(j1), .busy(busy1), .done(done1));

  always #5 clk = ~clk;

  // expected vector: {load, en, first, reno, dec, store1, cmp, busy, done}
  task automatic expect_vec(string tag, logic [8:0] got, logic [8:0] exp, logic [2:0] gj, int ej);
    checks++;
    if (got !== exp || (ej >= 0 && gj != 3'(ej))) begin
      failures++;
      $display("FAIL %s got=%b exp=%b j=%0d expj=%0d", tag, got, exp, gj, ej);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    #1;
    expect_vec("idle0", {load0, en0, first0, reno0, dec0, store0, cmp0, busy0, done0}, 9'b100000000, j0, -1);
    expect_vec("idle1", {load1, en1, first1, reno1, dec1, store1, cmp1, busy1, done1}, 9'b100000000, j1, -1);
    @(negedge clk);
    for (int c = 0; c < 2 * N + 3; c++) begin
      logic [8:0] e0, e1;
      start = (c == 3);   // ignored while busy
      #1;
      // design without NEG_BOTH: run1 c=0..N-1, run2 N..2N-1, dec 2N, cmp 2N+1, done 2N+2
      if (c < N)               e0 = {1'b0, 1'b1, c == 0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0};
      else if (c < 2 * N)      e0 = {1'b0, 1'b1, c == N, 1'b1, 1'b0, c == N, 1'b0, 1'b1, 1'b0};
      else if (c == 2 * N)     e0 = 9'b010110010;
      else if (c == 2 * N + 1) e0 = 9'b000000110;
      else                     e0 = 9'b000000001;
      if (c < N)               e1 = {1'b0, 1'b1, c == 0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0};
      else if (c < 2 * N)      e1 = {1'b0, 1'b1, c == N, 1'b1, 1'b0, c == N, 1'b0, 1'b1, 1'b0};
      else if (c == 2 * N)     e1 = 9'b000000110;
      else if (c == 2 * N + 1) e1 = 9'b000000001;
      else                     e1 = 9'b000000000;
      expect_vec($sformatf("c%0d dut0", c), {load0, en0, first0, reno0, dec0, store0, cmp0, busy0, done0},
                 e0, j0, (c < 2 * N) ? c % N : -1);
      expect_vec($sformatf("c%0d dut1", c), {load1, en1, first1, reno1, dec1, store1, cmp1, busy1, done1},
                 e1, j1, (c < 2 * N) ? c % N : -1);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
