// tb_mod_mult: self-checking test of the modular multiplier against 64-bit
// integer arithmetic, for random full-width operands (including values >= P,
// as produced by an injected stuck-at-1 fault) and corner values.
module tb_mod_mult;
  localparam int unsigned P = 1049089;
  localparam int W = $clog2(P);

  logic [W-1:0] a, b, z;
  int checks = 0, failures = 0;

  mod_mult #(.P(P)) dut (.a, .b, .z);

  task automatic check(longint unsigned x, longint unsigned y);
    longint unsigned r;
    a = W'(x); b = W'(y);
    #1;
    r = (longint'(a) * longint'(b)) % P;
    checks++;
    if (longint'(z) != r) begin
      failures++;
      $display("FAIL a=%0d b=%0d z=%0d exp=%0d", a, b, z, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1, P-1); check(P-1, P-1); check((1<<W)-1, (1<<W)-1); check(2, (P+1)/2);
    for (int i = 0; i < 3000; i++) check($urandom % (1 << W), $urandom % (1 << W));
    for (int i = 0; i < 3000; i++) check($urandom % P, $urandom % P);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
