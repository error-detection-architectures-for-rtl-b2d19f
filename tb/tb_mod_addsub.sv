// tb_mod_addsub: self-checking test of the modular adder/subtractor.
// Random and corner operands in [0, P] for two moduli; the expected value is
// computed with 64-bit integer arithmetic.
module tb_mod_addsub;
  localparam int unsigned P1 = 1049089;
  localparam int unsigned P2 = 17;
  localparam int W1 = $clog2(P1);
  localparam int W2 = $clog2(P2);

  logic [W1-1:0] x1, y1, z1;
  logic [W2-1:0] x2, y2, z2;
  logic          s1, s2;
  int checks = 0, failures = 0;

  mod_addsub #(.P(P1)) dut1 (.x(x1), .y(y1), .sub(s1), .z(z1));
  mod_addsub #(.P(P2)) dut2 (.x(x2), .y(y2), .sub(s2), .z(z2));

  function automatic longint unsigned ref_as(longint unsigned x, longint unsigned y,
                                             bit sub, longint unsigned p);
    longint r;
    r = sub ? (longint'(x) - longint'(y)) : (longint'(x) + longint'(y));
    r = r % longint'(p);
    if (r < 0) r += longint'(p);
    return longint'(r);
  endfunction

  task automatic check1(longint unsigned x, longint unsigned y, bit s);
    x1 = W1'(x); y1 = W1'(y); s1 = s;
    #1;
    checks++;
    if (longint'(z1) != ref_as(x, y, s, P1)) begin
      failures++;
      $display("FAIL P1 x=%0d y=%0d sub=%0d z=%0d", x, y, s, z1);
    end
  endtask

  task automatic check2(longint unsigned x, longint unsigned y, bit s);
    x2 = W2'(x); y2 = W2'(y); s2 = s;
    #1;
    checks++;
    if (longint'(z2) != ref_as(x, y, s, P2)) begin
      failures++;
      $display("FAIL P2 x=%0d y=%0d sub=%0d z=%0d", x, y, s, z2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check1(0, 0, 0); check1(0, 0, 1); check1(P1-1, P1-1, 0); check1(0, P1-1, 1);
    check1(P1, 0, 1); check1(P1, 5, 1); check1(P1, P1-1, 1); check1(P1-1, 1, 0);
    for (int i = 0; i < 2000; i++)
      check1($urandom % P1, $urandom % P1, 1'($urandom));
    for (int x = 0; x <= int'(P2); x++)
      for (int y = 0; y < int'(P2); y++) begin
        check2(x, y, 0);
        check2(x, y, 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
