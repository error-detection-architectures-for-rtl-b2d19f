// tb_rpm_column: self-checking test of one multiplier column.
// Random sequences of accumulate cycles (random sign, random 'first' restarts,
// random idle cycles) and decode cycles are applied; a reference accumulator
// kept with integer arithmetic predicts e after every clock edge.
module tb_rpm_column;
  localparam int unsigned P = 1049089;
  localparam int W = $clog2(P);

  logic clk = 0, rst_n = 0;
  logic en, first, dec, sel;
  logic [W-1:0] a, b, e;
  longint model;
  int checks = 0, failures = 0;

  rpm_column #(.P(P)) dut (.clk, .rst_n, .en, .first, .dec, .sel, .a, .b, .e);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; dec = 0; sel = 0; a = 0; b = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      first = ($urandom % 10) == 0;
      dec   = ($urandom % 12) == 0;
      sel   = 1'($urandom);
      a     = W'($urandom % P);
      b     = W'($urandom % P);
      if (en) begin
        longint acc, prod;
        acc  = first ? 0 : model;
        prod = (longint'(a) * longint'(b)) % P;
        if (dec)      model = (P - model) % P;
        else if (sel) model = (acc - prod + P) % P;
        else          model = (acc + prod) % P;
      end
      @(posedge clk);
      #1;
      checks++;
      if (longint'(e) != model) begin
        failures++;
        $display("FAIL i=%0d e=%0d exp=%0d", i, e, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
