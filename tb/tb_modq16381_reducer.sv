// tb_modq16381_reducer: self-checking test of the mod 16381 reducer.
// Inputs are the full range a DSP result can take: (A*B + C) and
// (q - A)*B + C for residues A, B, C (normal), and twice those values with
// the RESO flag set, in which case the output must be the residue of the
// un-doubled value. One input per cycle; results must appear 2 edges later.
module tb_modq16381_reducer;
  localparam longint Q = 16381;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_reso, out_valid, out_reso;
  logic [28:0] in_x;
  logic [13:0] out_r;
  int checks = 0, failures = 0;
  typedef struct { bit v; longint r; bit s; } exp_t;
  exp_t pipe [3];

  modq16381_reducer dut (.clk, .rst_n, .in_valid, .in_reso, .in_x, .out_valid, .out_reso, .out_r);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_reso = 0; in_x = 0;
    for (int k = 0; k < 3; k++) pipe[k] = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      longint av, bv, cv, y;
      @(negedge clk);
      av = $urandom % Q; bv = $urandom % Q; cv = $urandom % Q;
      if (i < 8) begin av = (i & 1) ? Q - 1 : 0; bv = (i & 2) ? Q - 1 : 0; cv = Q - 1; end
      y = (($urandom % 2) != 0) ? av * bv + cv : (Q - av) * bv + cv;
      if (i < 8 && (i & 4) != 0) y = Q * (Q - 1) + Q - 1;   // largest signed-form value
      in_valid = ($urandom % 6) != 0;
      in_reso  = 1'($urandom);
      in_x     = 29'(in_reso ? 2 * y : y);
      pipe[2] = pipe[1];
      pipe[1] = pipe[0];
      pipe[0] = '{in_valid, y % Q, in_reso};
      if (i >= 2) begin
        checks++;
        if (out_valid != pipe[2].v || (pipe[2].v && (longint'(out_r) != pipe[2].r || out_reso != pipe[2].s))) begin
          failures++;
          $display("FAIL i=%0d v=%0d r=%0d exp=%0d reso=%0d", i, out_valid, out_r, pipe[2].r, pipe[2].s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
