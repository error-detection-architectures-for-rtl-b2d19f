// tb_sams2_reducer: self-checking test of the SAMS2 reducer mod 12289.
// Random 28-bit inputs (and corner values, including the largest input) are
// reduced in Norm and RESO mode, one per cycle with random gaps; the output
// must be x mod q, 3 clock edges after the input. XW is the default 28.
module tb_sams2_reducer;
  localparam longint Q = 12289;
  localparam int XW = 28;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_reso, out_valid, out_reso;
  logic [XW-1:0] in_x;
  logic [XW:0]   sa0, sa1;
  logic [13:0]   out_r;
  int checks = 0, failures = 0;
  typedef struct { bit v; longint r; bit s; } exp_t;
  exp_t pipe [4];

  sams2_reducer #(.XW(XW)) dut (.clk, .rst_n, .in_valid, .in_reso, .in_x,
                                .flt_sa0(sa0), .flt_sa1(sa1), .out_valid, .out_reso, .out_r);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_reso = 0; in_x = 0; sa0 = '0; sa1 = '0;
    for (int k = 0; k < 4; k++) pipe[k] = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      longint xv;
      @(negedge clk);
      xv = (longint'($urandom) << 8 ^ longint'($urandom)) & ((longint'(1) << XW) - 1);
      if (i < 16) xv = (i < 8) ? ((longint'(1) << XW) - 1 - i) : (Q * (i + 1000) - 1);
      if (i % 5 == 0) xv = (longint'($urandom) % Q) * (longint'($urandom) % Q);
      in_valid = ($urandom % 6) != 0;
      in_reso  = 1'($urandom);
      in_x     = XW'(xv);
      for (int k = 3; k > 0; k--) pipe[k] = pipe[k-1];
      pipe[0] = '{in_valid, xv % Q, in_reso};
      if (i >= 3) begin
        checks++;
        if (out_valid != pipe[3].v || (pipe[3].v && (longint'(out_r) != pipe[3].r || out_reso != pipe[3].s))) begin
          failures++;
          $display("FAIL i=%0d v=%0d r=%0d exp=%0d", i, out_valid, out_r, pipe[3].r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
