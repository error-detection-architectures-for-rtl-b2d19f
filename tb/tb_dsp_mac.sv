// tb_dsp_mac: self-checking test of the DSP multiply-accumulate stage.
// A random operation (mode Norm/RESO/RESwO, signed or unsigned) is applied
// every cycle, with random idle cycles; the expected 29-bit result, computed
// with integer arithmetic, must appear exactly 2 clock edges later. A final
// pass with a stuck-at-1 fault on an A bit checks that the fault reaches x.
module tb_dsp_mac;
  import rlwe_pkg::*;
  localparam int Q = 16381;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_neg, out_valid, out_neg;
  recomp_mode_e in_mode, out_mode;
  logic [13:0] a, b, c, d;
  logic [14:0] sa0, sa1;
  logic [28:0] out_x;
  int checks = 0, failures = 0;

  typedef struct { bit v; longint x; recomp_mode_e m; bit n; } exp_t;
  exp_t pipe [3];

  dsp_mac dut (.clk, .rst_n, .in_valid, .in_mode, .in_neg, .a, .b, .c, .d,
               .flt_sa0(sa0), .flt_sa1(sa1), .out_valid, .out_mode, .out_neg, .out_x);

  always #5 clk = ~clk;

  function automatic longint model(recomp_mode_e m, bit n, longint av, longint bv, longint cv,
                                   longint dv, logic [14:0] m0, logic [14:0] m1);
    longint ae, be, ce, de;
    ae = av; be = bv; ce = cv; de = dv;
    if (m == MODE_RESO)  begin ae = 2 * av; ce = 2 * cv; de = 2 * dv; end
    if (m == MODE_RESWO) begin ae = bv; be = av; end
    ae = longint'((15'(ae) & ~m0) | m1);
    return ((n ? (de - ae) : ae) * be + ce) & ((longint'(1) << 29) - 1);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_neg = 0; in_mode = MODE_NORM; a = 0; b = 0; c = 0; d = 14'(Q);
    sa0 = '0; sa1 = '0;
    for (int k = 0; k < 3; k++) pipe[k] = '{0, 0, MODE_NORM, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i == 1500) sa1 = 15'(1) << 3;
      in_valid = ($urandom % 5) != 0;
      in_neg   = 1'($urandom);
      case ($urandom % 3)
        0: in_mode = MODE_NORM;
        1: in_mode = MODE_RESO;
        default: in_mode = MODE_RESWO;
      endcase
      if (in_mode == MODE_RESWO) in_neg = 0;
      a = 14'($urandom % Q); b = 14'($urandom % Q); c = 14'($urandom % Q);
      if (i % 97 == 0) begin a = 14'(Q - 1); b = 14'(Q - 1); c = 14'(Q - 1); end
      pipe[2] = pipe[1];
      pipe[1] = pipe[0];
      pipe[0] = '{in_valid, model(in_mode, in_neg, a, b, c, d, sa0, sa1), in_mode, in_neg};
      // outputs now correspond to the operation applied two cycles earlier
      if (i >= 2) begin
        checks++;
        if (out_valid != pipe[2].v) begin
          failures++; $display("FAIL i=%0d valid=%0d exp=%0d", i, out_valid, pipe[2].v);
        end else if (pipe[2].v && (longint'(out_x) != pipe[2].x || out_mode != pipe[2].m || out_neg != pipe[2].n)) begin
          failures++; $display("FAIL i=%0d x=%0d exp=%0d", i, out_x, pipe[2].x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
