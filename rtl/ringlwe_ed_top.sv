// ringlwe_ed_top: the three error-detecting ring-LWE datapaths side by side.
//
//  * rpm_*  : ring polynomial multiplier in Z_P[x]/(x^N + 1), N = 256,
//             P = 1049089, with modified RENO recomputation: rpm_reno by
//             default, or the two-stage pipelined rpm_reno_pipe when
//             RPM_PIPELINED = 1 (done then follows start by 2N+4 cycles
//             instead of 2N+3, at a shorter clock period; RPM_NEG_BOTH
//             applies to rpm_reno only).
//  * pm_*   : schoolbook polynomial multiplier in Z_16381[x]/(x^PM_N + 1),
//             one coefficient MAC at a time on the DSP-style multiply-
//             accumulate unit with RESO / RESwO recomputation (dsp_polymul,
//             dsp_modq_ed); done follows start by 7*PM_N^2 + 1 cycles.
//  * sams_* : SAMS2 reduction mod 12289 with RESO recomputation (sams2_ed).
// The three share only clock and reset; each has its own handshake, result
// and error flag (see the sub-blocks for timing). The moduli of the three
// parts differ, so they are not chained: each is a building block that a
// ring-LWE processor would use on its own. The flt_* inputs inject stuck-at
// faults into each datapath and must be 0 in normal use.
module ringlwe_ed_top #(
  parameter int unsigned RPM_N        = 256,
  parameter int unsigned RPM_P        = 1049089,
  parameter bit          RPM_NEG_BOTH = 1'b0,
  parameter bit          RPM_PIPELINED = 1'b0,
  parameter int unsigned PM_N         = 256,
  parameter int          SAMS_XW      = 28,
  localparam int         RPM_W        = $clog2(RPM_P)
) (
  input  logic             clk,
  input  logic             rst_n,
  // polynomial multiplier
  input  logic             rpm_start,
  input  logic [RPM_W-1:0] rpm_a [RPM_N],
  input  logic [RPM_W-1:0] rpm_b [RPM_N],
  input  logic [RPM_W-1:0] rpm_flt_sa0,
  input  logic [RPM_W-1:0] rpm_flt_sa1,
  output logic             rpm_busy,
  output logic             rpm_done,
  output logic [RPM_W-1:0] rpm_c [RPM_N],
  output logic             rpm_err,
  output logic             rpm_zero_alarm,
  // schoolbook polynomial multiplier mod 16381 on the error-detecting MAC
  input  logic             pm_start,
  input  logic [13:0]      pm_a [PM_N],
  input  logic [13:0]      pm_b [PM_N],
  input  logic             pm_swap,
  input  logic [14:0]      pm_flt_sa0,
  input  logic [14:0]      pm_flt_sa1,
  output logic             pm_busy,
  output logic             pm_done,
  output logic [13:0]      pm_c [PM_N],
  output logic             pm_err,
  // SAMS2 reduction mod 12289
  input  logic               sams_in_valid,
  output logic               sams_in_ready,
  input  logic [SAMS_XW-1:0] sams_x,
  input  logic [SAMS_XW:0]   sams_flt_sa0,
  input  logic [SAMS_XW:0]   sams_flt_sa1,
  output logic               sams_res_valid,
  output logic [13:0]        sams_res,
  output logic               sams_err,
  output logic               sams_err_sticky
);

  if (RPM_PIPELINED) begin : g_rpm_pipe
    rpm_reno_pipe #(.N(RPM_N), .P(RPM_P)) u_rpm (
      .clk, .rst_n, .start(rpm_start), .a_in(rpm_a), .b_in(rpm_b),
      .flt_sa0(rpm_flt_sa0), .flt_sa1(rpm_flt_sa1),
      .busy(rpm_busy), .done(rpm_done), .c_out(rpm_c), .err(rpm_err),
      .zero_alarm(rpm_zero_alarm)
    );
  end else begin : g_rpm
    rpm_reno #(.N(RPM_N), .P(RPM_P), .NEG_BOTH(RPM_NEG_BOTH)) u_rpm (
      .clk, .rst_n, .start(rpm_start), .a_in(rpm_a), .b_in(rpm_b),
      .flt_sa0(rpm_flt_sa0), .flt_sa1(rpm_flt_sa1),
      .busy(rpm_busy), .done(rpm_done), .c_out(rpm_c), .err(rpm_err),
      .zero_alarm(rpm_zero_alarm)
    );
  end

  dsp_polymul #(.N(PM_N)) u_pm (
    .clk, .rst_n, .start(pm_start), .a_in(pm_a), .b_in(pm_b), .swap(pm_swap),
    .flt_sa0(pm_flt_sa0), .flt_sa1(pm_flt_sa1),
    .busy(pm_busy), .done(pm_done), .c_out(pm_c), .err(pm_err)
  );

  sams2_ed #(.XW(SAMS_XW)) u_sams (
    .clk, .rst_n, .in_valid(sams_in_valid), .in_ready(sams_in_ready), .x(sams_x),
    .flt_sa0(sams_flt_sa0), .flt_sa1(sams_flt_sa1),
    .res_valid(sams_res_valid), .res(sams_res), .err(sams_err), .err_sticky(sams_err_sticky)
  );

endmodule
