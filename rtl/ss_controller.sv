// ss_controller -- spread-spectrum PWM controller for a synchronous buck
// converter.
//
// A pseudorandom streams generator (prs_gen: 16 maximum-length LFSRs in
// parallel) provides a 16-bit, a 12-bit and a 10-bit random stream every
// clock. The DPWM (dpwm) samples them at the start of each switching cycle
// as RFS (16-bit stream), RES (12-bit stream) and RDS (10-bit stream) and
// derives the period TN, on-time WN and turn-on delay EN of the cycle, in
// clocks, for the scheme selected by scheme_i (one of the eight schemes of
// ss_pkg::scheme_e, from plain PWM to RRRM, in which frequency, duty ratio
// and pulse position are all randomized). The result drives the high-side
// gate vgs1_o and, complemented, the low-side gate vgs2_o.
//
// Defaults: 40 MHz clock (this design's choice), switching frequency
// 234.5..365.57 kHz when randomized and 300 kHz when fixed, duty ratio
// 0.2488..0.3511 or 0.3, turn-on delay 0.15..0.5595 of the period or 0.
// A change of scheme_i takes effect in the second switching cycle after it
// (the parameters of a cycle are computed during the cycle before).
//
// The analog power stage and the noise-measurement set-up are outside this
// module; vgs1_o/vgs2_o are its connection to the power switches.
module ss_controller
  import ss_pkg::*;
#(
  parameter int unsigned FCLK_HZ  = 40_000_000,
  parameter int unsigned FL_HZ    = 234_500,
  parameter int unsigned K        = 2,
  parameter int unsigned F_FIX_HZ = 300_000,
  parameter int unsigned D_L      = 2488,
  parameter int unsigned E_L      = 1500,
  parameter int unsigned D_FIX    = 3000,
  parameter int unsigned E_FIX    = 0,
  parameter int unsigned NORM     = 10_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  scheme_e          scheme_i,
  output logic             vgs1_o,
  output logic             vgs2_o,
  output logic             reset1_o,
  output logic             running_o,
  output logic             underrun_o,
  output pwm_params_t      params_o
);

  logic [15:0]      rs16;
  logic [11:0]      rs12;
  logic [9:0]       rs10;
  logic             sample;
  logic [CNT_W-1:0] cnt;

  prs_gen u_prs (
    .clk, .rst_n,
    .rs16_o(rs16),
    .rs12_o(rs12),
    .rs10_o(rs10)
  );

  dpwm #(
    .FCLK_HZ(FCLK_HZ), .FL_HZ(FL_HZ), .K(K), .F_FIX_HZ(F_FIX_HZ),
    .D_L(D_L), .E_L(E_L), .D_FIX(D_FIX), .E_FIX(E_FIX), .NORM(NORM)
  ) u_dpwm (
    .clk, .rst_n,
    .scheme_i  (scheme_i),
    .rfs_i     (rs16),
    .rds_i     (rs10),
    .res_i     (rs12),
    .sample_o  (sample),
    .vgs1_o    (vgs1_o),
    .vgs2_o    (vgs2_o),
    .reset1_o  (reset1_o),
    .running_o (running_o),
    .underrun_o(underrun_o),
    .cnt_o     (cnt),
    .params_o  (params_o)
  );

  logic unused;
  assign unused = ^{sample, cnt};

endmodule
