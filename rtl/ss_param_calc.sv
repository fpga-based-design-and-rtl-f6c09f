// ss_param_calc -- per-cycle randomization-parameter calculator of the DPWM.
//
// On a start pulse it captures the scheme and the three pseudorandom integers
// RFS (16 bit), RDS (10 bit) and RES (12 bit), and computes the clock counts
// of one switching cycle:
//
//   f_sw = F_L + K*RFS              (F_FIX_HZ when the scheme keeps F fixed)
//   TN   = f_clk / f_sw             switching period in clocks
//   WN   = TN * (D_L + RDS) / NORM  on-time in clocks  (D_FIX when d is fixed)
//   EN   = TN * (E_L + RES) / NORM  turn-on delay      (E_FIX when eps is fixed)
//
// All divisions truncate. The equations, F_L = 234.5 kHz, K = 2 (f_sw from
// 234.5 to 365.57 kHz), D_L = 2488, E_L = 1500, NORM = 1E4, and the fixed
// values 300 kHz / 0.3 / 0 follow the published controller. The 40 MHz clock
// is this design's choice (the clock frequency is not stated; 40 MHz gives
// TN = 109..170, about the range of TN values seen in a simulation of
// the original controller). How the arithmetic is done is also this design's choice: one
// sequential divider for TN, then one multiplier and divider
// pair each for WN and EN working in parallel, one quotient bit per clock.
//
// Timing: done_o pulses LATENCY = NW_T + NW_P + 5 clocks after the clock edge
// that samples start_i (61 clocks at the defaults); params_o then holds the
// result until the next done_o. busy_o is high in between; a start while busy
// is ignored. The DPWM runs this one switching cycle ahead, so LATENCY must
// stay below the shortest TN.
module ss_param_calc
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
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  scheme_e            scheme_i,
  input  logic [RFS_W-1:0]   rfs_i,
  input  logic [RDS_W-1:0]   rds_i,
  input  logic [RES_W-1:0]   res_i,
  output logic               busy_o,
  output logic               done_o,
  output pwm_params_t        params_o
);

  localparam int unsigned FSW_MAX  = FL_HZ + K * ((1 << RFS_W) - 1);
  localparam int unsigned FSW_W    = $clog2((FSW_MAX > F_FIX_HZ ? FSW_MAX : F_FIX_HZ) + 1);
  localparam int unsigned NW_T     = $clog2(FCLK_HZ + 1);
  localparam int unsigned NORM_W   = $clog2(NORM + 1);
  localparam int unsigned NW_P     = CNT_W + NORM_W;
  localparam int unsigned LATENCY  = NW_T + NW_P + 5;

  typedef enum logic [1:0] {ST_IDLE, ST_T, ST_MUL, ST_WE} state_e;

  state_e              state_q;
  logic [FSW_W-1:0]    fsw_q;
  logic [NORM_W-1:0]   dnum_q, enum_q;
  logic [CNT_W-1:0]    tn_q, wn_q, en_q;
  logic                start_t_q, start_we_q, done_q;

  logic                t_busy, t_done, w_busy, w_done, e_busy, e_done;
  logic [NW_T-1:0]     t_quo;
  logic [NW_P-1:0]     w_quo, e_quo;
  logic [FSW_W-1:0]    t_rem;
  logic [NORM_W-1:0]   w_rem, e_rem;
  logic [NW_P-1:0]     w_prod, e_prod;

  assign w_prod = NW_P'(tn_q) * NW_P'(dnum_q);
  assign e_prod = NW_P'(tn_q) * NW_P'(enum_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      fsw_q      <= '0;
      dnum_q     <= '0;
      enum_q     <= '0;
      tn_q       <= '0;
      wn_q       <= '0;
      en_q       <= '0;
      start_t_q  <= 1'b0;
      start_we_q <= 1'b0;
      done_q     <= 1'b0;
    end else begin
      start_t_q  <= 1'b0;
      start_we_q <= 1'b0;
      done_q     <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start_i) begin
          fsw_q     <= scheme_i[SCH_BIT_F] ? FSW_W'(FL_HZ + K * rfs_i) : FSW_W'(F_FIX_HZ);
          dnum_q    <= scheme_i[SCH_BIT_D] ? NORM_W'(D_L + rds_i)      : NORM_W'(D_FIX);
          enum_q    <= scheme_i[SCH_BIT_E] ? NORM_W'(E_L + res_i)      : NORM_W'(E_FIX);
          start_t_q <= 1'b1;
          state_q   <= ST_T;
        end
        ST_T: if (t_done) begin
          tn_q    <= CNT_W'(t_quo);
          state_q <= ST_MUL;
        end
        ST_MUL: begin
          start_we_q <= 1'b1;
          state_q    <= ST_WE;
        end
        ST_WE: if (w_done) begin
          wn_q    <= CNT_W'(w_quo);
          en_q    <= CNT_W'(e_quo);
          done_q  <= 1'b1;
          state_q <= ST_IDLE;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  seq_divider #(.NW(NW_T), .DW(FSW_W)) u_div_t (
    .clk, .rst_n,
    .start_i    (start_t_q),
    .dividend_i (NW_T'(FCLK_HZ)),
    .divisor_i  (fsw_q),
    .busy_o     (t_busy),
    .done_o     (t_done),
    .quotient_o (t_quo),
    .remainder_o(t_rem)
  );

  seq_divider #(.NW(NW_P), .DW(NORM_W)) u_div_w (
    .clk, .rst_n,
    .start_i    (start_we_q),
    .dividend_i (w_prod),
    .divisor_i  (NORM_W'(NORM)),
    .busy_o     (w_busy),
    .done_o     (w_done),
    .quotient_o (w_quo),
    .remainder_o(w_rem)
  );

  seq_divider #(.NW(NW_P), .DW(NORM_W)) u_div_e (
    .clk, .rst_n,
    .start_i    (start_we_q),
    .dividend_i (e_prod),
    .divisor_i  (NORM_W'(NORM)),
    .busy_o     (e_busy),
    .done_o     (e_done),
    .quotient_o (e_quo),
    .remainder_o(e_rem)
  );

  // The two dividers of WN and EN run in lockstep.
  assert property (@(posedge clk) disable iff (!rst_n) w_done == e_done)
    else $error("ss_param_calc: WN and EN dividers out of step");
  // TN must fit the count width and the fixed fractions must not exceed one.
  initial begin
    assert (FCLK_HZ / FL_HZ < (1 << CNT_W)) else $error("ss_param_calc: TN overflows CNT_W");
    // The DPWM computes one cycle ahead: the calculation must fit in the
    // shortest switching period.
    assert (LATENCY < FCLK_HZ / FSW_MAX) else $error("ss_param_calc: calculation longer than a period");
    // EN + WN must stay within one period: largest d plus largest eps <= 1.
    assert (D_L + (1 << RDS_W) - 1 + E_L + (1 << RES_W) - 1 <= NORM)
      else $error("ss_param_calc: duty/position limits exceed one period");
  end

  assign busy_o   = (state_q != ST_IDLE);
  assign done_o   = done_q;
  assign params_o = '{tn: tn_q, wn: wn_q, en: en_q};

  // Remainders, busy flags and the (always zero) upper quotient bits of the
  // dividers are not needed here.
  logic unused;
  assign unused = ^{t_rem, w_rem, e_rem, t_busy, w_busy, e_busy,
                   t_quo[NW_T-1:CNT_W], w_quo[NW_P-1:CNT_W], e_quo[NW_P-1:CNT_W]};

endmodule
