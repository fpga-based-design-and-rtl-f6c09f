// dpwm -- digital pulse-width modulator with per-cycle randomization.
//
// At the start of every switching cycle the DPWM samples the three
// pseudorandom streams as integers RFS (16 bit), RDS (10 bit) and RES
// (12 bit), turns them into the clock counts TN, WN and EN of a cycle
// (ss_param_calc, equations of f_sw, TN, WN and EN) and generates the gate
// waveforms with a counter and comparators (dpwm_core). Which of frequency,
// duty ratio and pulse position are randomized is chosen by scheme_i.
//
// Pipelining is this design's choice: the values sampled at the start of
// cycle k are computed while cycle k runs and are applied to cycle k+1, so
// the sequential calculator has a whole period (at least 109 clocks at the
// default 40 MHz, against a 61-clock calculation) to finish. Right after
// reset one extra calculation provides the parameters of the first cycle;
// the outputs stay low until then: the first cycle starts LATENCY + 2 clocks
// after the first sampling edge (63 clocks, the result is buffered once).
//
// sample_o marks the clocks on whose edge the streams and scheme_i are
// sampled (the first after reset, then the last clock of each cycle).
module dpwm
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
  input  logic [RFS_W-1:0] rfs_i,
  input  logic [RDS_W-1:0] rds_i,
  input  logic [RES_W-1:0] res_i,
  output logic             sample_o,
  output logic             vgs1_o,
  output logic             vgs2_o,
  output logic             reset1_o,
  output logic             running_o,
  output logic             underrun_o,
  output logic [CNT_W-1:0] cnt_o,
  output pwm_params_t      params_o
);

  pwm_params_t calc_params, next_q;
  logic        calc_done, calc_busy, calc_start;
  logic        next_valid_q, take, started_q;

  // First calculation right after reset, then one per cycle start.
  assign calc_start = take || !started_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started_q    <= 1'b0;
      next_q       <= '0;
      next_valid_q <= 1'b0;
    end else begin
      started_q <= 1'b1;
      if (calc_done) begin
        next_q       <= calc_params;
        next_valid_q <= 1'b1;
      end else if (take) begin
        next_valid_q <= 1'b0;
      end
    end
  end

  ss_param_calc #(
    .FCLK_HZ(FCLK_HZ), .FL_HZ(FL_HZ), .K(K), .F_FIX_HZ(F_FIX_HZ),
    .D_L(D_L), .E_L(E_L), .D_FIX(D_FIX), .E_FIX(E_FIX), .NORM(NORM)
  ) u_calc (
    .clk, .rst_n,
    .start_i (calc_start),
    .scheme_i(scheme_i),
    .rfs_i   (rfs_i),
    .rds_i   (rds_i),
    .res_i   (res_i),
    .busy_o  (calc_busy),
    .done_o  (calc_done),
    .params_o(calc_params)
  );

  dpwm_core u_core (
    .clk, .rst_n,
    .next_i      (next_q),
    .next_valid_i(next_valid_q),
    .take_o      (take),
    .running_o   (running_o),
    .reset1_o    (reset1_o),
    .underrun_o  (underrun_o),
    .vgs1_o      (vgs1_o),
    .vgs2_o      (vgs2_o),
    .cnt_o       (cnt_o),
    .cur_o       (params_o)
  );

  // A new calculation is only ever started on an idle calculator, and each
  // cycle's parameters are ready before the cycle they belong to begins.
  assert property (@(posedge clk) disable iff (!rst_n) calc_start |-> !calc_busy)
    else $error("dpwm: calculation started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) !underrun_o)
    else $error("dpwm: parameters not ready at cycle end");

  assign sample_o = calc_start;

endmodule
