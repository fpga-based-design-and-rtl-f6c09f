// dpwm_core -- counter-based pulse generator of the DPWM.
//
// A counter runs from 0 to TN-1 and restarts, so one switching cycle lasts
// TN clocks. The gate output is high while EN <= count < EN+WN, which gives
// an on-time of WN clocks starting EN clocks after the cycle begins. The
// counter-and-compare scheme and the reset1 pulse that ends each cycle follow
// the published controller; the half-open comparison window, the one-clock
// output register and the handshake below are this design's choice.
//
// Parameters for the next cycle come in on next_i with next_valid_i. They are
// taken (take_o high for one clock) on the last clock of the running cycle,
// and become active on the following edge, when the new cycle starts with
// count 0. After reset the core stays idle, both gate outputs low, until the
// first valid parameter set arrives. If no new set is valid at a cycle end
// the current one is repeated and underrun_o flags it.
//
// Outputs (all registered or decoded from registers):
//   vgs1_o   high-side gate drive (the PWM signal)
//   vgs2_o   low-side gate drive of the synchronous buck, its complement
//            while running (no dead time is inserted)
//   reset1_o high on the last clock of every cycle
//   cnt_o    count within the cycle; cur_o the active TN/WN/EN
module dpwm_core
  import ss_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pwm_params_t next_i,
  input  logic        next_valid_i,
  output logic        take_o,
  output logic        running_o,
  output logic        reset1_o,
  output logic        underrun_o,
  output logic        vgs1_o,
  output logic        vgs2_o,
  output logic [CNT_W-1:0] cnt_o,
  output pwm_params_t cur_o
);

  logic             run_q, run_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;
  pwm_params_t      cur_q, cur_d;
  logic             vgs1_q, vgs2_q, pwm_d;
  logic             last;

  // Last clock of a cycle: count + 1 reaches TN.
  assign last = run_q && ({1'b0, cnt_q} + 1'b1 >= {1'b0, cur_q.tn});

  always_comb begin
    run_d      = run_q;
    cnt_d      = cnt_q;
    cur_d      = cur_q;
    take_o     = 1'b0;
    underrun_o = 1'b0;
    if (!run_q) begin
      if (next_valid_i) begin
        run_d  = 1'b1;
        cnt_d  = '0;
        cur_d  = next_i;
        take_o = 1'b1;
      end
    end else if (last) begin
      cnt_d = '0;
      if (next_valid_i) begin
        cur_d  = next_i;
        take_o = 1'b1;
      end else begin
        underrun_o = 1'b1;
      end
    end else begin
      cnt_d = cnt_q + 1'b1;
    end
    pwm_d = run_d && (cnt_d >= cur_d.en)
                  && ({1'b0, cnt_d} < {1'b0, cur_d.en} + {1'b0, cur_d.wn});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      cnt_q  <= '0;
      cur_q  <= '0;
      vgs1_q <= 1'b0;
      vgs2_q <= 1'b0;
    end else begin
      run_q  <= run_d;
      cnt_q  <= cnt_d;
      cur_q  <= cur_d;
      vgs1_q <= pwm_d;
      vgs2_q <= run_d && !pwm_d;
    end
  end

  // The two gate drives are never on together.
  assert property (@(posedge clk) disable iff (!rst_n) !(vgs1_q && vgs2_q))
    else $error("dpwm_core: both gates on");

  assign running_o = run_q;
  assign reset1_o  = last;
  assign vgs1_o    = vgs1_q;
  assign vgs2_o    = vgs2_q;
  assign cnt_o     = cnt_q;
  assign cur_o     = cur_q;

endmodule
