// tb_ss_controller -- end-to-end testbench of the spread-spectrum controller
// at its default parameters (40 MHz clock).
//
// Runs all eight schemes in turn, 60 switching cycles each, switching the
// scheme at a random clock inside a cycle. For every switching cycle it
// checks, on the gate outputs:
//   * the parameters equal the equations applied to the stream values and
//     scheme sampled at the start of the previous cycle (read from inside the
//     design): f_sw = 234500 + 2*RFS or 300000, TN = 40e6/f_sw,
//     WN = TN*(2488+RDS)/10000 or TN*3000/10000, EN = TN*(1500+RES)/10000 or 0;
//   * measured period, on-time and delay of vgs1 equal TN, WN and EN;
//   * vgs2 is the complement of vgs1, reset1 pulses once per cycle;
//   * fixed parameters stay fixed (TN = 133 for 300 kHz, WN = 39, EN = 0)
//     and randomized ones stay in range (TN 109..170, WN/TN 0.24..0.3511,
//     EN/TN 0.14..0.5595).
// Mechanisms counted, each must occur: every scheme, a scheme change, a
// period, on-time and delay that vary within a scheme that randomizes them.
module tb_ss_controller;
  import ss_pkg::*;

  localparam int CYCLES_PER_SCHEME = 60;

  logic        clk = 1'b0;
  logic        rst_n;
  scheme_e     scheme, sch_at_sample;
  logic        vgs1, vgs2, reset1, running, underrun;
  pwm_params_t params, cur;
  int          checks = 0, failures = 0;
  pwm_params_t expq [$];
  scheme_e     schq [$];
  scheme_e     cur_sch;
  int          cycles, clk_in_cycle, high, first_high, reset1s, switches;
  int          scheme_cycles [8];
  int          tn_min [8], tn_max [8], wn_min [8], wn_max [8], en_min [8], en_max [8];
  real         frac;

  always #12.5 clk = ~clk;  // 40 MHz with a 1 ns time unit

  ss_controller dut (
    .clk, .rst_n, .scheme_i(scheme), .vgs1_o(vgs1), .vgs2_o(vgs2),
    .reset1_o(reset1), .running_o(running), .underrun_o(underrun), .params_o(params)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic pwm_params_t expected(scheme_e s, int unsigned f, int unsigned d, int unsigned e);
    pwm_params_t r;
    longint unsigned fsw, tn;
    fsw  = s[2] ? 64'(234500 + 2 * f) : 64'd300000;
    tn   = 64'd40000000 / fsw;
    r.tn = CNT_W'(tn);
    r.wn = CNT_W'(tn * 64'(s[1] ? 2488 + d : 3000) / 64'd10000);
    r.en = CNT_W'(tn * 64'(s[0] ? 1500 + e : 0) / 64'd10000);
    return r;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme   = SCH_PWM;
    cur      = '0;
    clk_in_cycle = 0;
    high     = 0;
    first_high = -1;
    cycles   = 0;
    reset1s  = 0;
    switches = 0;
    for (int i = 0; i < 8; i++) begin
      scheme_cycles[i] = 0;
      tn_min[i] = 1 << 30; tn_max[i] = 0;
      wn_min[i] = 1 << 30; wn_max[i] = 0;
      en_min[i] = 1 << 30; en_max[i] = 0;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (cycles < 8 * CYCLES_PER_SCHEME + 2) begin
      // change the scheme somewhere inside a cycle
      if (cycles % CYCLES_PER_SCHEME == 0 && cycles > 0 && cycles / CYCLES_PER_SCHEME < 8 &&
          scheme != scheme_e'(cycles / CYCLES_PER_SCHEME) && clk_in_cycle == 37) begin
        scheme = scheme_e'(cycles / CYCLES_PER_SCHEME);
        switches++;
      end
      #1;
      if (dut.u_dpwm.sample_o) begin
        expq.push_back(expected(scheme, dut.rs16, dut.rs10, dut.rs12));
        schq.push_back(scheme);
      end
      if (reset1) reset1s++;
      check(!underrun, "no underrun");
      @(posedge clk);
      #1;
      if (!running) check(!vgs1 && !vgs2, "gates low before first cycle");
      if (running && params != cur || running && clk_in_cycle >= int'(cur.tn)) begin
        // a new switching cycle has begun: close the previous one
        if (cycles > 0 || cur.tn != 0) begin
          check(clk_in_cycle == int'(cur.tn), $sformatf("period %0d expected %0d", clk_in_cycle, cur.tn));
          check(high == int'(cur.wn), $sformatf("on-time %0d expected %0d", high, cur.wn));
          check(first_high == int'(cur.en), $sformatf("delay %0d expected %0d", first_high, cur.en));
          check(reset1s == 1, "one reset1 per cycle");
          // ranges and fixed values
          check(cur_sch[2] ? (cur.tn >= 109 && cur.tn <= 170) : cur.tn == 133, "TN range / fixed");
          frac = real'(cur.wn) / real'(cur.tn);
          check(cur_sch[1] ? (frac >= 0.24 && frac <= 0.3511) : cur.wn == 16'(cur.tn * 3000 / 10000),
                "WN range / fixed");
          frac = real'(cur.en) / real'(cur.tn);
          check(cur_sch[0] ? (frac >= 0.14 && frac <= 0.5595) : cur.en == 0, "EN range / fixed");
          scheme_cycles[cur_sch]++;
          if (int'(cur.tn) < tn_min[cur_sch]) tn_min[cur_sch] = cur.tn;
          if (int'(cur.tn) > tn_max[cur_sch]) tn_max[cur_sch] = cur.tn;
          if (int'(cur.wn) < wn_min[cur_sch]) wn_min[cur_sch] = cur.wn;
          if (int'(cur.wn) > wn_max[cur_sch]) wn_max[cur_sch] = cur.wn;
          if (int'(cur.en) < en_min[cur_sch]) en_min[cur_sch] = cur.en;
          if (int'(cur.en) > en_max[cur_sch]) en_max[cur_sch] = cur.en;
          cycles++;
        end
        reset1s = 0;
        check(expq.size() > 0, "a sample for every cycle");
        if (expq.size() > 0) begin
          cur     = expq.pop_front();
          cur_sch = schq.pop_front();
          check(params == cur, $sformatf("cycle %0d params %0d/%0d/%0d expected %0d/%0d/%0d",
                cycles, params.tn, params.wn, params.en, cur.tn, cur.wn, cur.en));
        end
        clk_in_cycle = 0;
        high = 0;
        first_high = -1;
      end
      if (running) begin
        check(vgs2 == !vgs1, "vgs2 complement of vgs1");
        if (vgs1) begin
          if (first_high < 0) first_high = clk_in_cycle;
          high++;
        end
        clk_in_cycle++;
      end
    end
    // mechanisms
    check(switches == 7, $sformatf("scheme changes %0d", switches));
    for (int i = 0; i < 8; i++) begin
      $display("scheme %-14s cycles %0d  TN %0d..%0d  WN %0d..%0d  EN %0d..%0d",
               scheme_e'(i), scheme_cycles[i], tn_min[i], tn_max[i], wn_min[i], wn_max[i],
               en_min[i], en_max[i]);
      check(scheme_cycles[i] >= CYCLES_PER_SCHEME - 3, "scheme exercised");
      check((tn_max[i] > tn_min[i]) == (i[2] == 1'b1), "frequency randomized only when selected");
      check(i[1] == 1'b0 || i[2] == 1'b1 || wn_max[i] > wn_min[i], "duty ratio randomized");
      check((en_max[i] > en_min[i]) == (i[0] == 1'b1), "pulse position randomized only when selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
