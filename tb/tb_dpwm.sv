// tb_dpwm -- self-checking testbench of dpwm at its default parameters.
//
// Random stream values change every clock and the scheme changes every 25
// switching cycles, through all eight schemes. Whenever sample_o is high the
// testbench computes the expected TN/WN/EN from the sampled values with
//   f_sw = 234500 + 2*RFS (or 300000), TN = 40e6 / f_sw,
//   WN = TN*(2488+RDS)/10000 (or 3000), EN = TN*(1500+RES)/10000 (or 0),
// and the n-th sample must become the parameters of the n-th switching
// cycle. Each cycle is also measured on the gate outputs: period, on-time
// and delay of vgs1, vgs2 the complement of vgs1, one reset1 per cycle.
// Checks no underrun, outputs low until the first cycle, and the time from
// reset to the first cycle: 64 clocks (61-clock calculation, then one clock
// each to buffer the result and to start the counter).
module tb_dpwm;
  import ss_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  scheme_e          scheme;
  logic [15:0]      rfs;
  logic [9:0]       rds;
  logic [11:0]      res;
  logic             sample, vgs1, vgs2, reset1, running, underrun;
  logic [CNT_W-1:0] cnt;
  pwm_params_t      params, cur;
  int               checks = 0, failures = 0;
  pwm_params_t      expq [$];
  int               cycles, clk_in_cycle, high, first_high, reset1s, start_clk, nclk;
  int               per_scheme [8];

  always #5 clk = ~clk;

  dpwm dut (
    .clk, .rst_n, .scheme_i(scheme), .rfs_i(rfs), .rds_i(rds), .res_i(res),
    .sample_o(sample), .vgs1_o(vgs1), .vgs2_o(vgs2), .reset1_o(reset1),
    .running_o(running), .underrun_o(underrun), .cnt_o(cnt), .params_o(params)
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
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scheme = SCH_PWM;
    rfs = '0; rds = '0; res = '0;
    cycles = 0; reset1s = 0; nclk = 0; start_clk = -1;
    for (int i = 0; i < 8; i++) per_scheme[i] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (cycles < 8 * 25 + 2) begin
      scheme = scheme_e'((cycles / 25) % 8);
      rfs = 16'($urandom);
      rds = 10'($urandom);
      res = 12'($urandom);
      #1;
      if (sample) expq.push_back(expected(scheme, rfs, rds, res));
      if (reset1) reset1s++;
      check(!underrun, "no underrun");
      @(posedge clk);
      #1;
      nclk++;
      if (!running) check(!vgs1 && !vgs2, "gates low before first cycle");
      if (running && cnt == 0) begin
        if (start_clk < 0) begin
          start_clk = nclk;
          check(nclk == 64, $sformatf("first cycle after %0d clocks, expected 64", nclk));
        end else begin
          check(clk_in_cycle == int'(cur.tn), $sformatf("period %0d expected %0d", clk_in_cycle, cur.tn));
          check(high == int'(cur.wn), $sformatf("on-time %0d expected %0d", high, cur.wn));
          check(first_high == int'(cur.en), $sformatf("delay %0d expected %0d", first_high, cur.en));
          check(reset1s == 1, "one reset1 per cycle");
          cycles++;
        end
        reset1s = 0;
        check(expq.size() > 0, "a sample for every cycle");
        if (expq.size() > 0) begin
          cur = expq.pop_front();
          check(params == cur, $sformatf("cycle %0d params %0d/%0d/%0d expected %0d/%0d/%0d", cycles,
                params.tn, params.wn, params.en, cur.tn, cur.wn, cur.en));
          per_scheme[(cycles / 25) % 8]++;
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
    for (int i = 0; i < 8; i++) check(per_scheme[i] >= 20, $sformatf("scheme %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
