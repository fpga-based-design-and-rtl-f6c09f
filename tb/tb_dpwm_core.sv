// tb_dpwm_core -- self-checking testbench of dpwm_core.
//
// Offers random parameter sets (TN 3..60, EN + WN <= TN) and follows the core
// with a reference model of the cycle: after a set is taken the next cycle
// starts at count 0 and lasts TN clocks; vgs1 is high for counts EN..EN+WN-1
// and vgs2 is its complement. Checked every clock: count, gate outputs and
// reset1 (last clock of the cycle); per cycle: period, high time and delay
// measured from vgs1. It also withholds a parameter set once to check that
// the running set is repeated and underrun_o is raised, and checks that the
// outputs stay low before the first set.
module tb_dpwm_core;
  import ss_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  pwm_params_t      nxt, cur, m_cur, taken;
  logic             nxt_valid, take, running, reset1, underrun, vgs1, vgs2;
  logic [CNT_W-1:0] cnt;
  int               checks = 0, failures = 0;
  int               m_cnt, m_run, high, first_high, cycles, underruns;
  logic             took;

  always #5 clk = ~clk;

  dpwm_core dut (
    .clk, .rst_n, .next_i(nxt), .next_valid_i(nxt_valid), .take_o(take),
    .running_o(running), .reset1_o(reset1), .underrun_o(underrun),
    .vgs1_o(vgs1), .vgs2_o(vgs2), .cnt_o(cnt), .cur_o(cur)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic pwm_params_t random_params();
    pwm_params_t r;
    int tn, wn, en;
    tn = $urandom_range(60, 3);
    wn = $urandom_range(tn);
    en = $urandom_range(tn - wn);
    r.tn = CNT_W'(tn);
    r.wn = CNT_W'(wn);
    r.en = CNT_W'(en);
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
    nxt_valid = 1'b0;
    nxt       = random_params();
    rst_n     = 1'b0;
    m_run     = 0;
    m_cnt     = 0;
    m_cur     = '0;
    cycles    = 0;
    underruns = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) begin
      @(posedge clk);
      #1;
      check(!vgs1 && !vgs2 && !running, "idle before first parameter set");
    end
    nxt_valid = 1'b1;
    while (cycles < 2000) begin
      // sample the handshake before the edge, once the offer has settled
      #1;
      took  = take;
      taken = nxt;
      check(reset1 == (m_run != 0 && m_cnt == int'(m_cur.tn) - 1), "reset1 on last clock");
      check(!took || m_run == 0 || m_cnt == int'(m_cur.tn) - 1, "take only at cycle end");
      check(underrun == (m_run != 0 && !nxt_valid && m_cnt == int'(m_cur.tn) - 1), "underrun flag");
      if (underrun) underruns++;
      @(posedge clk);
      #1;
      // reference model of the counter
      if (took) begin
        if (m_run != 0) begin
          check(high == int'(m_cur.wn), $sformatf("high time %0d expected %0d", high, m_cur.wn));
          check(m_cur.wn == 0 || first_high == int'(m_cur.en),
                $sformatf("delay %0d expected %0d", first_high, m_cur.en));
          cycles++;
        end
        m_run = 1;
        m_cur = taken;
        m_cnt = 0;
        high  = 0;
        first_high = -1;
        // next offer: withhold it once, late in the run
        nxt = random_params();
        nxt_valid = (cycles != 1000);
      end else if (m_cnt == int'(m_cur.tn) - 1) begin
        m_cnt = 0;  // repeat of the running set
        nxt_valid = 1'b1;
        high  = 0;
        first_high = -1;
      end else begin
        m_cnt++;
      end
      check(int'(cnt) == m_cnt && cur == m_cur, $sformatf("count %0d expected %0d", cnt, m_cnt));
      check(vgs1 == (m_cnt >= int'(m_cur.en) && m_cnt < int'(m_cur.en) + int'(m_cur.wn)),
            $sformatf("vgs1 at count %0d (EN %0d WN %0d)", m_cnt, m_cur.en, m_cur.wn));
      check(vgs2 == !vgs1, "vgs2 complement of vgs1");
      if (vgs1) begin
        if (first_high < 0) first_high = m_cnt;
        high++;
      end
    end
    check(underruns == 1, $sformatf("underruns %0d expected 1", underruns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
