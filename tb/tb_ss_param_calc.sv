// tb_ss_param_calc -- self-checking testbench of ss_param_calc.
//
// Drives random RFS/RDS/RES values under all eight schemes, plus the corner
// values 0 and all-ones, and compares TN, WN and EN with the equations
//   f_sw = 234500 + 2*RFS (or 300000), TN = 40e6 / f_sw,
//   WN = TN*(2488+RDS)/10000 (or TN*3000/10000),
//   EN = TN*(1500+RES)/10000 (or 0)
// evaluated here in plain integer arithmetic. It also checks the latency:
// done_o exactly 61 clocks after the sampling edge, which is below the
// shortest switching period of 109 clocks at 40 MHz.
module tb_ss_param_calc;
  import ss_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        start;
  scheme_e     scheme;
  logic [15:0] rfs;
  logic [9:0]  rds;
  logic [11:0] res;
  logic        busy, done;
  pwm_params_t p;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  ss_param_calc dut (
    .clk, .rst_n, .start_i(start), .scheme_i(scheme),
    .rfs_i(rfs), .rds_i(rds), .res_i(res),
    .busy_o(busy), .done_o(done), .params_o(p)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input scheme_e s, input int unsigned f, input int unsigned d,
                         input int unsigned e);
    longint unsigned fsw, tn, wn, en;
    int lat;
    fsw = s[2] ? 64'd234500 + 64'd2 * f : 64'd300000;
    tn  = 64'd40000000 / fsw;
    wn  = tn * (s[1] ? 64'd2488 + d : 64'd3000) / 64'd10000;
    en  = tn * (s[0] ? 64'd1500 + e : 64'd0) / 64'd10000;
    scheme = s;
    rfs    = 16'(f);
    rds    = 10'(d);
    res    = 12'(e);
    start  = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    // inputs change after sampling: the result must not follow them
    rfs = ~rfs;
    rds = ~rds;
    res = ~res;
    lat = 0;
    while (!done && lat < 200) begin
      @(posedge clk);
      #1;
      lat++;
    end
    check(lat == 61, $sformatf("latency %0d, expected 61", lat));
    check(lat < 109, "latency below the shortest period");
    check(p.tn == tn && p.wn == wn && p.en == en,
          $sformatf("%s f=%0d d=%0d e=%0d: got %0d/%0d/%0d expected %0d/%0d/%0d",
                    s.name(), f, d, e, p.tn, p.wn, p.en, tn, wn, en));
    check(tn >= 109 && tn <= 170, "TN in 109..170");
    @(posedge clk);
    #1;
  endtask

  initial begin
    start  = 1'b0;
    scheme = SCH_PWM;
    rfs = '0; rds = '0; res = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      run_one(scheme_e'(s), 0, 0, 0);
      run_one(scheme_e'(s), 65535, 1023, 4095);
      for (int n = 0; n < 40; n++)
        run_one(scheme_e'(s), $urandom_range(65535), $urandom_range(1023), $urandom_range(4095));
    end
    // a start while busy is ignored
    scheme = SCH_RRRM; rfs = 16'd0; rds = 10'd0; res = 12'd0;
    start = 1'b1;
    @(posedge clk);
    #1;
    rfs = 16'hFFFF;
    repeat (5) @(posedge clk);
    #1;
    start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    check(p.tn == 40000000 / 234500, "start while busy ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
