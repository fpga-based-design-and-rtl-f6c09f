// tb_ss_spectrum -- spectrum of the switching function under the eight
// schemes, at the controller's default parameters (40 MHz clock).
//
// For each scheme the high-side gate signal q(t) = vgs1 is recorded for
// WINDOWS windows of N = 33 * 133 clocks (about 110 us, a resolution of
// 9.11 kHz, close to the 9 kHz bandwidth of a conducted-emission receiver;
// the 300.75 kHz PWM lines fall exactly on bins). The power of every bin from
// 155 kHz to 1 MHz (bins 17..110) is averaged over the windows with the
// Goertzel algorithm, and the largest bin is the scheme's low-frequency
// peak. The peak reduction against plain PWM is printed per scheme.
//
// Checks, with predictions worked out here from the parameter equations:
//   * PWM (TN 133, WN 39): peak equals the Fourier line of that pulse train;
//   * RPPM, RPWM: fixed period, so the lines stay; their coherent amplitude is
//     the PWM line times the expectation over all RES (RPPM) or RDS (RPWM)
//     values, which fixes the reduction to within 1 dB;
//   * schemes that randomize the frequency spread each line over roughly
//     131 kHz, i.e. about 14 bins: their reduction must exceed 6 dB, and
//     exceed that of every fixed-frequency scheme;
//   * RPWM gives the smallest reduction of all.
// The mechanism counted is one measurement per scheme; one missing fails.
module tb_ss_spectrum;
  import ss_pkg::*;

  localparam int  N       = 33 * 133;
  localparam int  WINDOWS = 48;
  localparam int  K_LO    = 17;
  localparam int  K_HI    = 110;
  localparam real PI      = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n;
  scheme_e     scheme;
  logic        vgs1, vgs2, reset1, running, underrun;
  pwm_params_t params;
  int          checks = 0, failures = 0;
  bit          samp [N];
  real         pw [K_LO:K_HI];
  real         peak [8];
  real         red [8];
  int          measured;
  real         pred_pwm, pred_rppm, pred_rpwm;

  always #12.5 clk = ~clk;

  ss_controller dut (
    .clk, .rst_n, .scheme_i(scheme), .vgs1_o(vgs1), .vgs2_o(vgs2),
    .reset1_o(reset1), .running_o(running), .underrun_o(underrun), .params_o(params)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real db(real x);
    return 10.0 * $log10(x);
  endfunction

  // |sum_{m=0}^{w-1} exp(-j 2 pi h (m + e) / 133)| for a pulse of w clocks at
  // delay e, in real and imaginary parts, accumulated into re/im.
  function automatic void pulse_line(input int h, input int w, input int e, inout real re, inout real im);
    for (int m = 0; m < w; m++) begin
      re += $cos(2.0 * PI * h * (m + e) / 133.0);
      im -= $sin(2.0 * PI * h * (m + e) / 133.0);
    end
  endfunction

  // Largest predicted line power (bins 33, 66, 99) for a fixed 300 kHz
  // period, averaging the pulse over all values of the random stream.
  function automatic real predict(input int which);  // 0 PWM, 1 RPPM, 2 RPWM
    real best, re, im;
    int  n, w, e;
    best = 0.0;
    for (int h = 1; h <= 3; h++) begin
      re = 0.0;
      im = 0.0;
      n  = (which == 1) ? 4096 : (which == 2) ? 1024 : 1;
      for (int r = 0; r < n; r++) begin
        w = (which == 2) ? 133 * (2488 + r) / 10000 : 39;
        e = (which == 1) ? 133 * (1500 + r) / 10000 : 0;
        pulse_line(h, w, e, re, im);
      end
      re = re / n * 33.0;
      im = im / n * 33.0;
      if (re * re + im * im > best) best = re * re + im * im;
    end
    return best;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real coeff, s0, s1, s2;
    measured = 0;
    scheme   = SCH_PWM;
    rst_n    = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      scheme = scheme_e'(s);
      // let the change pass through the one-cycle-ahead pipeline
      repeat (3 * 170 + 70) @(posedge clk);
      for (int k = K_LO; k <= K_HI; k++) pw[k] = 0.0;
      for (int w = 0; w < WINDOWS; w++) begin
        for (int n = 0; n < N; n++) begin
          @(posedge clk);
          #1;
          samp[n] = vgs1;
          if (underrun) check(1'b0, "underrun");
        end
        for (int k = K_LO; k <= K_HI; k++) begin
          coeff = 2.0 * $cos(2.0 * PI * k / N);
          s1 = 0.0;
          s2 = 0.0;
          for (int n = 0; n < N; n++) begin
            s0 = (samp[n] ? 1.0 : 0.0) + coeff * s1 - s2;
            s2 = s1;
            s1 = s0;
          end
          pw[k] += (s1 * s1 + s2 * s2 - coeff * s1 * s2) / WINDOWS;
        end
      end
      peak[s] = 0.0;
      for (int k = K_LO; k <= K_HI; k++) if (pw[k] > peak[s]) peak[s] = pw[k];
      measured++;
    end
    pred_pwm  = predict(0);
    pred_rppm = predict(1);
    pred_rpwm = predict(2);
    $display("low-frequency peak (155 kHz .. 1 MHz) of the switching function, reduction against PWM:");
    for (int s = 0; s < 8; s++) begin
      red[s] = db(peak[0] / peak[s]);
      $display("  %-14s %6.2f dB", scheme_e'(s), red[s]);
    end
    $display("  predicted: RPPM %5.2f dB, RPWM %5.2f dB", db(pred_pwm / pred_rppm), db(pred_pwm / pred_rpwm));
    check(measured == 8, "all eight schemes measured");
    check(absr(db(peak[0] / pred_pwm)) < 0.1, $sformatf("PWM line %.2f dB off prediction", db(peak[0] / pred_pwm)));
    check(absr(red[1] - db(pred_pwm / pred_rppm)) < 1.0, "RPPM reduction as predicted");
    check(absr(red[2] - db(pred_pwm / pred_rpwm)) < 1.0, "RPWM reduction as predicted");
    for (int s = 4; s < 8; s++) begin
      check(red[s] > 6.0, $sformatf("%s spreads the lines", scheme_e'(s)));
      for (int f = 1; f < 4; f++)
        check(red[s] > red[f], $sformatf("%s beats %s", scheme_e'(s), scheme_e'(f)));
    end
    for (int s = 1; s < 8; s++)
      if (s != 2) check(red[2] < red[s], $sformatf("RPWM below %s", scheme_e'(s)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
