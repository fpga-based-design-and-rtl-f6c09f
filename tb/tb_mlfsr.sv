// tb_mlfsr -- self-checking testbench of mlfsr.
//
// Checks, at the default length 16, seed and polynomial x^16+x^14+x^13+x^11+1:
// the reset value is the seed; every following state equals a reference
// model written from the polynomial; the output bit is the register's bit 0;
// the state never becomes zero and first returns to the seed after exactly
// 2^16 - 1 clocks (maximum length).
module tb_mlfsr;
  localparam logic [15:0] SEED = 16'hACE1;  // the default seed

  logic        clk = 1'b0;
  logic        rst_n;
  logic        bit_o;
  logic [15:0] state;
  int          checks = 0, failures = 0;
  logic [15:0] model;
  int          period;

  always #5 clk = ~clk;

  mlfsr dut (
    .clk, .rst_n, .bit_o, .state_o(state)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(state == SEED, "reset loads seed");
    model  = SEED;
    period = 0;
    for (int n = 1; n <= 70000; n++) begin
      @(posedge clk);
      #1;
      // x^16 + x^14 + x^13 + x^11 + 1: new leftmost bit from bits 0, 2, 3, 5
      model = {model[0] ^ model[2] ^ model[3] ^ model[5], model[15:1]};
      if (state != model || bit_o != state[0] || state == 16'h0) begin
        check(1'b0, $sformatf("step %0d state %h expected %h", n, state, model));
      end else if (n % 1000 == 0) begin
        check(1'b1, "");
      end
      if (period == 0 && state == SEED) period = n;
    end
    check(period == 65535, $sformatf("period %0d, expected 65535", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
