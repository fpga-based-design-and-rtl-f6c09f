// tb_prs_gen -- self-checking testbench of prs_gen.
//
// A reference model keeps sixteen 16-bit LFSRs (x^16+x^14+x^13+x^11+1)
// started from seed(i) = ((i+1)*16'h9E37) ^ 16'h5A5A and checks every clock
// that the 16-bit stream holds their output bits and that the 12-bit and
// 10-bit streams are the bit arrangements (5i+3) mod 16 and (7i+1) mod 16.
// It also checks that the seeds are distinct and non-zero and that each
// stream bit is balanced (ones between 45% and 55% over 20000 clocks).
module tb_prs_gen;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] rs16;
  logic [11:0] rs12;
  logic [9:0]  rs10;
  int          checks = 0, failures = 0;
  logic [15:0] m [16];
  logic [15:0] exp16;
  logic [11:0] exp12;
  logic [9:0]  exp10;
  int          ones [16];

  always #5 clk = ~clk;

  prs_gen dut (.clk, .rst_n, .rs16_o(rs16), .rs12_o(rs12), .rs10_o(rs10));

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

  initial begin
    for (int i = 0; i < 16; i++) begin
      m[i]    = 16'((i + 1) * 32'h9E37) ^ 16'h5A5A;
      ones[i] = 0;
      check(m[i] != 0, "seed non-zero");
      for (int j = 0; j < i; j++) check(m[i] != m[j], "seeds distinct");
    end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < 16; i++) exp16[i] = m[i][0];
      for (int i = 0; i < 12; i++) exp12[i] = exp16[(5 * i + 3) % 16];
      for (int i = 0; i < 10; i++) exp10[i] = exp16[(7 * i + 1) % 16];
      check(rs16 == exp16 && rs12 == exp12 && rs10 == exp10,
            $sformatf("clock %0d: %h/%h/%h expected %h/%h/%h", n, rs16, rs12, rs10, exp16, exp12, exp10));
      for (int i = 0; i < 16; i++) ones[i] += int'(rs16[i]);
      @(posedge clk);
      #1;
      for (int i = 0; i < 16; i++) m[i] = {m[i][0] ^ m[i][2] ^ m[i][3] ^ m[i][5], m[i][15:1]};
    end
    for (int i = 0; i < 16; i++)
      check(ones[i] > 9000 && ones[i] < 11000, $sformatf("bit %0d ones %0d of 20000", i, ones[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
