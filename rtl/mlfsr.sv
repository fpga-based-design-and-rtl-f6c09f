// mlfsr -- one maximum-length linear feedback shift register (Fibonacci form).
//
// The register shifts one place towards bit 0 on every clock. Bit 0 is the
// pseudorandom output bit; it is XORed with the tapped bits and the result is
// fed back into the leftmost bit (bit WIDTH-1). With the default length of 16
// and tap mask 16'h002D (bits 0, 2, 3, 5, i.e. x^16 + x^14 + x^13 + x^11 + 1)
// the sequence has the maximum period 2^16 - 1.
//
// The feedback structure (taps XORed with the output bit, result into the
// leftmost bit) follows the original generator; the length of 16 and the
// particular polynomial are this design's choice. SEED must be
// non-zero (the all-zero state is the one state outside the cycle).
//
// Interface: synchronous active-low reset loads SEED. state_o is the whole
// register, bit_o its output bit; both are registered, so the first output
// after reset is SEED[0] and the register advances every clock after that.
module mlfsr #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'h002D,
  parameter logic [WIDTH-1:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             bit_o,
  output logic [WIDTH-1:0] state_o
);

  logic [WIDTH-1:0] state_q;
  logic             feedback;

  // Output bit XORed with the taps; TAPS includes bit 0.
  assign feedback = ^(state_q & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SEED;
    else        state_q <= {feedback, state_q[WIDTH-1:1]};
  end

  assign bit_o   = state_q[0];
  assign state_o = state_q;

  initial begin
    assert (SEED != '0) else $error("mlfsr: SEED must be non-zero");
  end

endmodule
