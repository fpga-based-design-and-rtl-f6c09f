// prs_gen -- pseudorandom streams generator.
//
// N_LFSR maximum-length LFSRs (mlfsr) run in parallel from one clock, each
// started from a different seed. The output bits of all of them, LFSR i on
// bit i, form the 16-bit stream rs16_o (RFS). The 12-bit (RES) and 10-bit
// (RDS) streams are made of some of those same bits in a different order:
//
//   rs12_o[i] = rs16_o[(5*i + 3) mod 16]     i = 0..11
//   rs10_o[i] = rs16_o[(7*i + 1) mod 16]     i = 0..9
//
// Sixteen parallel LFSRs, all advancing every clock, and 12/10-bit streams
// taken as rearranged subsets of the 16 output bits follow the generator's
// published structure. The seed formula, the polynomial and the two bit
// arrangements above are this design's choice (the bit arrangement was not
// specified beyond "some of these bits with different arrangements"):
//
//   seed(i) = ((i+1) * 16'h9E37) XOR 16'h5A5A   (non-zero and distinct for i < 16)
//
// Timing: all outputs are registered LFSR bits; they change every clock.
// The consumer samples them at the start of each switching cycle.
module prs_gen #(
  parameter int unsigned     N_LFSR = 16,
  parameter int unsigned     LFSR_W = 16,
  parameter logic [LFSR_W-1:0] TAPS = 16'h002D
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_LFSR-1:0] rs16_o,
  output logic [11:0]       rs12_o,
  output logic [9:0]        rs10_o
);

  function automatic logic [LFSR_W-1:0] seed_of(int unsigned i);
    logic [LFSR_W-1:0] s;
    s = LFSR_W'((i + 1) * 32'h9E37) ^ LFSR_W'(32'h5A5A);
    if (s == '0) s = LFSR_W'(1);
    return s;
  endfunction

  for (genvar i = 0; i < N_LFSR; i++) begin : g_lfsr
    logic [LFSR_W-1:0] unused_state;
    mlfsr #(
      .WIDTH(LFSR_W),
      .TAPS (TAPS),
      .SEED (seed_of(i))
    ) u_lfsr (
      .clk    (clk),
      .rst_n  (rst_n),
      .bit_o  (rs16_o[i]),
      .state_o(unused_state)
    );
  end

  for (genvar i = 0; i < 12; i++) begin : g_rs12
    assign rs12_o[i] = rs16_o[(5 * i + 3) % N_LFSR];
  end

  for (genvar i = 0; i < 10; i++) begin : g_rs10
    assign rs10_o[i] = rs16_o[(7 * i + 1) % N_LFSR];
  end

  initial begin
    assert (N_LFSR == 16) else $error("prs_gen: the stream arrangement assumes 16 LFSRs");
  end

endmodule
