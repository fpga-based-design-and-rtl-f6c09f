// seq_divider -- unsigned restoring divider, one quotient bit per clock.
//
// A start pulse captures dividend and divisor; NW clocks later done_o pulses
// for one clock with quotient_o = dividend / divisor (floor) and
// remainder_o = dividend mod divisor, both held until the next start.
// busy_o is high while a division is running; a start while busy is ignored.
// Division by zero returns an all-ones quotient (no caller here divides by
// zero). Used by the spread-spectrum parameter calculator; the sequential
// form is this design's choice for computing the per-cycle clock counts.
module seq_divider #(
  parameter int unsigned NW = 26,  // dividend / quotient width
  parameter int unsigned DW = 19   // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [NW-1:0] dividend_i,
  input  logic [DW-1:0] divisor_i,
  output logic          busy_o,
  output logic          done_o,
  output logic [NW-1:0] quotient_o,
  output logic [DW-1:0] remainder_o
);

  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] quo_q;   // dividend bits shift out of the top, quotient bits in at the bottom
  logic [DW-1:0] rem_q;
  logic [DW-1:0] dvs_q;
  logic [CW-1:0] cnt_q;
  logic          busy_q, done_q;

  logic [DW:0]   trial;
  logic          ge;

  always_comb begin
    trial = {rem_q, quo_q[NW-1]};
    ge    = (trial >= {1'b0, dvs_q});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      quo_q  <= '0;
      rem_q  <= '0;
      dvs_q  <= '0;
      cnt_q  <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start_i) begin
          quo_q  <= dividend_i;
          rem_q  <= '0;
          dvs_q  <= divisor_i;
          cnt_q  <= CW'(NW);
          busy_q <= 1'b1;
        end
      end else begin
        // trial < 2*divisor always, so the difference fits in DW bits
        rem_q <= ge ? DW'(trial - {1'b0, dvs_q}) : trial[DW-1:0];
        quo_q <= {quo_q[NW-2:0], ge};
        cnt_q <= cnt_q - CW'(1);
        if (cnt_q == CW'(1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o      = busy_q;
  assign done_o      = done_q;
  assign quotient_o  = quo_q;
  assign remainder_o = rem_q;

endmodule
