// ss_pkg -- types and constants shared by the spread-spectrum PWM controller.
//
// The eight modulation schemes are all combinations in which each of the
// switching frequency F_k, the duty ratio d_k and the pulse position
// (turn-on delay) eps_k is either held constant or drawn anew every switching
// cycle. RPPM, RPWM, RCFMFD and RCFMVD are known from earlier randomized
// switching work; RDRPPMFCF, RCFRPPMFD and RRRM were introduced with the
// original controller. The scheme code is simply the three "randomize" flags
// {F, d, eps} (this design's encoding), which numbers the schemes 0..7 in the
// order (a) PWM .. (h) RRRM in which they are usually tabulated.
//
// pwm_params_t carries the integer clock counts of one switching cycle:
// TN (period), WN (on-time) and EN (delay from cycle start to turn-on).
// The 16-bit width of these counts is this design's choice; it allows clock
// to switching frequency ratios up to 65535.
package ss_pkg;

  typedef enum logic [2:0] {
    SCH_PWM       = 3'b000,  // (a) nothing randomized
    SCH_RPPM      = 3'b001,  // (b) pulse position
    SCH_RPWM      = 3'b010,  // (c) duty ratio
    SCH_RDRPPMFCF = 3'b011,  // (d) duty ratio and pulse position
    SCH_RCFMFD    = 3'b100,  // (e) carrier frequency
    SCH_RCFRPPMFD = 3'b101,  // (f) carrier frequency and pulse position
    SCH_RCFMVD    = 3'b110,  // (g) carrier frequency and duty ratio
    SCH_RRRM      = 3'b111   // (h) all three
  } scheme_e;

  // Widths of the three pseudorandom streams (RFS, RDS, RES).
  localparam int unsigned RFS_W = 16;
  localparam int unsigned RDS_W = 10;
  localparam int unsigned RES_W = 12;

  // Width of the per-cycle clock counts.
  localparam int unsigned CNT_W = 16;

  typedef struct packed {
    logic [CNT_W-1:0] tn;  // switching period in clocks
    logic [CNT_W-1:0] wn;  // on-time in clocks
    logic [CNT_W-1:0] en;  // turn-on delay in clocks
  } pwm_params_t;

  // Bit positions of the three "randomize" flags in a scheme code.
  localparam int unsigned SCH_BIT_F = 2;  // switching frequency
  localparam int unsigned SCH_BIT_D = 1;  // duty ratio
  localparam int unsigned SCH_BIT_E = 0;  // pulse position

endpackage
