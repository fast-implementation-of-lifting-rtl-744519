// dwt_pkg: types and constants shared by the lifting DWT/IDWT datapath.
//
// Samples are two's-complement integers of DW bits. Lifting coefficients are
// kept in sign-magnitude form: a sign bit and an unsigned magnitude with FRAC
// fractional bits, because the BZ-FAD multiplier is an unsigned shift-and-add
// multiplier. The magnitude has CW = DW + 1 bits, the width of the sum of two
// samples, so both multiplier operands share one width.
//
// The coefficient values are the 9/7 lifting constants alpha, beta, gamma,
// delta and zeta (-1.58613, -0.0529, 0.882911, 0.44350, 1.1496) rounded to
// FRAC = 12 fractional bits. The sample width of 16 bits and the 12-bit
// coefficient fraction are this design's choice.
package dwt_pkg;

  localparam int DW   = 16;       // sample width
  localparam int FRAC = 12;       // fractional bits of a coefficient magnitude
  localparam int CW   = DW + 1;   // multiplier operand width

  typedef logic signed [DW-1:0] sample_t;

  typedef struct packed {
    logic          neg;   // 1: coefficient is negative
    logic [CW-1:0] mag;   // |coefficient| * 2**FRAC
  } coef_t;

  // round(|c| * 4096)
  localparam coef_t C_ALPHA    = '{neg: 1'b1, mag: CW'(6497)};  // -1.58613
  localparam coef_t C_BETA     = '{neg: 1'b1, mag: CW'(217)};   // -0.0529
  localparam coef_t C_GAMMA    = '{neg: 1'b0, mag: CW'(3616)};  //  0.882911
  localparam coef_t C_DELTA    = '{neg: 1'b0, mag: CW'(1817)};  //  0.44350
  localparam coef_t C_ZETA     = '{neg: 1'b0, mag: CW'(4709)};  //  1.1496
  localparam coef_t C_INV_ZETA = '{neg: 1'b0, mag: CW'(3563)};  //  1/1.1496

  // Pass run by a lift_line processor over its line buffer.
  typedef enum logic [1:0] {
    OP_FWD   = 2'd0,   // predict with coef1, then update with coef2
    OP_INV   = 2'd1,   // undo update (coef2), then undo predict (coef1)
    OP_SCALE = 2'd2    // even samples times coef1, odd samples times coef2
  } line_op_e;

  // What one lifting processing element computes at a given step.
  typedef enum logic [1:0] {
    ROLE_P  = 2'd0,    // odd  sample += c * (even left + even right)
    ROLE_U  = 2'd1,    // even sample += c * (odd left + odd right)
    ROLE_SE = 2'd2,    // even sample  = c * even sample
    ROLE_SO = 2'd3     // odd sample   = c * odd sample
  } role_e;

endpackage
