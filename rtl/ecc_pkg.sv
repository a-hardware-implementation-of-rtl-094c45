// ecc_pkg: types and constants shared by the ECC-B233 scalar-multiplication
// processor.
//
// The processor works on the NIST B-233 curve y^2 + xy = x^3 + a*x^2 + b over
// GF(2^233), with field polynomial f(x) = x^233 + x^74 + 1. A field element is a
// 233-bit vector whose bit i is the coefficient of x^i. The curve coefficient
// a = 1 is the B-233 value from FIPS 186-2; b is not needed by the point
// formulas and therefore does not appear. The I/O word width (16) and the
// number of words per 233-bit value (15) follow from the 16-bit data pins.
package ecc_pkg;

  localparam int unsigned M = 233;                  // field degree
  localparam int unsigned IO_W = 16;                // external data word width
  localparam int unsigned WORDS = (M + IO_W - 1) / IO_W;  // 15 words per value
  localparam int unsigned CNT_W = 8;                // width of the key-bit counter

  typedef logic [M-1:0] gf_t;

  // Low M bits of f(x) = x^233 + x^74 + 1 (the x^233 term is implicit).
  localparam gf_t F_LOW = gf_t'(1) | (gf_t'(1) << 74);

  // Curve coefficient a of B-233.
  localparam gf_t CURVE_A = gf_t'(1);

  // Scalar-multiplication states (FSM_MML). IDLE, MAINTAIN, ADDP0_DBLP1 and
  // ADDP1_DBLP0 are the ladder states; INIT (the first doubling P1 = 2P) and
  // DONE (result hand-off) are added by this implementation.
  typedef enum logic [2:0] {
    MML_IDLE        = 3'd0,
    MML_MAINTAIN    = 3'd1,
    MML_INIT        = 3'd2,
    MML_ADDP0_DBLP1 = 3'd3,
    MML_ADDP1_DBLP0 = 3'd4,
    MML_DONE        = 3'd5
  } mml_state_t;

  // Field-operation steps of one point addition (A_*) followed by one point
  // doubling (D_*), affine coordinates. With Pd the addition destination and
  // Ps the doubling source:
  //   A_DIV : lamda = (y0 + y1) / (x0 + x1)
  //   A_SQR : x_sec = lamda^2 + lamda + x0 + x1 + a
  //   A_MUL : yd = lamda*(xd + x_sec) + x_sec + yd ; xd = x_sec
  //   D_DIV : lamda = xs + ys / xs
  //   D_SQR : x_sec = lamda^2 + lamda + a
  //   D_MUL : lamda = (lamda + 1) * x_sec
  //   D_SQX : ys = xs^2 + lamda ; xs = x_sec
  typedef enum logic [2:0] {
    OP_IDLE  = 3'd0,
    OP_A_DIV = 3'd1,
    OP_A_SQR = 3'd2,
    OP_A_MUL = 3'd3,
    OP_D_DIV = 3'd4,
    OP_D_SQR = 3'd5,
    OP_D_MUL = 3'd6,
    OP_D_SQX = 3'd7
  } op_step_t;

  // True for the steps that use the divider rather than the multiplier.
  function automatic logic op_is_div(op_step_t s);
    return (s == OP_A_DIV) || (s == OP_D_DIV);
  endfunction

endpackage
