// dwt_pkg: types and constants shared by the modified-lifting 9/7 DWT.
//
// The transform is the 9/7 lifting scheme (lifting constants alpha=-1.58613,
// beta=-0.0529, gamma=0.882911, delta=0.44350, scaling zeta=1.1496) with the
// four lifting steps substituted into each other, so that each output is a
// direct weighted sum of input samples and no output waits for a previous one.
// Every product of lifting constants is multiplied by 256 and rounded to an
// integer. Terms that share the same group of samples have their integer
// weights added together, which leaves eight coefficients:
//
//   a_i = 294 * ( 256*x0 + 8*P - 5*Q - 59*E + 100*R )           (about 65536*a)
//   d_i =        256*x1 + 19*S - 12*T - 180*U                    (about   256*d)
//
// with the sample groups (x0 = x[2i], x1 = x[2i+1], xk = x[2i+k])
//   P = x-4 + 4*x-2 + 6*x0 + 4*x2 + x4     (weight 256*alpha*beta*gamma*delta)
//   Q = x-3 + 3*x-1 + 3*x1 + x3            (256*beta*gamma*delta)
//   E = x-2 + 2*x0 + x2                    (256*(gamma*delta + alpha*delta + alpha*beta) = 100-180+21)
//   R = x-1 + x1                           (256*(delta + beta) = 113-13)
//   S = x-2 + 3*x0 + 3*x2 + x4             (256*alpha*beta*gamma)
//   T = x-1 + 2*x1 + x3                    (256*beta*gamma)
//   U = x0 + x2                            (256*(gamma + alpha) = 226-406)
// and 294 = round(256*zeta). The high-pass output keeps the 256 scale and
// is not divided by zeta.
//
// The equations, the scale of 256 and the resulting integer weights follow
// the design description; adding the weights that share a sample group into
// one coefficient, the address order and all widths are this design's
// choices. Samples are unsigned, sums and weights are two's complement.
package dwt_pkg;

  // Input sample width (8-bit taps of the window register).
  parameter int unsigned SAMPLE_W = 8;
  // Width of the group sums and of the unscaled accumulator (signed).
  parameter int unsigned ACC_W    = 20;
  // Width of a stored coefficient (signed).
  parameter int unsigned COEF_W   = 10;
  // Number of taps in the window, X-4 .. X+4.
  parameter int unsigned TAPS     = 9;

  // Coefficient memory addresses.
  typedef enum logic [2:0] {
    C_P    = 3'd0,   // weight of P in a_i
    C_Q    = 3'd1,   // weight of Q in a_i
    C_E    = 3'd2,   // weight of E in a_i
    C_R    = 3'd3,   // weight of R in a_i
    C_ZETA = 3'd4,   // final scaling of a_i
    C_S    = 3'd5,   // weight of S in d_i
    C_T    = 3'd6,   // weight of T in d_i
    C_U    = 3'd7    // weight of U in d_i
  } coef_idx_e;

  parameter int unsigned NCOEF = 8;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_set_t [NCOEF];

  // Scaled coefficient for each address.
  function automatic coef_t coef_value(input coef_idx_e idx);
    case (idx)
      C_P:     return coef_t'(8);
      C_Q:     return coef_t'(-5);
      C_E:     return coef_t'(-59);
      C_R:     return coef_t'(100);
      C_ZETA:  return coef_t'(294);
      C_S:     return coef_t'(19);
      C_T:     return coef_t'(-12);
      default: return coef_t'(-180);
    endcase
  endfunction

endpackage
