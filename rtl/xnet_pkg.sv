// xnet_pkg: types and constants shared by the x-net polynomial multiplier.
//
// The multiplier computes r(x) = a(x) * b(x) mod pi(x) mod q for the polynomial
// rings of Kyber, Saber, NTRU (HPS/HRSS) and Streamlined NTRU Prime. The rings
// differ in three things that this package tabulates per ring identifier:
//   - the degree n of pi(x) (256, 509, 653, 677, 701, 761, 821, 857),
//   - the form of pi(x): x^n + 1 (Kyber, Saber), x^n - 1 (NTRU) or
//     x^n - x - 1 (NTRU Prime),
//   - the coefficient modulus q: a power of two (Saber, NTRU), reduced by
//     truncation, or a prime (Kyber, NTRU Prime), reduced by Barrett reduction.
// The ring forms and the power-of-two/prime split follow the scheme table of
// the architecture; the concrete n and q of each parameter set are the values
// published in the schemes' own specifications.
//
// Widths: b(x) coefficients are unsigned Q_W-bit values (q <= 8192). a(x) is
// the small operand with signed coefficients in [-KMAX, KMAX], KMAX = 5 being
// the largest magnitude used (Saber with p = 11). The accumulator width is
// ceil(log2(max 2*p*q*n)) over all supported sets, which is 26 bits (Saber:
// 2*11*8192*256).
package xnet_pkg;

  // Coefficient widths
  localparam int unsigned Q_W    = 13;  // large coefficient, q <= 2^13
  localparam int unsigned S_W    = 4;   // small coefficient, two's complement
  localparam int unsigned KMAX   = 5;   // largest small-coefficient magnitude
  localparam int unsigned ACC_W  = 26;  // signed accumulator width
  localparam int unsigned PROD_W = Q_W + 4; // signed k*b, |k| <= KMAX < 8

  // Barrett reduction: m = floor(2^BAR_K / q), valid for |x| < 2^BAR_K
  localparam int unsigned BAR_K  = ACC_W;
  localparam int unsigned BAR_M_W = BAR_K - 11;  // q >= 2048

  typedef enum logic [3:0] {
    RING_KYBER       = 4'd0,  // n = 256, q = 3329, x^n + 1
    RING_SABER       = 4'd1,  // n = 256, q = 8192, x^n + 1
    RING_NTRUHPS509  = 4'd2,  // n = 509, q = 2048, x^n - 1
    RING_NTRUHPS677  = 4'd3,  // n = 677, q = 2048, x^n - 1
    RING_NTRUHRSS701 = 4'd4,  // n = 701, q = 8192, x^n - 1
    RING_NTRUHPS821  = 4'd5,  // n = 821, q = 4096, x^n - 1
    RING_SNTRUP653   = 4'd6,  // n = 653, q = 4621, x^n - x - 1
    RING_SNTRUP761   = 4'd7,  // n = 761, q = 4591, x^n - x - 1
    RING_SNTRUP857   = 4'd8   // n = 857, q = 5167, x^n - x - 1
  } ring_e;

  localparam int unsigned NUM_RINGS = 9;
  localparam logic [NUM_RINGS-1:0] ALL_RINGS = '1;

  typedef enum logic [1:0] {
    PI_NEGACYCLIC = 2'd0,  // x^n + 1 : x^n = -1
    PI_CYCLIC     = 2'd1,  // x^n - 1 : x^n = +1
    PI_NTRUPRIME  = 2'd2   // x^n - x - 1 : x^n = x + 1
  } pi_form_e;

  function automatic int unsigned ring_n(input int unsigned r);
    case (r)
      0, 1:    return 256;
      2:       return 509;
      3:       return 677;
      4:       return 701;
      5:       return 821;
      6:       return 653;
      7:       return 761;
      default: return 857;
    endcase
  endfunction

  function automatic int unsigned ring_q(input int unsigned r);
    case (r)
      0:       return 3329;
      1:       return 8192;
      2, 3:    return 2048;
      4:       return 8192;
      5:       return 4096;
      6:       return 4621;
      7:       return 4591;
      default: return 5167;
    endcase
  endfunction

  function automatic pi_form_e ring_pi(input int unsigned r);
    case (r)
      0, 1:       return PI_NEGACYCLIC;
      2, 3, 4, 5: return PI_CYCLIC;
      default:    return PI_NTRUPRIME;
    endcase
  endfunction

  // q prime -> Barrett reduction, q a power of two -> truncation
  function automatic logic ring_barrett(input int unsigned r);
    return ring_pi(r) == PI_NTRUPRIME || r == 0;
  endfunction

  function automatic logic [BAR_M_W-1:0] ring_bar_m(input int unsigned r);
    return BAR_M_W'((64'd1 << BAR_K) / 64'(ring_q(r)));
  endfunction

  // Largest n over a set of supported rings (sizes the LFSR and MAC array)
  function automatic int unsigned max_n(input logic [NUM_RINGS-1:0] rings);
    int unsigned m = 1;
    for (int r = 0; r < NUM_RINGS; r++)
      if (rings[r] && ring_n(r) > m) m = ring_n(r);
    return m;
  endfunction

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
