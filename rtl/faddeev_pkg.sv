// faddeev_pkg: number format and shared types of the dual mode Faddeev array.
//
// Every data word moving through the array (matrix entries X and
// modification factors M) is a signed two's-complement fixed-point number
// with FRAC_W fraction bits. The cells need a product and, in the diagonal
// cells only, a quotient; both helpers are defined here so that all cells
// round the same way (toward zero, by truncation of the exact result).
// The word format is this design's own choice: the source design speaks of
// "n-bit" ports and real-valued microcode, without fixing a format.
package faddeev_pkg;

  localparam int unsigned DATA_W = 32;  // width of one data port
  localparam int unsigned FRAC_W = 16;  // fraction bits (Q15.16)

  typedef logic signed [DATA_W-1:0] fx_t;

  // What travels east along an array row and through the B_q queue:
  // a modification factor and its pivot (row interchange) bit C3.
  typedef struct packed {
    fx_t  m;
    logic c3;
  } mfac_t;

  localparam fx_t FX_ZERO = '0;

  // a * b, rescaled to the fixed-point format (truncated toward zero)
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    if (p < 0) p = -((-p) >>> FRAC_W);
    else       p = p >>> FRAC_W;
    return fx_t'(p);
  endfunction

  // a / b in fixed point; b must be non-zero (callers guard the zero case)
  function automatic fx_t fx_div(fx_t a, fx_t b);
    logic signed [2*DATA_W-1:0] n, q;
    n = (2*DATA_W)'(a) <<< FRAC_W;
    q = n / (2*DATA_W)'(b);
    return fx_t'(q);
  endfunction

  function automatic fx_t fx_abs(fx_t a);
    return (a < 0) ? -a : a;
  endfunction

endpackage
