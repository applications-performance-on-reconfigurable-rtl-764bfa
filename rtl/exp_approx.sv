// exp_approx: truncated Taylor series standing in for e^X.
//
// The annealer accepts a swap that lengthens the tour with probability
// e^X, X = -energy_change / T. Floating point being ill suited to the
// fabric, e^X is replaced by the first terms of its series,
//   y = 1 + X + X^2/2! + X^3/3! + X^4/4!,
// with TERMS (1..4) the number of X terms kept (TERMS = 1 gives 1 + X).
// The structure is the one of the document's figure: a chain of multipliers
// forms X^2, X^3 and X^4, constant dividers scale them, and an adder chain
// sums the terms. Purely combinational.
//
// Numbers are signed fixed point with FRAC fractional bits; FRAC = 0 is the
// all-integer form the document evaluated (FRAC > 0 is an extension of this
// design). Divisions truncate toward zero like C integer division; the
// re-scaling after each product is an arithmetic shift. y is 4*XW bits wide,
// enough for X^4. Note that with an even number of terms y grows again for
// large negative X; that is a property of the series, kept as specified.
module exp_approx #(
  parameter int unsigned XW    = 32,
  parameter int unsigned FRAC  = 0,
  parameter int unsigned TERMS = 4,
  localparam int unsigned YW   = 4 * XW
) (
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y
);

  logic signed [YW-1:0] xs, one, x2, x3, x4, t2, t3, t4;

  // Division by a small positive constant, truncating toward zero: done on
  // the magnitude so that only an unsigned divider is needed.
  function automatic logic signed [YW-1:0] div_c(logic signed [YW-1:0] a, int unsigned k);
    logic [YW-1:0] mag, q;
    mag = a[YW-1] ? YW'(-a) : YW'(a);
    q   = mag / YW'(k);
    return a[YW-1] ? -$signed(q) : $signed(q);
  endfunction

  always_comb begin
    xs  = YW'(x);
    one = YW'(1) <<< FRAC;
    x2  = (xs * xs) >>> FRAC;
    x3  = (x2 * xs) >>> FRAC;
    x4  = (x3 * xs) >>> FRAC;
    t2  = (TERMS >= 2) ? div_c(x2, 2)  : '0;
    t3  = (TERMS >= 3) ? div_c(x3, 6)  : '0;
    t4  = (TERMS >= 4) ? div_c(x4, 24) : '0;
    y   = one + xs + t2 + t3 + t4;
  end

endmodule
