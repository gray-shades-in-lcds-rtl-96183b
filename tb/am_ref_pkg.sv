// am_ref_pkg: reference model used by the testbenches.
//
// It holds the behavioural model of the voltage level generator (the
// voltage, normalised to Vc, on each generator line) and the column and row
// voltages of each addressing scheme written directly from the formulas
// g + sqrt(1-g^2) and g - sqrt(1-g^2), independent of the line numbering
// the RTL uses. Scheme codes: 0 = I, 1 = II, 2 = III, 3 = II/III combined.
package am_ref_pkg;

  // Gray shade of data code k, for g symmetrically spaced shades in [-1, +1].
  function automatic real shade(int g, int k);
    return (2.0 * k - (g - 1)) / (g - 1);
  endfunction

  // Voltage-level-generator model: line k carries k's (g + sqrt(1-g^2)),
  // line g+k-1 (1 <= k <= g-2) its negative.
  function automatic real vlg_volts(int g, int id);
    real x;
    int  k;
    if (id < g) begin
      x = shade(g, id);
      return x + $sqrt(1.0 - x * x);
    end
    k = id - g + 1;
    x = shade(g, k);
    return -(x + $sqrt(1.0 - x * x));
  endfunction

  // Column voltage for code k in slot `slot` at polarity q1 (1 = reversed).
  function automatic real col_volts(int g, int scheme, bit reorder, int k, bit slot, bit q1);
    real x, r, v0, v1, v;
    int  s;
    x = shade(g, k);
    r = $sqrt(1.0 - x * x);
    s = scheme;
    if (s == 3) s = (x < 0.0) ? 1 : 2;
    case (s)
      0: begin
        v0 = x + r; v1 = x - r;
        if (reorder && x > 0.0) begin v0 = x - r; v1 = x + r; end
      end
      1: begin v0 = x + r; v1 = -x + r; end
      default: begin v0 = x - r; v1 = -x - r; end
    endcase
    v = slot ? v1 : v0;
    return q1 ? -v : v;
  endfunction

  // Sign (+1, -1) of the row select voltage.
  function automatic int row_sign(int scheme, bit slot, bit q1);
    int sg;
    sg = (scheme != 0 && slot) ? -1 : 1;
    return q1 ? -sg : sg;
  endfunction

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

endpackage
