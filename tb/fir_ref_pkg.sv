// fir_ref_pkg: reference model shared by the filter testbenches. A direct
// form FIR, y(n) = sum_k A_k b(n-k), computed with ordinary multiplications
// in 64-bit integers and fed the same samples as the design.
package fir_ref_pkg;

  // The coefficient set the design uses by default, as plain integers.
  localparam int REF_COEFS [8] = '{-169, -750, 3170, 14133, 14133, 3170, -750, -169};

  class fir_ref;
    int     coef [8];
    longint hist [8];

    function new();
      coef = REF_COEFS;
      foreach (hist[k]) hist[k] = 0;
    endfunction

    // take sample b(n), return y(n)
    function longint step(input int b);
      longint y;
      for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'(b);
      y = 0;
      foreach (coef[k]) y += longint'(coef[k]) * hist[k];
      return y;
    endfunction
  endclass

endpackage
