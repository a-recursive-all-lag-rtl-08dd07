// Shared constants of the recursive all-lag odd correlator.
//
// The correlator computes r̄_n = S̄ r̄_{n-1} + (d_n + d_{n-N}) c̄_{N-1}, where S̄
// is the inverting end-around shift. The default sizes below are this design's
// own choice: the code length N, the sample width and the code-coefficient width
// are left open by the method, which works for any of them.
//
// acc_width() gives the width of one stored correlation value. Every stored value
// is an exact odd correlation (or, before N samples have arrived, the same sum
// with the missing samples taken as zero), so its magnitude is at most
// N * 2^(DW-1) * 2^(CW-1); DW + CW + clog2(N) signed bits always hold it.
package oddcorr_pkg;

  localparam int unsigned N_DEFAULT  = 31;  // reference-code length
  localparam int unsigned DW_DEFAULT = 8;   // input sample width, signed
  localparam int unsigned CW_DEFAULT = 2;   // code coefficient width, signed (±1 fits)

  function automatic int unsigned acc_width(int unsigned n, int unsigned dw, int unsigned cw);
    return dw + cw + $clog2(n);
  endfunction

endpackage
