// tb_ref_pkg: reference models for the SCDCT testbenches.
//
// The models work from the DCT definition, not from the hardware's tables:
// the basis value a(u,n) = alpha(u) cos(pi u (2n+1)/16) is evaluated in real
// arithmetic, and its magnitude is replaced by the nearest of the seven
// fixed-point cosine factors used by the multiplier-free datapath
// (A1 1448, B1 1892, B2 784, C1 2008, C2 1703, C3 1138, C4 400, all /4096).
// ref_1d then forms the exact integer sum and rounds it half up by 'shift'
// bits, which is what the hardware promises to produce bit for bit.
// dct_real gives the ideal real DCT for accuracy checks.
package tb_ref_pkg;

  localparam int KVAL [7] = '{1448, 1892, 784, 2008, 1703, 1138, 400};

  function automatic real basis(input int u, input int n);
    real a;
    a = (u == 0) ? 1.0 / $sqrt(8.0) : 0.5;
    return a * $cos(3.14159265358979323846 * u * (2 * n + 1) / 16.0);
  endfunction

  // Integer factor (scaled by 4096) standing for a(u,n).
  function automatic int kint(input int u, input int n);
    real b, best;
    int  k;
    b = basis(u, n);
    best = 1.0e9;
    k = 0;
    for (int i = 0; i < 7; i++) begin
      real e;
      e = ((b < 0) ? -b : b) - KVAL[i] / 4096.0;
      if (e < 0) e = -e;
      if (e < best) begin
        best = e;
        k = KVAL[i];
      end
    end
    return (b < 0) ? -k : k;
  endfunction

  function automatic longint ref_1d(input longint f [8], input int u, input int shift);
    longint s;
    s = 0;
    for (int n = 0; n < 8; n++) s += f[n] * kint(u, n);
    if (shift > 0) s += longint'(1) <<< (shift - 1);
    return s >>> shift;
  endfunction

  function automatic real dct_real(input longint f [8], input int u);
    real s;
    s = 0.0;
    for (int n = 0; n < 8; n++) s += f[n] * basis(u, n);
    return s;
  endfunction

endpackage
