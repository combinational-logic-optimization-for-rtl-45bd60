// dct_pkg: constants and elaboration-time tables shared by the HEVC 32-point
// forward DCT modules.
//
// The HEVC integer DCT matrix of size 32 is built from 33 magnitudes
// A[i] ~ 64*sqrt(2)*cos(i*pi/64) (A[0] = A[16] = 64 and A[32] = 0). Entry
// (k, n) of the matrix is A[i] with i = (2n+1)*k mod 128, folded into 0..64 by
// cos symmetry (i -> 128-i keeps the sign, i -> 64-i for i > 32 flips it).
// The partial butterfly uses the rows of this matrix and the MCM blocks use
// the constant lists below; both are computed here so no table is typed twice.
package dct_pkg;

  localparam int N = 32;  // transform size

  // Magnitudes A[0..32] of the HEVC DCT basis.
  localparam int A [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                            64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};

  // Constant lists of the four MCM blocks, in the order of their outputs.
  localparam int C_ODD32 [15] = '{90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4};
  localparam int C_ODD16 [8]  = '{90, 87, 80, 70, 57, 43, 25, 9};
  localparam int C_ODD8  [4]  = '{89, 75, 50, 18};
  localparam int C_ODD4  [2]  = '{83, 36};

  // Entry (k, n) of the 32-point HEVC forward DCT matrix.
  function automatic int coef(int k, int n);
    int i;
    i = ((2 * n + 1) * k) % 128;
    if (i > 64) i = 128 - i;
    if (i > 32) return -A[64 - i];
    return A[i];
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Position of a magnitude in an MCM block's constant list (-1 if absent).
  function automatic int idx_odd32(int m);
    for (int i = 0; i < 15; i++) if (C_ODD32[i] == m) return i;
    return -1;
  endfunction
  function automatic int idx_odd16(int m);
    for (int i = 0; i < 8; i++) if (C_ODD16[i] == m) return i;
    return -1;
  endfunction
  function automatic int idx_odd8(int m);
    for (int i = 0; i < 4; i++) if (C_ODD8[i] == m) return i;
    return -1;
  endfunction
  function automatic int idx_odd4(int m);
    for (int i = 0; i < 2; i++) if (C_ODD4[i] == m) return i;
    return -1;
  endfunction

endpackage
