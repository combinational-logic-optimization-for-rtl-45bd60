// dct32_1d: combinational 32-point forward HEVC DCT (one dimension).
//
// The 32 inputs x[n] are transformed into y[k] = (sum_n T[k][n]*x[n] + R) >>> SHIFT
// with T the HEVC integer DCT matrix and R = 2^(SHIFT-1), the rounding of the
// HM reference encoder. The sum is not formed as 32x32 products. It follows the
// partial butterfly of the reference software: sums and differences of
// mirrored inputs split the transform into an odd 16-input part, and the even
// half is split again, down to 2-input parts:
//   E[j]  = x[j] + x[31-j],   O[j]    = x[j] - x[31-j]          j < 16
//   EE[j] = E[j] + E[15-j],   EO[j]   = E[j] - E[15-j]          j < 8
//   EEE[j]= EE[j] + EE[7-j],  EEO[j]  = EE[j] - EE[7-j]         j < 4
//   EEEE[j]=EEE[j]+EEE[3-j],  EEEO[j] = EEE[j] - EEE[3-j]       j < 2
//   y[2k+1]  = sum_j T[2k+1][j]  O[j]      y[4k+2]  = sum_j T[4k+2][j] EO[j]
//   y[8k+4]  = sum_j T[8k+4][j]  EEO[j]    y[16k+8] = sum_j T[16k+8][j] EEEO[j]
//   y[16k]   = 64*EEEE[0] +- 64*EEEE[1]
// Each of O, EO, EEO and EEEO is multiplied by all constants its rows use in
// one multiple-constant-multiplication (MCM) block (mcm_odd32/16/8/4), so
// no general multiplier is built; the row sums then pick each product with
// the sign of the matrix entry. The multiplications by 64 are wiring.
//
// ADDER_DEPTH (2, 3 or 4) is passed to the MCM blocks and trades adder count
// against logic depth. Output words keep the low OW bits of the rounded sum,
// the 16-bit storage of the reference encoder. Accumulation uses AW = IW+14
// bits, enough for any input. Row sums are balanced adder trees (4 levels for
// the odd rows). Purely combinational; the surrounding design puts registers
// on both sides.
module dct32_1d
  import dct_pkg::*;
#(
  parameter int IW = 9,            // input width (9: residuals of 8-bit video)
  parameter int OW = 16,           // output width
  parameter int SHIFT = 4,         // rounding right shift after the transform
  parameter int ADDER_DEPTH = 4    // MCM adder depth bound: 2, 3 or 4
) (
  input  logic signed [IW-1:0] x [N],
  output logic signed [OW-1:0] y [N]
);
  localparam int AW = IW + 14;

  // Butterfly stages.
  logic signed [IW:0]   e    [16], o    [16];
  logic signed [IW+1:0] ee   [8],  eo   [8];
  logic signed [IW+2:0] eee  [4],  eeo  [4];
  logic signed [IW+3:0] eeee [2],  eeeo [2];

  always_comb begin
    for (int j = 0; j < 16; j++) begin
      e[j] = (IW+1)'(x[j]) + (IW+1)'(x[31-j]);
      o[j] = (IW+1)'(x[j]) - (IW+1)'(x[31-j]);
    end
    for (int j = 0; j < 8; j++) begin
      ee[j] = (IW+2)'(e[j]) + (IW+2)'(e[15-j]);
      eo[j] = (IW+2)'(e[j]) - (IW+2)'(e[15-j]);
    end
    for (int j = 0; j < 4; j++) begin
      eee[j] = (IW+3)'(ee[j]) + (IW+3)'(ee[7-j]);
      eeo[j] = (IW+3)'(ee[j]) - (IW+3)'(ee[7-j]);
    end
    for (int j = 0; j < 2; j++) begin
      eeee[j] = (IW+4)'(eee[j]) + (IW+4)'(eee[3-j]);
      eeeo[j] = (IW+4)'(eee[j]) - (IW+4)'(eee[3-j]);
    end
  end

  // MCM blocks: one per butterfly value that is multiplied.
  logic signed [IW+8:0]  p1 [16][15];
  logic signed [IW+9:0]  p2 [8][8];
  logic signed [IW+10:0] p3 [4][4];
  logic signed [IW+11:0] p4 [2][2];

  for (genvar j = 0; j < 16; j++) begin : g_mcm1
    mcm_odd32 #(.IW(IW+1), .ADDER_DEPTH(ADDER_DEPTH)) u_mcm (.x(o[j]), .p(p1[j]));
  end
  for (genvar j = 0; j < 8; j++) begin : g_mcm2
    mcm_odd16 #(.IW(IW+2), .ADDER_DEPTH(ADDER_DEPTH)) u_mcm (.x(eo[j]), .p(p2[j]));
  end
  for (genvar j = 0; j < 4; j++) begin : g_mcm3
    mcm_odd8 #(.IW(IW+3), .ADDER_DEPTH(ADDER_DEPTH)) u_mcm (.x(eeo[j]), .p(p3[j]));
  end
  for (genvar j = 0; j < 2; j++) begin : g_mcm4
    mcm_odd4 #(.IW(IW+4), .ADDER_DEPTH(ADDER_DEPTH)) u_mcm (.x(eeeo[j]), .p(p4[j]));
  end

  // Signed terms of every output row, then the row sums.
  logic signed [AW-1:0] s [N];

  // Odd rows: y[2k+1] from O[0..15].
  for (genvar k = 0; k < 16; k++) begin : g_row1
    logic signed [AW-1:0] t [16];
    for (genvar j = 0; j < 16; j++) begin : g_t
      localparam int C = coef(2*k+1, j);
      localparam int I = idx_odd32(iabs(C));
      if (C > 0) begin : g_pos
        assign t[j] = AW'(p1[j][I]);
      end else begin : g_neg
        assign t[j] = -AW'(p1[j][I]);
      end
    end
    always_comb begin
      logic signed [AW-1:0] a [16];
      a = t;
      // Pairwise reduction: a balanced tree of log2(16) adder levels.
      for (int w = 16; w > 1; w = w / 2)
        for (int i = 0; i < w / 2; i++) a[i] = a[2*i] + a[2*i+1];
      s[2*k+1] = a[0];
    end
  end

  // Rows 2, 6, ..., 30 from EO[0..7].
  for (genvar k = 0; k < 8; k++) begin : g_row2
    logic signed [AW-1:0] t [8];
    for (genvar j = 0; j < 8; j++) begin : g_t
      localparam int C = coef(4*k+2, j);
      localparam int I = idx_odd16(iabs(C));
      if (C > 0) begin : g_pos
        assign t[j] = AW'(p2[j][I]);
      end else begin : g_neg
        assign t[j] = -AW'(p2[j][I]);
      end
    end
    always_comb begin
      logic signed [AW-1:0] a [8];
      a = t;
      // Pairwise reduction: a balanced tree of log2(8) adder levels.
      for (int w = 8; w > 1; w = w / 2)
        for (int i = 0; i < w / 2; i++) a[i] = a[2*i] + a[2*i+1];
      s[4*k+2] = a[0];
    end
  end

  // Rows 4, 12, 20, 28 from EEO[0..3].
  for (genvar k = 0; k < 4; k++) begin : g_row3
    logic signed [AW-1:0] t [4];
    for (genvar j = 0; j < 4; j++) begin : g_t
      localparam int C = coef(8*k+4, j);
      localparam int I = idx_odd8(iabs(C));
      if (C > 0) begin : g_pos
        assign t[j] = AW'(p3[j][I]);
      end else begin : g_neg
        assign t[j] = -AW'(p3[j][I]);
      end
    end
    assign s[8*k+4] = (t[0] + t[1]) + (t[2] + t[3]);
  end

  // Rows 8 and 24 from EEEO[0..1].
  for (genvar k = 0; k < 2; k++) begin : g_row4
    logic signed [AW-1:0] t [2];
    for (genvar j = 0; j < 2; j++) begin : g_t
      localparam int C = coef(16*k+8, j);
      localparam int I = idx_odd4(iabs(C));
      if (C > 0) begin : g_pos
        assign t[j] = AW'(p4[j][I]);
      end else begin : g_neg
        assign t[j] = -AW'(p4[j][I]);
      end
    end
    assign s[16*k+8] = t[0] + t[1];
  end

  // Rows 0 and 16: all entries are +-64, a shift by six.
  assign s[0]  = (AW'(eeee[0]) + AW'(eeee[1])) <<< 6;
  assign s[16] = (AW'(eeee[0]) - AW'(eeee[1])) <<< 6;

  // Rounding shift and truncation to the output word.
  always_comb begin
    for (int k = 0; k < N; k++) y[k] = OW'((s[k] + (AW'(1) <<< (SHIFT-1))) >>> SHIFT);
  end

endmodule
