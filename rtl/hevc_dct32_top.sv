// hevc_dct32_top: 32x32 two-dimensional forward DCT of HEVC built from a
// combinational 1D row transform, a transpose memory and a combinational 1D
// column transform, with shift-and-add multiple-constant-multiplication
// (MCM) blocks in place of multipliers.
//
// Dataflow, one row or column per clock:
//   in_row (32 residuals) -> dct32_1d (rows, shift S1) -> stage register
//   -> transpose_buffer (32x32) -> dct32_1d (columns, shift 11)
//   -> output register -> out_col
// Rows of a block enter in order 0..31. After the last row the block leaves
// as 32 output beats; beat u carries out_col[v] = coefficient (v, u), i.e.
// column u of the coefficient block, vertical frequency v. The result equals
// the HM reference forward transform: first stage shift S1 = BIT_DEPTH - 4
// (log2(32) - 1 + BIT_DEPTH - 8), second stage shift 11 (log2(32) + 6),
// round-to-nearest and 16-bit intermediate and output words.
//
// Timing: each 1D transform sits alone between two registers. A block's
// first output beat is valid 3 cycles after its last row is accepted, and
// consecutive blocks stream at full rate (32 cycles per block). Both sides
// use valid/ready; out_ready low stalls the output register, then the
// transpose memory, then the input.
//
// ADDER_DEPTH selects the MCM adder depth bound (2, 3 or 4): fewer adder
// levels shorten the combinational path, a larger bound needs fewer adders.
// The two small example circuits mcm_fig1 and mcm_fig2 (21x/10x with a shared
// 5x; 101x/50x at depth 2 and 3) stand beside the transform with their own
// ports and take no part in it. The transform size, the shifts, 8-bit video
// and the handshakes are this design's reading; the partial butterfly, the
// MCM blocks and the depth bound follow the source.
module hevc_dct32_top
  import dct_pkg::*;
#(
  parameter int BIT_DEPTH = 8,     // video sample bit depth
  parameter int ADDER_DEPTH = 4    // MCM adder depth bound: 2, 3 or 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // residual rows in
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [BIT_DEPTH:0]  in_row [N],
  // coefficient columns out
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic signed [15:0]         out_col [N],
  output logic [4:0]                 out_idx,
  output logic                       out_last,
  // example circuit: 21x and 10x with a shared 5x
  input  logic signed [15:0]         ex1_x,
  output logic signed [20:0]         ex1_p21,
  output logic signed [20:0]         ex1_p10,
  // example circuit: 101x and 50x at adder depth 2 and 3
  input  logic signed [15:0]         ex2_x,
  output logic signed [23:0]         ex2_d2_p101,
  output logic signed [23:0]         ex2_d2_p50,
  output logic signed [23:0]         ex2_d3_p101,
  output logic signed [23:0]         ex2_d3_p50
);
  localparam int IW = BIT_DEPTH + 1;
  localparam int SHIFT1 = BIT_DEPTH - 4;
  localparam int SHIFT2 = 11;

  // Row transform, straight from the input port.
  logic signed [15:0] row_y [N];
  dct32_1d #(.IW(IW), .OW(16), .SHIFT(SHIFT1), .ADDER_DEPTH(ADDER_DEPTH)) u_row (
    .x(in_row), .y(row_y));

  // Stage register between the row transform and the transpose memory.
  logic               s1_valid, s1_ready;
  logic signed [15:0] s1_row [N];
  assign in_ready = !s1_valid || s1_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else if (in_ready) s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_ready && in_valid) s1_row <= row_y;
  end

  // Transpose memory.
  logic               tb_valid, tb_ready, tb_last;
  logic signed [15:0] tb_col [N];
  logic [4:0]         tb_idx;
  transpose_buffer #(.N(N), .W(16)) u_tbuf (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(s1_ready), .in_row(s1_row),
    .out_valid(tb_valid), .out_ready(tb_ready), .out_col(tb_col),
    .out_idx(tb_idx), .out_last(tb_last));

  // Column transform, straight from the transpose memory.
  logic signed [15:0] col_y [N];
  dct32_1d #(.IW(16), .OW(16), .SHIFT(SHIFT2), .ADDER_DEPTH(ADDER_DEPTH)) u_col (
    .x(tb_col), .y(col_y));

  // Output register.
  assign tb_ready = !out_valid || out_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (tb_ready) out_valid <= tb_valid;
  end
  always_ff @(posedge clk) begin
    if (tb_ready && tb_valid) begin
      out_col  <= col_y;
      out_idx  <= tb_idx;
      out_last <= tb_last;
    end
  end

  // Example circuits.
  mcm_fig1 #(.IW(16)) u_ex1 (.x(ex1_x), .p21(ex1_p21), .p10(ex1_p10));
  mcm_fig2 #(.IW(16), .ADDER_DEPTH(2)) u_ex2_d2 (.x(ex2_x), .p101(ex2_d2_p101), .p50(ex2_d2_p50));
  mcm_fig2 #(.IW(16), .ADDER_DEPTH(3)) u_ex2_d3 (.x(ex2_x), .p101(ex2_d3_p101), .p50(ex2_d3_p50));

  initial assert (BIT_DEPTH >= 8 && BIT_DEPTH <= 12)
    else $error("%m: BIT_DEPTH out of range");

endmodule
