// transpose_buffer: N x N transpose memory between the row and the column
// transform.
//
// Rows of a block are written one per cycle and the block is read back one
// column per cycle, so the column transform sees the transposed block. The
// memory is a single N x N register array whose orientation alternates from
// block to block: a block written as storage rows is read as storage columns,
// and while it is read, the next block is written into the storage columns
// the reader has already emptied (and the other way round for the next pair).
// A block can therefore stream in while the previous one streams out, at one
// row and one column per cycle, without a second N x N buffer. Write row w of
// the new block is accepted only once column w of the old block is read, in
// the same cycle at the latest.
//
// Interface: valid/ready on both sides. in_row is one row of the block, rows
// in order 0..N-1. out_col[r] is element (r, out_idx) of the block, columns in
// order, out_last marks column N-1. out_col is read combinationally from the
// array. Reset clears the control state; the array itself is not reset and is
// never read before it is written. The single-buffer orientation switching is
// this design's choice; the source describes the memory only as an N x N
// transpose memory.
module transpose_buffer #(
  parameter int N = 32,   // block size
  parameter int W = 16    // word width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_row [N],
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_col [N],
  output logic [$clog2(N)-1:0] out_idx,
  output logic                out_last
);
  localparam int AW = $clog2(N);

  logic signed [W-1:0] mem [N][N];
  logic [AW-1:0] wr_idx, rd_idx;
  logic          wr_mode, rd_mode;   // 0: block stored as rows, 1: as columns
  logic          rd_active;          // a complete block is being read
  logic          wr_fire, rd_fire, wr_done, rd_done;

  assign out_valid = rd_active;
  assign rd_fire   = rd_active && out_ready;
  assign rd_done   = rd_fire && (rd_idx == AW'(N-1));
  assign in_ready  = !rd_active || (wr_idx < rd_idx) || (wr_idx == rd_idx && rd_fire);
  assign wr_fire   = in_valid && in_ready;
  assign wr_done   = wr_fire && (wr_idx == AW'(N-1));
  assign out_idx   = rd_idx;
  assign out_last  = rd_idx == AW'(N-1);

  always_comb begin
    for (int r = 0; r < N; r++) out_col[r] = rd_mode ? mem[rd_idx][r] : mem[r][rd_idx];
  end

  always_ff @(posedge clk) begin
    if (wr_fire) begin
      for (int i = 0; i < N; i++) begin
        if (wr_mode) mem[i][wr_idx] <= in_row[i];
        else         mem[wr_idx][i] <= in_row[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx    <= '0;
      rd_idx    <= '0;
      wr_mode   <= 1'b0;
      rd_mode   <= 1'b0;
      rd_active <= 1'b0;
    end else begin
      if (wr_fire) wr_idx <= wr_idx + 1'b1;
      if (rd_fire) rd_idx <= rd_idx + 1'b1;
      if (wr_done) begin
        // The finished block becomes readable; the next one uses the other
        // orientation. The reader is idle or finishing its last column now.
        rd_active <= 1'b1;
        rd_mode   <= wr_mode;
        wr_mode   <= !wr_mode;
        rd_idx    <= '0;
      end else if (rd_done) begin
        rd_active <= 1'b0;
      end
    end
  end

  // A column is never overwritten before it has been read.
  assert property (@(posedge clk) disable iff (!rst_n)
                   wr_fire && rd_active |-> (wr_idx < rd_idx) || (wr_idx == rd_idx && rd_fire))
    else $error("%m: write overtakes read");
  // Offered output data stays until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_idx))
    else $error("%m: output withdrawn");

endmodule
