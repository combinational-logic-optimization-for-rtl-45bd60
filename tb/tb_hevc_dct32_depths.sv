// tb_hevc_dct32_depths: end-to-end run of the 32x32 transform with the MCM
// adder depth bound set to 2 and to 3, the two settings besides the default
// 4. Both instances receive the same stream of blocks at full rate (random
// residuals, then all +255 and all -256) and every output column is compared
// with a plain two-pass matrix-product reference. Both must also keep the
// timing of the default configuration: 32 cycles per block and the first
// column 3 cycles after the last row.
module tb_hevc_dct32_depths;
  localparam int N = 32;
  localparam int NB = 4;
  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                              64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [8:0]  in_row [N];
  logic in_ready [2], out_valid [2], out_last [2];
  logic signed [15:0] out_col [2][N];
  logic [4:0] out_idx [2];
  logic signed [15:0] ex_x = '0;
  logic signed [20:0] ex1a [2], ex1b [2];
  logic signed [23:0] ex2a [2], ex2b [2], ex2c [2], ex2d [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    hevc_dct32_top #(.BIT_DEPTH(8), .ADDER_DEPTH(d + 2)) dut (
      .clk, .rst_n, .in_valid, .in_ready(in_ready[d]), .in_row,
      .out_valid(out_valid[d]), .out_ready(1'b1), .out_col(out_col[d]),
      .out_idx(out_idx[d]), .out_last(out_last[d]),
      .ex1_x(ex_x), .ex1_p21(ex1a[d]), .ex1_p10(ex1b[d]),
      .ex2_x(ex_x), .ex2_d2_p101(ex2a[d]), .ex2_d2_p50(ex2b[d]),
      .ex2_d3_p101(ex2c[d]), .ex2_d3_p50(ex2d[d]));
  end

  always #5 clk = ~clk;

  int tm [N][N];
  logic signed [8:0]  blk  [NB][N][N];
  logic signed [15:0] expc [NB][N][N];
  int checks = 0, failures = 0;
  int cyc = 0, wr_blk = 0, wr_row = 0;
  int rd_blk [2] = '{0, 0}, rd_col [2] = '{0, 0};
  int last_wr [NB], first_rd [2][NB];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] rnd16(longint acc, int sh);
    return 16'((acc + (longint'(1) << (sh - 1))) >>> sh);
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) in_row[i] = (wr_blk < NB) ? blk[wr_blk][wr_row][i] : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && in_ready[0]) begin
        if (wr_row == N - 1) begin last_wr[wr_blk] = cyc; wr_row <= 0; wr_blk <= wr_blk + 1; end
        else wr_row <= wr_row + 1;
      end
      checks++;
      if (in_ready[0] != in_ready[1]) begin failures++; $display("FAIL in_ready differs"); end
      for (int d = 0; d < 2; d++) begin
        if (out_valid[d]) begin
          if (rd_col[d] == 0) first_rd[d][rd_blk[d]] = cyc;
          for (int v = 0; v < N; v++) begin
            checks++;
            if (out_col[d][v] != expc[rd_blk[d]][rd_col[d]][v]) begin
              failures++;
              $display("FAIL depth %0d blk %0d coef (%0d,%0d) got %0d exp %0d", d + 2, rd_blk[d], v, rd_col[d],
                       out_col[d][v], expc[rd_blk[d]][rd_col[d]][v]);
            end
          end
          if (rd_col[d] == N - 1) begin rd_col[d] <= 0; rd_blk[d] <= rd_blk[d] + 1; end
          else rd_col[d] <= rd_col[d] + 1;
        end
      end
    end
  end

  initial begin
    logic signed [15:0] s [N][N];
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) begin
        int i;
        i = ((2 * n + 1) * k) % 128;
        if (i > 64) i = 128 - i;
        tm[k][n] = (i > 32) ? -MAG[64 - i] : MAG[i];
      end
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          blk[b][r][c] = (b == 2) ? 9'sd255 : (b == 3) ? -9'sd256 : 9'($urandom);
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < N; r++)
        for (int u = 0; u < N; u++) begin
          longint acc;
          acc = 0;
          for (int n = 0; n < N; n++) acc += longint'(tm[u][n]) * longint'(blk[b][r][n]);
          s[r][u] = rnd16(acc, 4);
        end
      for (int u = 0; u < N; u++)
        for (int v = 0; v < N; v++) begin
          longint acc;
          acc = 0;
          for (int r = 0; r < N; r++) acc += longint'(tm[v][r]) * longint'(s[r][u]);
          expc[b][u][v] = rnd16(acc, 11);
        end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) in_valid = 1'b1;
    wait (wr_blk == NB);
    @(negedge clk) in_valid = 1'b0;
    wait (rd_blk[0] == NB && rd_blk[1] == NB);
    for (int d = 0; d < 2; d++)
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (first_rd[d][b] - last_wr[b] != 3) begin failures++; $display("FAIL depth %0d blk %0d latency %0d", d + 2, b, first_rd[d][b] - last_wr[b]); end
        if (b > 0) begin
          checks++;
          if (last_wr[b] - last_wr[b-1] != N) begin failures++; $display("FAIL block spacing %0d", last_wr[b] - last_wr[b-1]); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
