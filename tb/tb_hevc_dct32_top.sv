// tb_hevc_dct32_top: end-to-end test of the 32x32 forward transform at its
// default parameters (8-bit video, adder depth 4).
//
// Blocks of residuals are streamed in row by row and every output beat is
// compared with a reference computed here as two plain matrix products with
// the HEVC matrix (rows with shift 4, then columns with shift 11, rounding
// and 16-bit words as in the reference encoder), without butterflies or MCM.
// Phase 1 streams blocks at full rate and checks the timing: no refused input
// after reset, 32 cycles per block, first beat 3 cycles after the last row.
// Phase 2 uses random valid/ready. The testbench counts how often each
// mechanism happened and fails if one never did: input stall, output stall,
// a block read from each transpose orientation, a row written while the
// previous block is still being read. Extreme blocks (all +255, all -256,
// checkerboard) are included. The example circuits are checked as well.
module tb_hevc_dct32_top;
  localparam int N = 32;
  localparam int NB = 10;
  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                              64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_last;
  logic signed [8:0]  in_row [N];
  logic signed [15:0] out_col [N];
  logic [4:0] out_idx;
  logic signed [15:0] ex1_x, ex2_x;
  logic signed [20:0] ex1_p21, ex1_p10;
  logic signed [23:0] ex2_d2_p101, ex2_d2_p50, ex2_d3_p101, ex2_d3_p50;

  hevc_dct32_top dut (.*);

  always #5 clk = ~clk;

  int tm [N][N];
  logic signed [8:0]  blk  [NB][N][N];
  logic signed [15:0] expc [NB][N][N];   // [block][u][v]
  int checks = 0, failures = 0;
  int cyc = 0, wr_blk = 0, wr_row = 0, rd_blk = 0, rd_col = 0;
  int first_wr = -1, last_wr [NB], first_rd [NB];
  int n_in_stall = 0, n_out_stall = 0, n_mode0 = 0, n_mode1 = 0, n_overlap = 0;
  bit random_phase = 0;

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

  task automatic make_reference();
    logic signed [15:0] s [N][N];
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < N; r++)
        for (int u = 0; u < N; u++) begin
          longint acc = 0;
          for (int n = 0; n < N; n++) acc += longint'(tm[u][n]) * longint'(blk[b][r][n]);
          s[r][u] = rnd16(acc, 4);
        end
      for (int u = 0; u < N; u++)
        for (int v = 0; v < N; v++) begin
          longint acc = 0;
          for (int r = 0; r < N; r++) acc += longint'(tm[v][r]) * longint'(s[r][u]);
          expc[b][u][v] = rnd16(acc, 11);
        end
    end
  endtask

  always_comb begin
    for (int i = 0; i < N; i++) in_row[i] = (wr_blk < NB) ? blk[wr_blk][wr_row][i] : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (dut.u_tbuf.in_valid && dut.u_tbuf.in_ready && dut.u_tbuf.out_valid) n_overlap++;
      if (dut.u_tbuf.out_valid && dut.u_tbuf.out_ready && dut.u_tbuf.out_last) begin
        if (dut.u_tbuf.rd_mode) n_mode1++; else n_mode0++;
      end
      if (in_valid && in_ready) begin
        if (first_wr < 0) first_wr = cyc;
        if (wr_row == N - 1) begin last_wr[wr_blk] = cyc; wr_row <= 0; wr_blk <= wr_blk + 1; end
        else wr_row <= wr_row + 1;
      end
      if (out_valid && out_ready) begin
        if (rd_col == 0) first_rd[rd_blk] = cyc;
        checks++;
        if (out_idx != 5'(rd_col) || out_last != (rd_col == N - 1)) begin
          failures++; $display("FAIL blk %0d beat %0d: idx %0d last %0d", rd_blk, rd_col, out_idx, out_last);
        end
        for (int v = 0; v < N; v++) begin
          checks++;
          if (out_col[v] != expc[rd_blk][rd_col][v]) begin
            failures++;
            if (failures < 20) $display("FAIL blk %0d coef (%0d,%0d) got %0d exp %0d", rd_blk, v, rd_col, out_col[v], expc[rd_blk][rd_col][v]);
          end
        end
        if (rd_col == N - 1) begin rd_col <= 0; rd_blk <= rd_blk + 1; end
        else rd_col <= rd_col + 1;
      end
      if (random_phase) begin
        in_valid  <= (wr_blk < NB) && ($urandom_range(0, 4) != 0);
        out_ready <= ($urandom_range(0, 2) != 0);
      end
    end
  end

  initial begin
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
          case (b)
            1:       blk[b][r][c] = 9'sd255;
            2:       blk[b][r][c] = -9'sd256;
            3:       blk[b][r][c] = ((r + c) % 2 != 0) ? -9'sd255 : 9'sd255;
            default: blk[b][r][c] = 9'($urandom);
          endcase
    make_reference();

    // Example circuits.
    for (int t = 0; t < 200; t++) begin
      ex1_x = 16'($urandom); ex2_x = 16'($urandom);
      #1;
      checks += 6;
      if (int'(ex1_p21) != 21 * int'(ex1_x)) failures++;
      if (int'(ex1_p10) != 10 * int'(ex1_x)) failures++;
      if (int'(ex2_d2_p101) != 101 * int'(ex2_x)) failures++;
      if (int'(ex2_d2_p50) != 50 * int'(ex2_x)) failures++;
      if (int'(ex2_d3_p101) != 101 * int'(ex2_x)) failures++;
      if (int'(ex2_d3_p50) != 50 * int'(ex2_x)) failures++;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: four blocks at full rate.
    @(negedge clk) in_valid = 1'b1;
    wait (wr_blk == 4);
    @(negedge clk) in_valid = 1'b0;
    wait (rd_blk == 4);
    checks++;
    if (n_in_stall != 0) begin failures++; $display("FAIL input refused %0d times at full rate", n_in_stall); end
    checks++;
    if (last_wr[3] - first_wr != 4 * N - 1) begin failures++; $display("FAIL 4 blocks in %0d cycles", last_wr[3] - first_wr + 1); end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (first_rd[b] - last_wr[b] != 3) begin failures++; $display("FAIL blk %0d latency %0d", b, first_rd[b] - last_wr[b]); end
    end
    $display("full rate: 4 blocks in %0d cycles, latency last row to first beat %0d", last_wr[3] - first_wr + 1, first_rd[0] - last_wr[0]);
    // Phase 2: random handshakes.
    @(negedge clk) random_phase = 1'b1;
    wait (rd_blk == NB);
    $display("input stalls %0d, output stalls %0d, blocks read as rows %0d / as columns %0d, overlapped writes %0d",
             n_in_stall, n_out_stall, n_mode0, n_mode1, n_overlap);
    checks += 5;
    if (n_in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    if (n_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    if (n_mode0 == 0)     begin failures++; $display("FAIL no block read in row orientation"); end
    if (n_mode1 == 0)     begin failures++; $display("FAIL no block read in column orientation"); end
    if (n_overlap == 0)   begin failures++; $display("FAIL no overlapped write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
