// tb_transpose_buffer: self-checking test of the alternating-orientation
// transpose memory. Blocks of random words are pushed row by row; every
// column read out is compared with the matching column of the block kept in
// the testbench. Phase 1 streams blocks with the source always valid and the
// sink always ready and checks the rate: after the first block no input
// cycle is refused, and column 0 of a block appears the cycle after its last
// row is written. Phase 2 uses random valid and ready, so both orientations
// are read under stalls and with the writer waiting for the reader.
module tb_transpose_buffer;
  localparam int N = 32;
  localparam int W = 16;
  localparam int NB = 12;   // blocks in total

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic signed [W-1:0] in_row [N], out_col [N];
  logic [4:0] out_idx;
  logic signed [W-1:0] blk [NB][N][N];
  int checks = 0, failures = 0;
  int cyc = 0, wr_blk = 0, wr_row = 0, rd_blk = 0, rd_col = 0;
  int refused_full_rate = 0, wr_waits = 0, out_stalls = 0;
  int last_wr_cycle [NB], first_rd_cycle [NB];
  int first_wr_cycle = -1;
  bit random_phase = 0;

  transpose_buffer #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source.
  always_comb begin
    for (int i = 0; i < N; i++) in_row[i] = (wr_blk < NB) ? blk[wr_blk][wr_row][i] : '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) begin
        if (first_wr_cycle < 0) first_wr_cycle = cyc;
        if (wr_row == N - 1) begin
          last_wr_cycle[wr_blk] = cyc;
          wr_row <= 0; wr_blk <= wr_blk + 1;
        end else wr_row <= wr_row + 1;
      end
      if (in_valid && !in_ready) begin
        wr_waits++;
        if (!random_phase && wr_blk > 0) refused_full_rate++;
      end
      if (out_valid && !out_ready) out_stalls++;
      if (out_valid && out_ready) begin
        if (rd_col == 0) first_rd_cycle[rd_blk] = cyc;
        checks++;
        if (out_idx != 5'(rd_col) || out_last != (rd_col == N - 1)) begin
          failures++; $display("FAIL index blk %0d col %0d idx %0d", rd_blk, rd_col, out_idx);
        end
        for (int r = 0; r < N; r++) begin
          checks++;
          if (out_col[r] != blk[rd_blk][r][rd_col]) begin
            failures++;
            $display("FAIL blk %0d col %0d row %0d got %0d exp %0d", rd_blk, rd_col, r, out_col[r], blk[rd_blk][r][rd_col]);
          end
        end
        if (rd_col == N - 1) begin rd_col <= 0; rd_blk <= rd_blk + 1; end
        else rd_col <= rd_col + 1;
      end
      // Random handshakes in phase 2.
      if (random_phase) begin
        in_valid  <= (wr_blk < NB) && ($urandom_range(0, 3) != 0);
        out_ready <= ($urandom_range(0, 3) != 0);
      end
    end
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) blk[b][r][c] = W'($urandom);
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: four blocks at full rate.
    @(negedge clk) in_valid = 1'b1;
    wait (wr_blk == 4);
    @(negedge clk) in_valid = 1'b0;
    wait (rd_blk == 4);
    checks++;
    if (refused_full_rate != 0) begin failures++; $display("FAIL %0d refused cycles at full rate", refused_full_rate); end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (first_rd_cycle[b] != last_wr_cycle[b] + 1) begin
        failures++; $display("FAIL blk %0d: last row at %0d, first column at %0d", b, last_wr_cycle[b], first_rd_cycle[b]);
      end
    end
    checks++;
    if (last_wr_cycle[3] - first_wr_cycle != 4 * N - 1) begin
      failures++; $display("FAIL four blocks took %0d cycles", last_wr_cycle[3] - first_wr_cycle + 1);
    end
    // Phase 2: random valid and ready for the rest.
    @(negedge clk) random_phase = 1'b1;
    wait (rd_blk == NB);
    checks++;
    if (wr_waits == 0 || out_stalls == 0) begin failures++; $display("FAIL phase 2 made no stalls"); end
    $display("writer waits %0d, output stalls %0d", wr_waits, out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
