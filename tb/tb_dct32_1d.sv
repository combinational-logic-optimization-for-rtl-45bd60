// tb_dct32_1d: self-checking test of the combinational 32-point transform.
// Four instances are checked at once: the row configuration (9-bit input,
// shift 4) at adder depths 2, 3 and 4, and the column configuration (16-bit
// input, shift 11) at depth 4. The expected output is the plain 32x32 matrix
// product with the HEVC matrix, rounded and truncated to 16 bits as in the
// reference encoder; the matrix is rebuilt here from its 33 magnitudes
// without the butterfly. Inputs: extremes, single impulses and random rows.
module tb_dct32_1d;
  localparam int N = 32;
  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                              64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0};

  logic signed [8:0]  xr [N];
  logic signed [15:0] xc [N];
  logic signed [15:0] y2 [N], y3 [N], y4 [N], yc [N];
  int tm [N][N];
  int checks = 0, failures = 0;

  dct32_1d #(.IW(9),  .OW(16), .SHIFT(4),  .ADDER_DEPTH(2)) u_d2 (.x(xr), .y(y2));
  dct32_1d #(.IW(9),  .OW(16), .SHIFT(4),  .ADDER_DEPTH(3)) u_d3 (.x(xr), .y(y3));
  dct32_1d #(.IW(9),  .OW(16), .SHIFT(4),  .ADDER_DEPTH(4)) u_d4 (.x(xr), .y(y4));
  dct32_1d #(.IW(16), .OW(16), .SHIFT(11), .ADDER_DEPTH(4)) u_col (.x(xc), .y(yc));

  function automatic logic signed [15:0] ref_out(int k, longint v [N], int sh);
    longint acc = 0;
    for (int n = 0; n < N; n++) acc += longint'(tm[k][n]) * v[n];
    return 16'((acc + (longint'(1) << (sh - 1))) >>> sh);
  endfunction

  task automatic check_now();
    longint vr [N], vc [N];
    logic signed [15:0] er, ec;
    for (int n = 0; n < N; n++) begin vr[n] = longint'(xr[n]); vc[n] = longint'(xc[n]); end
    for (int k = 0; k < N; k++) begin
      er = ref_out(k, vr, 4);
      ec = ref_out(k, vc, 11);
      checks += 4;
      if (y2[k] != er) begin failures++; $display("FAIL d2 k=%0d got %0d exp %0d", k, y2[k], er); end
      if (y3[k] != er) begin failures++; $display("FAIL d3 k=%0d got %0d exp %0d", k, y3[k], er); end
      if (y4[k] != er) begin failures++; $display("FAIL d4 k=%0d got %0d exp %0d", k, y4[k], er); end
      if (yc[k] != ec) begin failures++; $display("FAIL col k=%0d got %0d exp %0d", k, yc[k], ec); end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // HEVC matrix from the folded-cosine rule.
    for (int k = 0; k < N; k++)
      for (int n = 0; n < N; n++) begin
        int i;
        i = ((2 * n + 1) * k) % 128;
        if (i > 64) i = 128 - i;
        tm[k][n] = (i > 32) ? -MAG[64 - i] : MAG[i];
      end
    // A few spot values of the standard matrix.
    checks += 4;
    if (tm[1][0] != 90 || tm[1][31] != -90) failures++;
    if (tm[8][1] != 36 || tm[24][1] != -83) failures++;
    if (tm[31][0] != 4 || tm[31][15] != -90 || tm[2][7] != 9) failures++;
    if (tm[16][1] != -64 || tm[0][17] != 64) failures++;

    // Extremes.
    for (int n = 0; n < N; n++) begin xr[n] = 9'sd255; xc[n] = 16'sd32767; end
    #1 check_now();
    for (int n = 0; n < N; n++) begin xr[n] = -9'sd256; xc[n] = -16'sd32768; end
    #1 check_now();
    for (int n = 0; n < N; n++) begin
      xr[n] = (n % 2 != 0) ? -9'sd255 : 9'sd255;
      xc[n] = (n % 2 != 0) ? -16'sd4000 : 16'sd4000;
    end
    #1 check_now();
    // Impulses: each output equals a rounded matrix column.
    for (int m = 0; m < N; m++) begin
      for (int n = 0; n < N; n++) begin xr[n] = (n == m) ? 9'sd200 : 9'sd0; xc[n] = (n == m) ? -16'sd9000 : 16'sd0; end
      #1 check_now();
    end
    // Random rows.
    repeat (300) begin
      for (int n = 0; n < N; n++) begin xr[n] = 9'($urandom); xc[n] = 16'($urandom); end
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
