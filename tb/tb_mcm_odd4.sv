// tb_mcm_odd4: self-checking test of the mcm_odd4 constant-multiplier block.
// Three instances, one per adder depth (2, 3, 4), are driven with the extreme
// input values and with random values. Each output is compared with the
// product x * C computed here with the multiply operator, where the constants
// are an independent copy of the HEVC coefficient list.
module tb_mcm_odd4;
  localparam int IW = 16;
  localparam int OW = IW + 8;
  localparam int NC = 2;
  localparam int C [NC] = '{83, 36};

  logic signed [IW-1:0] x;
  logic signed [OW-1:0] p2 [NC];
  logic signed [OW-1:0] p3 [NC];
  logic signed [OW-1:0] p4 [NC];
  int checks = 0, failures = 0;

  mcm_odd4 #(.IW(IW), .ADDER_DEPTH(2)) u_d2 (.x(x), .p(p2));
  mcm_odd4 #(.IW(IW), .ADDER_DEPTH(3)) u_d3 (.x(x), .p(p3));
  mcm_odd4 #(.IW(IW), .ADDER_DEPTH(4)) u_d4 (.x(x), .p(p4));

  task automatic check_all();
    longint exp;
    for (int i = 0; i < NC; i++) begin
      exp = longint'(x) * longint'(C[i]);
      checks += 3;
      if (longint'(p2[i]) != exp) begin failures++; $display("FAIL d2 x=%0d C=%0d got %0d", x, C[i], p2[i]); end
      if (longint'(p3[i]) != exp) begin failures++; $display("FAIL d3 x=%0d C=%0d got %0d", x, C[i], p3[i]); end
      if (longint'(p4[i]) != exp) begin failures++; $display("FAIL d4 x=%0d C=%0d got %0d", x, C[i], p4[i]); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [IW-1:0] edges [6] = '{16'sh7fff, -16'sh8000, 16'sd0, 16'sd1, -16'sd1, 16'sd12345};
    foreach (edges[k]) begin
      x = edges[k]; #1; check_all();
    end
    repeat (500) begin
      x = IW'($urandom); #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
