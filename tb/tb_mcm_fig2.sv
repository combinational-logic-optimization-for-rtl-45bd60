// tb_mcm_fig2: checks 101x and 50x of both adder-depth variants against the
// multiply operator, for the input extremes and random inputs.
module tb_mcm_fig2;
  localparam int IW = 16;
  logic signed [IW-1:0] x;
  logic signed [IW+7:0] a101, a50, b101, b50;
  int checks = 0, failures = 0;

  mcm_fig2 #(.IW(IW), .ADDER_DEPTH(2)) u_d2 (.x(x), .p101(a101), .p50(a50));
  mcm_fig2 #(.IW(IW), .ADDER_DEPTH(3)) u_d3 (.x(x), .p101(b101), .p50(b50));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks += 4;
    if (int'(a101) != 101 * int'(x)) begin failures++; $display("FAIL d2 x=%0d 101x=%0d", x, a101); end
    if (int'(a50)  != 50 * int'(x))  begin failures++; $display("FAIL d2 x=%0d 50x=%0d", x, a50); end
    if (int'(b101) != 101 * int'(x)) begin failures++; $display("FAIL d3 x=%0d 101x=%0d", x, b101); end
    if (int'(b50)  != 50 * int'(x))  begin failures++; $display("FAIL d3 x=%0d 50x=%0d", x, b50); end
  endtask

  initial begin
    x = 16'sh7fff; #1 check_now();
    x = -16'sh8000; #1 check_now();
    x = -16'sd1; #1 check_now();
    repeat (1000) begin x = IW'($urandom); #1 check_now(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
