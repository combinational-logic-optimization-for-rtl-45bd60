// tb_mcm_fig1: checks 21x and 10x of the shared-5x example against the
// multiply operator, for the input extremes and random inputs.
module tb_mcm_fig1;
  localparam int IW = 16;
  logic signed [IW-1:0] x;
  logic signed [IW+4:0] p21, p10;
  int checks = 0, failures = 0;

  mcm_fig1 #(.IW(IW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks += 2;
    if (int'(p21) != 21 * int'(x)) begin failures++; $display("FAIL x=%0d 21x=%0d", x, p21); end
    if (int'(p10) != 10 * int'(x)) begin failures++; $display("FAIL x=%0d 10x=%0d", x, p10); end
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
