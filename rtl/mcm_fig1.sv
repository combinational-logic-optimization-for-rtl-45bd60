// mcm_fig1: smallest example of sub-expression sharing in multiple constant
// multiplication. The products 21x and 10x are built with shifts and two
// adders: 5x = x + 4x is formed once and used by both, 21x = 16x + 5x and
// 10x = 5x << 1. Without sharing, 21x (10101b) and 10x (1010b) would need
// three adders. The structure is the one of the example circuit it
// reproduces; the widths are this design's choice.
//
// Interface: signed x (IW bits) in; p21 = 21x and p10 = 10x (IW+5 bits) out.
// Purely combinational.
module mcm_fig1 #(
  parameter int IW = 16
) (
  input  logic signed [IW-1:0] x,
  output logic signed [IW+4:0] p21,
  output logic signed [IW+4:0] p10
);
  logic signed [IW+4:0] x1, f5;

  always_comb begin
    x1  = (IW+5)'(x);
    f5  = x1 + (x1 <<< 2);      // adder 1: 5x
    p21 = (x1 <<< 4) + f5;      // adder 2: 21x
    p10 = f5 <<< 1;             // wiring: 10x
  end
endmodule
