// mcm_fig2: the products 101x and 50x built two ways, showing how allowing a
// deeper adder chain saves hardware.
//   ADDER_DEPTH = 2: 129x = 128x + x, 7x = 8x - x, 101x = 129x - 28x,
//                    25x = 32x - 7x, 50x = 25x << 1   (4 adders, 5 shifts)
//   ADDER_DEPTH = 3: 33x = 32x + x, 25x = 33x - 8x, 101x = 100x + x,
//                    50x = 25x << 1                   (3 adders, 4 shifts)
// The depth-3 form reuses 25x inside 101x, saving one adder and one shifter
// at the cost of a third adder on the path to 101x. Both structures
// reproduce the example circuits; the widths are this design's choice.
//
// Interface: signed x (IW bits) in; p101 = 101x and p50 = 50x (IW+8 bits)
// out. Purely combinational.
module mcm_fig2 #(
  parameter int IW = 16,
  parameter int ADDER_DEPTH = 3    // 2 or 3
) (
  input  logic signed [IW-1:0] x,
  output logic signed [IW+7:0] p101,
  output logic signed [IW+7:0] p50
);
  localparam int FW = IW + 9;

  initial assert (ADDER_DEPTH == 2 || ADDER_DEPTH == 3)
    else $error("%m: ADDER_DEPTH must be 2 or 3");

  if (ADDER_DEPTH == 2) begin : g_depth2
    logic signed [FW-1:0] x1, f129, f7, f25, f101;
    always_comb begin
      x1   = FW'(x);
      f129 = (x1 <<< 7) + x1;          // depth 1
      f7   = (x1 <<< 3) - x1;          // depth 1
      f101 = f129 - (f7 <<< 2);        // depth 2
      f25  = (x1 <<< 5) - f7;          // depth 2
      p101 = (IW+8)'(f101);
      p50  = (IW+8)'(f25 <<< 1);
    end
  end else begin : g_depth3
    logic signed [FW-1:0] x1, f33, f25, f101;
    always_comb begin
      x1   = FW'(x);
      f33  = (x1 <<< 5) + x1;          // depth 1
      f25  = f33 - (x1 <<< 3);         // depth 2
      f101 = (f25 <<< 2) + x1;         // depth 3
      p101 = (IW+8)'(f101);
      p50  = (IW+8)'(f25 <<< 1);
    end
  end
endmodule
