// mcm_odd16: multiple constant multiplication (MCM) block for the HEVC
// 32-point DCT: the 16-point odd-row coefficients that multiply EO[j].
//
// One signed input x is multiplied by every constant of the set
//   90, 87, 80, 70, 57, 43, 25, 9
// using only shifts, adders and subtractors. Every constant is an odd
// 'fundamental' f<n> = n*x shifted left; fundamentals are built from x and from
// each other, so a sub-expression shared by several constants is computed once.
// The parameter ADDER_DEPTH bounds the number of adders on any path from x to
// an output, trading adder count against logic depth (the three settings of the
// experiment table: 2, 3 and 4). The adder graphs were found with a greedy
// depth-bounded heuristic in the style of published MCM algorithms; the shared
// sub-expressions are this design's own and are not taken from a published
// netlist. Adder counts: depth 2: 9 adders, depth 3: 9 adders, depth 4: 8 adders.
//
// Interface: x (IW bits, signed) in, p[i] = x * C[i] (OW bits, signed) out, in
// the order of the list above. Purely combinational, no clock.
module mcm_odd16 #(
  parameter int IW = 16,           // input width
  parameter int OW = IW + 8,       // product width
  parameter int ADDER_DEPTH = 4    // 2, 3 or 4
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] p [8]
);
  // Internal width: fundamentals stay below 2^10, shifts included.
  localparam int FW = IW + 11;

  initial assert (ADDER_DEPTH >= 2 && ADDER_DEPTH <= 4)
    else $error("%m: ADDER_DEPTH must be 2, 3 or 4");

  if (ADDER_DEPTH <= 2) begin : g_depth2
    // 9 adders, depth 2
    logic signed [FW-1:0] f1, f3, f5, f9, f25, f35, f43, f45, f57, f87;
    always_comb begin
      f1 = FW'(x);
      f3 = (f1 <<< 1) + f1;  // depth 1
      f5 = (f1 <<< 2) + f1;  // depth 1
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f35 = (f9 <<< 2) - f1;  // depth 2
      f43 = (f5 <<< 3) + f3;  // depth 2
      f45 = (f5 <<< 3) + f5;  // depth 2
      f57 = f9 + (f3 <<< 4);  // depth 2
      f87 = (f3 <<< 5) - f9;  // depth 2
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'(f87);  // 87x
      p[2] = OW'((f5 <<< 4));  // 80x
      p[3] = OW'((f35 <<< 1));  // 70x
      p[4] = OW'(f57);  // 57x
      p[5] = OW'(f43);  // 43x
      p[6] = OW'(f25);  // 25x
      p[7] = OW'(f9);  // 9x
    end
  end else if (ADDER_DEPTH == 3) begin : g_depth3
    // 9 adders, depth 3
    logic signed [FW-1:0] f1, f3, f5, f9, f25, f35, f45, f87, f43, f57;
    always_comb begin
      f1 = FW'(x);
      f3 = (f1 <<< 1) + f1;  // depth 1
      f5 = (f1 <<< 2) + f1;  // depth 1
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f35 = (f9 <<< 2) - f1;  // depth 2
      f45 = (f5 <<< 3) + f5;  // depth 2
      f87 = (f3 <<< 5) - f9;  // depth 2
      f43 = (f1 <<< 3) + f35;  // depth 3
      f57 = (f1 <<< 5) + f25;  // depth 3
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'(f87);  // 87x
      p[2] = OW'((f5 <<< 4));  // 80x
      p[3] = OW'((f35 <<< 1));  // 70x
      p[4] = OW'(f57);  // 57x
      p[5] = OW'(f43);  // 43x
      p[6] = OW'(f25);  // 25x
      p[7] = OW'(f9);  // 9x
    end
  end else if (ADDER_DEPTH >= 4) begin : g_depth4
    // 8 adders, depth 4
    logic signed [FW-1:0] f1, f5, f9, f25, f35, f45, f43, f57, f87;
    always_comb begin
      f1 = FW'(x);
      f5 = (f1 <<< 2) + f1;  // depth 1
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f35 = (f9 <<< 2) - f1;  // depth 2
      f45 = (f5 <<< 3) + f5;  // depth 2
      f43 = (f1 <<< 3) + f35;  // depth 3
      f57 = (f1 <<< 5) + f25;  // depth 3
      f87 = f1 + (f43 <<< 1);  // depth 4
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'(f87);  // 87x
      p[2] = OW'((f5 <<< 4));  // 80x
      p[3] = OW'((f35 <<< 1));  // 70x
      p[4] = OW'(f57);  // 57x
      p[5] = OW'(f43);  // 43x
      p[6] = OW'(f25);  // 25x
      p[7] = OW'(f9);  // 9x
    end
  end

endmodule
