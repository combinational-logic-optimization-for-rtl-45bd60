// mcm_odd8: multiple constant multiplication (MCM) block for the HEVC
// 32-point DCT: the 8-point odd-row coefficients that multiply EEO[j].
//
// One signed input x is multiplied by every constant of the set
//   89, 75, 50, 18
// using only shifts, adders and subtractors. Every constant is an odd
// 'fundamental' f<n> = n*x shifted left; fundamentals are built from x and from
// each other, so a sub-expression shared by several constants is computed once.
// The parameter ADDER_DEPTH bounds the number of adders on any path from x to
// an output, trading adder count against logic depth (the three settings of the
// experiment table: 2, 3 and 4). The adder graphs were found with a greedy
// depth-bounded heuristic in the style of published MCM algorithms; the shared
// sub-expressions are this design's own and are not taken from a published
// netlist. Adder counts: depth 2: 5 adders, depth 3: 4 adders, depth 4: 4 adders.
//
// Interface: x (IW bits, signed) in, p[i] = x * C[i] (OW bits, signed) out, in
// the order of the list above. Purely combinational, no clock.
module mcm_odd8 #(
  parameter int IW = 16,           // input width
  parameter int OW = IW + 8,       // product width
  parameter int ADDER_DEPTH = 4    // 2, 3 or 4
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] p [4]
);
  // Internal width: fundamentals stay below 2^10, shifts included.
  localparam int FW = IW + 11;

  initial assert (ADDER_DEPTH >= 2 && ADDER_DEPTH <= 4)
    else $error("%m: ADDER_DEPTH must be 2, 3 or 4");

  if (ADDER_DEPTH <= 2) begin : g_depth2
    // 5 adders, depth 2
    logic signed [FW-1:0] f1, f5, f9, f25, f75, f89;
    always_comb begin
      f1 = FW'(x);
      f5 = (f1 <<< 2) + f1;  // depth 1
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f75 = (f5 <<< 4) - f5;  // depth 2
      f89 = f9 + (f5 <<< 4);  // depth 2
      p[0] = OW'(f89);  // 89x
      p[1] = OW'(f75);  // 75x
      p[2] = OW'((f25 <<< 1));  // 50x
      p[3] = OW'((f9 <<< 1));  // 18x
    end
  end else if (ADDER_DEPTH == 3) begin : g_depth3
    // 4 adders, depth 3
    logic signed [FW-1:0] f1, f9, f25, f75, f89;
    always_comb begin
      f1 = FW'(x);
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f75 = (f25 <<< 1) + f25;  // depth 3
      f89 = (f1 <<< 6) + f25;  // depth 3
      p[0] = OW'(f89);  // 89x
      p[1] = OW'(f75);  // 75x
      p[2] = OW'((f25 <<< 1));  // 50x
      p[3] = OW'((f9 <<< 1));  // 18x
    end
  end else if (ADDER_DEPTH >= 4) begin : g_depth4
    // 4 adders, depth 3
    logic signed [FW-1:0] f1, f9, f25, f75, f89;
    always_comb begin
      f1 = FW'(x);
      f9 = (f1 <<< 3) + f1;  // depth 1
      f25 = (f1 <<< 4) + f9;  // depth 2
      f75 = (f25 <<< 1) + f25;  // depth 3
      f89 = (f1 <<< 6) + f25;  // depth 3
      p[0] = OW'(f89);  // 89x
      p[1] = OW'(f75);  // 75x
      p[2] = OW'((f25 <<< 1));  // 50x
      p[3] = OW'((f9 <<< 1));  // 18x
    end
  end

endmodule
