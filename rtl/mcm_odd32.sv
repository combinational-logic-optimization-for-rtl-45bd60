// mcm_odd32: multiple constant multiplication (MCM) block for the HEVC
// 32-point DCT: the odd-row coefficients that multiply O[j] = r[j] - r[31-j].
//
// One signed input x is multiplied by every constant of the set
//   90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4
// using only shifts, adders and subtractors. Every constant is an odd
// 'fundamental' f<n> = n*x shifted left; fundamentals are built from x and from
// each other, so a sub-expression shared by several constants is computed once.
// The parameter ADDER_DEPTH bounds the number of adders on any path from x to
// an output, trading adder count against logic depth (the three settings of the
// experiment table: 2, 3 and 4). The adder graphs were found with a greedy
// depth-bounded heuristic in the style of published MCM algorithms; the shared
// sub-expressions are this design's own and are not taken from a published
// netlist. Adder counts: depth 2: 15 adders, depth 3: 13 adders, depth 4: 13 adders.
//
// Interface: x (IW bits, signed) in, p[i] = x * C[i] (OW bits, signed) out, in
// the order of the list above. Purely combinational, no clock.
module mcm_odd32 #(
  parameter int IW = 16,           // input width
  parameter int OW = IW + 8,       // product width
  parameter int ADDER_DEPTH = 4    // 2, 3 or 4
) (
  input  logic signed [IW-1:0] x,
  output logic signed [OW-1:0] p [15]
);
  // Internal width: fundamentals stay below 2^10, shifts included.
  localparam int FW = IW + 11;

  initial assert (ADDER_DEPTH >= 2 && ADDER_DEPTH <= 4)
    else $error("%m: ADDER_DEPTH must be 2, 3 or 4");

  if (ADDER_DEPTH <= 2) begin : g_depth2
    // 15 adders, depth 2
    logic signed [FW-1:0] f1, f5, f7, f31, f11, f13, f19, f23, f27, f39, f41, f45, f61, f67, f73, f85;
    always_comb begin
      f1 = FW'(x);
      f5 = (f1 <<< 2) + f1;  // depth 1
      f7 = (f1 <<< 3) - f1;  // depth 1
      f31 = (f1 <<< 5) - f1;  // depth 1
      f11 = f1 + (f5 <<< 1);  // depth 2
      f13 = (f1 <<< 3) + f5;  // depth 2
      f19 = (f5 <<< 2) - f1;  // depth 2
      f23 = f31 - (f1 <<< 3);  // depth 2
      f27 = f31 - (f1 <<< 2);  // depth 2
      f39 = (f1 <<< 3) + f31;  // depth 2
      f41 = f1 + (f5 <<< 3);  // depth 2
      f45 = (f5 <<< 3) + f5;  // depth 2
      f61 = (f31 <<< 1) - f1;  // depth 2
      f67 = (f31 <<< 1) + f5;  // depth 2
      f73 = (f5 <<< 4) - f7;  // depth 2
      f85 = (f5 <<< 4) + f5;  // depth 2
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'((f11 <<< 3));  // 88x
      p[2] = OW'(f85);  // 85x
      p[3] = OW'((f41 <<< 1));  // 82x
      p[4] = OW'((f39 <<< 1));  // 78x
      p[5] = OW'(f73);  // 73x
      p[6] = OW'(f67);  // 67x
      p[7] = OW'(f61);  // 61x
      p[8] = OW'((f27 <<< 1));  // 54x
      p[9] = OW'((f23 <<< 1));  // 46x
      p[10] = OW'((f19 <<< 1));  // 38x
      p[11] = OW'(f31);  // 31x
      p[12] = OW'((f11 <<< 1));  // 22x
      p[13] = OW'(f13);  // 13x
      p[14] = OW'((f1 <<< 2));  // 4x
    end
  end else if (ADDER_DEPTH == 3) begin : g_depth3
    // 13 adders, depth 3
    logic signed [FW-1:0] f1, f31, f23, f27, f39, f61, f11, f13, f19, f41, f45, f67, f73, f85;
    always_comb begin
      f1 = FW'(x);
      f31 = (f1 <<< 5) - f1;  // depth 1
      f23 = f31 - (f1 <<< 3);  // depth 2
      f27 = f31 - (f1 <<< 2);  // depth 2
      f39 = (f1 <<< 3) + f31;  // depth 2
      f61 = (f31 <<< 1) - f1;  // depth 2
      f11 = f27 - (f1 <<< 4);  // depth 3
      f13 = (f27 - f1) >>> 1;  // depth 3
      f19 = f27 - (f1 <<< 3);  // depth 3
      f41 = (f1 <<< 1) + f39;  // depth 3
      f45 = f61 - (f1 <<< 4);  // depth 3
      f67 = (f1 <<< 7) - f61;  // depth 3
      f73 = f27 + (f23 <<< 1);  // depth 3
      f85 = f31 + (f27 <<< 1);  // depth 3
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'((f11 <<< 3));  // 88x
      p[2] = OW'(f85);  // 85x
      p[3] = OW'((f41 <<< 1));  // 82x
      p[4] = OW'((f39 <<< 1));  // 78x
      p[5] = OW'(f73);  // 73x
      p[6] = OW'(f67);  // 67x
      p[7] = OW'(f61);  // 61x
      p[8] = OW'((f27 <<< 1));  // 54x
      p[9] = OW'((f23 <<< 1));  // 46x
      p[10] = OW'((f19 <<< 1));  // 38x
      p[11] = OW'(f31);  // 31x
      p[12] = OW'((f11 <<< 1));  // 22x
      p[13] = OW'(f13);  // 13x
      p[14] = OW'((f1 <<< 2));  // 4x
    end
  end else if (ADDER_DEPTH >= 4) begin : g_depth4
    // 13 adders, depth 3
    logic signed [FW-1:0] f1, f31, f23, f27, f39, f61, f11, f13, f19, f41, f45, f67, f73, f85;
    always_comb begin
      f1 = FW'(x);
      f31 = (f1 <<< 5) - f1;  // depth 1
      f23 = f31 - (f1 <<< 3);  // depth 2
      f27 = f31 - (f1 <<< 2);  // depth 2
      f39 = (f1 <<< 3) + f31;  // depth 2
      f61 = (f31 <<< 1) - f1;  // depth 2
      f11 = f27 - (f1 <<< 4);  // depth 3
      f13 = (f27 - f1) >>> 1;  // depth 3
      f19 = f27 - (f1 <<< 3);  // depth 3
      f41 = (f1 <<< 1) + f39;  // depth 3
      f45 = f61 - (f1 <<< 4);  // depth 3
      f67 = (f1 <<< 7) - f61;  // depth 3
      f73 = f27 + (f23 <<< 1);  // depth 3
      f85 = f31 + (f27 <<< 1);  // depth 3
      p[0] = OW'((f45 <<< 1));  // 90x
      p[1] = OW'((f11 <<< 3));  // 88x
      p[2] = OW'(f85);  // 85x
      p[3] = OW'((f41 <<< 1));  // 82x
      p[4] = OW'((f39 <<< 1));  // 78x
      p[5] = OW'(f73);  // 73x
      p[6] = OW'(f67);  // 67x
      p[7] = OW'(f61);  // 61x
      p[8] = OW'((f27 <<< 1));  // 54x
      p[9] = OW'((f23 <<< 1));  // 46x
      p[10] = OW'((f19 <<< 1));  // 38x
      p[11] = OW'(f31);  // 31x
      p[12] = OW'((f11 <<< 1));  // 22x
      p[13] = OW'(f13);  // 13x
      p[14] = OW'((f1 <<< 2));  // 4x
    end
  end

endmodule
