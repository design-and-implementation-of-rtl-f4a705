// karatsuba_mult: unsigned W x W multiplier built with the Karatsuba formula,
// applied recursively LEVELS times.
//
// Each level splits both operands at L = w/2 into a high part (H = w - L bits)
// and a low part (L bits), X = XH*2^L + XL, and forms three products instead
// of four:
//   A = XH*YH, C = XL*YL, M = (XH+XL)*(YH+YL)
//   X*Y = A*2^(2L) + (M - A - C)*2^L + C
// The middle product has operands one bit wider (H+1). Each of the three
// products is split again at the next level; after LEVELS levels (or once
// the operands are narrower than 4 bits) plain products are used.
//
// The recursion is unrolled into a tree of 1 + 3 + 9 + ... nodes held in
// flat arrays: node n of level d has children 3n (A), 3n+1 (C) and 3n+2 (M)
// on level d+1. Operands flow down the tree, products flow up. All nodes of a
// level are given the width of the widest (the middle branch); the unused
// high operand bits of the A and C branches are constant zero and vanish in
// synthesis.
//
// Recombination at every node: A*2^(2L) and C never overlap, so they are
// concatenated as {A, C}. The remaining terms M*2^L, -A*2^L and -C*2^L are
// added as one's complements; the two "+1" corrections of the negations enter
// as the carry-ins of two carry-save rows (4:2 reduction) that feed a single
// carry-propagate adder. Arithmetic is modulo 2^(2w), which is exact because
// the product fits.
//
// The split and the three-product formula follow the design description; the
// carry-save recombination, the recursion limit and the odd-width split (high
// part takes the extra bit) are this implementation's own choices.
// Purely combinational: p is valid in the same cycle as a and b.
module karatsuba_mult #(
  parameter int unsigned W      = 16,
  parameter int unsigned LEVELS = 1
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // operand width of the nodes on level d
  function automatic int unsigned lvl_w(input int unsigned d);
    int unsigned w = W;
    for (int unsigned i = 0; i < d; i++) w = (w - w / 2) + 1;
    return w;
  endfunction

  // number of levels that are actually split
  function automatic int unsigned eff_levels();
    int unsigned n = 0;
    while (n < LEVELS && lvl_w(n) >= 4) n++;
    return n;
  endfunction

  // index of the first node of level d
  function automatic int unsigned lvl_off(input int unsigned d);
    return (3 ** d - 1) / 2;
  endfunction

  localparam int unsigned LV    = eff_levels();
  localparam int unsigned NODES = (3 ** (LV + 1) - 1) / 2;

  logic [W-1:0]   opa  [NODES];
  logic [W-1:0]   opb  [NODES];
  logic [2*W-1:0] prod [NODES];

  assign opa[0] = a;
  assign opb[0] = b;
  assign p      = prod[0];

  for (genvar d = 0; d <= LV; d++) begin : g_lvl
    localparam int unsigned WD = lvl_w(d);
    for (genvar n = 0; n < 3 ** d; n++) begin : g_node
      localparam int unsigned ID = lvl_off(d) + n;

      if (d == LV) begin : g_leaf
        // plain product at the bottom of the tree
        assign prod[ID] = (2*W)'(opa[ID][WD-1:0]) * (2*W)'(opb[ID][WD-1:0]);
      end else begin : g_split
        localparam int unsigned L  = WD / 2;
        localparam int unsigned H  = WD - L;
        localparam int unsigned P2 = 2 * WD;
        localparam int unsigned CA = lvl_off(d + 1) + 3 * n;   // A = XH*YH
        localparam int unsigned CC = CA + 1;                   // C = XL*YL
        localparam int unsigned CM = CA + 2;                   // M = (XH+XL)*(YH+YL)

        // operands of the three sub-products
        assign opa[CA] = W'(opa[ID][WD-1:L]);
        assign opb[CA] = W'(opb[ID][WD-1:L]);
        assign opa[CC] = W'(opa[ID][L-1:0]);
        assign opb[CC] = W'(opb[ID][L-1:0]);
        assign opa[CM] = W'((H+1)'(opa[ID][WD-1:L]) + (H+1)'(opa[ID][L-1:0]));
        assign opb[CM] = W'((H+1)'(opb[ID][WD-1:L]) + (H+1)'(opb[ID][L-1:0]));

        // recombination: {A,C} + M<<L + ~(A<<L) + ~(C<<L) + 2
        logic [P2-1:0] op_ac, op_m, op_na, op_nc, s1, c1, s2, c2;
        assign op_ac = {prod[CA][2*H-1:0], prod[CC][2*L-1:0]};
        assign op_m  = P2'(prod[CM][2*H+1:0]) << L;
        assign op_na = ~(P2'(prod[CA][2*H-1:0]) << L);
        assign op_nc = ~(P2'(prod[CC][2*L-1:0]) << L);

        csa_3to2 #(.W(P2)) u_csa1 (.a(op_ac), .b(op_m), .c(op_na), .cin(1'b1),
                                   .sum(s1), .carry(c1));
        csa_3to2 #(.W(P2)) u_csa2 (.a(s1), .b(c1), .c(op_nc), .cin(1'b1),
                                   .sum(s2), .carry(c2));

        assign prod[ID] = (2*W)'(s2 + c2);
      end
    end
  end

endmodule
