// xor_tree: M-input parity generator built as a binary tree of 2-input XORs.
//
// The inputs are padded with zeros up to the next power of two, N = 2**L with
// L = ceil(log2 M), and reduced over L levels of xor2_cell; level k+1 node j
// is the XOR of level k nodes 2j and 2j+1. parity is 1 when an odd number of
// inputs are 1. Purely combinational, depth L cells (5 levels for the default
// 32-bit word). The tree shape follows the static-tree parity generator of the
// design; the zero padding for M not a power of two is this design's choice
// (the compact two-row layout only rearranges the same tree).
module xor_tree #(
  parameter int M = 32
) (
  input  logic [M-1:0] x,
  output logic         parity
);
  localparam int L = (M < 2) ? 1 : $clog2(M);
  localparam int N = 1 << L;

  // lvl[k] holds the N >> k node values of level k.
  logic [N-1:0] lvl [L+1];

  assign lvl[0] = N'(x);

  for (genvar k = 0; k < L; k++) begin : g_level
    for (genvar j = 0; j < (N >> (k + 1)); j++) begin : g_node
      xor2_cell u_cell (.a(lvl[k][2*j]), .b(lvl[k][2*j+1]), .y(lvl[k+1][j]));
    end
    if ((N >> (k + 1)) < N) begin : g_pad
      assign lvl[k+1][N-1:(N >> (k + 1))] = '0;
    end
  end

  assign parity = lvl[L][0];
endmodule
