// adder_tree: sums N signed operands with a balanced tree of two-input adders.
//
// How it works: the operands are the leaves of a binary tree (padded with
// zeros to a power of two); each internal node adds its two children, so the
// depth is ceil(log2 N) adders. Node i has children 2i+1 and 2i+2 and the
// root, node 0, is the sum. Every node is OUT_W bits wide, enough that no
// partial sum can overflow. The document uses such a tree to add the
// products and the bias of an output neuron.
//
// Interface: `operand[N]` (IN_W-bit signed), `sum` (OUT_W-bit signed).
// Combinational.
module adder_tree #(
  parameter int unsigned N     = 29,
  parameter int unsigned IN_W  = 36,
  parameter int unsigned OUT_W = IN_W + $clog2(N)
) (
  input  logic signed [IN_W-1:0]  operand [N],
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned NP = (N < 2) ? 2 : (1 << $clog2(N));

  logic signed [OUT_W-1:0] node [2*NP-1];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_op
      assign node[NP-1+i] = OUT_W'(operand[i]);
    end else begin : g_pad
      assign node[NP-1+i] = '0;
    end
  end

  for (genvar i = 0; i < NP - 1; i++) begin : g_add
    assign node[i] = node[2*i+1] + node[2*i+2];
  end

  assign sum = node[0];

endmodule
