// htree_node: a subtree of the global H-tree covering 2**LEVEL leaf cells.
//
// Built recursively: a node of level L holds one htree_switch whose child
// busses are LEAF_W*2**(L-1) bits wide and two subtrees of level L-1; a node
// of level 0 is a single leaf and just connects its parent bus to the leaf
// bus. Bus width therefore doubles at every level, from LEAF_W bits at a
// cell to LEAF_W*2**LEVELS at the root (fat tree). Switches are numbered in
// heap order (root 1, children 2i and 2i+1), so the switch on the path to
// leaf i at level l is (2**LEVELS + i) >> l. Switches at even levels are
// registered, giving half a cycle per level.
// Leaves are numbered left to right: leaf_in/leaf_out slice i belongs to
// leaf i of this subtree.
// Lint note: when this module is linted on its own as the top, Verilator
// does not elaborate a top module's instances of itself, and reports
// leaf_in, cl_out and cr_out as undriven. Within mgr_array every level is
// elaborated and driven (the recursion ends at LEVEL 0 in g_leaf), and the
// array testbenches exercise all of it.
module htree_node #(
  parameter int unsigned LEVEL  = 2,
  parameter int unsigned LEAF_W = 8,
  parameter int unsigned ID     = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  mgr_pkg::cfg_cmd_t                 cfg_cmd,
  input  logic [LEAF_W*(2**LEVEL)-1:0]      p_in,      // input path from above
  output logic [LEAF_W*(2**LEVEL)-1:0]      p_out,     // output path to above
  output logic [LEAF_W*(2**LEVEL)-1:0]      leaf_in,   // to the cells, LEAF_W each
  input  logic [LEAF_W*(2**LEVEL)-1:0]      leaf_out   // from the cells, LEAF_W each
);
  if (LEVEL == 0) begin : g_leaf
    assign leaf_in = p_in;
    assign p_out   = leaf_out;
  end else begin : g_node
    localparam int unsigned N  = LEAF_W * (2**(LEVEL-1));
    localparam int unsigned NL = (LEVEL == 0) ? 0 : LEVEL - 1;
    logic [N-1:0] cl_in, cr_in, cl_out, cr_out;

    htree_switch #(.N(N), .ID(ID), .REG(LEVEL % 2 == 0)) u_sw (
      .clk, .rst_n, .cfg_cmd,
      .p_in, .p_out,
      .cl_out, .cr_out, .cl_in, .cr_in
    );

    htree_node #(.LEVEL(NL), .LEAF_W(LEAF_W), .ID(2*ID)) u_left (
      .clk, .rst_n, .cfg_cmd,
      .p_in (cl_in), .p_out (cl_out),
      .leaf_in  (leaf_in [N-1:0]),
      .leaf_out (leaf_out[N-1:0])
    );

    htree_node #(.LEVEL(NL), .LEAF_W(LEAF_W), .ID(2*ID+1)) u_right (
      .clk, .rst_n, .cfg_cmd,
      .p_in (cr_in), .p_out (cr_out),
      .leaf_in  (leaf_in [2*N-1:N]),
      .leaf_out (leaf_out[2*N-1:N])
    );
  end
endmodule
