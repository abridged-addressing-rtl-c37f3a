// addr_adder_network: derives every address of a loop body from the one
// stored value.
//
// The network is a tree given by the parameter table TREE (see abr_pkg):
// node 0 is the stored value base_i, and each node n >= 1 is computed by an
// addr_derive_node as TREE[n].mult * node[TREE[n].parent] + TREE[n].offset.
// Parents must come before their children in the table, which every rooted
// tree allows. The tree itself is the directed minimum spanning tree of the
// "cost of deriving address j from address i" graph, found offline; the
// network just lays it out in adders, as the document prescribes. When the
// stored value is the loop induction variable (the augmented graph), node 0
// is simply not used as an address.
//
// Interface: base_i (ADDR_W) in; node_o[N_NODES] (ADDR_W each) out, node_o[0]
// equal to base_i. Combinational; the outputs change only when the base
// register does, once per iteration.
module addr_adder_network
  import abr_pkg::*;
#(
  parameter int unsigned ADDR_W  = ADDR_W_DEF,
  parameter int unsigned N_NODES = DEF_NODES,
  parameter node_t       TREE [N_NODES] = DEF_TREE
) (
  input  logic [ADDR_W-1:0] base_i,
  output logic [ADDR_W-1:0] node_o [N_NODES]
);

  assign node_o[0] = base_i;

  for (genvar n = 1; n < N_NODES; n++) begin : g_node
    localparam int unsigned PARENT = int'(TREE[n].parent);

    initial begin
      assert (PARENT < n)
        else $error("addr_adder_network: node %0d must follow its parent", n);
    end

    addr_derive_node #(
      .ADDR_W (ADDR_W),
      .MULT   (int'(TREE[n].mult)),
      .OFFSET (TREE[n].offset[ADDR_W-1:0])
    ) u_node (
      .parent_i (node_o[PARENT]),
      .child_o  (node_o[n])
    );
  end

endmodule
