// abridged_addr_logic: the addressing logic of the memory subsystem.
//
// Only one address value is stored (addr_base_reg). The datapath transmits it
// once, with load_i, when a loop starts. A network of adders
// (addr_adder_network) derives every other address the loop body uses from
// that value, a final MUX level (addr_port_mux) routes the addresses of the
// current slot to the memory ports, and a local FSM (access_sequencer)
// supplies the slot number and advances the stored value by STRIDE once per
// iteration. There is no register file: one register write per iteration in
// place of one per access, and each adder's inputs change once per iteration.
// This structure is the document's; the parameters of the default are its
// five-access example, with array bases and widths of this design's choosing.
//
// Timing: a cycle with advance_i high (and the FSM active) issues one slot:
// port_en_o, port_addr_o and port_acc_o are valid in that same cycle. The
// stored value updates at the clock edge that ends the last slot.
module abridged_addr_logic
  import abr_pkg::*;
#(
  parameter int unsigned              ADDR_W    = ADDR_W_DEF,
  parameter int unsigned              NUM_PORTS = NUM_PORTS_DEF,
  parameter int unsigned              N_NODES   = DEF_NODES,
  parameter int unsigned              N_ACCS    = DEF_ACCS,
  parameter logic        [ADDR_W-1:0] STRIDE    = ADDR_W'(DEF_STRIDE),
  parameter node_t                    TREE     [N_NODES] = DEF_TREE,
  parameter int unsigned              ACC_NODE [N_ACCS]  = DEF_ACC_NODE
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic [ADDR_W-1:0] load_addr_i,
  input  logic              advance_i,
  output logic              port_en_o   [NUM_PORTS],
  output logic [ADDR_W-1:0] port_addr_o [NUM_PORTS],
  output logic [7:0]        port_acc_o  [NUM_PORTS],
  output logic [7:0]        slot_o,
  output logic [31:0]       iter_o,
  output logic              active_o
);

  logic              issue, step;
  logic [ADDR_W-1:0] base;
  logic [ADDR_W-1:0] node  [N_NODES];
  logic              valid [NUM_PORTS];

  access_sequencer #(
    .N_ACCS    (N_ACCS),
    .NUM_PORTS (NUM_PORTS)
  ) u_fsm (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_i    (load_i),
    .advance_i (advance_i),
    .active_o  (active_o),
    .issue_o   (issue),
    .slot_o    (slot_o),
    .step_o    (step),
    .iter_o    (iter_o)
  );

  addr_base_reg #(
    .ADDR_W (ADDR_W),
    .STRIDE (STRIDE)
  ) u_base (
    .clk         (clk),
    .rst_n       (rst_n),
    .load_i      (load_i),
    .load_addr_i (load_addr_i),
    .step_i      (step),
    .value_o     (base)
  );

  addr_adder_network #(
    .ADDR_W  (ADDR_W),
    .N_NODES (N_NODES),
    .TREE    (TREE)
  ) u_net (
    .base_i (base),
    .node_o (node)
  );

  addr_port_mux #(
    .ADDR_W    (ADDR_W),
    .N_NODES   (N_NODES),
    .N_ACCS    (N_ACCS),
    .NUM_PORTS (NUM_PORTS),
    .ACC_NODE  (ACC_NODE)
  ) u_mux (
    .sel_i   (slot_o),
    .node_i  (node),
    .addr_o  (port_addr_o),
    .valid_o (valid),
    .acc_o   (port_acc_o)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_en
    assign port_en_o[p] = issue && valid[p];
  end

endmodule
