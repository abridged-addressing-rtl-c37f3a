// abridged_mem_subsystem: memory subsystem with abridged addressing.
//
// The datapath sends a single address per loop (load_i with load_addr_i);
// the addressing logic inside the subsystem derives all the other addresses
// of the loop body with constant additions and serves them, NUM_PORTS per
// cycle, to a dual-port RAM. Data goes between the datapath and the RAM
// directly (wdata_i / rdata_o per port). Only one address bus crosses from
// the datapath, whatever the number of memory ports. Partitioning into
// addressing logic and RAM follows the document; the datapath handshake
// (advance_i as the "perform the next slot" strobe) is this design's choice.
//
// Timing: in a cycle with advance_i high, each port with port_en_o high
// accesses port_addr_o; a write stores wdata_i at that clock edge (we_i is
// gated by port_en_o), a read returns its word on rdata_o one cycle later.
// port_acc_o tells the datapath which loop-body access each port serves.
module abridged_mem_subsystem
  import abr_pkg::*;
#(
  parameter int unsigned              ADDR_W    = ADDR_W_DEF,
  parameter int unsigned              DATA_W    = DATA_W_DEF,
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
  input  logic              we_i        [NUM_PORTS],
  input  logic [DATA_W-1:0] wdata_i     [NUM_PORTS],
  output logic [DATA_W-1:0] rdata_o     [NUM_PORTS],
  output logic              port_en_o   [NUM_PORTS],
  output logic [7:0]        port_acc_o  [NUM_PORTS],
  output logic [ADDR_W-1:0] port_addr_o [NUM_PORTS],
  output logic [7:0]        slot_o,
  output logic [31:0]       iter_o,
  output logic              active_o
);

  abridged_addr_logic #(
    .ADDR_W    (ADDR_W),
    .NUM_PORTS (NUM_PORTS),
    .N_NODES   (N_NODES),
    .N_ACCS    (N_ACCS),
    .STRIDE    (STRIDE),
    .TREE      (TREE),
    .ACC_NODE  (ACC_NODE)
  ) u_addr (
    .clk         (clk),
    .rst_n       (rst_n),
    .load_i      (load_i),
    .load_addr_i (load_addr_i),
    .advance_i   (advance_i),
    .port_en_o   (port_en_o),
    .port_addr_o (port_addr_o),
    .port_acc_o  (port_acc_o),
    .slot_o      (slot_o),
    .iter_o      (iter_o),
    .active_o    (active_o)
  );

  dual_port_ram #(
    .ADDR_W    (ADDR_W),
    .DATA_W    (DATA_W),
    .NUM_PORTS (NUM_PORTS)
  ) u_ram (
    .clk     (clk),
    .rst_n   (rst_n),
    .en_i    (port_en_o),
    .we_i    (we_i),
    .addr_i  (port_addr_o),
    .wdata_i (wdata_i),
    .rdata_o (rdata_o)
  );

endmodule
