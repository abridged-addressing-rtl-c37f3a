// addr_port_mux: the final MUX level between the adder network and the
// memory ports.
//
// Accesses are issued in loop-body order, NUM_PORTS per slot: in slot s,
// port p serves access a = s*NUM_PORTS + p, whose address is node
// ACC_NODE[a] of the adder network. If N_ACCS is not a multiple of NUM_PORTS
// the spare ports of the last slot are left idle (valid_o low). The
// document only says that a last MUX level depends on the ports; this fixed
// round-robin assignment of accesses to ports is this design's choice.
//
// Interface: sel_i (slot number) and node_i[N_NODES] in; for each port
// addr_o, valid_o and acc_o (the access index) out. Combinational.
module addr_port_mux #(
  parameter int unsigned ADDR_W    = abr_pkg::ADDR_W_DEF,
  parameter int unsigned N_NODES   = abr_pkg::DEF_NODES,
  parameter int unsigned N_ACCS    = abr_pkg::DEF_ACCS,
  parameter int unsigned NUM_PORTS = abr_pkg::NUM_PORTS_DEF,
  parameter int unsigned ACC_NODE [N_ACCS] = abr_pkg::DEF_ACC_NODE
) (
  input  logic [7:0]        sel_i,
  input  logic [ADDR_W-1:0] node_i  [N_NODES],
  output logic [ADDR_W-1:0] addr_o  [NUM_PORTS],
  output logic              valid_o [NUM_PORTS],
  output logic [7:0]        acc_o   [NUM_PORTS]
);

  initial begin
    for (int unsigned a = 0; a < N_ACCS; a++)
      assert (ACC_NODE[a] < N_NODES)
        else $error("addr_port_mux: access %0d names a missing node", a);
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic [15:0] acc;
    assign acc = 16'(sel_i) * 16'(NUM_PORTS) + 16'(p);

    always_comb begin
      addr_o[p]  = '0;
      valid_o[p] = 1'b0;
      acc_o[p]   = acc[7:0];
      for (int unsigned a = p; a < N_ACCS; a += NUM_PORTS) begin
        if (acc == 16'(a)) begin
          addr_o[p]  = node_i[ACC_NODE[a]];
          valid_o[p] = 1'b1;
        end
      end
    end
  end

endmodule
