// dual_port_ram: the two-port data memory behind the addressing logic.
//
// 2**ADDR_W words of DATA_W bits, written as an array. Each port has its own
// enable, write enable, address and data. Reads are synchronous: rdata_o[p]
// shows the word addressed in a cycle with en_i[p] high and we_i[p] low at
// the following clock edge, and holds otherwise. A read of the address being
// written in the same cycle returns the old word (read-first). If both ports
// write one address in the same cycle, port NUM_PORTS-1 wins. The document
// names a dual-port RAM only; these timing details are this design's choices.
//
// Interface: clk, rst_n (clears the read registers only); per port en_i,
// we_i, addr_i, wdata_i in and rdata_o out.
module dual_port_ram #(
  parameter int unsigned ADDR_W    = abr_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W    = abr_pkg::DATA_W_DEF,
  parameter int unsigned NUM_PORTS = abr_pkg::NUM_PORTS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i    [NUM_PORTS],
  input  logic              we_i    [NUM_PORTS],
  input  logic [ADDR_W-1:0] addr_i  [NUM_PORTS],
  input  logic [DATA_W-1:0] wdata_i [NUM_PORTS],
  output logic [DATA_W-1:0] rdata_o [NUM_PORTS]
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      if (en_i[p] && we_i[p]) mem[addr_i[p]] <= wdata_i[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NUM_PORTS; p++) rdata_o[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < NUM_PORTS; p++) begin
        if (en_i[p] && !we_i[p]) rdata_o[p] <= mem[addr_i[p]];
      end
    end
  end

endmodule
