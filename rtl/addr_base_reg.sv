// addr_base_reg: the one stored address of the abridged addressing scheme.
//
// A two-input MUX in front of a register: when load_i is high the register
// takes load_addr_i, the single address the datapath transmits at the start
// of a loop; when step_i is high (once per loop iteration) it takes its own
// value plus STRIDE, the compile-time address difference between two
// successive iterations; otherwise it holds. The MUX / register / constant
// adder loop is the structure the document draws. Priority of load over
// step and the reset value of zero are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), load_i, load_addr_i,
// step_i in; value_o out, the register output (new value one cycle after
// load_i or step_i).
module addr_base_reg #(
  parameter int unsigned              ADDR_W = abr_pkg::ADDR_W_DEF,
  parameter logic        [ADDR_W-1:0] STRIDE = ADDR_W'(abr_pkg::DEF_STRIDE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_i,
  input  logic [ADDR_W-1:0] load_addr_i,
  input  logic              step_i,
  output logic [ADDR_W-1:0] value_o
);

  logic [ADDR_W-1:0] next_value;

  always_comb begin
    if (load_i)      next_value = load_addr_i;
    else if (step_i) next_value = value_o + STRIDE;
    else             next_value = value_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) value_o <= '0;
    else        value_o <= next_value;
  end

endmodule
