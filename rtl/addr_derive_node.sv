// addr_derive_node: one edge of the address-derivation tree.
//
// Computes child_o = MULT * parent_i + OFFSET modulo 2**ADDR_W. MULT is a
// compile-time constant; it is realised as the sum of the parent shifted left
// by the position of each set bit of MULT, so the node holds only fixed
// wiring and adders: MULT = 1 costs one adder (the constant offset), and for
// instance MULT = 11 = 8+2+1 costs two more adders for the shifted copies.
// Because array addresses are affine in the loop variable, any address whose
// loop coefficient is an integer multiple of its parent's can be derived this
// way. Shift-and-add for a constant factor and the add-a-constant edge follow
// the document's adder networks; packaging one edge as its own module is this
// design's choice.
//
// The default parameters are the edge of the two-access example,
// b[i+1] = a[i] + (B - A + 1), with the array bases of abr_pkg.
//
// Interface: parent_i (ADDR_W) in, child_o (ADDR_W) out. Purely combinational.
module addr_derive_node #(
  parameter int unsigned              ADDR_W = abr_pkg::ADDR_W_DEF,
  parameter int unsigned              MULT   = 1,
  parameter logic        [ADDR_W-1:0] OFFSET = ADDR_W'(abr_pkg::BASE_B - abr_pkg::BASE_A + 1)
) (
  input  logic [ADDR_W-1:0] parent_i,
  output logic [ADDR_W-1:0] child_o
);

  initial begin
    assert (MULT >= 1 && MULT < (1 << abr_pkg::MULT_W))
      else $error("addr_derive_node: MULT must be 1..%0d", (1 << abr_pkg::MULT_W) - 1);
  end

  logic [ADDR_W-1:0] scaled;

  always_comb begin
    scaled = '0;
    for (int unsigned b = 0; b < abr_pkg::MULT_W; b++) begin
      if (((MULT >> b) & 1) != 0) scaled = scaled + (parent_i << b);
    end
    child_o = scaled + OFFSET;
  end

endmodule
