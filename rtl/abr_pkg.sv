// abr_pkg: types, default sizes and the default address-derivation tree of
// the abridged memory addressing subsystem.
//
// In abridged addressing the datapath hands the memory subsystem a single
// address when a loop starts. One register holds that address (or, in the
// augmented form, the loop induction variable) and is advanced once per loop
// iteration by a compile-time constant. Every other address the loop body
// needs is derived from it by a tree of small arithmetic nodes, each of the
// form
//     value[n] = MULT[n] * value[PARENT[n]] + OFFSET[n]      (mod 2**ADDR_W)
// where MULT is a small constant realised as shifted copies added together
// (wiring plus adders, no multiplier) and OFFSET is a constant. Node 0 is the
// register itself. The tree is the directed minimum spanning tree of the
// "derive j from i" graph; it is computed offline and supplied here as a
// parameter table.
//
// The default table is the five-access example A[k], B[k], B[k+1], A[3k],
// B[3k] whose spanning tree is A[k]->B[k]->B[k+1] and A[k]->A[3k]->B[3k].
// The array base addresses A and B are this design's own choice.
package abr_pkg;

  // Default widths (the address and data widths are this design's choice).
  localparam int unsigned ADDR_W_DEF    = 16;
  localparam int unsigned DATA_W_DEF    = 32;
  localparam int unsigned NUM_PORTS_DEF = 2;   // dual-port memory
  localparam int unsigned MULT_W        = 8;   // width of a node multiplier

  // One node of the derivation tree.
  typedef struct packed {
    logic [7:0]        parent;  // index of the node this one is derived from
    logic [MULT_W-1:0] mult;    // constant factor applied to the parent (>= 1)
    logic [31:0]       offset;  // constant added (two's complement, truncated)
  } node_t;

  // Default configuration: the five-access example, stored value = &A[k].
  localparam logic [31:0] BASE_A = 32'h0000_0100;
  localparam logic [31:0] BASE_B = 32'h0000_0800;

  localparam int unsigned DEF_NODES  = 5;
  localparam int unsigned DEF_ACCS   = 5;
  localparam logic [31:0] DEF_STRIDE = 32'd1;   // k advances by 1

  // Node 0 (the register) has no entry of its own; its table row is ignored.
  localparam node_t DEF_TREE [DEF_NODES] = '{
    '{parent: 8'd0, mult: 8'd1, offset: 32'd0},                  // 0: A[k]  (register)
    '{parent: 8'd0, mult: 8'd1, offset: BASE_B - BASE_A},        // 1: B[k]   = A[k] + (B-A)
    '{parent: 8'd1, mult: 8'd1, offset: 32'd1},                  // 2: B[k+1] = B[k] + 1
    '{parent: 8'd0, mult: 8'd3, offset: 32'd0 - 2 * BASE_A},     // 3: A[3k]  = 3*A[k] - 2A
    '{parent: 8'd3, mult: 8'd1, offset: BASE_B - BASE_A}         // 4: B[3k]  = A[3k] + (B-A)
  };

  // Access order in the loop body: access a is served from node DEF_ACC_NODE[a].
  localparam int unsigned DEF_ACC_NODE [DEF_ACCS] = '{0, 1, 2, 3, 4};

  // Number of memory cycles needed to issue n accesses on p ports.
  function automatic int unsigned slots_for(int unsigned n, int unsigned p);
    return (n + p - 1) / p;
  endfunction

  // Address step between two successive iterations of the innermost loop for
  // a reference A[c1*i1+..+k1]..[cr*i1+..+kr] to an array with dimensions
  // N1..Nr: Ad = (N2..Nr)*c1n + (N3..Nr)*c2n + ... + Nr*c(r-1)n + crn, where
  // cjn is the coefficient of the innermost induction variable in index j.
  // dims[j] and coef[j] are given for j = 0..rank-1 (outermost first).
  function automatic longint addr_delta(int unsigned rank,
                                        int unsigned dims [4],
                                        int          coef [4]);
    longint acc = 0;
    for (int unsigned j = 0; j < rank; j++) begin
      longint w = 1;
      for (int unsigned m = j + 1; m < rank; m++) w = w * dims[m];
      acc = acc + w * coef[j];
    end
    return acc;
  endfunction

endpackage
