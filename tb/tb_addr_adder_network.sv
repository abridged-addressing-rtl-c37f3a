// tb_addr_adder_network: checks the derivation tree in two configurations.
// (1) The default five-access tree, root &A[k]: for each k the five node
// outputs must equal A+k, B+k, B+k+1, A+3k, B+3k with A = 0x100 and
// B = 0x800. (2) The augmented tree of the B[11k] / B[5k] example, whose
// root holds the induction variable k: nodes must equal 11k+B and 5k+B.
// Expected addresses are computed from the array references directly, not
// from the tree.
module tb_addr_adder_network;
  import abr_pkg::*;
  localparam int unsigned W = 16;
  localparam int unsigned A = 'h100, B = 'h800;

  localparam node_t AUG_TREE [3] = '{
    '{parent: 8'd0, mult: 8'd1,  offset: 32'd0},
    '{parent: 8'd0, mult: 8'd11, offset: 32'(B)},
    '{parent: 8'd0, mult: 8'd5,  offset: 32'(B)}
  };

  logic [W-1:0] base1, base2;
  logic [W-1:0] n1 [5];
  logic [W-1:0] n2 [3];
  int checks = 0, failures = 0;

  addr_adder_network dut1 (.base_i(base1), .node_o(n1));
  addr_adder_network #(.ADDR_W(W), .N_NODES(3), .TREE(AUG_TREE)) dut2 (.base_i(base2), .node_o(n2));

  task automatic chk(input logic [W-1:0] got, input int unsigned exp, input string what, input int k);
    checks++;
    if (got !== W'(exp)) begin
      failures++;
      $display("FAIL %s k=%0d got=%h exp=%h", what, k, got, W'(exp));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int unsigned kk;
      kk = (k < 1000) ? k : ($urandom & 16'hFFFF);
      base1 = W'(A + kk);
      base2 = W'(kk);
      #1;
      chk(n1[0], A + kk,         "A[k]",   k);
      chk(n1[1], B + kk,         "B[k]",   k);
      chk(n1[2], B + kk + 1,     "B[k+1]", k);
      chk(n1[3], A + 3 * kk,     "A[3k]",  k);
      chk(n1[4], B + 3 * kk,     "B[3k]",  k);
      chk(n2[1], B + 11 * kk,    "B[11k]", k);
      chk(n2[2], B + 5 * kk,     "B[5k]",  k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
