// tb_addr_derive_node: checks the shift-and-add derivation node against a
// plain multiplication. Four instances cover the edges used in the
// examples: +constant (MULT 1), 3x with a negative offset, 5x and 11x (the
// augmented-graph edges k -> B[5k] and k -> B[11k]). Parent values are
// random plus the extremes; the expected value is MULT*parent+OFFSET taken
// modulo 2**ADDR_W.
module tb_addr_derive_node;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] OFF0 = 16'h0700;
  localparam logic [W-1:0] OFF1 = 16'hFE00;   // -2*0x100
  localparam logic [W-1:0] OFF2 = 16'h0800;
  localparam logic [W-1:0] OFF3 = 16'h0800;

  logic [W-1:0] parent;
  logic [W-1:0] c0, c1, c2, c3;
  int checks = 0, failures = 0;

  addr_derive_node #(.ADDR_W(W), .MULT(1),  .OFFSET(OFF0)) u0 (.parent_i(parent), .child_o(c0));
  addr_derive_node #(.ADDR_W(W), .MULT(3),  .OFFSET(OFF1)) u1 (.parent_i(parent), .child_o(c1));
  addr_derive_node #(.ADDR_W(W), .MULT(5),  .OFFSET(OFF2)) u2 (.parent_i(parent), .child_o(c2));
  addr_derive_node #(.ADDR_W(W), .MULT(11), .OFFSET(OFF3)) u3 (.parent_i(parent), .child_o(c3));

  task automatic check(input logic [W-1:0] got, input int unsigned m, input logic [W-1:0] off);
    logic [W-1:0] exp;
    exp = W'((int'(parent) * int'(m) + int'(off)) & 32'hFFFF);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL parent=%h mult=%0d off=%h got=%h exp=%h", parent, m, off, got, exp);
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
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: parent = '0;
        1: parent = '1;
        2: parent = 16'h0100;
        default: parent = W'($urandom);
      endcase
      #1;
      check(c0, 1, OFF0);
      check(c1, 3, OFF1);
      check(c2, 5, OFF2);
      check(c3, 11, OFF3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
