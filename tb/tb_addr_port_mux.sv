// tb_addr_port_mux: checks the final MUX level with the default five
// accesses on two ports and with a three-port variant. Every node carries a
// distinct random address; for every SEL value the testbench works out
// which access each port should serve (a = SEL*ports + port) and compares
// address, valid flag and access index. SEL values past the last slot must
// leave all ports idle.
module tb_addr_port_mux;
  localparam int unsigned W = 16;
  localparam int unsigned MAP3 [7] = '{4, 3, 2, 1, 0, 0, 2};

  logic [7:0]   sel;
  logic [W-1:0] node [5];
  logic [W-1:0] addr2 [2];
  logic         val2  [2];
  logic [7:0]   acc2  [2];
  logic [W-1:0] addr3 [3];
  logic         val3  [3];
  logic [7:0]   acc3  [3];
  int checks = 0, failures = 0;

  addr_port_mux dut2 (.sel_i(sel), .node_i(node), .addr_o(addr2), .valid_o(val2), .acc_o(acc2));
  addr_port_mux #(.ADDR_W(W), .N_NODES(5), .N_ACCS(7), .NUM_PORTS(3), .ACC_NODE(MAP3))
    dut3 (.sel_i(sel), .node_i(node), .addr_o(addr3), .valid_o(val3), .acc_o(acc3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int n = 0; n < 5; n++) node[n] = W'($urandom);
      for (int s = 0; s < 5; s++) begin
        sel = 8'(s);
        #1;
        for (int p = 0; p < 2; p++) begin
          int a;
          a = s * 2 + p;
          checks++;
          if (a < 5) begin
            if (!val2[p] || addr2[p] !== node[a] || acc2[p] !== 8'(a)) begin
              failures++;
              $display("FAIL 2-port sel=%0d port=%0d v=%b addr=%h exp=%h", s, p, val2[p], addr2[p], node[a]);
            end
          end else if (val2[p]) begin
            failures++;
            $display("FAIL 2-port sel=%0d port=%0d should be idle", s, p);
          end
        end
        for (int p = 0; p < 3; p++) begin
          int a;
          a = s * 3 + p;
          checks++;
          if (a < 7) begin
            if (!val3[p] || addr3[p] !== node[MAP3[a]] || acc3[p] !== 8'(a)) begin
              failures++;
              $display("FAIL 3-port sel=%0d port=%0d", s, p);
            end
          end else if (val3[p]) begin
            failures++;
            $display("FAIL 3-port sel=%0d port=%0d should be idle", s, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
