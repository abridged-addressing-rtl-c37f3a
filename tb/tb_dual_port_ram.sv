// tb_dual_port_ram: checks the two-port RAM (8-bit address for speed)
// against a reference array: random reads and writes on both ports, the
// one-cycle read latency, read-first behaviour when a port reads the word
// the other port writes, and that a port without enable leaves its read
// register unchanged.
module tb_dual_port_ram;
  localparam int unsigned AW = 8, DW = 32;
  logic clk = 0, rst_n = 0;
  logic          en [2], we [2];
  logic [AW-1:0] addr [2];
  logic [DW-1:0] wdata [2], rdata [2];
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] exp_r [2];
  int checks = 0, failures = 0, n_rw_same = 0;

  dual_port_ram #(.ADDR_W(AW), .DATA_W(DW), .NUM_PORTS(2)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin en[p] = 0; we[p] = 0; addr[p] = '0; wdata[p] = '0; exp_r[p] = '0; end
    #12 rst_n = 1;
    // Fill every word through both ports.
    for (int a = 0; a < 2**AW; a += 2) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        en[p] = 1; we[p] = 1; addr[p] = AW'(a + p); wdata[p] = $urandom;
        model[a + p] = wdata[p];
      end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        en[p]    = ($urandom % 5) != 0;
        we[p]    = ($urandom % 3) == 0;
        addr[p]  = AW'($urandom);
        wdata[p] = $urandom;
      end
      if (i % 7 == 0) begin addr[1] = addr[0]; we[0] = 1; we[1] = 0; en[0] = 1; en[1] = 1; end
      if (en[0] && we[0] && en[1] && !we[1] && addr[0] == addr[1]) n_rw_same++;
      for (int p = 0; p < 2; p++) if (en[p] && !we[p]) exp_r[p] = model[addr[p]];
      for (int p = 0; p < 2; p++) if (en[p] && we[p]) model[addr[p]] = wdata[p];
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] !== exp_r[p]) begin
          failures++;
          $display("FAIL cycle %0d port %0d rdata=%h exp=%h", i, p, rdata[p], exp_r[p]);
        end
      end
    end
    checks++;
    if (n_rw_same == 0) begin failures++; $display("FAIL no read-during-write case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
