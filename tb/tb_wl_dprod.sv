// tb_wl_dprod: dot product kernel, s += X[i] * Y[i] for i = 0..1023,
// X at 0x1000, Y at 0x2000 (kernel shape and sizes are this design's
// reading of the benchmark name). Uses the augmented form: the stored value
// is the induction variable i itself, and both addresses are derived from it
// (X[i] = i + X, Y[i] = i + Y), one slot per iteration on the two ports. The
// kernel only reads; the sum stays in the datapath. Every address and every
// read word is checked by wl_runner.
module tb_wl_dprod;
  import abr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done;
  int checks, failures, n_stall, n_idle, n_raw;

  always #5 clk = ~clk;

  localparam node_t W_TREE [3] = '{'{parent: 8'd0, mult: 8'd1, offset: 32'd0},
            '{parent: 8'd0, mult: 8'd1, offset: 32'h1000},
            '{parent: 8'd0, mult: 8'd1, offset: 32'h2000}};
  localparam int unsigned W_ACC_NODE [2] = '{1, 2};
  localparam int W_BASE [2] = '{32'h1000, 32'h2000};
  localparam int W_DI [2] = '{0, 0};
  localparam int W_DJ [2] = '{0, 0};
  localparam bit W_IS_WR [2] = '{1'b0, 1'b0};

  wl_runner #(
    .N_NODES(3), .N_ACCS(2), .STRIDE(16'd1),
    .TREE(W_TREE),
    .ACC_NODE(W_ACC_NODE),
    .BASE(W_BASE), .DI(W_DI), .DJ(W_DJ), .IS_WR(W_IS_WR),
    .ROOT_A(-1), .NCOL(1), .I0(0), .I1(1), .J0(0), .J1(1024)
  ) u_run (.clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures),
           .n_stall(n_stall), .n_idle(n_idle), .n_raw(n_raw));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    wait (done);
    $display("stalls=%0d idle_ports=%0d reads_of_written_words=%0d", n_stall, n_idle, n_raw);
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
