// tb_wl_sor: successive over-relaxation sweep on a 32x32 grid, in place:
// A[i][j] = f(A[i][j], A[i-1][j], A[i+1][j], A[i][j-1], A[i][j+1]) for
// i, j = 1..30, A at 0x1000, row-major (kernel shape and sizes are this
// design's reading of the benchmark name). The stored value is &A[i][j-1];
// the tree is a chain and star mix: A[i][j] = A[i][j-1] + 1, A[i][j+1] =
// A[i][j] + 1, A[i-1][j] = A[i][j] - 32, A[i+1][j] = A[i][j] + 32. Five reads
// and the write-back of A[i][j] take three slots per iteration; because the
// sweep is in place, later iterations and rows read words written earlier,
// which the testbench requires to happen.
module tb_wl_sor;
  import abr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done;
  int checks, failures, n_stall, n_idle, n_raw;

  always #5 clk = ~clk;

  localparam node_t W_TREE [5] = '{'{parent: 8'd0, mult: 8'd1, offset: 32'd0},
            '{parent: 8'd0, mult: 8'd1, offset: 32'd1},
            '{parent: 8'd1, mult: 8'd1, offset: 32'd1},
            '{parent: 8'd1, mult: 8'd1, offset: -32'sd32},
            '{parent: 8'd1, mult: 8'd1, offset: 32'd32}};
  localparam int unsigned W_ACC_NODE [6] = '{1, 3, 4, 0, 2, 1};
  localparam int W_BASE [6] = '{32'h1000, 32'h1000, 32'h1000, 32'h1000, 32'h1000, 32'h1000};
  localparam int W_DI [6] = '{0, -1, 1, 0, 0, 0};
  localparam int W_DJ [6] = '{0, 0, 0, -1, 1, 0};
  localparam bit W_IS_WR [6] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1};

  wl_runner #(
    .N_NODES(5), .N_ACCS(6), .STRIDE(16'd1),
    .TREE(W_TREE),
    .ACC_NODE(W_ACC_NODE),
    .BASE(W_BASE),
    .DI(W_DI), .DJ(W_DJ),
    .IS_WR(W_IS_WR),
    .ROOT_A(3), .NCOL(32), .I0(1), .I1(31), .J0(1), .J1(31)
  ) u_run (.clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures),
           .n_stall(n_stall), .n_idle(n_idle), .n_raw(n_raw));

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    wait (done);
    $display("stalls=%0d idle_ports=%0d reads_of_written_words=%0d", n_stall, n_idle, n_raw);
    if (n_stall == 0 || n_raw == 0) begin failures++; $display("FAIL stall or in-place read never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
