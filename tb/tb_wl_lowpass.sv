// tb_wl_lowpass: three-tap low-pass filter, y[i] = (x[i-1] + 2x[i] + x[i+1]) / 4
// for i = 1..1022 over 1024 samples, x at 0x1000, y at 0x3000 (kernel shape
// and sizes are this design's reading of the benchmark name). The stored
// value is &x[i-1]; the tree derives x[i] = x[i-1] + 1, x[i+1] = x[i] + 1 and
// y[i] = x[i] + (y - x). Four accesses take two slots per iteration.
module tb_wl_lowpass;
  import abr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done;
  int checks, failures, n_stall, n_idle, n_raw;

  always #5 clk = ~clk;

  localparam node_t W_TREE [4] = '{'{parent: 8'd0, mult: 8'd1, offset: 32'd0},
            '{parent: 8'd0, mult: 8'd1, offset: 32'd1},
            '{parent: 8'd1, mult: 8'd1, offset: 32'd1},
            '{parent: 8'd1, mult: 8'd1, offset: 32'h2000}};
  localparam int unsigned W_ACC_NODE [4] = '{0, 1, 2, 3};
  localparam int W_BASE [4] = '{32'h1000, 32'h1000, 32'h1000, 32'h3000};
  localparam int W_DI [4] = '{0, 0, 0, 0};
  localparam int W_DJ [4] = '{-1, 0, 1, 0};
  localparam bit W_IS_WR [4] = '{1'b0, 1'b0, 1'b0, 1'b1};

  wl_runner #(
    .N_NODES(4), .N_ACCS(4), .STRIDE(16'd1),
    .TREE(W_TREE),
    .ACC_NODE(W_ACC_NODE),
    .BASE(W_BASE), .DI(W_DI), .DJ(W_DJ),
    .IS_WR(W_IS_WR),
    .ROOT_A(0), .NCOL(1), .I0(0), .I1(1), .J0(1), .J1(1023)
  ) u_run (.clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures),
           .n_stall(n_stall), .n_idle(n_idle), .n_raw(n_raw));

  initial begin
    repeat (30000) @(posedge clk);
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
