// tb_wl_example: the introductory two-access loop x = a[i] + b[i+1], with
// the loop variable stepping by 2 as in the register adder of that example.
// The stored value is &a[i]; the only derived address is
// &b[i+1] = &a[i] + (B - A + 1), so both references go out in one slot on
// the two ports and an iteration takes one cycle. a is at 0x100, b at 0x800
// (this design's choice); i = 0, 2, ..., 1022. The register step is not
// typed in by hand: it comes from the package's address-step formula for the
// one-dimensional reference a[2j] (dimension 1024, coefficient 2), which the
// testbench also checks against the expected value 2, together with the
// step of a column walk through a 32x32 array (32) and of a diagonal walk
// A[j][j] (33).
module tb_wl_example;
  import abr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done;
  int checks, failures, n_stall, n_idle, n_raw;
  int extra_checks = 0, extra_failures = 0;

  always #5 clk = ~clk;

  localparam int unsigned D1 [4] = '{1024, 1, 1, 1};
  localparam int          C1 [4] = '{2, 0, 0, 0};
  localparam int unsigned D2 [4] = '{32, 32, 1, 1};
  localparam int          C2 [4] = '{1, 0, 0, 0};
  localparam int          C3 [4] = '{1, 1, 0, 0};
  localparam logic [15:0] STEP = 16'(addr_delta(1, D1, C1));

  localparam node_t W_TREE [2] = '{'{parent: 8'd0, mult: 8'd1, offset: 32'd0},
                                   '{parent: 8'd0, mult: 8'd1, offset: 32'h0800 - 32'h0100 + 32'd1}};
  localparam int unsigned W_ACC_NODE [2] = '{0, 1};
  localparam int W_BASE [2] = '{32'h0100, 32'h0800};
  localparam int W_DI [2] = '{0, 0};
  localparam int W_DJ [2] = '{0, 1};
  localparam bit W_IS_WR [2] = '{1'b0, 1'b0};

  wl_runner #(
    .N_NODES(2), .N_ACCS(2), .STRIDE(STEP),
    .TREE(W_TREE), .ACC_NODE(W_ACC_NODE), .BASE(W_BASE), .DI(W_DI), .DJ(W_DJ), .IS_WR(W_IS_WR),
    .ROOT_A(0), .NCOL(1), .SJ(2), .I0(0), .I1(1), .J0(0), .J1(512)
  ) u_run (.clk(clk), .rst_n(rst_n), .done(done), .checks(checks), .failures(failures),
           .n_stall(n_stall), .n_idle(n_idle), .n_raw(n_raw));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    extra_checks = 3;
    if (STEP != 16'd2) extra_failures++;
    if (addr_delta(2, D2, C2) != 32) extra_failures++;
    if (addr_delta(2, D2, C3) != 33) extra_failures++;
    #12 rst_n = 1;
    wait (done);
    $display("stalls=%0d idle_ports=%0d", n_stall, n_idle);
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    if (extra_failures != 0) $display("FAIL address-step formula");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  end
endmodule
