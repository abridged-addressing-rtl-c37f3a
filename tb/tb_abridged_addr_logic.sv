// tb_abridged_addr_logic: end-to-end check of the addressing logic with its
// default parameters (accesses A[k], B[k], B[k+1], A[3k], B[3k] on two
// ports, A = 0x100, B = 0x800, k advancing by 1). The datapath side sends
// one address, &A[k0], and then advances with random stalls. For every
// issued access the expected address is computed from the array reference
// and the current k, and compared with what the port shows. Also checked:
// the last slot leaves port 1 idle, each iteration takes three issued slots
// (so 3 cycles when never stalled), and a second load restarts the loop.
module tb_abridged_addr_logic;
  localparam int unsigned A = 'h100, B = 'h800;
  logic clk = 0, rst_n = 0;
  logic load = 0, advance = 0;
  logic [15:0] load_addr = '0;
  logic        port_en   [2];
  logic [15:0] port_addr [2];
  logic [7:0]  port_acc  [2];
  logic [7:0]  slot;
  logic [31:0] iter;
  logic        active;
  int checks = 0, failures = 0;
  int k, slot_m, issued;
  int n_stall = 0, n_idle = 0, n_iter = 0, n_load = 0;

  abridged_addr_logic dut (.clk(clk), .rst_n(rst_n), .load_i(load), .load_addr_i(load_addr),
    .advance_i(advance), .port_en_o(port_en), .port_addr_o(port_addr), .port_acc_o(port_acc),
    .slot_o(slot), .iter_o(iter), .active_o(active));

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_addr(input int acc, input int kk);
    case (acc)
      0: return 16'(A + kk);
      1: return 16'(B + kk);
      2: return 16'(B + kk + 1);
      3: return 16'(A + 3 * kk);
      default: return 16'(B + 3 * kk);
    endcase
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_loop(input int k0, input int iters, input bit stalls);
    int cycles;
    @(negedge clk);
    load = 1; load_addr = 16'(A + k0); advance = 0;
    n_load++;
    @(negedge clk);
    load = 0;
    k = k0; slot_m = 0; issued = 0; cycles = 0;
    while (issued < iters * 3) begin
      advance = stalls ? (($urandom % 3) != 0) : 1'b1;
      #1;
      cycles++;
      if (!advance) n_stall++;
      for (int p = 0; p < 2; p++) begin
        int acc;
        acc = slot_m * 2 + p;
        checks++;
        if (advance && acc < 5) begin
          if (!port_en[p] || port_addr[p] !== ref_addr(acc, k) || port_acc[p] !== 8'(acc)) begin
            failures++;
            $display("FAIL k=%0d acc=%0d en=%b addr=%h exp=%h", k, acc, port_en[p], port_addr[p], ref_addr(acc, k));
          end
        end else begin
          if (port_en[p]) begin failures++; $display("FAIL port %0d enabled when idle", p); end
          if (advance) n_idle++;
        end
      end
      if (advance) begin
        issued++;
        if (slot_m == 2) begin slot_m = 0; k++; n_iter++; end
        else slot_m++;
      end
      @(negedge clk);
    end
    advance = 0;
    #1;
    checks++;
    if (iter !== 32'(iters)) begin failures++; $display("FAIL iter=%0d exp=%0d", iter, iters); end
    if (!stalls) begin
      checks++;
      if (cycles != iters * 3) begin failures++; $display("FAIL rate: %0d cycles for %0d iterations", cycles, iters); end
    end
  endtask

  initial begin
    #12 rst_n = 1;
    run_loop(0, 50, 0);
    run_loop(int'($urandom % 1000), 200, 1);
    run_loop(21000, 100, 1);   // 3k crosses the top of the address space
    checks++;
    if (n_stall == 0 || n_idle == 0 || n_iter == 0 || n_load < 2) begin
      failures++;
      $display("FAIL coverage stall=%0d idle=%0d iter=%0d load=%0d", n_stall, n_idle, n_iter, n_load);
    end
    $display("stalls=%0d idle_ports=%0d iterations=%0d loads=%0d", n_stall, n_idle, n_iter, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
