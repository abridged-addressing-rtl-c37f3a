// tb_abridged_mem_subsystem: end-to-end test of the memory subsystem at its
// default parameters (16-bit addresses, 32-bit data, dual-port RAM, the
// five-access loop A[k], B[k], B[k+1], A[3k], B[3k] with A = 0x100 and
// B = 0x800). A small datapath model sends one address per loop and uses
// port_acc_o to decide what each port does.
//   Pass 1 writes every address the loop touches (data = hash of address).
//   Pass 2 runs the loop body
//       t = A[k] + B[k] + B[k+1] + A[3k];  B[3k] = t ^ k
//   reading four words and writing one per iteration, with random stalls,
//   so later iterations read words that earlier ones wrote.
//   Pass 3 reads everything back.
// A reference memory in the testbench checks every read, and each issued
// address is compared with the one computed from the array reference. It
// also counts the mechanisms (loads, stalls, iteration steps, the idle port
// of the last slot, reads of words written in the same loop) and checks
// the rate: without stalls one iteration takes exactly three cycles.
module tb_abridged_mem_subsystem;
  localparam int unsigned A = 'h100, B = 'h800;
  localparam int K = 1500;

  logic clk = 0, rst_n = 0;
  logic        load = 0, advance = 0;
  logic [15:0] load_addr = '0;
  logic        we    [2];
  logic [31:0] wdata [2];
  logic [31:0] rdata [2];
  logic        port_en   [2];
  logic [7:0]  port_acc  [2];
  logic [15:0] port_addr [2];
  logic [7:0]  slot;
  logic [31:0] iter;
  logic        active;

  int checks = 0, failures = 0;
  logic [31:0] model [int];
  bit          written2 [int];
  logic [31:0] exp_r [2];
  bit          pend  [2];
  logic [31:0] t_sum;
  int n_load = 0, n_stall = 0, n_step = 0, n_idle = 0, n_raw = 0, n_rd = 0, n_wr = 0;

  abridged_mem_subsystem dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_addr_i(load_addr), .advance_i(advance),
    .we_i(we), .wdata_i(wdata), .rdata_o(rdata), .port_en_o(port_en), .port_acc_o(port_acc),
    .port_addr_o(port_addr), .slot_o(slot), .iter_o(iter), .active_o(active));

  always #5 clk = ~clk;

  function automatic logic [31:0] hash(input logic [15:0] a);
    return {a, ~a} ^ 32'h5A5A_1234;
  endfunction

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pass: 1 = fill, 2 = compute, 3 = read back
  task automatic run_pass(input int pass, input int iters, input bit stalls);
    int k, issued, cycles;
    @(negedge clk);
    load = 1; load_addr = 16'(A); advance = 0;
    for (int p = 0; p < 2; p++) begin we[p] = 0; pend[p] = 0; end
    n_load++;
    @(negedge clk);
    load = 0;
    k = 0; issued = 0; cycles = 0; t_sum = '0;
    while (issued < iters * 3) begin
      advance = stalls ? (($urandom % 4) != 0) : 1'b1;
      #1;
      cycles++;
      if (!advance) n_stall++;
      for (int p = 0; p < 2; p++) begin
        int acc;
        acc = int'(port_acc[p]);
        we[p] = 0; wdata[p] = '0; pend[p] = 0;
        if (advance && port_en[p]) begin
          checks++;
          if (port_addr[p] !== ref_addr(acc, k)) begin
            failures++;
            $display("FAIL pass %0d k=%0d acc=%0d addr=%h exp=%h", pass, k, acc, port_addr[p], ref_addr(acc, k));
          end
          if (pass == 1) begin
            we[p] = 1; wdata[p] = hash(port_addr[p]);
          end else if (pass == 2 && acc == 4) begin
            we[p] = 1; wdata[p] = t_sum ^ 32'(k);
          end else begin
            pend[p] = 1;
            exp_r[p] = model.exists(int'(port_addr[p])) ? model[int'(port_addr[p])] : 32'hDEAD_BEEF;
            if (pass == 2) t_sum = t_sum + exp_r[p];
            if (written2.exists(int'(port_addr[p]))) n_raw++;
          end
        end else if (advance) n_idle++;
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        if (we[p]) begin
          model[int'(port_addr[p])] = wdata[p];
          if (pass == 2) written2[int'(port_addr[p])] = 1;
          n_wr++;
        end
      end
      if (advance) begin
        issued++;
        if (issued % 3 == 0) begin k++; t_sum = '0; end
      end
      @(posedge clk);
      #1;
      if (advance && issued % 3 == 0 && issued > 0) n_step++;
      for (int p = 0; p < 2; p++) begin
        if (pend[p]) begin
          checks++;
          n_rd++;
          if (rdata[p] !== exp_r[p]) begin
            failures++;
            $display("FAIL pass %0d read port %0d data=%h exp=%h", pass, p, rdata[p], exp_r[p]);
          end
        end
      end
      @(negedge clk);
    end
    advance = 0;
    for (int p = 0; p < 2; p++) we[p] = 0;
    #1;
    checks++;
    if (iter !== 32'(iters)) begin failures++; $display("FAIL pass %0d iter=%0d", pass, iter); end
    if (!stalls) begin
      checks++;
      if (cycles != iters * 3) begin failures++; $display("FAIL rate: %0d cycles for %0d iterations", cycles, iters); end
    end
  endtask

  initial begin
    for (int p = 0; p < 2; p++) begin we[p] = 0; wdata[p] = '0; end
    #12 rst_n = 1;
    run_pass(1, K + 1, 0);
    run_pass(2, K, 1);
    run_pass(3, K, 0);
    $display("loads=%0d stalls=%0d steps=%0d idle_ports=%0d reads=%0d writes=%0d read_after_write=%0d",
             n_load, n_stall, n_step, n_idle, n_rd, n_wr, n_raw);
    checks++;
    if (n_load == 0 || n_stall == 0 || n_step == 0 || n_idle == 0 || n_rd == 0 || n_wr == 0 || n_raw == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
