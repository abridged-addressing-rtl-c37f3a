// wl_runner: drives one loop kernel through the abridged memory subsystem
// and checks it. Used by the kernel testbenches (tb_wl_*).
//
// The kernel is a doubly nested loop over rows i = I0..I1-1 and columns
// j = J0..J1-1; the inner loop body makes N_ACCS references, reference a
// being word BASE[a] + (i+DI[a])*NCOL + (j*SJ+DJ[a]) of memory, a write if
// IS_WR[a] is set, a read otherwise. Each row is one run of the inner loop:
// the datapath sends the single address of derivation-tree node 0 (the
// reference ROOT_A at j = J0, or the column index j itself when ROOT_A is
// negative, the augmented form), then advances slot by slot with random
// stalls. The kernel's arithmetic is modelled as "every write stores the sum
// of the words read in the same iteration, xor the iteration count".
//
// Pass 1 runs the loops with every reference a write of a hash of its
// address, so every word read later holds known data; pass 2 runs the
// kernel. Every issued address is compared with the reference formula, and
// every read with a reference memory. The testbench learns checks and
// failures through the output ports when done goes high.
module wl_runner
  import abr_pkg::*;
#(
  parameter int unsigned N_NODES = 2,
  parameter int unsigned N_ACCS  = 2,
  parameter logic [15:0] STRIDE  = 16'd1,
  parameter node_t       TREE     [N_NODES] = '{default: '{parent: 8'd0, mult: 8'd1, offset: 32'd0}},
  parameter int unsigned ACC_NODE [N_ACCS]  = '{default: 0},
  parameter int          BASE     [N_ACCS]  = '{default: 0},
  parameter int          DI       [N_ACCS]  = '{default: 0},
  parameter int          DJ       [N_ACCS]  = '{default: 0},
  parameter bit          IS_WR    [N_ACCS]  = '{default: 1'b0},
  parameter int          ROOT_A   = 0,
  parameter int          NCOL     = 1,
  parameter int          SJ       = 1,
  parameter int          I0 = 0, I1 = 1, J0 = 0, J1 = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_idle,
  output int   n_raw
);
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

  localparam int SLOTS = int'(slots_for(N_ACCS, 2));

  logic [31:0] model [int];
  bit          written [int];
  logic [31:0] exp_r [2];
  bit          pend  [2];

  abridged_mem_subsystem #(
    .N_NODES(N_NODES), .N_ACCS(N_ACCS), .STRIDE(STRIDE), .TREE(TREE), .ACC_NODE(ACC_NODE)
  ) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_addr_i(load_addr), .advance_i(advance),
    .we_i(we), .wdata_i(wdata), .rdata_o(rdata), .port_en_o(port_en), .port_acc_o(port_acc),
    .port_addr_o(port_addr), .slot_o(slot), .iter_o(iter), .active_o(active));

  function automatic logic [15:0] ref_addr(input int a, input int i, input int j);
    return 16'(BASE[a] + (i + DI[a]) * NCOL + (j * SJ + DJ[a]));
  endfunction

  function automatic logic [31:0] hash(input logic [15:0] a);
    return {~a, a} ^ 32'h0F1E_2D3C;
  endfunction

  task automatic run_row(input int pass, input int i);
    int j, issued, n_it;
    logic [31:0] sum;
    @(negedge clk);
    load = 1; advance = 0;
    load_addr = (ROOT_A < 0) ? 16'(J0 * SJ) : ref_addr(ROOT_A, i, J0);
    for (int p = 0; p < 2; p++) begin we[p] = 0; pend[p] = 0; end
    @(negedge clk);
    load = 0;
    j = J0; issued = 0; n_it = 0; sum = '0;
    while (j < J1) begin
      advance = ($urandom % 5) != 0;
      #1;
      if (!advance) n_stall++;
      for (int p = 0; p < 2; p++) begin
        int a;
        a = int'(port_acc[p]);
        we[p] = 0; wdata[p] = '0; pend[p] = 0;
        if (advance && port_en[p]) begin
          checks++;
          if (port_addr[p] !== ref_addr(a, i, j)) begin
            failures++;
            $display("FAIL i=%0d j=%0d ref=%0d addr=%h exp=%h", i, j, a, port_addr[p], ref_addr(a, i, j));
          end
          if (pass == 1) begin
            we[p] = 1; wdata[p] = hash(port_addr[p]);
          end else if (IS_WR[a]) begin
            we[p] = 1; wdata[p] = sum ^ 32'(n_it);
          end else begin
            pend[p] = 1;
            exp_r[p] = model.exists(int'(port_addr[p])) ? model[int'(port_addr[p])] : 32'hDEAD_BEEF;
            sum = sum + exp_r[p];
            if (written.exists(int'(port_addr[p]))) n_raw++;
          end
        end else if (advance) n_idle++;
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        if (we[p]) begin
          model[int'(port_addr[p])] = wdata[p];
          if (pass == 2) written[int'(port_addr[p])] = 1;
        end
      end
      if (advance) begin
        issued++;
        if (issued % SLOTS == 0) begin j++; n_it++; sum = '0; end
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < 2; p++) begin
        if (pend[p]) begin
          checks++;
          if (rdata[p] !== exp_r[p]) begin
            failures++;
            $display("FAIL i=%0d read port %0d data=%h exp=%h", i, p, rdata[p], exp_r[p]);
          end
        end
      end
      @(negedge clk);
    end
    advance = 0;
    for (int p = 0; p < 2; p++) we[p] = 0;
    #1;
    checks++;
    if (iter !== 32'(J1 - J0)) begin failures++; $display("FAIL row %0d: %0d iterations", i, iter); end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_stall = 0; n_idle = 0; n_raw = 0;
    for (int p = 0; p < 2; p++) begin we[p] = 0; wdata[p] = '0; end
    @(posedge rst_n);
    for (int pass = 1; pass <= 2; pass++)
      for (int i = I0; i < I1; i++) run_row(pass, i);
    done = 1;
  end
endmodule
