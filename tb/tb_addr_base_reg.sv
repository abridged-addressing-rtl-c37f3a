// tb_addr_base_reg: checks the single address register with the stride of
// the two-access example (step 2): load, step, hold, load taking priority
// over step, and the reset value. A reference value is kept in the
// testbench and compared after every clock edge.
module tb_addr_base_reg;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] STRIDE = 16'd2;

  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0;
  logic [W-1:0] load_addr = '0, value, model;
  int checks = 0, failures = 0;
  int n_load = 0, n_step = 0, n_both = 0;

  addr_base_reg #(.ADDR_W(W), .STRIDE(STRIDE)) dut (
    .clk(clk), .rst_n(rst_n), .load_i(load), .load_addr_i(load_addr),
    .step_i(step), .value_o(value));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12;
    checks++;
    if (value !== '0) begin failures++; $display("FAIL reset value %h", value); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load      = ($urandom % 10) == 0;
      step      = ($urandom % 3) != 0;
      load_addr = W'($urandom);
      if (load && step) n_both++;
      if (load) begin model = load_addr; n_load++; end
      else if (step) begin model = model + 16'd2; n_step++; end
      @(posedge clk);
      #1;
      checks++;
      if (value !== model) begin
        failures++;
        $display("FAIL cycle %0d value=%h exp=%h", i, value, model);
      end
    end
    checks++;
    if (n_load == 0 || n_step == 0 || n_both == 0) begin
      failures++;
      $display("FAIL coverage load=%0d step=%0d both=%0d", n_load, n_step, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
