// tb_access_sequencer: checks the local FSM for five accesses on two ports
// (three slots per iteration). A reference slot counter and iteration
// counter run beside the design under random advance (stall) and
// occasional load (restart). Checked each cycle: issue only when active and
// advancing, step exactly in the last slot, slot and iteration counts. With
// advance held high one iteration must take exactly three cycles.
module tb_access_sequencer;
  logic clk = 0, rst_n = 0;
  logic load = 0, advance = 0;
  logic active, issue, step;
  logic [7:0] slot;
  logic [31:0] iter;
  int checks = 0, failures = 0;
  int m_slot = 0, m_iter = 0;
  bit m_active = 0;
  int n_stall = 0, n_step = 0, n_restart = 0;

  access_sequencer dut (.clk(clk), .rst_n(rst_n), .load_i(load), .advance_i(advance),
    .active_o(active), .issue_o(issue), .slot_o(slot), .step_o(step), .iter_o(iter));

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (slot=%0d iter=%0d)", msg, slot, iter);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    // Not active before a load: advancing must issue nothing.
    @(negedge clk);
    advance = 1;
    #1;
    checks++;
    if (active || issue) fail("issue before load");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load    = (i == 0) || (($urandom % 97) == 0);
      advance = (i > 2000) ? 1'b1 : (($urandom % 4) != 0);
      #1;
      checks++;
      if (active !== m_active) fail("active");
      checks++;
      if (issue !== (m_active && advance && !load)) fail("issue");
      checks++;
      if (step !== (m_active && advance && !load && m_slot == 2)) fail("step");
      checks++;
      if (slot !== 8'(m_slot) || iter !== 32'(m_iter)) fail("counters");
      if (m_active && !advance && !load) n_stall++;
      if (step) n_step++;
      if (load && m_active) n_restart++;
      // Reference update for the coming clock edge.
      if (load) begin m_active = 1; m_slot = 0; m_iter = 0; end
      else if (m_active && advance) begin
        if (m_slot == 2) begin m_slot = 0; m_iter++; end
        else m_slot++;
      end
    end
    // Rate: with advance held high, 30 cycles = 10 iterations.
    @(negedge clk);
    load = 1; advance = 0;
    @(negedge clk);
    load = 0; advance = 1;
    repeat (30) @(negedge clk);
    checks++;
    if (iter !== 32'd10) fail("rate: expected 10 iterations in 30 cycles");
    checks++;
    if (n_stall == 0 || n_step == 0 || n_restart == 0) fail("coverage");
    $display("stalls=%0d steps=%0d restarts=%0d", n_stall, n_step, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
