// access_sequencer: the local FSM of the addressing logic.
//
// A loop body issues N_ACCS memory accesses per iteration, but the memory
// has only NUM_PORTS ports, so one iteration takes SLOTS = ceil(N_ACCS /
// NUM_PORTS) access slots. The FSM counts these slots; the slot number is the
// SEL that the final MUX level uses to route derived addresses to ports.
// After the last slot of an iteration it pulses step_o, so the base register
// (and through it the whole adder network) changes exactly once per
// iteration. A local FSM producing SEL is what the document describes;
// pacing by a datapath strobe (advance_i, which may stay low to stall) and
// counting iterations are this design's choices.
//
// States: IDLE until load_i; RUN afterwards. load_i restarts at slot 0 with
// the iteration count cleared. In RUN, a cycle with advance_i high issues the
// current slot (issue_o high) and moves to the next slot at the clock edge.
//
// Interface: clk, rst_n, load_i, advance_i in; active_o, issue_o, slot_o,
// step_o (combinational, in the cycle of the last slot's issue), iter_o
// (iterations completed) out.
module access_sequencer #(
  parameter int unsigned N_ACCS    = abr_pkg::DEF_ACCS,
  parameter int unsigned NUM_PORTS = abr_pkg::NUM_PORTS_DEF,
  localparam int unsigned SLOTS    = abr_pkg::slots_for(N_ACCS, NUM_PORTS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic        advance_i,
  output logic        active_o,
  output logic        issue_o,
  output logic [7:0]  slot_o,
  output logic        step_o,
  output logic [31:0] iter_o
);

  typedef enum logic {IDLE, RUN} state_t;
  state_t state;

  initial begin
    assert (SLOTS >= 1 && SLOTS <= 256)
      else $error("access_sequencer: 1..256 slots supported");
  end

  // The slot number, used as the port MUX select, never leaves 0..SLOTS-1.
  slot_in_range: assert property (@(posedge clk) disable iff (!rst_n) slot_o < 8'(SLOTS));

  assign active_o = (state == RUN);
  assign issue_o  = active_o && advance_i && !load_i;
  assign step_o   = issue_o && (slot_o == 8'(SLOTS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      slot_o <= '0;
      iter_o <= '0;
    end else if (load_i) begin
      state  <= RUN;
      slot_o <= '0;
      iter_o <= '0;
    end else if (issue_o) begin
      if (step_o) begin
        slot_o <= '0;
        iter_o <= iter_o + 1;
      end else begin
        slot_o <= slot_o + 1;
      end
    end
  end

endmodule
