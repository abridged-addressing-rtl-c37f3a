# Abridged memory addressing

A loop that reads and writes several arrays produces a new memory address
for every reference in every iteration. Sending all of those addresses from
the datapath to the memory costs bus switching; keeping one register per
reference inside the memory subsystem (so that only the first iteration's
addresses cross the bus) costs a register-file read and write for every
access. Abridged addressing avoids both:

* the datapath sends **one** address to the memory subsystem when a loop
  starts;
* the memory subsystem stores only that one value and advances it by a
  compile-time constant once per iteration;
* every other address of the loop body is **derived** from it by a small,
  fixed network of adders (constant offsets, and constant factors built from
  shifts and adds — no multiplier), laid out as a spanning tree;
* a final MUX level puts the derived addresses on the memory ports, slot by
  slot, under a small local state machine.

So there is one register write per iteration instead of one per access, each
adder's inputs change only once per iteration, and only one address bus
crosses from the datapath whatever the number of memory ports.

This repository holds synthesizable SystemVerilog for that memory subsystem
(addressing logic plus a dual-port RAM), with a self-checking testbench for
each unit, an end-to-end testbench, and kernel testbenches.

## How addresses are derived

Array references in a loop are affine in the loop variable, for example
`&A[3k] = A + 3k`. If one reference is stored, say `&A[k] = A + k`, any other
whose loop coefficient is an integer multiple of the stored one follows by
a constant multiply-and-add:

```
&B[k]   = &A[k] + (B - A)
&B[k+1] = &B[k] + 1
&A[3k]  = 3 * &A[k] - 2A          (3x = (x << 1) + x)
&B[3k]  = &A[3k] + (B - A)
```

Each line is one *node* of the derivation tree:
`value[n] = MULT[n] * value[PARENT[n]] + OFFSET[n]`, taken modulo
`2**ADDR_W`, so negative offsets are simply two's complement constants. The
register is node 0. A node with `MULT = 1` costs one adder; a larger factor
adds one adder per additional set bit (`11 = 8 + 2 + 1` costs two more).

Which node is derived from which is a graph problem solved before synthesis:
build a directed graph whose edge `i -> j` is weighted by the number of
adders needed to derive `j` from `i`, and take its directed minimum spanning
tree (Chu-Liu/Edmonds). The graph is directed because deriving `A[3k]` from
`A[k]` is cheap while the reverse is not. It can also pay to add an extra
root node for the induction variable `k` itself (the *augmented* graph): for
`B[11k]` and `B[5k]`, deriving each from `k` (`11k + B`, `5k + B`) is cheaper
than deriving one from the other. Both trees are computed and the cheaper
one is built. With the augmented root, node 0 holds `k` and is simply not
used as an address.

The spanning-tree search is not hardware and is not part of this RTL: the
tree is a parameter table (`TREE`, an array of `abr_pkg::node_t`), and the
hardware lays it out exactly as given. The default table is the five-access
example `A[k], B[k], B[k+1], A[3k], B[3k]` above, whose spanning tree is
`A[k] -> B[k] -> B[k+1]` and `A[k] -> A[3k] -> B[3k]`. The array bases
`A = 0x100` and `B = 0x800` are arbitrary choices.

`abr_pkg::addr_delta` computes the per-iteration step of a reference to an
r-dimensional array: with dimensions `N1..Nr` and innermost-loop coefficients
`c1..cr`, `Ad = (N2..Nr)c1 + (N3..Nr)c2 + ... + Nr c(r-1) + cr`. That value is
the `STRIDE` parameter of the stored reference.

## Block structure

```
             load, load_addr         advance
 datapath ----------------+  +----------------+
                          v  v                v
               +---------------+   step   +------------------+
               | addr_base_reg |<---------| access_sequencer |
               +---------------+          +------------------+
                          | base                 | slot (SEL)
                          v                      v
               +--------------------+   +---------------+   A1, A2   +---------------+
               | addr_adder_network |-->| addr_port_mux |----------->| dual_port_ram |
               | (addr_derive_node) |   +---------------+            +---------------+
               +--------------------+                             D1, D2 <-> datapath
```

| File | Role |
|---|---|
| `rtl/abr_pkg.sv` | node type, default sizes and tree, `slots_for`, `addr_delta` |
| `rtl/addr_base_reg.sv` | the single stored value: load MUX, register, `+STRIDE` loop |
| `rtl/addr_derive_node.sv` | one tree edge, `MULT * parent + OFFSET` by shift-and-add |
| `rtl/addr_adder_network.sv` | the tree of derive nodes |
| `rtl/addr_port_mux.sv` | final MUX level: derived address per port per slot |
| `rtl/access_sequencer.sv` | local FSM: slot counter (SEL), once-per-iteration step |
| `rtl/abridged_addr_logic.sv` | the addressing logic: the four blocks above |
| `rtl/dual_port_ram.sv` | two-port RAM, `2**ADDR_W` words |
| `rtl/abridged_mem_subsystem.sv` | top: addressing logic plus RAM |

## Sequencing: slots, iterations and the datapath handshake

A loop body with `N_ACCS` references on a `NUM_PORTS`-port memory needs
`SLOTS = ceil(N_ACCS / NUM_PORTS)` cycles per iteration. Accesses are issued
in program order: in slot `s`, port `p` serves access `a = s*NUM_PORTS + p`,
whose address is node `ACC_NODE[a]`. When `N_ACCS` is not a multiple of the
port count, the spare ports of the last slot stay idle. For the default (5
accesses, 2 ports) that is 3 slots, and port 1 idles in slot 2.

Top-level protocol (all signals synchronous to `clk`, reset `rst_n`
asynchronous and active low):

1. Pulse `load_i` for one cycle with `load_addr_i` = the value of node 0 for
   the first iteration (`&A[k0]`, or `k0` itself with an augmented root).
   This sets the register, slot 0, and clears `iter_o`. `load_i` wins over
   `advance_i` in the same cycle, and may be repeated at any time to start
   another loop.
2. Each cycle the datapath holds `advance_i` high, the current slot is
   issued: `port_en_o[p]`, `port_addr_o[p]` and `port_acc_o[p]` (which
   loop-body access this is) are valid in that same cycle. The datapath
   chooses read or write per port with `we_i[p]` and `wdata_i[p]`; `we_i` is
   only honoured on an enabled port.
3. Holding `advance_i` low stalls: nothing is issued and nothing moves.
4. The cycle that issues the last slot of an iteration also advances the
   register by `STRIDE` at its clock edge; `iter_o` counts finished
   iterations.
5. A read returns on `rdata_o[p]` one cycle after it was issued and stays
   there until that port reads again. A read and a write of the same word in
   the same cycle return the old word; if both ports write one word, the
   higher port wins.

With `advance_i` always high one iteration takes exactly `SLOTS` cycles.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 16 | address width; the RAM holds `2**ADDR_W` words |
| `DATA_W` | 32 | word width |
| `NUM_PORTS` | 2 | memory ports (dual-port RAM) |
| `N_NODES`, `TREE` | 5, five-access tree | derivation tree, parents listed before children |
| `N_ACCS`, `ACC_NODE` | 5, `{0,1,2,3,4}` | loop-body accesses in issue order and their nodes |
| `STRIDE` | 1 | per-iteration step of node 0 |

Node multipliers are 8 bits wide (`abr_pkg::MULT_W`), so factors up to 255.
Assertions checked at the start of simulation reject a node listed before
its parent, an access naming a missing node and a factor out of range; a
concurrent assertion in the state machine checks that the slot number never
leaves `0..SLOTS-1`.

## What is this design's own choice

The structure (one register with a constant-step loop, an adder tree from a
spanning tree, shift-and-add for constant factors, a final port MUX under a
local FSM, dual-port RAM) follows the published scheme. These details are
filled in here and can be changed freely:

* address and data widths, the array base addresses of the default tree,
  `STRIDE = 1` for the default loop;
* the `advance_i` strobe and stall behaviour, restart on `load_i`, and the
  iteration counter;
* the round-robin assignment of accesses to ports in program order;
* the RAM's synchronous read, read-first and write-collision rules;
* the asynchronous reset.

Not built:

* the datapath and its address interface (application logic; their signals
  are the top's ports);
* the offline spanning-tree search;
* sharing adders between the trees of several loops: one build serves one
  loop's tree. A design with several loops would instantiate several trees
  or reload parameters per loop;
* references whose offset to the stored one depends on outer loop indices
  (for example `A[i][k]` and `B[k][j]` in a matrix-multiply inner loop): the
  tree only holds compile-time constants, so such a loop needs a fresh
  `load_i` per outer iteration and a tree per reference class, which this
  RTL does not provide.

The power, area and bus-capacitance results that motivate the scheme are
properties of a gate-level implementation in a particular library and are
not reproduced by this RTL.

## Verification

Every testbench is self-checking, ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_addr_derive_node` | factors 1, 3, 5, 11 with positive and negative offsets against multiplication |
| `tb_addr_base_reg` | load, step by 2, hold, load priority, reset value |
| `tb_addr_adder_network` | default tree and the augmented `B[11k]`, `B[5k]` tree against the array formulas |
| `tb_addr_port_mux` | 2-port and 3-port routing, idle spare ports |
| `tb_access_sequencer` | slot/iteration counting under random stalls and restarts; 10 iterations in 30 cycles |
| `tb_dual_port_ram` | random two-port traffic, latency, read-first |
| `tb_abridged_addr_logic` | every issued address for three loops, including wrap-around at the top of the address space; rate |
| `tb_abridged_mem_subsystem` | end to end at the default parameters: fill, compute `B[3k] = f(A[k], B[k], B[k+1], A[3k])` with stalls (later iterations read words earlier ones wrote), read back; counts loads, stalls, steps, idle ports, reads, writes and read-after-write |
| `tb_wl_example` | the two-access loop `x = a[i] + b[i+1]` with `i` stepping by 2, one slot per iteration; also checks `addr_delta` for 1-D, column and diagonal walks |
| `tb_wl_dprod`, `tb_wl_lowpass`, `tb_wl_laplace`, `tb_wl_sor` | dot product (augmented root), 3-tap low-pass, 32x32 Laplace and in-place SOR kernels, one load per row, random stalls, every address and read word checked; kernel shapes and sizes are illustrative choices |

The kernel testbenches share `tb/wl_runner.sv`, which takes a reference table
`BASE + (i+DI)*NCOL + (j*SJ+DJ)` per access and a tree, and checks that the
hardware's addresses match the table.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/abr_pkg.sv \
    tb/tb_abridged_mem_subsystem.sv --top-module tb_abridged_mem_subsystem
./obj_dir/Vtb_abridged_mem_subsystem
```

`tb_abridged_mem_subsystem` uses the top at its default parameters (64 Ki
words of 32 bits) and runs in well under a second.
