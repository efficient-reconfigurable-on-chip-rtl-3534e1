# ReCoBus-style reconfigurable on-chip bus

This is SystemVerilog RTL for an on-chip bus. Hardware modules can be plugged into it and unplugged
at run time by partial reconfiguration of an FPGA. The bus is a row of identical *resource slots*
(sockets). It starts at the static part of the system (CPU, master) and ends at a dummy
termination. A module takes any run of consecutive slots. Every slot carries exactly the same logic
and wiring, so a module built once works at any position. A module can also be loaded more than
once, and wide and narrow modules can share the bus. The module's software address does not depend
on where it sits: the host writes the address into the slots when it plugs the module in.

The main ideas:

* **Shared write signals** (address, write data, byte selects, strobes) are plain wires that cross
  every slot. A module taps them directly, so no per-slot logic is needed.
* **Dedicated write signals** (module select, read, write, grant) come from a *select generator* in
  each slot. This is a 16-entry look-up table that can be loaded serially after the slot has been
  reconfigured, and it then decodes a 4-bit module address.
* **Shared read data** returns through *distributed read multiplexer chains*: AND with the select,
  OR with the chain. There are N interleaved chains to shorten the combinational path, and
  alignment multiplexers put the sub-words back in order, so a module may start at any socket.
* **Dedicated read signals** use two methods. Interrupts are sampled one after another over a
  single chain (time multiplexing). Bus requests are routed into one of several interleaved
  request chains by configuration flip-flops.

## Slots, chains and the dummy end

```
 static part |  slot 0 | slot 1 | slot 2 | slot 3 | slot 4 | ... | slot R-1 | dummy
   master <--+---- chain 0 <---------------------- chain 0 <------------------ '0'
   (align)<--+------------ chain 1 <---------------------- chain 1 <---------- '0'
             |  ...            (slot i feeds chain i mod N, fed by slot i+N)
```

Slot `i` ORs its module's data, gated by `module_read`, onto read chain `i mod N`. The chain
arriving from slot `i+N` is its input. Chain ends beyond the last slot are tied to 0. Each slot
carries `SLICE = B/N` bits. A module `w·SLICE` bits wide therefore needs at least `w` slots, and
puts sub-word `j` into slot `first+j`.

At the master, chain `c` holds sub-word `j` of the module that starts at socket `s` when
`c = (s+j) mod N`. The alignment multiplexers rebuild the word:

```
word[j] = chain[(off + j) mod N],   off = s mod N
```

`off` comes from a 16-entry register file (`align_regfile`) indexed by the module address on the
read bus. The host writes it when it places the module. With `N = 1` (the demonstrator) each slot
carries the full word and the alignment reduces to a wire.

## The select generator (`select_generator`)

This is the part that needs the most care. Each slot holds a 16-bit table `Q0..Q15`, and it runs
in two phases:

1. **Device level.** Partial reconfiguration of the slot (`pr_init`) fills the table with ones.
   `Q15 = 1` has two effects. It holds `module_reset` of the new module. It also enables shifting.
2. **System level.** The configuration interface gives 16 `config_clock` pulses. Each pulse moves
   `config_data` into `Q0` and every entry one place up. The host sends table bit 15 first and bit 0
   last. Bit 15 must be 0 (the *lock bit*). On the 16th pulse the lock bit reaches `Q15`. Shifting
   stops, `module_reset` drops, and the table becomes a decoder:

```
module_select = Q[bus_enable]
module_read   = bus_read & module_select & ~module_reset
```

The table is written with one bit per address: bit `a` set means "respond to address `a`". Setting
several bits makes the module answer a multicast address too. Address `4'hF` reads `Q15`, which is
always 0 after locking, so it selects nobody. That leaves 15 usable module addresses.

Every slot sees the same `config_data`, but only slots still unlocked (`Q15 = 1`) take the shift.
All slots of a freshly loaded module therefore get the same table at once. Modules already running
keep theirs. The host must therefore load **one module at a time**, and after power-up it must shift
an all-zero table once so that empty slots are locked and selected by nothing.

Each slot has four generators:

* one on the read address bus (`module_select`, `module_read`, `module_reset`);
* one on the write address bus (`module_write`);
* one on the grant address (`module_grant`);
* one on the interrupt counter.

The first three share `config_data` and hold the same table. The interrupt generator has its own
`cfg_irq_data` line, so a module's interrupt number can be chosen independently of its address.

With `CASCADE = 1` an extra flip-flop sits behind `Q15` and takes over the lock and reset role.
The table then takes 17 pulses (a lock bit 0 first, then all 16 entries), and all 16 addresses can
select a module. `config_interface` has the same parameter so that it sends the longer stream.

`config_clock` is modelled as a clock enable (`cfg_clk_en`) on the system clock, so the design has
one clock domain.

## Signals driven by master modules

When a slot can host a master (`MASTER = 1`), the master must send more than read data back to the
static side: its address (`AW` bits), byte selects (`B/8`) and direction (1 bit). These 37 signals
(at `B = AW = 32`) use the same multi-slot technique as the read data. There are N more interleaved
chains, each `MSLICE = ceil(37/N)` bits wide per slot, so 10 bits at `N = 4`. A master puts
sub-word `j` into slot `first+j`, so it needs at least N slots to deliver all 37 signals. The chain stages are gated by the slot's **grant** decode rather
than `module_read`, so the master chosen on `gnt_be` drives them while the read channel stays free
for slave traffic. A second copy of the offset register file, written together with the first and
read at `gnt_be`, aligns them onto `m_addr`, `m_byte_sel` and `m_write`. The master's write data
comes back over the ordinary read data chains, when the static side puts the master's address on
`rd_be`. Together that gives the `B + AW + B/8 + 1` shared read signals of a bus whose slots all
accept masters or slaves. The master path is not pipelined.

With `MASTER = 0` (slave mode) these chains are not built. `slot_mout` is then ignored and the
`m_*` outputs are 0.

## Interrupts and bus requests

**Interrupts (`irq_capture` plus one multiplexer per slot).** A counter steps through the interrupt
numbers `0..M-1`, one per clock. The slot whose interrupt table matches the count switches its
module's interrupt onto the single interrupt chain. A decoder of the counter enables the matching
output flip-flop at the master. A change in a module's interrupt reaches its flip-flop within
M+1 cycles; the testbenches measure at most M. `M = 15` is the limit of a 4-bit table.

**Bus requests (`brq_demux_stage`).** There are `S_DR` request chains, interleaved like the read
chains. Slot `i` hosts chains `k·N + (i mod N)`. Each stage has a configuration flip-flop. It either
passes the chain (0) or inserts the slot module's `bus_request` (1). To connect a module, the host
puts the module address on the read bus, pulses `brq_cfg_we`, and presents a one-hot word on
`brq_cfg_data`. Only that module's slots are enabled, and only the slot whose phase matches the
chosen line takes the 1. The request then appears on exactly one of `brq_lines`. If a module spans
at least N slots it can reach every chain.

Reconfiguring a slot clears its flip-flops and resets its tables. A removed module therefore drops
off all chains.

## Timing and pipelining

With `PIPELINE = 0`, a read is combinational. `rd_data` depends on `rd_be`, `rd_addr` and
`bus_read` in the same cycle, and the master registers it at the clock edge. This is the mode of
the demonstrator. Writes are sampled by the module at the clock edge.

With `PIPELINE = 1`, a register sits between the forward path (address and select decode) and the
read chains. It is placed in front of the select generators, and it carries `rd_be`, `bus_read`,
the read address, the alignment offset and the request-configuration strobe. A read can still start
every cycle, but its data appears one cycle later. Every position gets the same extra latency,
which is why the register is not placed inside the chains.

## The demonstrator system (`recobus_test_system`, the top)

The top is a test system around the bus:

* a **stimuli generator**, which writes pseudo-random data each cycle to a bus module and to its own
  reference copy of that module, reads back over the independent read channel in the same cycle,
  and counts mismatches;
* the **configuration interface**, which shifts the tables into freshly loaded slots;
* a **host port**, which drives both bus channels while the stimuli generator is idle;
* a **model of the slot fabric**: which test module sits where.

A test module is a small function (adder, XOR, bit permutation, byte rotation) followed by an
output register and a write counter. Its interrupt is "result pending": set by a write, cleared by
a read.

Partial reconfiguration is modelled by `pr_we/pr_first/pr_span/pr_func`. This re-initialises the
covered slots (tables to ones, request flip-flops to 0) and selects the function of the module
anchored at `pr_first`.

Bringing a module up:

1. `pr_we` with position, span and function. The module's slots show `slot_reset = 1`.
2. `cfg_start` with `cfg_sel_table = 1 << addr` (plus any multicast bits) and
   `cfg_irq_table = 1 << irq`. `cfg_done` pulses 16 cycles later and the module leaves reset.
3. `align_we` with `align_waddr = addr` and `align_wdata = pr_first mod N`.
4. For a master module only: `brq_cfg_we` with `host_rd_be = addr` and a one-hot `brq_cfg_data`.
5. `st_start` with `st_mod_be = addr`, `st_func`, `st_words` and `st_seed`. Afterwards
   `st_tests = st_words` and `st_errors = 0` are expected. The run keeps `st_busy` high for
   `st_words + 2 (+1 pipelined)` cycles, which is one write and one read per clock.

Master modules and the arbiter are not part of the system. Their signals are ports: `ext_brq` (one
request per slot), `ext_mout` (address, byte-select and direction sub-words per slot),
`brq_lines`, `gnt_be`, `slot_grant` and `m_addr/m_byte_sel/m_write`. The top defaults to slave
mode, like the demonstrator. The end-to-end testbench runs it with `MASTER = 1`.

## Parameters

| parameter | top default | `recobus` default | meaning |
|---|---|---|---|
| `B` | 32 | 32 | data width |
| `AW` | 32 | 32 | address width |
| `R` | 8 | 32 | resource slots |
| `N` | 1 | 4 | interleaved read and request chains; `B` and `S_DR` must be multiples of `N`, and `R >= N` |
| `S_DR` | 16 | 16 | bus request lines |
| `M` | 15 | 15 | interrupt lines, 1..15 |
| `PIPELINE` | 0 | 0 | one register between the forward and backward paths |
| `MASTER` | 0 | 1 | build the chains for the master address, byte-select and direction signals |

The top's defaults are those of the demonstrator: 8 slots, no interleaving, unpipelined, slave
mode. `recobus`'s defaults are those of a 32-slot, 4-chain case study in which every slot can host
a master. `recobus_pkg` fixes the address width at 4 bits (16-entry tables) and defines
`BE_NONE = 4'hF`.

## Files

* `rtl/recobus_pkg.sv`: shared constants, table and address types, test-module function codes.
* `rtl/select_generator.sv`, `read_chain_stage.sv`, `brq_demux_stage.sv`, `recobus_slot.sv`: the
  per-slot logic.
* `rtl/align_regfile.sv`, `align_mux.sv`, `irq_capture.sv`, `config_interface.sv`: the static-side
  bus logic.
* `rtl/recobus.sv`: the complete bus with R slots.
* `rtl/test_module.sv`, `stimuli_generator.sv`, `recobus_test_system.sv`: the demonstrator.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=F`.
* `tb/tb_recobus_test_system.sv`: end-to-end test with R=32, N=4, pipelined, master mode. Modules start at every
  alignment offset, and the test covers interrupts, requests, grants, multicast and relocation.
* `tb/tb_recobus_test_system_full.sv`: the same sequence on the top at its default parameters.
* `tb/tb_recobus_random_placement.sv`: 200 random placements × 100 transfers, with a resident
  neighbour module that must stay intact.
* `tb/recobus_sys_seq.svh`: the host sequence shared by the system testbenches.

## Simulating

Any testbench builds with plain Verilator 5. The package comes first:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_recobus_test_system rtl/recobus_pkg.sv tb/tb_recobus_test_system.sv
obj_dir/Vtb_recobus_test_system
```

Lint a module with `verilator --lint-only -Wall -y rtl rtl/recobus_pkg.sv rtl/recobus.sv`.

All testbenches pass and finish within seconds. The system testbenches count every mechanism
(reconfiguration reset, release, offset reads, pipelined reads, interrupt set and clear, bus
request, grant, master signals, multicast, relocation, host access) and fail if one never happened. Each module's
testbench was also run against a deliberately broken copy of the module and reported failures.

## Departures and limits

* **Reconfiguration is modelled.** The FPGA's partial bitstream loading cannot be expressed in RTL.
  `pr_init`/`pr_we` stand for its effect on the slot's tables and flip-flops. The fabric model in
  the top, which decides which test module drives which slot, replaces the real placement of logic.
* **One clock.** `config_clock` is a clock enable, not a separate clock.
* **Fifteen module addresses on the bus.** The optional cascade flip-flop is available as
  `CASCADE = 1` on `select_generator` and `config_interface`, and is tested there. The bus itself
  uses `CASCADE = 0`, because it needs `4'hF` as its idle address.
* **Master signals.** The chains for master address, byte selects and direction are built. The
  choices of which select gates them (grant) and how they are aligned (by the grant address) are
  this design's own. Arbiter and master modules themselves are outside the design. The
  testbenches drive those signals directly.
* **`wait_request`.** This dedicated read signal appears in the list of typical bus signals but has
  no distribution scheme of its own here. The bus-request chains could carry it.
* **Own choices.** The test-module functions, the stimuli generator's LFSR and byte-select pattern,
  the host port, reset values, and the placement of the pipeline register in front of the select
  generators are this design's own choices. The FPGA-specific figures (LUT counts, slot widths in
  CLB columns, propagation delays, 104 MHz) cannot be checked in RTL simulation.
* **Hazards the RTL does not prevent.** Loading two modules before configuring either gives both
  the same table. Overlapping a running module with a new load corrupts it. The host sequence above
  avoids both.
