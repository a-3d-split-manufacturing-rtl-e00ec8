# Split-manufactured security: a computation plane with optional control planes

A processor made in a foundry that is not trusted can still be part of a trustworthy
system if the security logic lives on a second die, made by a trusted fab, and is stacked
on top of it afterwards. The untrusted die (the *computation plane*) is an ordinary design
that also works on its own. At chosen points it carries small *receptacles*: sockets where
the trusted die (the *control plane*) can read a signal, cut it, or replace it. Every
control post is pulled to its harmless value, so with no control die bonded the
computation plane behaves natively. With the control die present, the same chip enforces
a policy that the untrusted fab never saw.

This RTL models the receptacles as logic and uses them in four demonstrators:

| System | Computation plane | Control plane | Mechanism |
|---|---|---|---|
| A | multi-cycle MIPS | multilevel-security regulator | skips, blocks loads/stores, relabels data |
| B | multi-cycle MIPS | crypto coprocessor | encrypts stores and decrypts loads in one address region |
| C | 4-way cache controller | cache eviction monitor | locks lines of a process so others cannot evict them |
| D | two cores on a shared bus | TDMA arbiter | cuts every core off the bus outside its time slot |

`split3d_top` holds all four side by side. Each has an input `*_cp_attached`. When it is 0
the control die counts as absent: its posts float and the pull-ups decide.

## Receptacles: the only way the two dies touch

All receptacles are combinational. A floating node cannot exist in two-state simulation, so
an undriven post is modelled as 0 plus a separate "driven" flag.

* `tsv_tap`: `a = b ? c : 0`. The native signal `c` continues unchanged. `tap_vld` says
  whether the post is driven.
* `tsv_disable`: `c = a_n ? b : 0`. The active-low post `a_n` is pulled up, so the line
  stays connected by default.
* `tsv_override`: `out = control_n ? in : ovr_val`. The active-low `control_n` is pulled
  up, so the native value wins by default.
* `tsv_reroute`: a tap plus a disable. The signal goes up to the control plane, and its
  native continuation `e` can be cut with `d_n`.
* `tsv_generic_receptacle`: one socket that can do all of the above.
  * A tap (`b` → `a`) is built so that the top die cannot drive the tapped node.
  * An override multiplexer is selected by `d_n` and takes its value from `c`.
  * A disable on the output is controlled by `e_n`.
  * Its internal inverter pair is kept, so the data path does not invert.
  * The testbench checks it against the truth tables for control plane absent and
    present.

Every override, tap and disable in the larger blocks is an instance of one of these
modules. In the netlist, the receptacle is the only place a signal can cross between the
dies.

The analog parts of the physical design (sleep transistors, diodes, the posts themselves)
have no logic function and are not modelled. Their logic-level effect is what the modules
above implement.

## The MIPS computation plane (`mips_cpu`)

The processor is a textbook multi-cycle MIPS.
* Instructions: `add sub and or slt addi lw sw beq j`.
* Memory: one unified memory of `MEM_WORDS` words with an asynchronous read.
* Controller: a 12-state FSM, `S0_FETCH` … `S11_JUMP`.
* Cycles per instruction:
  * R-type, `addi` and `sw`: 4;
  * `lw`: 5;
  * `beq` and `j`: 3;
  * an unknown opcode: 2, after which it fetches again.
* Programs are loaded through `ld_we/ld_addr/ld_data` while `rst` is held; an assertion
  enforces this.

The control plane sees the processor through two structs from `split3d_pkg`:

* `mips_taps_t` (read out through taps): the memory address, IRWrite, the instruction,
  the destination register, RegWrite, MemWrite, the write data and the read data.
* `mips_ovr_t` (override posts): an active-low select and a value for each of:
  * the controller reset,
  * MemWrite,
  * RegWrite,
  * the data written to memory,
  * the data read from memory.

`MIPS_OVR_NATIVE` is the all-pulled-up value. The read data goes through a generic
receptacle. The write data goes through a re-route followed by an override.

## System A: multilevel-security regulator (`mls_regulator`)

This is the most involved part. Every memory word and every register carries a 2-bit
label: 3 = TS, 2 = S, 1 = C, 0 = U. The process runs at level `proc_level`. The regulator
keeps its own copy of the labels:
* a label memory parallel to the CPU memory, loaded like the program;
* a shadow register file, reset to U.

The regulator follows the CPU through its taps with its own FSM:

```
RG_FETCH -> RG_INST_TEST -> R_EXEC    -> RG_REG_WRITE
                         -> ADDI_EXEC -> RG_REG_WRITE
                         -> FIND_ADDR -> STORE_TEST
                                      -> LW_LOAD -> READ_TEST
```

A *security lattice unit* compares two labels with the process level. It returns:
* "allowed" when both labels are at or below the level;
* the result label, which is the highest of the two labels and the level.

The regulator enforces these rules:

* **Instruction above the level.** The instruction is skipped. While the CPU decodes it,
  the regulator overrides the controller reset. The PC was already advanced in fetch, so
  the CPU simply fetches the next instruction. A branch into higher-labelled code
  therefore runs on through it without effect.
* **Instruction below the level.** Its label is raised to the level, so the code is from
  then on treated as part of this process ("classification creep").
* **ALU, `addi` or load whose operands or word are above the level.** RegWrite is
  overridden low, so the destination register keeps its old value.
* **Store through an address register above the level, or into a word labelled above
  the level.** MemWrite is overridden low. The second case would move data down.
* **Permitted writes.** The destination's shadow label becomes the result label. A store
  relabels the word it writes.

The regulator reports each action on a one-cycle event output: `ev_skip`, `ev_deny_ld`,
`ev_deny_st` and `ev_creep`. Every label update is driven by the *tapped* RegWrite or
MemWrite. A write the regulator blocked therefore relabels nothing.

## System B: crypto coprocessor (`crypto_coproc`)

The coprocessor compares the tapped address with the data region: bits 31:8 equal to those
of `0x0040_0100`. For an address in the region:
* a store has its write data overridden with `enc_out`;
* a load has its read data overridden with `dec_out`.

Addresses outside the region pass untouched, so instructions stay in plaintext.

The cipher is not part of the RTL. Its two combinational halves are the top's ports
`b_enc_in/b_enc_out` and `b_dec_in/b_dec_out`. The testbenches attach `tb/cipher_model.sv`,
an invertible 32-bit stand-in (XOR with a key, rotate, add). A real core must be
combinational, or the CPU timing would have to stretch.

The MIPS memory is 1 KB, so addresses wrap. The region at `0x0040_0100` is word 64 of that
memory.

## System C: cache with an eviction monitor (`cache_ctrl`, `evict_monitor`, `main_mem`)

The cache defends against cache-timing attacks that work by evicting a victim's lines. It
is 4-way set associative, with `SETS` = 2048 sets of one 32-bit word. That is 32 KB, the
size the evaluation uses. Writes go through to memory and allocate on a miss. The memory
side uses a held request and an acknowledge; `main_mem` answers after `LAT` cycles.

The monitor stores security bits for every line: a valid bit, a process ID and a lock bit.
For the set being accessed, it returns a grant for each way:

```
grant[w] = !valid[w] | !lock[w] | (owner[w] == requesting PID)
```

The cache taps out the set index and the PID. It then picks its victim among the granted
ways: the first granted invalid way, otherwise round-robin among the granted ways.

If no way is granted, the access is served straight from memory and nothing is allocated.
`resp_denied` reports this case.

As a second line of defence, each way's fill write enable passes through a `tsv_override`
whose select is that way's grant. A way that was not granted cannot be written, even if the
victim logic failed. An assertion checks that such a fill never happens.

A *secure* access (`req_secure`, standing in for the `secure_load`/`secure_store`
instructions) locks its line to the requesting process. It does so when it fills the line
or when it hits a line it may own. A hit never evicts anything, so hits are served to every
process.

Without the monitor, grant is pulled up to all-ones and the cache is an ordinary cache.

Timing:
* The cache clears its valid bits after reset, one set per cycle, before `req_ready` rises.
  The monitor clears its own in the same `SETS` cycles.
* A load hit answers one cycle after it is accepted.
* A miss or a store answers when memory acknowledges.

## System D: time-division bus isolation (`tdma_arbiter`, `shared_bus_guard`)

Two cores share an L2 bus. Every request bit and every response bit of each core passes
through a `tsv_disable`. The control plane's arbiter gives each core slots of
`SLOT_CYCLES` cycles in turn and opens only that core's disables. A core that ignores the
bus protocol cannot reach the bus outside its slot.

With the control plane absent, the disables stay connected. The bus is then the OR of all
requests, and `d_conflict` shows when two cores drive it at once.

## Using the top

Each port of `split3d_top` is prefixed by the system it belongs to. All systems share
`clk` and the synchronous, active-high `rst`.

* `a_*`, system A:
  * load the program through `a_ld_*` and the labels through `a_tld_*`, both while `rst`
    is high, one word per cycle at byte addresses;
  * set the process level on `a_proc_level`;
  * watch `a_pc`, `a_state`, `a_reg_state` and the `a_ev_*` event pulses.
* `b_*`, system B:
  * load the program through `b_ld_*`;
  * connect a combinational cipher between `b_enc_in` → `b_enc_out` and between
    `b_dec_in` → `b_dec_out`;
  * `b_ev_encrypt` and `b_ev_decrypt` flag the cycles in which the coprocessor replaces
    data.
* `c_*`, system C:
  * preload main memory through `c_mm_ld_*`;
  * after reset, wait for `c_req_ready` (`CACHE_SETS` cycles);
  * issue one request at a time (`c_req_*`, with `c_req_pid` and `c_req_secure`);
  * take the result on the `c_resp_valid` pulse, with `c_resp_hit` and `c_resp_denied`.
* `d_*`, system D:
  * the cores' requests (`bus_req_t`: valid, we, addr, wdata) come in on `d_core_req`;
  * the shared L2 is outside, on `d_l2_req`, `d_l2_ack` and `d_l2_rdata`;
  * `d_slot` is the current TDMA owner.

Shared types (`mips_taps_t`, `mips_ovr_t`, `bus_req_t`, the state enums and the opcodes)
are in `rtl/split3d_pkg.sv`, which must be compiled first.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `CACHE_WAYS` | 4 | the cache design |
| `CACHE_SETS` | 2048 | 32 KB / (4 ways × 4 B) |
| `DATA_BASE` (crypto) | `32'h0040_0100` | the coprocessor's address comparator |
| `REGION_LSB` (crypto) | 8 | own choice: a 256-byte region |
| `MIPS_MEM_WORDS` | 256 | own choice |
| `PID_W` | 8 | own choice |
| `MM_WORDS` | 65536 | own choice |
| `MM_LAT` | 4 | own choice |
| `NUM_CORES` | 2 | own choice |
| `SLOT_CYCLES` | 16 | own choice |

## Where this RTL departs from the original design

* The original is a transistor-level proposal. Floating posts, pull-up resistors and
  non-restoring buffers are modelled here as logic values plus "driven" flags.
* The cipher of system B is left outside as ports.
* The cache has one-word lines. The evaluated cache's line size is not known here, so only
  its capacity and associativity are matched.
* The x86 benchmark runs behind the performance numbers, and the FPGA resource figures,
  are not reproduced.
* The monitor's security bits are updated by a tapped strobe from the cache. The original
  leaves open how secure instructions are signalled.
* A skipped instruction in system A costs its fetch and decode cycles: the reset override
  acts during decode.
* The general application sketches are not built:
  * dynamic information-flow tracking;
  * a pipelined crypto engine;
  * the diode and power-gating circuits.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `mips_cpu_tb` runs random programs against an instruction-set model in
  `tb/mips_asm_pkg.sv` and checks the cycle count of every instruction.
* `mls_regulator_tb` runs random labelled programs against a reference model of the rules
  above, at all four process levels.
* `cache_ctrl_tb` runs random multi-process, secure and plain traffic, with a small `SETS`,
  against a reference cache and monitor.
* The receptacle testbenches check complete truth tables.
* `split3d_top_tb` runs the whole top at its default sizes, twice: once with every control
  plane attached and once with none.
  * It counts each mechanism: skip, blocked load, blocked store, relabel, encrypt, decrypt,
    cache hit, miss, denied eviction, TDMA slot change and bus conflict.
  * It fails if any of them never happened.
* `cache_lock_workload_tb` runs the cache-locking scenario at full size (32 KB, 4 ways).
  * A crypto process locks a 4640-byte working set, one way of 1160 sets. That is the size
    of an AES implementation with enlarged T-boxes.
  * A second process then makes 30000 random accesses over 28 KB.
  * With the monitor, all 1160 crypto lines are still cached afterwards. The second
    process's load hit rate is about 69%.
  * Without the monitor, only about 540 crypto lines survive. The hit rate is about 73%.

To run a testbench with verilator:

```
verilator --binary --timing --top-module split3d_top_tb -y rtl -y tb \
          rtl/split3d_pkg.sv tb/split3d_top_tb.sv
./obj_dir/Vsplit3d_top_tb
```

Replace the top module and testbench file to run any other block's testbench. The
receptacle tests are very short. The top's test takes a few seconds.
