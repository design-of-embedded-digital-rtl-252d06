# Two FPGA data-handling engines: a cellular KdV solver and an FF-LYNX link emulator

This repository holds synthesizable SystemVerilog for two independent digital systems, and a top level (`dhe_top`) that places them side by side.

1. **DCMARK, a distributed computing system.** It is a ring of small floating-point processors ("cells"). Each cell owns one grid point of a 1-D physical field and advances it in time using only its own value and those of its four nearest neighbours. All cells run the same microprogram in lock step, so one integration step takes the same time for 100 cells as for 1000. The default program integrates the Korteweg–de Vries (KdV) equation `u_t + 6 u u_x + u_xxx = 0` with a forward first step and leap-frog steps after it.
2. **An FF-LYNX interface emulator.** FF-LYNX is a serial link for detector front ends. It carries two time-multiplexed channels on one data wire: a 2-bit THS channel for triggers, frame headers and sync patterns, and an FRM channel for data frames. The emulator contains a transmitter and a receiver in loopback, plus a test controller. The controller replays stored packets and triggers at given timestamps and records what comes out, with arrival times, so latency and loss can be measured.

The two systems share no signals. Each has its own clock, reset and port group in `dhe_top` (`kdv_*` and `ffl_*`).

---

## Part 1 — DCMARK

### The numerical scheme

Each cell `i` holds `u_i` (current value) and `u_old_i` (previous value). With `R = (u_{i-2} - u_{i+2}) + 2 (u_{i+1} - u_{i-1})` and `S = u_{i-1}^2 - u_{i+1}^2`:

- first step: `u' = u + Dt * (Ki1*R + Ki2*S)`
- later steps (leap-frog): `u' = u_old + Dt * (K1*R + K2*(S + u*(u_{i-1} - u_{i+1})))`

The constants fold the grid spacing into `Ki1, Ki2, K1, K2`. The defaults are `Ki1=4, Ki2=3, K1=8, K2=6, Dt=0.01`; they are parameters of `pccm_config_rom`. The ring is periodic, so cell 0's left neighbours are cells N-1 and N-2. The default initial field is a soliton `u = 2 sech²(x)` on `x ∈ [-5, 5)` sampled at the centres of 100 cells. It is stored in `rtl/kdv_init_u100.hex` (one IEEE single-precision word per line).

### The cell (`dcmark_cell`)

A cell is a 40-bit von Neumann machine:

- **RAM (`dcmark_ram`).** 256 words of 40 bits hold both the microprogram and the data. Reads are synchronous.
- **Instruction format.** An instruction is `{opcode[39:34], unused, address[7:0]}`. Data words carry a 32-bit float in the low bits.
- **Registers.** `PC`, `IR`, operands `A`/`B`, result `C`, and `I`, the value the cell publishes to its neighbours. There are also four neighbour registers, `M2, M1, P1, P2`. Every clock these sample the `I` registers of cells i-2, i-1, i+1 and i+2.
- **Arithmetic.** A pipelined single-precision adder/subtractor (`fp32_add`) and multiplier (`fp32_mul`). Both round to nearest even and flush subnormals to zero. A 2:1 multiplexer chooses which result goes to `C`. A 6:1 multiplexer chooses what is written to RAM: `C`, `M2`, `M1`, `P1`, `P2`, or configuration data.
- **Control.** An FSM with a two-cycle fetch (address, then `IR <= rdata; PC++`), followed by an execute phase whose length depends on the opcode.

| op | cycles (execute) | action |
|---|---|---|
| LDA / LDB | 2 | RAM → A / B |
| LDI | 2 | RAM → I (publish own value) |
| ST | 1 | C → RAM |
| STM2, STM1, STP1, STP2 | 2 | neighbour register → RAM |
| ADD / SUB | 8 | C ← A ± B |
| MUL | 6 | C ← A × B |
| JUMP | 1 | PC ← address |

The execute lengths are the fixed cycle counts of the instruction set. The FP units are built as one combinational stage followed by a delay pipeline of `LATENCY` stages (7 for add, 5 for multiply). This makes the result ready exactly in the last execute cycle. An assertion in the cell checks that.

**How neighbours exchange data.** Nothing is handshaken. Every cell executes the same instruction in the same clock. So after all cells have done `LDI u`, every `M*`/`P*` register holds the neighbour's `u`, and the next four store instructions copy them into local RAM. This lock-step property is the key invariant of the system. `dcsys` has an assertion that all cells are always in the same state.

### The microprogram

The program is generated at elaboration by `dcmark_pkg::kdv_mcode()`. It has two parts:

| part | addresses | instructions | clocks | contents |
|---|---|---|---|---|
| start-up (forward) step | 0–61 | 62 | 307 | exchange with neighbours, then 14 arithmetic operations, then falls through |
| loop (leap-frog) step | 62–135 | 74 | 368 | exchange with neighbours, then 17 arithmetic operations, then `JUMP 62` |

Each arithmetic operation is `LDA x; LDB y; OP; ST r`. The final operations also move `u` to `u_old` and store the new `u` (a `0 + x` addition serves as a move). One leap-frog step takes 368 clocks, which is 3.68 µs at 100 MHz. The design target was about 3.8 µs, for a 137-instruction program with a 74-instruction loop. The loop here has the same length; the start-up part is one instruction shorter.

RAM map: 0x00–0x87 microcode; 0xA0 `u`, 0xA1 `u_old`, 0xA2–0xA5 neighbour copies; 0xB0–0xB5 `Ki1, Ki2, K1, K2, Dt, 0`; 0xC1–0xD1 intermediate results.

### Configuration and run control (`pccm`, `pccm_config_rom`, `pccm_write_decoder`, `dcsys`)

The configuration ROM lists, in order:
1. the 136 microcode words,
2. the 6 constants,
3. one initial value per cell.

The PCCM FSM streams it into the cell RAMs. Microcode and constants are **broadcast**: the write decoder enables every cell at once. Initial values are written **one-to-one**, to cell `k` only. A configuration pass therefore takes `136 + 6 + N + 2` clocks, independent of N apart from the initial values.

`dcsys` runs the pass on `start` and then releases all cells.
- A step counter counts completed iterations. A cell reports one at each `JUMP`, and the first one when the start-up part falls into the loop.
- After `n_steps` iterations, `hold` stops every cell at the same fetch, and `done` rises.
- Any RAM word of any cell can then be read through `rd_cell`/`rd_addr`.
- `run_cycles` reports the compute time: `1 + 307 + 368·(n_steps-1) + 1` clocks.

---

## Part 2 — FF-LYNX emulator

### Link format

The link runs at `SPEED` bits per reference period: 4, 8 or 16 (the 4x/8x/16x modes; 8x = 320 Mbit/s with a 40 MHz reference). Each period carries one `SPEED`-bit word, MSB first:

```
 [SPEED-1:SPEED-2]  THS symbol        [SPEED-3:0]  FRM bits (2, 6 or 14)
```

THS symbols (this implementation's encoding):

| symbol/sequence | value (oldest first) | meaning |
|---|---|---|
| idle | `00` | nothing |
| trigger | `11` | this period's FRM bits are the trigger's fixed-latency (FLF) data |
| header | `01 01 10` (3 periods) | a data frame starts in the next period |
| sync | `10 10 01` (3 periods) | alignment pattern, sent whenever the THS channel is free |

The codes are chosen so that no run of idles, triggers, headers and syncs contains a false header or sync at the true word boundary.

A **data frame** on the FRM channel consists of:
- **FD (12 bits):** `[11:10]` type = `01`, `[9]` label present, `[8]` CRC present, `[7]` last frame of the packet, `[6:4]` zero, `[3:0]` word count − 1.
- an optional 16-bit **label**,
- 1–16 **payload words** of 16 bits,
- an optional **CRC-8** of the payload (polynomial x⁸+x²+x+1, MSB first, initial value 0).

The frame is cut into FRM-sized chunks, and the last chunk is zero-padded. Packets longer than 16 words are split into several frames; the `last` flag marks the final frame.

### Transmitter (`ffl_tx`)

```
host VLF port ─► data FIFO ─┐
            └─► length FIFO ┴─► frame builder ─► serializer ─► dat
host trg/FLF ─► THS scheduler ───────────────────────┘
```

- **Host VLF port.** The host presents a packet as consecutive words with `vlf_valid`, obeying `vlf_get_data`. A period with `vlf_valid` low ends the packet. The packet length then goes into the length FIFO, so the frame builder only starts on a complete packet.
- **THS scheduler (`ffl_ths_scheduler`).** This is the part that guarantees fixed trigger latency. Each trigger request goes through a 3-period delay line. So the scheduler always knows the trigger slots of the next three periods. It starts a 3-period header (or sync) only when all three slots are free. A trigger is therefore never delayed, always appearing exactly 3 periods after the request. A waiting header is deferred instead, and the `hdr_deferred` output counts those events.
- **Frame builder (`ffl_frame_builder`).** A 48-bit queue refills one field per fast clock and gives one FRM chunk per period. It starts delivering in the period after the header's last symbol. In a trigger period the FRM bits carry FLF data, so the frame simply pauses for that period.
- **Serializer (`ffl_serializer`).** Composes the word and shifts it out.

### Receiver (`ffl_rx`) and the PDT synchronizer

The receiver does not know where words begin.

- **Deserializer.** Keeps a window of the last three words at every bit position, plus a free-running bit-phase counter.
- **Sync detection.** Every clock, the THS detector reports whether the three THS slots in the window form the sync sequence. The hit is tagged with the current bit phase.
- **`ffl_synchronizer`.** Implements a *privileged dual-threshold* (PDT) scheme with one counter per phase:
  - Out of lock, the first counter to reach `N_LOCK = 4` wins. The receiver locks to that phase, and every other counter is cleared.
  - In lock, each sync seen at the locked ("in charge") phase clears the other counters again. Random data that looks like a sync at another phase must therefore accumulate `N_UNLOCK = 3` hits between two good syncs.
  - When a non-in-charge counter reaches `N_UNLOCK`, the lock is dropped and all counters restart.
  - After a one-bit slip of the line, the old phase stops producing hits. The receiver unlocks after 3 syncs at the new phase and relocks after 4 more.
- **Frame analyzer (`ffl_frame_analyzer`).** Once locked, it decodes triggers (output at once with their FLF bits) and header ends. It then rebuilds frames from the following FRM chunks, skipping trigger periods, and checks the CRC.
- **RX buffer.** Payload words go into a FIFO with an end-of-packet flag.
- **Error reporting.** `crc_err` flags a CRC mismatch. `fd_err` flags a bad frame type or a header arriving inside a frame.

Not implemented: Hamming protection of the frame descriptor, and FLF frames longer than one trigger word. The frame descriptor is sent plain.

### Test controller and emulator (`ff_emulator`)

- **Clocking.** Everything runs on the bit clock. A divider makes the reference strobe `ce` (one clock in `SPEED`).
- **Host access.** The host loads ten tables (`tc_ram`, dual-port) and the registers (`tc_config_regs`) through a simple port. `host_sel` selects the table, and read data arrives one clock after the address.

| sel | table | sel | table |
|---|---|---|---|
| 0 | VLF_TS (packet timestamps) | 5 | RX_TS (arrival time of each packet's last word) |
| 1 | VLF_LEN | 6 | RX_LEN |
| 2 | VLF_DW (all words back to back) | 7 | RX_DW |
| 3 | TRG_TS | 8 | RX_TRG_TS |
| 4 | FLF_DW | 9 | RX_FLF |
| 10 | registers | | |

Registers:

| address | access | contents |
|---|---|---|
| 0 | write | control: start, sync_en, label_on, crc_on |
| 1–5 | write | window, number of packets, number of triggers, TX buffer limit, label |
| 8 | read | status |
| 9 | read | lost words |
| 10 | read | received packets |
| 11 | read | received triggers |
| 12 | read | CRC errors |
| 13 | read | FD errors |
| 14 | read | sent packets |
| 15 | read | received words |

`tc_tx_controller` counts periods from `start`.
- **Packets.** When the count reaches a packet's timestamp, the packet's words are copied into an emulated sensor buffer, a `sync_fifo` whose size is limited at run time by `buf_limit`. Words that do not fit are counted as lost. A sender then hands stored packets to the transmitter.
- **Triggers.** When the count reaches a trigger's timestamp, `trg` is raised for one period with its FLF word.

`tc_rx_controller` stores everything received with the same timestamp base. Between the transmitter and the receiver is a `LINK_DELAY`-bit line. `link_flip` inverts a bit on the line. `link_slip` adds or removes one bit of delay, which moves the word boundary.

With the defaults (8x, 5-bit line delay), a trigger whose table timestamp is *t* is recorded with timestamp *t + 6*. Payload needs 16/6 ≈ 2.7 periods per word.

---

## Files

| file | what |
|---|---|
| `rtl/dhe_top.sv` | top: `dcsys` + `ff_emulator` |
| `rtl/dcmark_pkg.sv` | cell types, opcodes, cycle counts, RAM map, microcode generator |
| `rtl/dcsys.sv`, `dcmark_cell.sv`, `dcmark_ram.sv`, `fp32_add.sv`, `fp32_mul.sv` | computing system |
| `rtl/pccm.sv`, `pccm_config_rom.sv`, `pccm_write_decoder.sv`, `kdv_init_u100.hex` | configuration |
| `rtl/ffl_pkg.sv`, `ffl_*.sv` | FF-LYNX transmitter and receiver |
| `rtl/tc_*.sv`, `sync_fifo.sv`, `ff_emulator.sv` | test controller and emulator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dhe_top.sv` | end-to-end test (12-cell ring + emulator); counts every mechanism |
| `tb/tb_dhe_top_full.sv` | same with every parameter at its default (100 cells) |
| `tb/tb_kdv_pkg.sv`, `tb_fp_pkg.sv` | reference models (IEEE arithmetic and the KdV step) |
| `tb/kdv_init_u12.hex`, `kdv_init_u200.hex` | initial fields for 12 and 200 cells |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself, with a watchdog. Example, from the repository root (the `.hex` paths are relative to it):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dhe_top \
  -y rtl -y tb +libext+.sv rtl/dcmark_pkg.sv rtl/ffl_pkg.sv tb/tb_fp_pkg.sv tb/tb_kdv_pkg.sv \
  tb/tb_dhe_top.sv -o sim && ./obj_dir/sim
```

What the testbenches check:
- **KdV runs.** Compared bit-exactly with the reference model of the same float operation sequence. The configuration-pass and compute clock counts are checked exactly.
- **FF-LYNX tests.** Every word, end-of-packet mark and FLF word is compared. Trigger latency must be constant. The end-to-end test also checks the loss count with a small TX buffer, CRC detection after an injected bit error, and unlock/relock after a bit slip.

## Sizes and changing them

- **`N_CELLS`** (default 100) sets the ring size. For a different size, give `U_INIT_FILE` a file of N single-precision words. A 200-cell file is in `tb/`. The time per step does not depend on N.
- **`SPEED`** selects 4x/8x/16x.
- **`BUF_DEPTH`** sizes the transmitter and receiver FIFOs.
- **`PKT_AW`/`DW_AW`** size the test tables (default 256 packets/triggers and 1024 words per run).

At N = 100 a synthesis run of the whole ring takes long; the modules themselves elaborate quickly.

At 100 MHz, 300 000 / 400 000 / 500 000 leap-frog steps take 1.10 / 1.47 / 1.84 s for any N.

## Where this implementation makes its own choices

- The microprogram and its RAM map are written for this implementation: 136 words, 368-clock loop.
- Opcode values, the data-word layout and the neighbour-register mechanism are also this implementation's own choices.
- The constants `Ki1=4, Ki2=3, K1=8, K2=6` are assumed values.
- FP units are IEEE single precision without subnormals, NaN or infinity handling (overflow saturates to infinity).
- The following parts of FF-LYNX are this implementation's own: the THS symbol codes, the FD bit layout, the CRC polynomial, the 3-period trigger look-ahead, and the pausing of frames in trigger periods.
- In the synchronizer, the rule that in-charge hits clear the other counters while locked is this implementation's reading of the PDT scheme.
- The emulator uses internal loopback and a register/table host port in place of a PCIe host interface and soft processor. The controller starts a packet when the period count is greater than or equal to its timestamp.
