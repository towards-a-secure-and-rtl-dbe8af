# Fault-hardened secure processor subsystem

Small embedded systems that carry secrets (payment terminals, biometric
tokens, handhelds) face two kinds of faults at once: natural transients,
which grow more frequent as circuits shrink and supply voltages drop, and
faults provoked on purpose by an attacker with a laser, a light flash or a
glitched supply, in the hope that a wrong result leaks the key. Both can be
modelled the same way, as a flipped storage bit (a single-event upset, SEU)
or a flipped combinational signal (a single-event transient, SET). This RTL
protects the hardware of such a system against both. It uses cheap codes
(parity) and time redundancy instead of triplication, and it hands any error
it cannot correct in place to the operating system.

The system around it is a SPARC V8 processor with an AES coprocessor on its
APB peripheral bus, running an operating system that checkpoints each task
at every context switch. The processor core, its buses and the memory are
not part of this RTL. What is here:

| Block | Protection | Fault it covers | How an error is handled |
|---|---|---|---|
| `aes_core_ft`, `aes_apb` | byte parity on key store, state and S-boxes; every round and key word checked by recomputing it backwards | SEU and SET in the cipher | operation aborted, optional self-wipe, interrupt to the OS |
| `ft_cache` | parity bit on tag and on data of every word; controller logic checked by parity prediction | SEU in the arrays, SET in the controller | array error: forced miss and refill; controller error: OS rollback |
| `ft_regfile` | parity bit per register | SEU | OS rollback |
| `pp_alu_stage` | parity prediction on the ALU; parity on the stage registers | SET in logic, SEU in registers | SET: recomputed next cycle; SEU: OS rollback |
| `err_monitor` | none | none | sorts detections into local, central and mixed; raises rollback request or interrupt |
| `secure_soc` | none | none | top level: all of the above side by side |

## Error classes and the role of the operating system

Every detector emits a one-cycle pulse. `err_monitor` sorts the pulses into
three classes (bit positions are the `SRC_*` constants of `iu_pkg`):

* **Local**: the hardware has already corrected the error. This covers a
  cache parity error, which is refilled from memory, and a transient in the
  execute stage, which is recomputed. These are only counted.
* **Central**: the correct value is gone. This covers an upset in a
  pipeline register or a register-file word, a transient in the cache
  controller, and a transient seen by a detection-only execute stage.
  `rollback_req` rises and stays high until `rollback_ack`. The operating
  system answers by restarting the task from the state it saved at the
  last context switch. That state is saved anyway for multitasking, so the
  rollback costs almost nothing extra.
* **Mixed**: the fault was contained locally but the OS should know. This
  covers every AES detection: the core has already aborted, and may have
  erased its key. `irq` rises until `irq_ack`, and the OS can then erase
  other secrets or raise an alarm.

For every source the monitor also keeps a sticky flag and an 8-bit
saturating counter, cleared together by `clr`.

## The hardened AES core (`aes_core_ft`)

This is the largest block and the one with the most structure.

**Datapath.** The core supports 128-, 192- and 256-bit keys in a single
instance, selected when the key is loaded. It computes one complete AES
round per clock with 16 forward S-boxes, and it also holds a complete
inverse round with 16 inverse S-boxes. The two are defined so that one
exactly undoes the other:

    fwd(s, k)  = MixColumns(ShiftRows(SubBytes(s))) ^ k     (no MixColumns in the last round)
    inv(s, k)  = InvSubBytes(InvShiftRows(InvMixColumns(s ^ k)))

Both datapaths read the state register `s`.

**Timing redundancy by inverse calculation.** Each round takes two cycles:

1. *RUN*: save `s` into `prev` and write the new round value into `s`.
   Encryption uses `fwd` for this; decryption uses `inv`.
2. *CHK*: put the new `s` through the *other* datapath with the same round
   key and compare the result with `prev`.

A transient anywhere in the round logic corrupts the new state. The
inverse then no longer returns the old state, unless two faults cancel
exactly, which is very unlikely. Because the check runs in a different
cycle and on different hardware, a single transient cannot hit the
computation and the check in the same way. The same pair of datapaths
serves both directions, so checking costs no extra round logic.

**Key schedule.** `key_load` expands the whole key schedule into a
60-word store before any block is processed, one word every two cycles:

* *KX_GEN* computes `w[i] = w[i-Nk] ^ f(w[i-1])` (RotWord, SubWord and
  Rcon as the position requires) through four S-boxes and writes it.
* *KX_CHK* computes `f(w[i-1])` again through the same S-boxes and checks
  that `w[i] ^ f(w[i-1]) == w[i-Nk]`.

**Parity.** All 36 S-box ROMs store one parity bit per byte; the table is
generated at elaboration from the AES definition (GF(2^8) inverse followed
by the affine map). Every key word, the state register and the saved state
also carry one parity bit per byte. A parity bit is computed when its value
is written, and checked whenever the value is used (key words, S-boxes) or
in every cycle in which it is live (state).

**Reaction.** A detection in any cycle does four things:

* it aborts the operation, so no result and no `done` pulse is produced;
* it pulses `err`;
* it records the reason in `err_cause` (`aes_err_t`: S-box parity, key
  parity, state parity, round check, key-schedule check);
* with `self_reset` set, it also erases the round keys and the state, so
  the core must be given its key again.

Withholding the faulty ciphertext is what defeats differential fault
analysis.

**Latency.**

| | 128-bit | 192-bit | 256-bit |
|---|---|---|---|
| key load to `key_ready` | 81 | 93 | 105 |
| `start` to `done` (either direction) | 22 | 26 | 30 |

(2·Nr + 2 cycles per block.)

**Known weakness.** The control state machine is not protected. A fault
that sends it straight to the output state could release an unchecked
result. Any other wrong state transition only produces a wrong value, and
the round check catches that.

### APB register map (`aes_apb`)

The bus is AMBA 2.0 APB with no wait states. Offsets are byte addresses;
all registers are 32 bits.

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL | W | [0] start, [1] decrypt, [2] key_load (start and key_load are one-shot), [5:4] key length 0/1/2 = 128/192/256, [8] self_reset, [9] irq_en |
| 0x00 | CTRL | R | the same fields except the one-shot bits |
| 0x04 | STATUS | R | [0] busy, [1] key_ready, [2] done, [3] err, [12:8] last cause {sbox, key, state, round, keygen} |
| 0x04 | STATUS | W | write 1 to bit 2 or 3 to clear done or err |
| 0x10–0x2C | KEY0–KEY7 | W only | key, KEY0 most significant. Cleared right after key_load, so that afterwards the key exists only in the protected store |
| 0x30–0x3C | DIN0–DIN3 | R/W | input block |
| 0x40–0x4C | DOUT0–DOUT3 | R | result |

`irq` is high while irq_en is set and done or err is pending. `err_pulse`
goes to the error monitor.

A typical encryption is:

1. Write the key words, then CTRL = 0x004 for a 128-bit key.
2. Poll STATUS until key_ready is set.
3. Write DIN0–DIN3, then CTRL = 0x001 to start.
4. Wait for done, or for the interrupt.
5. Read DOUT0–DOUT3.

## Parity prediction in the execute stage (`pp_alu_stage`)

Duplicating the logic would be the obvious way to catch a transient in
combinational logic, but it doubles the area. This stage checks only
the parity of the result. A second copy of the ALU (the replica L') feeds
an XOR tree that produces the *predicted* parity. The XOR of the real
ALU's result gives the *actual* parity. A two-rail checker
(`dual_rail_checker`) compares the two. A two-rail checker is
self-checking: it reports its own faults as well as the signals it checks.

The predictor is a full replica only in the source. The idea is that
synthesis reduces "replica plus XOR tree" to much smaller logic. This has
a catch: a tool that merges identical logic would delete the replica
altogether. Keep the `u_alu` and `u_alu_rep` instances separate (keep
hierarchy, no resource sharing).

The stage has two modes, set by the parameter `RECOVERY`:

* `RECOVERY = 1` (default): the result register is written only when the
  two parities agree. On a mismatch, `in_ready` drops and the operand
  registers hold their value, so the same operation is computed again in
  the next cycle, after the transient has passed. The cost is one cycle
  per event, plus a combinational path from the checker to `in_ready`.
* `RECOVERY = 0`: detection only. The result is written anyway and
  `set_err` asks for a rollback.

The operand and result registers are `par_reg` instances: a parity bit is
written with the value and checked every cycle through a two-rail checker.
Parity prediction cannot see an upset *input* register, because the ALU
and its replica read the same wrong value. The register parity covers
that case.

Parity catches an odd number of wrong output bits. A transient that flips
an even number of result bits is missed; the testbench shows this
explicitly. Making single faults produce odd errors is a matter for
synthesis and layout, not RTL.

The ALU (`iu_alu`) stands in for the processor's integer pipeline. It
implements add, subtract, and, or, xor and three shifts, and the result
arrives one cycle after the operands are accepted.

## Cache (`ft_cache`)

The cache is write-through and direct-mapped, with 1024 one-word entries
(4 KB). Each entry holds:

* a valid flip-flop;
* the tag, with its own parity bit;
* the data word, with its own parity bit.

Both parity bits are written with the entry and checked on every lookup.

**Array errors are corrected by a miss.** A parity error on a tag or on
the data is treated as a miss. The word is fetched again from memory and
the entry rewritten, which also removes the upset. This is correct because
every write goes through to memory, so memory always holds the current
value. A write that finds a corrupted entry invalidates it.

**The controller is checked by parity prediction.** The controller's
combinational part is one function, `ctrl_fn`: next state plus the
accept, ready, fill, update and invalidate strobes. It is evaluated twice,
as L and as the replica L', and the parity of the two results is compared,
exactly as in the execute stage. Controller errors are detected only:
`ctrl_err` goes to the monitor as a central error.

**Timing.** A read hit takes 2 cycles from `cpu_req` to the `cpu_ready`
pulse: one for the array read, one for the compare and parity check.
Misses and writes add the memory latency. On the memory side, `mem_req` is
held until `mem_ack`, and `mem_rdata` is sampled together with `mem_ack`.

## Register file (`ft_regfile`)

The register file has two synchronous read ports and one write port. It
holds 136 words: 8 register windows of 16 registers each, plus 8 globals.
Each word carries its parity bit, and `rerrN` goes high when the word
read out on port N fails the check. A parity error cannot be corrected
here, because no other copy of the register exists, so it goes to the
monitor as a central error.

The registers have no reset. Software writes each register before reading
it; a register read before it was ever written may report a parity error.

## Top level (`secure_soc`)

`secure_soc` instantiates the AES peripheral, an instruction cache and a
data cache (both `ft_cache`; the instruction cache is only read, so its
write port is tied off), the register file, the execute stage and the
monitor. The blocks share clock and reset. Only the error monitor
connects them to one another, since the pipeline that would join them
belongs to the processor. Everything the processor, bus and memory would
drive is a top-level port.

Parameters of the top:

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_LINES` | 1024 | number of entries in each cache |
| `RF_WINDOWS` | 8 | register windows |
| `PIPE_RECOVERY` | 1 | execute-stage mode (1 = recovery, 0 = detection only) |

Every module's ports named `inj*` or `*_inj*` model faults for testing:

* flips of stored bits (`aes_inj` with an SEU target, `cache_inj_*`, `ic_inj_*`,
  `rf_inj_*`, `ex_inj_seu`);
* XOR masks on combinational outputs (`aes_inj` with a SET target,
  `cache_inj_ctrl`, `ex_inj_set`).

In a real design, tie them to zero.

## How the design was verified

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_aes_core_ft` | FIPS-197 known answers (Appendix B and C.1–C.3) for all three key sizes in both directions; random encrypt/decrypt round trips; the exact latencies above; one injected fault of each kind, with and without self-reset |
| `tb_aes_apb` | the same known answers reached through APB transfers only; interrupts, key wiping, status and error clearing |
| `tb_aes_sbox_par` | published S-box values; the inverse S-box undoing the forward one for all 256 inputs; every single-bit ROM upset detected |
| `tb_ft_cache` | 3000 random reads and writes (with byte enables) over four times the cache size, against a reference copy of memory; hit latency; write-through; recovery from 20 tag and data upsets; controller transients (single flip flagged, double flip not) |
| `tb_pp_alu_stage` | both modes against a reference ALU; recovery and detection behaviour; the even-flip blind spot; operand-register upsets |
| `tb_ft_regfile`, `tb_par_reg`, `tb_dual_rail_checker`, `tb_err_monitor` | their block's behaviour: read/write, parity, checker rule (exhaustive), error routing and counters |
| `tb_secure_soc` | the whole top at its default parameters, described below |

`tb_secure_soc` plays the processor and the memory (`tb/mem_model.sv`). It
checks:

* AES encryption and decryption;
* a transient during an AES operation (aborted, key kept, retry
  succeeds);
* an S-box upset with self-reset;
* data-cache traffic, including a refill after an upset and a controller
  transient;
* instruction fetches, including a refill after a tag upset;
* a register-file upset;
* a recovered execute-stage transient;
* an operand-register upset.

It counts each mechanism, fails if any never occurred, and checks that
exactly the expected rollbacks and interrupts were raised.

Not verified: the synthesized size or clock rate of any block, and
behaviour under real particle strikes, where one event can corrupt several
bits at once.

## Where this RTL departs from the original system

* **AES architecture and cycle counts.** The original hardened IP took
  140/156/190 cycles to encrypt and 208/178/236 to decrypt with 128/192/256-bit
  keys (ROM S-boxes). Its round architecture is not known. This core
  computes a round per cycle and expands the key in advance, so a block
  takes 22/26/30 cycles, and each key load costs 81/93/105 cycles once.
  The protection principles are the same; the cycle counts and area are
  not comparable.
* **S-boxes in RAM.** The original also offered S-boxes in FPGA block RAM
  (smaller and slower). Only the ROM form is built here.
* **What surrounds these blocks.** The processor core, its pipeline
  registers other than the execute stage shown here, the operating
  system's checkpoint and rollback, and main memory are not included.
  `err_monitor` is this design's own way of delivering detection signals
  to the operating system. The original puts that arbitration in
  software and does not describe the hardware collector.
* **Sizes and interfaces.** Cache size and organisation, register-window
  count, the APB register map, all handshakes and the error-cause encoding
  are choices made here. None of them was specified.
* **Register file ports.** The original register bank was built from
  dual-port RAMs. Here it is written as one memory with two read ports and
  one write port. A tool maps that onto two dual-port RAMs that hold the
  same contents.
* **Parity prediction.** The original generated parity-prediction logic
  for the cache controllers with an automated tool. Here the same
  replica-and-parity structure is written by hand around the controller's
  next-state function.

## Simulating

Packages must come first on the command line. For example, the full
system test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_secure_soc \
        -y rtl -y tb +libext+.sv rtl/aes_pkg.sv rtl/iu_pkg.sv tb/tb_secure_soc.sv
    ./obj_dir/Vtb_secure_soc

To run one block's test, replace the testbench name, for example with
`tb_aes_core_ft`. Every testbench finishes in well under a second of CPU
time. The designs use no X or Z values, and every register that is read
is reset or written before use, so two-state simulation with random
initial values is fine.

File layout: one module or package per file in `rtl/` (`aes_pkg` and
`iu_pkg` hold the shared types and functions). Testbenches and the
behavioural memory model are in `tb/`.
