# Backward error recovery for an SRAM-FPGA region

An SRAM-based FPGA keeps its circuit in configuration memory, and radiation can
flip those bits. Configuration scrubbing rewrites the configuration from a
golden copy, but it does not touch the state of the circuit. A circuit that has
already computed wrong values keeps running from that wrong state. Backward
error recovery (BER) goes further. It checkpoints the circuit's flip-flop state
while the circuit runs. When an upset is found, it repairs the configuration
and rolls the circuit back to the last good checkpoint.

This repository holds synthesizable SystemVerilog for such a BER reliability
controller, together with the platform used to evaluate it:

* a configuration-layer model for one *Enhanced Reliability Region* (ERR). An
  ERR is a partially reconfigurable region that the controller protects;
* the design under test placed in the ERR: the I/O side of a processor-based
  AES-128 encryptor;
* a timer-driven fault injector that flips configuration bits following a
  heavy-ion event-size law.

The approach, the three controller operations, the recovery-time formula and
the evaluation setup follow the paper *Reliability Assessment of Backward Error
Recovery for SRAM-based FPGAs* (Sahraoui, Ghaffari, Benkhelifa, Granado). That
work runs the controller as software on a soft processor, using the device's
configuration port. Here the controller is a hardware state machine. Sizes,
encodings and interfaces that the paper leaves open are this design's choices;
they are listed in [Departures and choices](#departures-and-choices).

## The three operations

The controller (`rtl/reliability_controller.sv`) handles each ERR with three
operations. Only the third one stops the protected circuit.

```
 task      ████████████████████████████████        ██████████████████
 control   FD FD FD HC FD FD FD FD HC FD FD | HR HR HR | FD FD HC FD FD
                                   upset ^   ^ detected            (FD = fault detection,
                                             halt ........ release  HC = checkpoint,
                                                                    HR = recovery)
```

**Fault detection (FD).** The controller reads the ERR's frames back one after
another, without end. Each frame streams through `frame_ecc`, which checks the
frame's extended Hamming code (SECDED). The code could correct a single upset,
but the controller uses it only to *detect* one. The repair always comes from
the stored copies. FD never touches the running circuit.

**Hardware checkpoint (HC).** Every `CKPT_PERIOD` cycles the controller pulses
`gcapture[e]` (the GCAPTURE sequence). This copies the ERR's flip-flop state
into its *context frames*. The controller then reads those frames back into
the checkpoint store. The circuit keeps running: capture takes a single cycle.
The store has two banks per ERR. A new checkpoint replaces the old one only if
every context frame passed its ECC check. Otherwise the upset is handled as in
HR, from the previous checkpoint.

**Hardware recovery (HR).** When a frame fails its check, the controller:

1. raises `halt[e]`;
2. rewrites the faulty frame from the golden copy;
3. rewrites the `NCTX` context frames from the current checkpoint bank;
4. pulses `grestore[e]` (the GRESTORE sequence), which reloads the flip-flops
   from the context frames;
5. releases the ERR.

Step 2 comes before step 3 on purpose. If the faulty frame is itself a context
frame, it then ends up holding the checkpointed state rather than the golden
copy's zeros.

### Recovery time

Writing one frame takes `T_FRAME = FRAME_WORDS + 1` cycles: one word per cycle,
plus the read latency of the source memory. The ERR is halted for

```
T_recovery = T_FRAME × (NCTX + 1) + 2   cycles
```

This is the paper's `t_frame_write × (context frames + 1)`. The `+2` covers
the GRESTORE cycle and the release. With the defaults (41 words, 2 context
frames) that is 42 × 3 + 2 = **128 cycles**. The controller reports each value
on `last_recovery_cycles`, and every platform testbench measures `halt`
independently and compares.

### Sharing the configuration port

The fault injector uses the same configuration port. It raises `inj_req`. The
controller finishes its current operation (one FD frame, a whole HC round or a
whole HR), then parks and raises `inj_gnt` until the request drops. A recovery
is therefore never interleaved with an injection. Assertions in both modules
check that the port is driven only by its owner.

## Frames, ECC and context

Everything that touches the configuration layer works on frames. A frame is
`FRAME_WORDS` = 41 words of 32 bits, the size of a Virtex-5 frame. `ber_pkg`
defines the code.

* The low 12 bits of the last word are the ECC field: 11 Hamming check bits
  `H` and an overall parity bit `P`.
* The other 1300 bits are data bits. Data bit *d* (counting in word order and
  skipping the ECC field) gets Hamming position `hpos(d)`. This is the *d*-th
  integer ≥ 3 that is not a power of two.
* `H` is the XOR of the positions of all set data bits. `P` makes the parity
  of the whole frame even.
* A check XORs the contribution of every word (`word_ecc`):
  * syndrome 0 and even parity means **OK**;
  * odd parity means **single** upset, and the syndrome gives its position;
  * non-zero syndrome with even parity means **double** upset.

  Three or more upsets in one frame may be mistaken for one, or missed.

**Context frames.** In each ERR, the `NCTX` frames starting at offset
`CTX_BASE` carry the circuit's state. Word `STATE_WORD` of each of these frames
holds 32 captured flip-flop bits. These words change at run time, so the ECC
skips them (`mask` input of `frame_ecc`). As on real devices, an upset in a
state word is not detected. It is overwritten by the next capture or restore.

**Golden copy.** `frame_store` with `GOLDEN = 1` builds the golden bitstream
itself after reset, one word per cycle:

* the content is `golden_raw(f, w)`, an integer hash of frame and word numbers;
* the state words of context frames are zero;
* the ECC field is computed as a bitstream generator would.

Once `ready` is high, the controller copies the golden bitstream into
`config_mem`, then takes a first checkpoint of every ERR. Only after that
does it start FD.

## The fault injector

`fault_injector` fires every `INJ_PERIOD` cycles while `enable` is high. The
default is 10,000,000 cycles: 0.1 s, the paper's 10 events per second, at an
assumed 100 MHz. For each event it draws the following from a 32-bit xorshift
generator:

* frame, word and bit, each uniform;
* the **shape**:
  * with probability `MBU_PCT` % it is a multi-frame upset: the same bit in
    consecutive frames;
  * otherwise it is a single-word upset: adjacent bits of one word;
* the **size**, 1 to 4 bits, from the cumulative percentages of that shape:

| size | single-word (SBU) | multi-frame (MBU) |
|------|------------------:|------------------:|
| 1 bit | 54 % | 41 % |
| 2 bits | 39 % | 34 % |
| 3 bits | 6 % | 13 % |
| 4 bits | 1 % | 12 % |

These percentages are the paper's example law for one heavy-ion setting. Each
bit is then inverted by a read-modify-write of its word: 2 cycles per bit.
The injector counts events and bits, and it ignores `enable` until the golden
bitstream has been loaded.

## Design under test

`dut` is what sits in the ERR: the I/O side of an AES-128 encryptor built
around an 8-bit PicoBlaze-class processor. The processor and its program are
not part of this RTL. Its I/O port (`port_id`, `out_port`, `write_strobe`,
`read_strobe`, `in_port`) is a port of the top. `cpu_halt` tells the processor
to stop during a recovery.

| port | write | read |
|------|-------|------|
| 0x00 | byte to substitute | S-box result, valid the next cycle |
| 0x01 | byte to send on RS232 | bit 0: transmitter busy |
| 0x02 | bit 0: draw new arrays | bit 0: DATAGEN busy (8 cycles) |
| 0x10–0x1F | – | plaintext bytes 0–15 |
| 0x20–0x2F | – | key bytes 0–15 |

* `sbox_ip` computes SubBytes as the GF(2^8) inverse (`x^254`) followed by the
  affine map, with no table.
* `datagen` fills both 128-bit arrays from a xorshift32 generator, 32 bits per
  cycle.
* `rs232_controller` is an 8N1 transmitter; 868 cycles per bit gives 115200
  baud at 100 MHz.
* `io_controller` decodes the ports and registers the read data.

The DUT's context is 64 bits: `{24'b0, S-box register, DATAGEN state}`. It
fills the two context frames. `halt` freezes every register of the DUT. A
restore reloads the S-box register and the DATAGEN state.

## Top level: `ber_platform`

```
 frame_store (golden) ──┐                     ┌── frame_store (checkpoints, 2 banks)
                        ▼                     ▼
 fault_injector ──► port mux ◄── reliability_controller ── halt/gcapture/grestore
                        │                                          │
                        ▼                                          ▼
                   config_mem ◄──────── 64-bit context ────────── dut ◄──► processor port
```

| parameter | default | meaning |
|-----------|---------|---------|
| `FRAMES_PER_ERR` | 72 | frames in the ERR (two 36-frame CLB columns) |
| `CTX_BASE` | 8 | first context frame |
| `CKPT_PERIOD` | 1,000,000 | cycles between checkpoints |
| `INJ_PERIOD` | 10,000,000 | cycles between injected events |
| `MBU_PCT` | 50 | share of multi-frame events, % |
| `INJ_SEED` | 0x12345678 | injector random seed |
| `CLKS_PER_BIT` | 868 | serial bit time |

`N_ERR` is 1 and `NCTX` is 2 in the top. The controller, `config_mem` and the
stores handle any number of ERRs; `tb_reliability_controller` uses two.

Outputs give the controller's statistics: frames checked, sweeps, detections,
checkpoints, recoveries, the last faulty frame with its single/double verdict,
and the last recovery time. They also give the injector's event and bit
counts.

At the defaults, one FD sweep of 72 frames takes about 3,200 cycles (44 cycles
per frame). An upset is therefore found within about 32 µs at 100 MHz. A
checkpoint takes about 90 cycles.

## Departures and choices

Taken from the paper:

* the three operations;
* detection-only use of the frame ECC;
* halting the ERR only during recovery;
* the recovery-time formula;
* GCAPTURE and GRESTORE;
* the injector's timer-triggered read/invert/write;
* the 10 events per second rate;
* the example event-size law;
* the DUT's composition: processor, I/O controller, S-box, DATAGEN, RS232.

This design's own choices:

* **Hardware instead of software.** The paper's controller and injection
  routine run on a MicroBlaze, reaching the configuration through HWICAP over a
  PLB bus. Here both are state machines sharing the port through a mux. Vendor
  IP (MicroBlaze, PLB, HWICAP, SysACE, DDR2, interrupt controller, timer) is
  not modelled.
* **The configuration layer is a model.** `config_mem` stores bits; an upset
  does not change what the DUT computes. The testbenches therefore check the
  *mechanism* (detection, repair, restore, timing), not the correct-output
  percentages the paper measures on hardware.
* **Region geometry.** The paper gives none of these, so all are assumed:
  * frame size (Virtex-5's 41 words);
  * ECC layout (last word);
  * region size (72 frames);
  * number and place of the context frames;
  * which word holds captured state.
* **Checkpoint policy.** The checkpoint period, the two-bank commit and the
  initial golden load plus first checkpoint are additions.
* **Injector details.** The paper writes whole frames; this injector rewrites
  only the word concerned, which has the same effect on the stored bits.
  Further choices:
  * the uniform address law (the paper's law comes from ground-test data);
  * the reading of the two event groups as two shapes;
  * `MBU_PCT`;
  * the random generator.
* **No campaign bookkeeping.** Campaign control (stop after 1000 events, host
  reload) is left to whoever drives `inj_enable`.
* **Context.** The processor's own registers are outside the RTL, so its
  state is not captured. An encryption that a recovery interrupts may
  therefore come out wrong. Because `halt` freezes the transmitter mid-bit,
  its serial output may also be corrupt.
* **DUT interfaces.** The port map, the generator and the 8N1 format at
  115200 baud are assumed.

## Simulating

All files are plain SystemVerilog. The packages must come first. For example,
to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ber_pkg.sv tb/aes_ref_pkg.sv tb/tb_ber_platform.sv --top-module tb_ber_platform
./obj_dir/Vtb_ber_platform
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_ber_platform` | whole platform, short periods, 24 events. Each of these happens and is counted: load, FD sweeps, checkpoints, single and double detections, recoveries, restores, both event shapes, port hand-over, correct ciphertexts, serial log. |
| `tb_ber_platform_full` | all defaults: one event at 10 M cycles, detected and recovered while AES runs (about 20 s of simulation) |
| `tb_campaign` | a 1000-event campaign at a 20,000-cycle period; reports the share of encryptions not interrupted by a recovery |
| `tb_inj_period` | three platforms side by side at injection periods in the ratio 1 : 2 : 10 (the evaluation's 0.1 s, 0.2 s and 1 s, scaled to 5,000 to 50,000 cycles); each recovers from every event, and the share of encryptions not interrupted grows with the period (about 1 %, 14 % and 83 %) |
| `tb_reliability_controller` | two ERRs; upsets in a plain frame, in the ECC field, in a context frame and in a state word; recovery only of the ERR concerned; 128-cycle halt; restored context |
| `tb_frame_ecc` | 200 random frames with 0–3 upsets and masked words, checked against an independent bit-level code model |
| `tb_config_mem`, `tb_frame_store` | memories, capture/restore paths, golden generation and its ECC |
| `tb_fault_injector` | 3000 events: exact bits flipped, event spacing, size distribution within 3 points of the table |
| `tb_dut`, `tb_sbox_ip`, `tb_datagen`, `tb_io_controller`, `tb_rs232_controller` | DUT blocks. AES results are checked against a reference whose S-box is found by search, and that reference is checked against the FIPS-197 example. |

Support models in `tb/`:

* `aes_cpu_model` stands in for the processor and its AES program. It uses
  only the DUT's I/O port and the hardware S-box.
* `uart_rx_model` decodes the serial line.
* `aes_ref_pkg` is the reference AES.
* `inj_rig` is one platform with its processor model and recovery checks;
  `tb_inj_period` uses three of them.
