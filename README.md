# An over-clocked ALU as a hidden voltage sensor on a shared FPGA

When several tenants share one FPGA, they also share its power distribution
network. One tenant's switching activity makes the supply voltage dip, and a
circuit whose delay depends on that voltage can watch the dips. That is enough
for a power-analysis attack on another tenant's cryptographic core. Cloud
providers try to reject such sensors by scanning bitstreams for the usual
constructions: ring oscillators and delay lines with a clock fed into the data
path.

This RTL models an experiment that gets around that check. The attacker's
circuit is a plain 192-bit ALU with a ripple-carry adder, ordinary logic that
passes any structural check. It is timed for 50 MHz but clocked at 300 MHz.
It is also driven with operands that make the carry run the full length of
the adder. Whether a result bit captures the right value before the clock
edge then depends on the supply voltage. The ALU's result register becomes a
bank of voltage-sensitive sample points.

The design puts on one FPGA:

- **Victim tenant:** an AES-128 core with a built-in key, and 8000 ring
  oscillators that can be switched in a 4 MHz pattern to make controlled
  voltage drops.
- **Attacker tenant:** the ALU with its stimulus logic, plus a conventional
  delay-line sensor (TDC) as a reference.
- **Shared logic:** a trace BRAM, and a UART link through which a host sends
  plaintexts and settings and collects ciphertexts and traces. The host then
  runs the statistics (bit selection, Hamming weight, correlation power
  analysis); that part is software and not in this RTL.

## Turning the ALU into a sensor

A register bit only reveals a late signal if the signal has to *change*. If
the correct new value equals the old one, a slow path goes unnoticed. So the
stimulus alternates every 300 MHz cycle between two operand sets:

| cycle     | operands (defaults after reset)      | correct result                       |
|-----------|--------------------------------------|--------------------------------------|
| "reset"   | a = all ones, b = 0, add             | all ones                             |
| "measure" | a = all ones, b = 1, add             | all zeros, carry through all 192 bits |

The reset cycle puts every result bit into a known state. The measure cycle
asks every bit to flip, and the flip at bit *i* needs the carry from bit 0 to
ripple through *i* stages. On silicon, the bits whose carry arrives late keep
their old value. How many do so depends on the supply voltage at that
instant. Only the measure-cycle results are kept, so a 300 MHz ALU clock gives
150 million samples per second.

`alu_sensor` makes the alternation and keeps the samples. `alu` is the
untouched benign circuit: it registers its inputs, adds or subtracts with
`ripple_carry_adder`, and registers the result. All four operands and both
operations can be changed from the host. Any stimulus that sensitises long
paths will work, for example an underflow (0 − 1) through the subtraction
path.

Post-processing is done on the host. Many result bits never fail and carry
no information. The host keeps the bits that vary across a trace (the
published measurements found 79 of 192), then either takes their Hamming
weight as a voltage estimate or uses one high-variance bit alone.

**What the simulation shows and what it cannot.** This is zero-delay RTL.
In simulation every ALU sample is the arithmetically correct result, and
every TDC tap equals the value launched into the line. The voltage-dependent
errors that make these circuits sensors exist only on silicon. The
testbenches therefore check the logical behaviour: the alternation, which
results are sampled and when, the trace contents, and the protocol. They
cannot check sensor sensitivity.

## Block structure

```
 host ──UART RX──► host_controller ──plaintext/start──► aes_core (victim, 100 MHz)
      ◄─UART TX───        │  │  │                          │ trig_start
                          │  │  └─cfg.ro_mode──► ro_controller ─► ro_bank (8000 ROs)
                          │  └─operands, cfg ─► alu_sensor ◄─► alu (300 MHz)
                          │                        │ sample (150 MS/s)
                          │         tdc_sensor ────┤ taps (150 MHz)
                          │                        ▼
                          └─read◄── trace_bram ◄── trace_recorder ◄─ start (AES or host)
```

| module               | role |
|----------------------|------|
| `mt_fpga_top`        | wires everything together; clock-domain crossings and reset synchronizers |
| `sensor_pkg`         | command opcodes, configuration byte layout, ALU op and trace-source enums |
| `aes_core`, `aes_sbox` | victim AES-128, four S-boxes, start/end trigger pulses |
| `ro_controller`      | 4 MHz on/off pattern: groups switched on one per cycle, all off at once |
| `ro_bank`            | behavioural model of the ring-oscillator array (see below) |
| `alu`, `ripple_carry_adder` | the benign 192-bit ALU |
| `alu_sensor`         | reset/measure alternation and every-second-cycle sampling |
| `tdc_sensor`         | reference delay line: LUT stages, carry chain, tap registers, buffer stage |
| `trace_recorder`     | writes one trace of `DEPTH` samples from the selected sensor |
| `trace_bram`         | dual-clock simple dual-port RAM, registered read |
| `host_controller`    | command decoder and response sequencer |
| `uart_rx`, `uart_tx` | 8N1 serial link |
| `sync_2ff`, `pulse_sync` | level and pulse synchronizers |

### Clocks

| clock     | frequency | used by |
|-----------|-----------|---------|
| `clk_sys` | 100 MHz | AES, UART, host controller, RO controller, BRAM read port |
| `clk_smp` | 150 MHz | TDC (as launch signal and sampling clock), trace recorder, BRAM write port |
| `clk_alu` | 300 MHz | ALU and its stimulus |

The three clocks are expected to come from one clock manager with aligned
phases; the clock manager itself is not part of this RTL.

- **ALU samples:** each sample is held for two `clk_alu` cycles, which is
  exactly one `clk_smp` cycle, so it is read directly in the `clk_smp`
  domain.
- **Capture trigger:** a pulse synchronizer carries it from `clk_sys` to
  `clk_smp`.
- **Busy flag:** a two-flop synchronizer carries the recorder's busy flag
  back to `clk_sys`.
- **Operands and configuration:** they are quasi-static. Change them only
  while no capture is running.
- **Reset:** `rst_n` is asynchronous. Each domain releases it through its own
  synchronizer.

### Victim: AES core

`aes_core` is column-serial so that four S-boxes are enough:

- **Load:** the edge that accepts `start` loads `plaintext ^ key`.
- **Rounds:** each round takes five cycles. In the first, the S-boxes
  substitute `RotWord(w3)` of the round key, and the next round key is formed
  on the fly. In the next four, the S-boxes substitute one state column each.
- **End of round:** the fourth column cycle also does ShiftRows, MixColumns
  (not in round 10) and AddRoundKey.

`done` (and `trig_end`) is high 50 cycles after `busy` rises. `trig_start`
pulses when an encryption begins and starts a trace capture. The key is the
parameter `SECRET_KEY`; the default is the FIPS-197 appendix C.1 key. The
S-box is computed (GF(2⁸) inverse as x²⁵⁴, then the affine map), not stored
as a table.

### Victim: ring oscillators

On an FPGA each oscillator is one LUT computing `a <= ~a & en` with its
output looped back to its input. A two-state cycle simulator cannot evaluate
a combinational loop, so `ro_bank` is a **behavioural model**, not
synthesizable RTL:

- While a group is enabled, its node takes `~a & en` every `DELAY` ps
  (default 1000 ps, an assumed loop delay).
- The 8000 oscillators are in 8 groups. The oscillators of one group share
  one modelled node.
- For synthesis, replace it with LUT primitives that are kept from
  optimisation.

`ro_controller` runs while RO mode is set and a capture is in progress. It
waits `RO_START_DELAY` = 13 cycles, about sample 20 of the trace. It then
repeats a 25-cycle (4 MHz) pattern: one more group on per cycle, then all
groups off at cycle 13. The gradual switch-on and sudden switch-off give the
slow voltage drop and sharp overshoot of the published RO measurements.

### Reference sensor: delay line

`tdc_sensor` sends its launch signal through two LUT stages and a 128-stage
carry chain whose multiplexers are all set to propagate. It registers every
chain output on the rising edge of `clk` and adds one buffer register stage.
In the top the 150 MHz sampling clock is also the launch signal: the clock is
fed into the data path, the classic pattern that bitstream checkers look for.
The number of ones in the tap word tracks the supply voltage. The raw taps
are stored, so the host can compute the count or pick a single tap.

## Host protocol

Every command is one opcode byte followed by its arguments. Multi-byte values
are sent most significant byte first; the AES blocks go byte 0 first, in
FIPS-197 order.

| opcode | command           | arguments | response |
|--------|-------------------|-----------|----------|
| `0x01` | `CMD_ENCRYPT`     | 16 plaintext bytes | 16 ciphertext bytes; the AES start triggers a capture |
| `0x02` | `CMD_SET_OPERAND` | slot (0 `a_rst`, 1 `b_rst`, 2 `a_meas`, 3 `b_meas`), 24 bytes | none |
| `0x03` | `CMD_SET_CONFIG`  | 1 byte: bit 0 source (0 TDC, 1 ALU), bit 1 RO mode, bit 2 reset-cycle op, bit 3 measure-cycle op (0 add, 1 subtract) | none |
| `0x04` | `CMD_CAPTURE`     | none | none; starts a capture at once |
| `0x05` | `CMD_READ_TRACE`  | none | after any running capture ends: 128 samples × 24 bytes, sample 0 first |

- **After reset:** the trace source is the ALU, RO mode is off, and the
  operands are the overflow stimulus shown above.
- **TDC samples:** they occupy the low 128 bits of a 192-bit sample; the rest
  is zero.
- **Captures:** a capture records 128 consecutive samples at 150 MS/s. That
  is 853 ns, long enough to cover one encryption (510 ns from start to end).
- **Triggers while busy:** a trigger that arrives while a capture is running
  is ignored.

## Sizes and where they come from

| parameter (top) | default | origin |
|-----------------|---------|--------|
| `ALU_W`         | 192     | number of ALU result bits in the published experiment |
| `N_RO`          | 8000    | published experiment |
| `RO_PERIOD`     | 25      | 4 MHz pattern at 100 MHz (published frequency) |
| `RO_GROUPS`, `RO_ON_CYCLES`, `RO_START_DELAY`, `RO_DELAY` | 8, 13, 13, 1000 ps | own choices |
| `TDC_TAPS`, `TDC_BUF_STAGES` | 128, 1 | own choices (the published TDC uses a tap near 32 at idle and buffer registers) |
| `DEPTH`         | 128     | own choice, matching the trace length of the published plots |
| `CLKS_PER_BIT`  | 868     | own choice: 115200 baud at 100 MHz |
| `SECRET_KEY`    | FIPS-197 C.1 key | own choice |

## Where this RTL departs from the published experiment

These points are not specified by the experiment and are this design's own
choices:

- The host protocol.
- The ALU operation set (add and subtract only).
- The trace depth, TDC length and RO grouping.
- The AES schedule and key size.
- The clocking scheme.

These points are knowingly different:

- **TDC clock:** the reference TDC is described both as "set up for 100 MHz"
  and as sampled at 150 MHz. Here it is sampled and launched at 150 MHz.
- **RO activity:** the ROs run only during a capture with RO mode set. In
  the lab setup an enable signal simply arrived over the serial link.
- **Placement:** no floorplan or placement constraints are provided.
- **Sensor behaviour:** it is physical and cannot be shown in simulation (see
  above).

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each one:

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_sbox` | all 256 S-box outputs |
| `tb_aes_core` | FIPS-197 appendix B and C.1 vectors, random plaintexts against the reference model in `tb/aes_ref_pkg.sv`, the 50-cycle latency |
| `tb_ro_bank` | which oscillators run, and their period |
| `tb_ro_controller` | the 4 MHz pattern, cycle by cycle |
| `tb_tdc_sensor` | tap capture and buffer latency |
| `tb_alu` | 192-bit add and subtract, including full-length carries |
| `tb_alu_sensor` | alternation, every-second-cycle sampling, measure results only |
| `tb_trace_bram`, `tb_trace_recorder` | trace storage and capture |
| `tb_uart_rx`, `tb_uart_tx` | framing and bit timing |
| `tb_host_controller` | every command |
| `tb_mt_fpga_top` | the whole design through its serial pins at 8 clocks per bit and 64-sample traces (a few seconds) |
| `tb_mt_fpga_top_full` | one full acquisition at the default size: set operands, encrypt, check the ciphertext, read and check all 128 samples (about 3 min; the 115200-baud readout of 3072 bytes dominates) |

`tb_mt_fpga_top` covers AES-triggered and commanded captures, ALU and TDC
traces, the RO pattern, a switch to subtraction, and a second encryption. It
also counts each mechanism and fails if one never happens.

The testbenches rely on `--timing` for their delays. Example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sensor_pkg.sv tb/aes_ref_pkg.sv tb/tb_mt_fpga_top.sv --top tb_mt_fpga_top
./obj_dir/Vtb_mt_fpga_top
```

The simulator is two-state. Everything that is read is reset, and the
testbenches ignore outputs while reset is active.
