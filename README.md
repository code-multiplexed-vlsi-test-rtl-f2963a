# Code multiplexed test access for a multi-core SOC

Testing several embedded cores of a system-on-chip at the same time normally
needs one tester channel per core; sharing one channel makes the cores take
turns, so the total test time becomes the sum of the per-core times. This
design shares **one** test bus between all cores and still feeds them all at
once, using code division multiple access (CDMA). Every core gets its own Walsh
spreading code. The test data of all cores is spread, added and sent as one
stream of small integers. Every core pulls its own data back out by correlating
that stream with its code. The session then lasts as long as the longest single
core test, not the sum of all of them.

The default configuration is a five-core SOC whose cores have the interfaces of
the ISCAS'89 benchmark circuits s344, s349, s820, s832 and s1494. It uses
8-chip Walsh codes and a 3-bit shared bus.

```
            +-----------------------------------------------------------+
 cfg[k] --> | TG 0 -> encoder (Walsh row 1) --chip--+                    |
            | TG 1 -> encoder (Walsh row 2) --chip--+--> chip adder ----+--- shared bus (sum, index, valid)
            |  ...                                  |   (main controller)|        |
            | TG 4 -> encoder (Walsh row 5) --chip--+                    |        |
            |                                                           |        v
            |  response analyzers (MISR + golden compare), one per core <--+  decoder k -> wrapper k -> core k
            +-----------------------------------------------------------+                    (outside)
```

## Spreading and despreading

The codes are rows of the Walsh (Hadamard) matrix in 0/1 form. For length S,
chip *j* of row *i* is the parity of (*i* AND *j*). Rows 1 to S-1 are
**balanced**: half of their chips are ones. They are also **orthogonal**: any
two of them agree in exactly S/2 chips. Row 0 is all zeros and is never used.
A set of S-chip codes can therefore serve at most S-1 cores, so five cores need
S = 8, which leaves two rows unused.

**Encoder (per core).** A data bit *d* is sent as S chips, `d XOR code[j]` for
j = 0..S-1, one chip per clock.

**Chip adder (main controller).** In every chip slot the chips of all encoders
are added as integers. The sum (0..N) goes on the bus in binary: 3 bits for
five cores, or 2 bits for the two-core example below.

**Decoder (per core).** Each sum in a symbol goes into a positive accumulator
when this core's code chip is 0, and into a negative accumulator when it is 1.
The reason this works:

* The core's own bit 1 becomes `NOT code`. That is a one exactly where the code
  is 0, so it adds S/2 to the positive side and nothing to the negative side.
  A bit 0 does the reverse.
* Any other core's code is balanced over the chips where this core's code is 0,
  and also over the chips where it is 1. Because of orthogonality, S/4 of its
  chips are ones in each half, whatever its data. It adds S/4 to both sides.

So `positive - negative` is +S/2 or -S/2, and the decoder outputs 1 when the
positive side is larger, otherwise 0. A core whose generator has no data sends
0 chips. This design uses that fact: when the two accumulators are equal, the
core's generator sent nothing in that symbol. The decoder then lowers
`bit_valid`, and the core-side wrapper ignores the symbol. Cores with short
tests can therefore finish early while longer tests go on.

Worked example, two cores. Core A sends 1 with row 1 (`0,1,0,1,0,1,0,1`, chip 0
first). Core B sends 0 with row 2 (`0,0,1,1,0,0,1,1`).

| chip        | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|-------------|---|---|---|---|---|---|---|---|
| A: 1 xor c1 | 1 | 0 | 1 | 0 | 1 | 0 | 1 | 0 |
| B: 0 xor c2 | 0 | 0 | 1 | 1 | 0 | 0 | 1 | 1 |
| bus sum     | 1 | 0 | 2 | 1 | 1 | 0 | 2 | 1 |

Decoder A puts the sums of chips 0, 2, 4 and 6 in the positive accumulator
(1+2+1+2 = 6). It puts the sums of chips 1, 3, 5 and 7 in the negative one
(0+1+0+1 = 2). Positive is larger, so A decodes 1. Decoder B gets 1+0+1+0 = 2
positive and 2+1+2+1 = 6 negative, so B decodes 0.

## Timing

One data bit per core takes one *symbol* of S = 8 clocks. The pipeline stages
are:

| clock | stage |
|-------|-------|
| t     | controller drives `chip_idx`, `chip_en` (and `sym_adv` in slot 7) |
| t+1   | encoders' registered chips |
| t+2   | bus: `bus_sum`, `bus_idx`, `bus_valid` |
| t+3   | after slot 7: decoder `bit_out`, `bit_valid`, `sym_done` |
| t+4   | after the last bit of a pattern: wrapper `core_pattern_valid` |

With core *k* testing `npat[k]` patterns of `PI[k]` bits each, the bus
transmits for exactly `8 × max_k(PI[k]·npat[k])` clocks. The controller reports
this count as `tx_cycles`. Giving the cores turns on one channel would take
`8 × Σ_k PI[k]·npat[k]`. For example, in one of the end-to-end sessions the
longest core test is 2160 bits and all five together are 9158 bits. That
session transmits in 17 280 clocks, not 73 264. The session finishes (`done`)
when the bus has finished and every core's last response has been analysed.

## Blocks

| module | role |
|--------|------|
| `cdma_pkg` | sizes (5 cores, 8 chips, core widths), `tg_mode_e`, `core_cfg_t`, MISR polynomial |
| `walsh_code_rom` | Walsh code of a given row (combinational) |
| `test_generator` | per-core generator, configurable at run time: Galois LFSR (`next = p>>1 ^ (p[0] ? taps : 0)`) or counter (`p+1`), starting at the seed; sends `npat` patterns LSB first, one bit per symbol |
| `cdma_encoder` | XOR spreading, one registered chip per clock; sends 0 when its generator is idle |
| `chip_adder` | sums the chips and registers them onto the bus with index and valid |
| `cdma_decoder` | positive/negative accumulators, bit decision, idle-symbol flag |
| `core_test_wrapper` | core side: shifts decoded bits into a pattern as wide as the core's inputs |
| `response_analyzer` | folds the first `npat` responses into a 32-bit MISR (CRC-32 polynomial) and compares with a golden signature |
| `main_controller` | session FSM (IDLE, RUN, FLUSH, DONE), chip/symbol sequencing, chip adder, one response analyzer per core, cycle counters |
| `cdma_soc_test_top` | wires five generator/encoder pairs, the controller and five decoder/wrapper pairs together |

### Using the top

1. While the top is not busy, set `cfg[k]` for every core and pulse `cfg_load`.
   Each `cfg[k]` holds `mode`, `seed`, `taps`, `npat` and `golden`. A core with
   `npat = 0` takes no part in the session.
2. Pulse `start`. `busy` rises.
3. `core_pattern[k]` / `core_pattern_valid[k]` deliver each pattern to core *k*.
   Only the low `PI_W[k]` bits are used. The core answers on `core_resp[k]` /
   `core_resp_valid[k]`, with any latency.
4. When `done` rises, `core_pass[k]` says whether core *k*'s signature matched,
   and `all_pass` whether all did. `signature[k]`, `tx_cycles` and
   `session_cycles` stay readable until the next start.

The golden signature is the MISR of the fault-free responses:
`sig = 0; for each response r: sig = (sig << 1) ^ (sig[31] ? 0x04C11DB7 : 0) ^ r`.

## Sizes

| parameter | default | origin |
|-----------|---------|--------|
| cores `N_CORES` | 5 | the evaluated SOC |
| code length `CODE_LEN` | 8 | smallest Walsh set that serves 5 cores (8-chip codes are also used in the scheme's worked example) |
| core inputs `CORE_PI` | 9, 9, 18, 18, 8 | primary inputs of s344, s349, s820, s832, s1494 |
| core outputs `CORE_PO` | 11, 11, 19, 19, 19 | primary outputs of the same circuits |
| pattern count width `NPAT_W` | 16 | design choice |
| signature width `SIG_W` | 32 | design choice |

The top checks `N ≤ CODE_LEN - 1` when it is elaborated. To add cores, raise
`N_CORES`, extend `CORE_PI`/`CORE_PO`, and move to 16-chip codes beyond seven
cores.

## What follows the published scheme and what is this design's own

Taken from the scheme: encoding by XOR with Walsh codes, adding the chips by
position, sending the sum in binary, the positive/negative accumulator decoder
and its decision rule, balanced orthogonal Walsh codes with at most S-1 cores,
one generator and encoder per core, a main controller that adds the data,
broadcasts it and analyses the results, generators reconfigured at run time,
and a test time set by the longest core.

This design's own choices, where the scheme says nothing:

* Chips travel serially, one per clock, with a chip index and a valid flag
  next to the sum. The bus is therefore 3 + 3 + 1 wires rather than a single
  trace.
* Idle generators send 0 chips. The decoder treats equal accumulators as "no
  data".
* Generator modes (LFSR and counter) and the serial bit order.
* The serial-to-parallel wrapper in front of each core.
* Responses return to the controller on dedicated per-core wires. They are
  not carried over the CDMA bus.
* Responses are checked by MISR compaction against a golden signature, not
  compared word by word.
* Asynchronous active-low reset everywhere. A new session can only start from
  IDLE or DONE. Configuration is ignored while a session runs.

Not included:

* The cores themselves (the ISCAS'89 netlists). Their ports are brought out of
  the top.
* Producing the golden signatures. They come from fault-free simulation of the
  cores, done outside the design.
* The fault-simulation run times reported for the benchmark SOC (63.5 s to
  1826.6 s per circuit; 4363.3 s in sequence against 1826.6 s at once). Those
  are software run times with no direct equivalent in clock cycles. The RTL
  shows the same effect as `tx_cycles = 8 × longest test` rather than
  `8 × sum`.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
models written independently of the RTL (`tb_ref_pkg`):

* The Walsh rows are built by recursive Hadamard doubling rather than by the
  parity rule the RTL uses.
* The MISR, LFSR and counter are modelled separately.
* A behavioural core, `tb_core_model`, replaces each benchmark circuit with a
  hash of its input.

| testbench | what it shows |
|-----------|---------------|
| `tb_walsh_code_rom` | rows at 8 and 16 chips; balance and orthogonality |
| `tb_test_generator` | both modes bit for bit; configuration ignored while active; `npat = 0`; irregular `sym_adv` |
| `tb_cdma_encoder` | all seven codes, idle and disabled cases, the two-core example above |
| `tb_chip_adder` | sums for 5 and 7 inputs, one-clock latency |
| `tb_cdma_decoder` | 3000 symbols with up to five concurrent senders; bus bubbles; idle-symbol flag |
| `tb_response_analyzer` | reference MISR; single-bit errors detected; stray responses ignored |
| `tb_main_controller` | chip sequence, bus timing, end of transmission, `tx_cycles = 8 × longest`, waiting for late responses, pass/fail per core |
| `tb_cdma_soc_test_top` | whole design at its default size |
| `tb_workload_two_faults` | the five-core benchmark SOC, two modelled faults per core, all cores tested at once |

The end-to-end testbench `tb_cdma_soc_test_top` runs four sessions. It checks
that every core receives exactly the predicted patterns and that the transmit
time is 8 clocks per bit of the longest core test. It also checks that
defective cores are flagged and healthy ones pass. It counts each mechanism and
fails if one never occurs: LFSR mode, counter mode, reconfiguration, cores
finishing early, a core without patterns, a flagged defect, concurrency
shorter than sequential, and a full bus (all five chips high).

`tb_workload_two_faults` repeats the benchmark-SOC experiment in clock
cycles. There are 64 LFSR patterns per core, with three cases: fault-free,
fault A on every core (response bit 0 stuck at 1) and fault B on every core
(top response bit inverted when the top input bit is 1). Both faults are
flagged on all five cores and the fault-free SOC passes. Each case transmits
in 9216 clocks, where testing the cores one after another would take
31 744 clocks.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/cdma_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_cdma_soc_test_top.sv --top-module tb_cdma_soc_test_top -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. It also has a
watchdog that stops a run that hangs and counts that as a failure.
