# Combined ring-oscillator random bit generator with carry-chain delay lines

A ring oscillator (an inverting gate closed through a delay) never runs at a
perfectly constant frequency: thermal noise, shot noise and supply noise move
every edge a little, and this *jitter* accumulates from period to period.
Sampling a fast ring with a much slower clock turns the jitter into bits that
are partly random. XOR-ing the sampled bits of many rings gives a stream that
passes statistical tests.

Such generators have two weaknesses:

- Rings that share a nominal frequency (all built from the same number of
  inverters) pull each other into lock, or lock onto a frequency injected on
  the supply by an attacker.
- Good statistics alone prove little. XOR-ing many deterministic oscillators
  also gives "random-looking" bits.

This design deals with both:

1. **Every ring gets a different delay.** Ring number *l* closes through *l*
   taps of an FPGA fast-carry chain (the 4-stage `carry4` primitive of a
   Virtex-5 slice). The taps are fine-grained, so dozens of rings all run
   above 200 MHz and still differ in frequency.
2. **Every source ring has its own sampling ring.** Source ring *l* is not
   sampled by the quartz clock. It is sampled by a slower ring (number
   *l* + 32), so the sampling instants are jittery too. The sampled bits of
   the K pairs are XORed in a registered tree of 6-input LUTs, which the
   quartz clock f_L drives.
3. **All rings can be restarted from the same state.** Each ring closes
   through a NAND gate instead of an inverter. Dropping the common enable
   stops every ring in a known state, and raising it starts them all
   together. If the generator is restarted many times, a bit position that
   carries true randomness shows a balanced 0/1 count across restarts. A bit
   position that carries only deterministic behaviour repeats. The first
   position from which all later positions are balanced is called `m_min`.
   Keeping only every *j*-th bit with *j* ≥ `m_min` makes the output
   unpredictable even just after a restart.

```
          ro_en (NAND enable, from the restart controller)
            |
  ring l  --+--> [NAND]-[carry4 x ceil(l/4), tap l]--+--> src_ro[l]  --D Q--+
 (l taps)   ^___________________________________________|                  |   |
                                                              smp_ro[l] ---->   |
  ring l+32 (l+32 taps, same structure) ---------------------------------^      |
                                                                                v
   K sampled bits --> XOR tree (groups of 6, register per level, clk = f_L) --> take
                                                                                 |
                       restart controller (stop / run / count) -----------------+
                                                                                 v
                                  decimator (keep every j-th) --> rnd_bit/rnd_valid
                                                                                 v
                                  output buffer (bytes, FIFO) --> rd_data to host link
```

## Files

| file | kind | what it is |
| --- | --- | --- |
| `rtl/rbg_pkg.sv` | package | LUT size, measured ring frequencies, XOR-tree shape functions |
| `rtl/carry4.sv` | simulation model | 4-stage carry-chain primitive with per-stage delay |
| `rtl/carry4_delay_line.sv` | simulation model | chain of `carry4`, tapped at tap *l* |
| `rtl/ring_oscillator.sv` | simulation model | NAND + delay line + routing, with jitter |
| `rtl/ro_sampler_bank.sv` | RTL | one flip-flop per source, clocked by its sampling ring |
| `rtl/xor_tree.sv` | RTL | LUT-sized registered XOR tree |
| `rtl/restart_controller.sv` | RTL | stops and restarts the rings, counts bits per restart |
| `rtl/bit_decimator.sv` | RTL | keeps every *j*-th bit of each restart |
| `rtl/output_buffer.sv` | RTL | bit-to-byte packer and FIFO for the host link |
| `rtl/rbg_core.sv` | RTL | everything clocked, with ring signals as ports |
| `rtl/combined_rbg.sv` | simulation model | top: 2K ring models + `rbg_core` |

`rbg_core` is the synthesizable part. `combined_rbg` wires it to behavioural
ring models and exists to simulate the whole generator.

## The rings and the carry-chain delay

`carry4` implements the four multiplexer/XOR stages of the primitive:
`CO[i] = S[i] ? c[i] : DI[i]` and `O[i] = S[i] ^ c[i]`. Stage *i* takes the
carry from the stage below. With all selects high and all `DI` low, the
primitive becomes four taps of a delay line. `carry4_delay_line` chains
ceil(TAPS/4) of them and brings out tap `TAPS`.

`ring_oscillator` closes the line through a NAND gate (`en` on the other
input) and through the routing back to the gate. On a real FPGA the routing
delay, which the place-and-route tool sets, dominates. For that reason a
longer line does not always give a slower ring. The model therefore sets its
routing delay so that each ring runs at the frequency measured for its tap
count. The package `rbg_pkg` holds these frequencies for 1..64 taps
(`RO_FREQ_MHZ`, 171..739 MHz). The model adds a random delay to every
transition. This jitter is a sum of twelve uniform draws, close to Gaussian,
with a standard deviation of `JITTER_PS` = 3 ps. Because each half period
inherits the previous edge time, the jitter accumulates. The jitter size and
shape are assumptions, not measurements. Nor does the model reproduce the
deterministic (supply- and temperature-driven) part of real jitter. **Treat
the simulated bit statistics as a test of the logic, not a prediction of
silicon entropy.**

With `en` low the NAND output is forced high and, after one pass through the
line, every node of the ring rests at 1. That is the identical starting
state needed for restarts.

For an FPGA build, replace `carry4` with the vendor `CARRY4` primitive.
Each ring is then a deliberate combinational loop. It needs the usual
keep/loop-allowed constraints so that synthesis neither removes it nor
complains about it. None of this is included here.

## Pair sampling

`ro_sampler_bank` holds one D flip-flop per source ring, clocked by that
source's sampling ring (`smp_ro[l]`). Ring *l* (taps *l*) is sampled by ring
*l* + `PAIR_OFFSET` (taps *l* + 32). For K = 15 every sampling ring (rings
33..47, 221..402 MHz) runs slower than its own source (rings 1..15,
355..739 MHz). The flip-flops are cleared
asynchronously while the rings are stopped, so every restart begins from the
same register state.

Metastability is expected at both sampling points: in the pair flip-flops and
in the first level of the XOR tree, which resamples the pair outputs with
f_L. It is part of the entropy source, and no synchronizers are placed on
purpose.

A note on the pairing rule: the pair of ring *l* could also be read as ring
*l* + K. The two readings agree only for K = 32. This design uses the fixed
offset of 32 (ring 1 with 33, ring 2 with 34, and so on) and makes it a
parameter.

With `PAIR_SAMPLING = 0` the sampler bank is left out. The ring outputs go
straight into the XOR tree, and its first register level samples them with
f_L. This is the simpler generator without sampling rings.

## The XOR tree

The K streams are split into groups of at most `N` = 6, the inputs of one
LUT. Each group is XORed and registered on f_L, and this repeats until one
bit is left. Group *g* of a level takes streams *g*·6 … *g*·6+5 of the level
below. The depth is `LEVELS = xor_tree_levels(K, N)`. It is 2 for K = 7..36
(so 2 for the default K = 15), and 3 for 37..216 (a full three-level tree of
216 sources has a latency of three f_L periods). Every level is cleared while
the rings are stopped. `valid_o` is the ring enable delayed by `LEVELS`
cycles, so the first combined bit of a restart appears exactly `LEVELS`
cycles after the rings start.

## Restarts and run control

`restart_controller` runs a sequence of `num_restarts` restarts. Each restart
has three steps:

1. `ro_en` stays low for `STOP_CYCLES` = 16 cycles. The rings settle, and the
   tree, the sampler flip-flops and the decimator count are cleared.
2. `ro_en` goes high. After `LEVELS` cycles the tree delivers one combined bit
   per cycle, and `take` marks each one.
3. After `bits_per_restart` bits, `ro_en` drops again. Bits still in the tree
   are discarded.

One restart therefore takes `16 + LEVELS + bits_per_restart` cycles. At the
end of the run `done` pulses for one cycle. A run of zero restarts or zero
bits ends at once.

Two uses:

- **Restart analysis.** Use `num_restarts = 2048`, `bits_per_restart = 20000`
  and `dec_j = 1`. The host gets 2048 sequences of 20000 bits. For every
  position *m* it counts the ones across the 2048 restarts and computes
  χ² = Δ²/N, where Δ is the difference between zeros and ones and N = 2048.
  A position fails at the 1 % level when Δ ≥ 117. `m_min` is one more than
  the last *m* at which three consecutive positions fail. This analysis runs
  on the host and is not part of the RTL.
- **On-demand generation.** Use `num_restarts = 1`, set `bits_per_restart` to
  what is needed, and set `dec_j` ≥ `m_min`. The rings run only while bits are
  wanted. That saves power and gives an attacker less time to observe them.

## Decimation: choosing j

`bit_decimator` keeps bits *j*, 2*j*, 3*j*, … of each restart, counting from
1, and restarts the count at every restart. `dec_j = 1` keeps every bit, and
0 behaves as 1. The kept bit appears on `rnd_bit`/`rnd_valid` one cycle after
the tree delivers it.

Values of `m_min` measured for this generator structure on a Virtex-5 (use
*j* ≥ `m_min`; the bit rate is f_L / *j*):

| K | f_L | j | output rate |
| --- | --- | --- | --- |
| 15 | 100 MHz | 22 | ≈ 4.5 Mbit/s |
| 15 | 200 MHz | 72 | ≈ 2.8 Mbit/s |
| 20 | 100 MHz | 17 | ≈ 5.9 Mbit/s |
| 20 | 200 MHz | 28 | ≈ 7.1 Mbit/s |

`m_min` depends on the device and on placement. Measure it again for any new
build with the restart analysis above.

## Output buffer and host link

`output_buffer` packs the kept bits into bytes, first bit in the MSB, and
stores them in a `DEPTH` = 2048-byte FIFO. The read side is
first-word-fall-through with `rd_valid`/`rd_ready` handshaking. If a byte
completes while the FIFO is full, it is dropped and the sticky `overflow`
flag is set. Both sides run on f_L. A USB bridge in another clock domain
needs its own clock-crossing FIFO, which is not included, and the USB link
itself is outside this RTL.

With every bit kept, the generator produces f_L/8 bytes per second: 12.5 MB/s
at 100 MHz and 25 MB/s at 200 MHz. A high-speed USB 2.0 bulk link can carry
that rate. At least one restart of 20000 bits (2500 bytes) is larger than the
FIFO, though, so the host must read continuously during a restart analysis.

## Parameters (`combined_rbg`)

| parameter | default | meaning |
| --- | --- | --- |
| `K` | 15 | source rings (needs K + 32 ≤ 64 with pair sampling, for the ring models) |
| `PAIR_OFFSET` | 32 | sampling ring of source *l* is ring *l* + 32 |
| `PAIR_SAMPLING` | 1 | 1: each source sampled by its own ring; 0: sampled by f_L only |
| `N` | 6 | LUT inputs, maximum XOR group size |
| `TAP_PS`, `NAND_PS`, `JITTER_PS` | 20, 100, 3 | ring model timing (assumed) |
| `J_W` | 8 | width of `dec_j` (j ≤ 255) |
| `B_W`, `R_W` | 16, 16 | widths of `bits_per_restart` and `num_restarts` |
| `STOP_CYCLES` | 16 | cycles the rings stay stopped between restarts |
| `FIFO_DEPTH` | 2048 | output buffer size in bytes |

`bits_per_restart` is at most 65535. Generating longer unbroken stretches
means widening `B_W`; otherwise the rings restart every 65535 bits, with an
18-cycle gap.

## Simulating

Everything runs with plain Verilator 5 (`--timing` is needed for the ring
models). The commands below use the end-to-end test as an example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          rtl/rbg_pkg.sv tb/tb_combined_rbg.sv --top-module tb_combined_rbg
./obj_dir/Vtb_combined_rbg
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it checks |
| --- | --- |
| `tb_carry4` | stage equations for random inputs; per-stage delay |
| `tb_carry4_delay_line` | tap *t* switches *t*·20 ps after the input, for 1/6/13/47-tap lines |
| `tb_ring_oscillator` | rest state at 1, frequency within 1 %, jitter present and bounded, identical first edge after each restart |
| `tb_ro_sampler_bank` | each flip-flop follows only its own sampling clock; asynchronous clear |
| `tb_xor_tree` | K = 15, 216, 7, 1 against a full-XOR reference; depth 2/3/2/1; valid timing |
| `tb_restart_controller` | bit and restart counts, stop length, run length, done pulse |
| `tb_bit_decimator` | j = 1, 2, 10, 22, 72, 0 against a counting reference |
| `tb_output_buffer` | byte packing and order, random read stalls, overflow and drain |
| `tb_rbg_core` | both sampling variants with stand-in rings, through `rbg_scoreboard` |
| `tb_combined_rbg` | whole generator, K = 7, 32-byte buffer: 6 restarts, decimation, overflow, latency, bit balance, restarts differ |
| `tb_restart_analysis` | scaled-down restart experiment, K = 7: 32 restarts × 100 bits, χ² per position, `m_min` search (39 with the model's 3 ps jitter) |
| `tb_combined_rbg_full` | default configuration (K = 15), one on-demand generation of 880 bits keeping every 22nd |

`tb/rbg_scoreboard.sv` is the shared reference for the three system tests.
It computes the expected combined bit from the sampled ring bits as a plain
XOR delayed by `LEVELS`, then applies the decimation and byte packing
independently of the RTL.

The ring models make whole-generator simulation slow. The default K = 15
configuration (30 rings, about 720 carry-chain stages) simulates at roughly
0.15 µs of circuit time per second of CPU time. The default-size test
therefore generates 880 bits in one restart, not the 20000 bits × 2048
restarts of a full restart analysis. The largest run simulated at default
parameters is that 880-bit generation. The smaller K = 7 system test covers
6 restarts and about 4100 combined bits.

## Where this RTL goes beyond, or falls short of, its basis

- The ring models are simulation models. Frequencies are the measured
  Virtex-5 values, but the gate and tap delays, and the size and shape of the
  jitter, are assumptions. Real rings on a real device determine `m_min`.
- The clock f_L was characterised at 100, 150 and 200 MHz. At 250 MHz the
  delays between the stages of the sampling cascade exceed the clock period
  on the measured device, and the generator stops working.
- The restart analysis (χ² per bit position, the search for `m_min`) and the
  NIST 800-22 tests run on a host, not in this RTL.
- These parts are this design's own choices: the stop time between restarts,
  the clearing of the sampler and tree registers, the byte format, the FIFO
  depth, the overflow behaviour, and the counter widths.
- The quartz oscillator and the USB 2.0 interface are outside the design:
  `clk` is an input, and the buffer's read port is where a USB bridge would
  connect.
- Rings beyond 64 taps have no measured frequency in `rbg_pkg`, so the
  simulation model cannot be built for K + 32 > 64. `rbg_core` itself takes
  any K. That includes the very wide variant without sampling rings (K > 80,
  every ≈ 5th bit kept) suggested for devices where area does not matter.
