# Real-time 1024-point FFT analyser

A chirp ionosonde receives its echoes as audio tones: the frequency of a tone
gives the height of the reflecting layer, its amplitude the strength of the
echo. To measure the angle of arrival, two receivers on spatially separated
antennas are used, and their relative phase matters. This design is a
spectrum analyser for that instrument. It samples both receivers at the same
instants at 1024 Hz, and for every block of 1024 samples (one second) it
delivers the power spectrum and the real and imaginary spectra of both
receivers to a host computer. The spacing between frequency bins is 1 Hz.

The central idea is that two real time series can share one complex FFT.
Receiver 1 is stored as the real part and receiver 2 as the imaginary part of
one complex series. After a 1024-point complex FFT, an "unscramble" pass uses
the even/odd symmetry of the transform to separate the two real spectra. A
second idea is double buffering: one memory fills with new samples while
the other is transformed in place.

The arithmetic is bit-serial. Four serial-parallel Booth multipliers and a
handful of serial adders compute a whole complex butterfly in about 20
clocks. The butterfly operand addresses and the twiddle-factor addresses both
come from one small counter.

## Signal path

```
 receiver 1 ──┐   ┌─────────┐  ┌───────────────┐   ┌───────────────────────────┐
 receiver 2 ──┴──►│ sampler │─►│ memory_switch │◄─►│ arithmetic_unit (serial)  │
   (A/D, S/H)     └─────────┘  │  2 x 1024 x24 │   │  4 Booth multipliers      │
                               └──────┬────────┘   └────────────┬──────────────┘
                 address_generator ───┤  wp_rom (W^P) ──────────┘
                                      ▼
                               output_unit ──► 8-bit latch ──► host / D/A
       start_address_rom ──► fft_controller ──► all control lines
```

The top module is `fft_analyser` and has a single clock (about 10 MHz). For
each block the sequence is:

1. **Sampling** (`sampler`). On every sample strobe both inputs are held. The
   A/D converter converts the real input, then the imaginary input, and the
   pair is written as one 24-bit word. After 1024 words the sampler pulses
   `mem_full` and starts again at address 0.
2. **Change-over** (`memory_switch`). The controller waits for `mem_full`, then
   swaps the two memories. The full one goes onto the system bus and the
   sampler carries on in the other.
3. **FFT** (`fft_controller`, `address_generator`, `wp_rom`,
   `arithmetic_unit`). This is a radix-2 decimation-in-time Cooley-Tukey
   FFT, done in place: the input is in natural order and the output is in
   bit-reversed order. There are 10 arrays of 512 butterflies:
   A' = A + BW and B' = A − BW.
4. **Unscramble**. For n = 0..511 the words at frequencies n and N−n are read
   and replaced:
   - T(n) = (X(n) + X*(N−n))/2 is the spectrum of receiver 1 at n.
   - S(n) = (X(n) − X*(N−n))/2j is the spectrum of receiver 2 at n.

   T(n) is written at the position of n, and S(n) at the position of N−n.
   The DC word 0 keeps the DC of receiver 1 in its real part and the DC of
   receiver 2 in its imaginary part.
5. **Output**. The host is sent N power words, then N real words, then N
   imaginary words.
   - In frequency order, words 0..511 are receiver 1 at 0..511 Hz.
   - Words 1023 down to 513 are receiver 2 at 1..511 Hz.
   - Word 512 is not used.

   An INT pulse asks the host for a DMA transfer before the power words. In
   this mode each word waits for `comp_ready`.

At 10 MHz, steps 3 and 4 take 132,140 clocks (13.2 ms). Output takes about
29,000 clocks if the host never stalls. Both are far inside the one-second
block.

## Number formats

| quantity | format |
|---|---|
| data word | 12-bit two's complement, real and imaginary (`cword_t`) |
| output word | the middle 8 bits, `d[9:2]`; the 2 top bits are overflow guard, the 2 low bits absorb truncation error |
| W^P | 8-bit two's complement parts with +1 = 64 (7-bit accuracy); `floor(64 cos(2πP/N) + 0.5)`, `floor(−64 sin(2πP/N) + 0.5)` |
| product BW | full precision, then the 6 fraction bits are dropped (floor) |
| scaling | results divided by 2 (floor) on arrays 1, 3, 5, 7, 9 (counting from 1), so the transform gain is N/32 |
| unscramble | results divided by 2 (floor) |
| power | S = R·R8 + I·I8, where R8 and I8 are the middle 8 bits of R and I (about (R² + I²)/4); S needs up to 17 bits, so the output is `S >> 9`, saturated to 0..255 |

Bit-exact reference model of one butterfly, as the testbenches use it
(integers, `>>>` is floor division by a power of two):

```
t  = (B * W) >>> 6                       // complex, each part separately
A' = wrap12(scale ? (A + t) >>> 1 : A + t)
B' = wrap12(scale ? (A - t) >>> 1 : A - t)
```

Because every truncation rounds down, small negative errors accumulate, and
they accumulate coherently only in the DC bin. Expect a DC offset of roughly
−15 LSB in the transform of a signal with no DC. The other bins agree with a
floating-point DFT divided by 32 to within a few LSB.

A tone of amplitude a at an integer bin gives about a·N/64 = 16a in T(n)
after the unscramble. To stay inside the 8-bit output window (±511), keep
tones below about 30 LSB of the 12-bit input. The 12-bit memory word itself
holds up to ±2047.

## Addressing: one counter for everything

`address_generator` counts only the 512 A operands of an array, with a 9-bit
counter. For array r, an extra "A+B" bit is inserted at address bit 9−r:
- Counter bits below that position stay where they are.
- Counter bits above it move up one place.

A+B = 0 addresses A, and A+B = 1 addresses B, which is 2^(9−r) words
higher. In array 0 the pairs are 512 apart; in array 9 they are neighbours.
When the counter carries, the array index steps on.

The twiddle factors are in `wp_rom` in bit-reversed order of P. With this
order, array r uses the first 2^r entries, each for one block of
butterflies. The twiddle counter advances whenever all counter bits below
the A+B position are ones, which is when the data address is about to skip
a block. The counter is cleared at the end of each array.

For the unscramble and the output, n = {A+B, counter}:
- `AG_BITREV_N` drives bitrev(n).
- `AG_BITREV_M` drives bitrev(N−n), formed as bitrev(~(n−1)).
- `AG_STRAIGHT` drives n, for the memory test.

## Bit-serial arithmetic unit

`arithmetic_unit` holds A and B in shift registers and W in parallel. The
real and imaginary parts of B are shifted out LS bit first, and sign-extended
after their MS bit. They feed four `booth_serial_mult` instances, which
compute BR·WR, BI·WI, BR·WI and BI·WR. Two serial adders (`serial_addsub`)
form BR·WR − BI·WI and BR·WI + BI·WR.

The first 6 bits coming out are the fractions of W. The final adders and the
A shift registers are not clocked while those bits pass, which truncates BW
to the data LSB without a separate shifter. Four final adder/subtractors
then produce A ± BW as 13-bit results. The result shift registers keep
either the low 12 bits or, when `scale` is set, bits 12:1.

The same datapath does the other two jobs:
- **Unscramble** bypasses the multipliers. The final adders combine the two
  operand words directly, and one of them is switched to compute B − A.
- **Power** loads the middle 8 bits of the bus word into the W register
  instead of the ROM term. The central real adder is switched from
  subtract to add.

Clocks from `start` to `done`: butterfly 20, unscramble 14, power 22.

## Controller and routines

The sequence of routines is held in `start_address_rom`: a 16 × 8 table, in
two halves selected by the FFT/test switch. `fft_controller` reads the entry,
runs the routine it names, and steps the table. The controller is a
hardwired state machine with one state per step of a routine.

| half | entries |
|---|---|
| full FFT | 0F init, 28 FFT, 82 unscramble, 5E power (+INT), 49 output real, 47 output imaginary, 00 restart |
| test | 08 init test, 16 test 1, 00 (unused), 28 test 2 FFT, 4B output, 82 test 3 unscramble, 4B output, 60 test 4 power |

The front panel (`panel_t`) has these controls:

- **FFT/test switch (0..8).** Read when reset is released.
  - 0 runs the full sequence above for ever.
  - 1..4 run one test. The controller counts the test half of the table up
    to entry 2k−1.
  - 5..8 leave the controller idle.
- **Test 1, memory.** Waits for a full memory, swaps, then sends the memory
  in straight order, repeating.
- **Test 2, FFT.** Waits for a full memory, swaps, runs the FFT, then sends
  the result in frequency order, repeating.
- **Test 3, unscramble.** Unscrambles the memory already on the bus, without
  a swap, then sends it, repeating.
- **Test 4, power.** Sends the power spectrum of the memory on the bus,
  repeating.
- **Behaviour in test mode.**
  - `scope_trig` pulses at the start of each repeat.
  - Output runs at full clock speed, without `comp_ready`.
  - The R/I switch selects real or imaginary output.

  In full mode the R/I switch is ignored: the controller clears R/I before
  the real output and toggles it before the imaginary output.
- **Start mode** for the sampler:
  - MAN samples continuously.
  - AUTO samples while `ext_enable` is high.
  - ONE-SHOT fills one memory per `start_btn` press.
- **`stop_sampling`.** Ends a block early.
- **Over-range lamps.** `ovr_re` and `ovr_im` light when a converted word
  leaves −512..511, which means it uses the overflow guard bits.

## Interface of `fft_analyser`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | system clock; master reset, active low and asynchronous |
| `por_n` | in | power-on reset, active low; clears only the memory selection |
| `panel` | in | front-panel switches (`fft_pkg::panel_t`) |
| `sample_tick` | in | sample strobe, one clock wide, 1024 Hz |
| `ext_enable`, `stop_sampling` | in | AUTO enable; end the block early |
| `sh_hold`, `adc_start`, `adc_sel` | out | sample-and-hold and A/D control (`adc_sel` = 1: imaginary input) |
| `adc_eoc`, `adc_data[11:0]` | in | end of conversion (one-clock pulse), result |
| `comp_ready` | in | host ready; in full mode, paces the words and ends the wait after the unscramble |
| `out_data[7:0]`, `out_val` | out | output latch and its strobe (one clock after the latch) |
| `out_int`, `scope_trig` | out | DMA request; test-mode scope trigger |
| `ovr_re`, `ovr_im`, `start_addr`, `mem_sel`, `fft_busy`, `sampling`, `ri_state` | out | status |

`LOG2N` (default 10) sizes the memories, counters and twiddle table. The
start addresses and the test sequence do not depend on it.

## Parts not in the RTL

- **Analogue parts.** The A/D converter, the sample-and-hold amplifiers and
  the D/A converter are outside the design; their digital sides are ports.
  `tb/adc_model.sv` is a behavioural model of the A/D converter and
  sample-and-hold, for simulation only.
- **Microprogrammed controller.** The original controller was built from two
  cascaded Am2909 microprogram sequencers, a 256 × 40 microinstruction ROM
  and an opcode-mapping PROM. The microprogram is not reproduced. The
  routines it implements (order, start addresses, status-bit uses,
  control-line functions) are rebuilt as the `fft_controller` state
  machine, so clock counts per routine differ from the original.
- **System clock.** The RUN/TEST/manual clock selector and its debouncing
  are outside the design.
- **Zero-filling.** Shorter transforms by filling the rest of memory with
  zeros are not built. `stop_sampling` only ends a block early.

## Design choices where the source is silent

- The sampler runs on the system clock, and the sample clock arrives as a
  strobe. A strobe that comes during a conversion is dropped.
- Which arrays are scaled (the first of each pair) and the power shift of 9.
- The packing of both DC terms into word 0.
- INT is sent once, just before the power spectrum.
- In full mode every word is paced by `comp_ready`; in test mode words are
  not paced.
- The memory-swap pulse is registered, so the controller waits one clock
  after a swap before reading.
- The memory selection has its own power-on reset, `por_n`, which puts
  memory 0 on the system bus. Master reset leaves the selection alone, so
  after Test 2 a master reset into Test 3 unscrambles the Test 2 transform,
  and Test 4 then works on that result. Memory contents are never cleared.

## Simulation

Each `tb/tb_<block>.sv` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft_analyser.sv --top-module tb_fft_analyser
./obj_dir/Vtb_fft_analyser
```

`tb_fft_analyser` runs the whole analyser at the default size (N = 1024) for
about 2.6 million clocks, which takes about 25 s of simulation.

- **Stimulus.** A tone at bin 37 on receiver 1 and at bin 100 on receiver 2,
  plus noise. There is one out-of-range sample, and the host withholds
  `comp_ready` at random.
- **Memory checks.** The testbench shadows both memories from their write
  ports and checks every read. At the end of each FFT and unscramble it
  compares the whole memory with a bit-exact integer model. The first FFT is
  also compared with a floating-point DFT.
- **Output and timing checks.** Every output word is compared with the value
  expected at its frequency. Each block must give 3N words, and the FFT plus
  unscramble must finish within 500,000 clocks.
- **Test modes.** Tests 1 to 5 run after resets.
- **Start modes.** The full FFT is then run with the ONE-SHOT and AUTO
  start modes, and with a block cut short by `stop_sampling`.
- **Mechanisms.** Swaps, scaled and unscaled arrays, twiddle steps, the DC
  word, host stalls, the wait after unscramble, over-range, R/I toggles,
  INT, scope triggers, each test and each start mode are counted. One that never happens
  counts as a failure.

Two immediate assertions in the RTL check handshake rules during any
simulation:
- The arithmetic unit gets no start and no operand load while it is busy.
- The memories are never swapped in the same clock as a system write.

`tb_hardware_tests` follows the bench procedure for the tests. A sine goes
into receiver 1, with receiver 2 at zero, and the analyser is reset into
Tests 2, 3 and 4 in turn. It checks the traces by their shape:
- Test 2 gives spikes of the expected size at +f and −f, an even real trace
  and an odd imaginary trace.
- Test 3 puts the real input's transform in locations 0..511 and zero in
  512..1023.
- Test 4 gives one power spike in the real-input half.

The unit testbenches check their blocks against independent models:
- `tb_wp_rom` checks every twiddle entry against `$cos`/`$sin`.
- `tb_address_generator` checks every address sequence.
- `tb_arithmetic_unit` checks random operands in all three modes, with
  clock counts.
- `tb_fft_controller` checks routine counts, clocks per butterfly and the
  test entries at N = 16.
- The remaining testbenches cover the RAM, the memory switch, the sampler
  with the A/D model, the start-address ROM and the output unit.
