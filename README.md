# Ring-oscillator true random number generator

This is a small true random number generator (TRNG) for FPGA or ASIC use.
Its randomness comes from timing jitter in free-running ring oscillators.
Thirty-six rings run at once: nine each of lengths 9, 13, 15 and 21 stages.
Their outputs are XORed together, and a single flip-flop samples the result
on every system clock. A Von Neumann corrector removes bias from the sampled
bits. An 8-bit shift register, a bit counter and a UART transmitter then send
the random bytes out over RS-232 at 115200 baud.

Two things make it different from a plain "XOR of rings" generator:

* **Multimode (3-edge) rings.** Each ring has three NAND gates spaced evenly
  round the loop. All three NANDs share one restart input. When that input
  rises, each NAND launches an edge, so three edges circulate at once. The
  ring then runs at about three times the frequency its gate count would
  give. Jitter makes the edges drift until two of them meet and cancel
  ("collapse"). After that one edge is left and the ring runs at its
  nominal frequency. The drift adds jitter.
* **Periodic restart.** To keep the rings from staying collapsed, a pulse
  generator restarts all 36 rings at 25 kHz. It sends a short low pulse
  every 40 µs, which puts the three edges back into every ring.

## Structure

```
                 +-----------------+  pulse_n (low 2 clk / 40 us)
 clk, reset ---->| pulse_generator |-------------------------+
                 +-----------------+                         |
                                                             v
   +-------------------------- entropy_source ------------------------+
   |  ro_group L=9  (9 x multimode_ro, XOR) --+                       |
   |  ro_group L=13 (9 x multimode_ro, XOR) --+--XOR--> D flip-flop --+--> raw_bit
   |  ro_group L=15 (9 x multimode_ro, XOR) --+          (clk)        |   (1 per clock)
   |  ro_group L=21 (9 x multimode_ro, XOR) --+                       |
   +------------------------------------------------------------------+
                                   |
               POST_PROCESS=1      v                POST_PROCESS=0
        +------------------------+            (every raw bit is taken)
        | von_neumann_corrector  |
        +------------------------+
            bit_value | bit_valid (one-clock impulse)
                      v
   +------------------------- simple_uart --------------------------+
   |  shift_register_8 --data[7:0]--> uart_tx --> tx (8N1, 115200)  |
   |  bit_counter ------transmit----^   (baud_generator inside)     |
   +----------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `trng_pkg` | Shared constants (clock, restart rate, baud, ring lengths, jitter), the Von Neumann rule and the UART state type |
| `multimode_ro` | **Behavioural model** of one 3-edge ring oscillator (simulation only) |
| `ro_group` | Nine rings of one length, XORed |
| `entropy_source` | Four groups, a 4-input XOR and the sampling flip-flop |
| `pulse_generator` | 25 kHz restart pulse: clock divider, delay line, NAND |
| `von_neumann_corrector` | Pairwise debiasing: 01 gives 0, 10 gives 1, 00 and 11 give nothing |
| `shift_register_8` | Gathers corrected bits into a byte |
| `bit_counter` | Requests a transmission after every eighth bit |
| `baud_generator` | One tick every 434 clocks (50 MHz / 115200) |
| `uart_tx` | 8N1 transmitter with Active and Done status outputs |
| `simple_uart` | Shift register, counter and transmitter wired together |
| `trng_top` | The whole generator |

## The ring oscillators and their model

A ring oscillator is a combinational loop. Its period comes from analog gate
delays and noise, which neither a cycle-based simulator nor a synthesis tool
handles as logic. So `multimode_ro` is a behavioural model with explicit
delays, written in picoseconds. It does not describe gates. On real hardware
each ring is built from LENGTH inverting stages, three of them two-input
NANDs. Each NAND is followed by an even run of inverters, and every NAND has
the restart line as its other input. Synthesis tools remove such loops unless
told not to: the hierarchy must be kept and the nets marked as kept. The
rings also need placement constraints (see "Departures and limits").

The model works stage by stage. It keeps the logic level of each of the
LENGTH stages, and an event loop switches one stage at a time:

* **Layout.** Three NANDs sit at equal spacing. The inverters between them
  form even runs: 2,2,2 for length 9; 4,4,2 for 13; 4,4,4 for 15; and
  6,6,6 for 21. The ring output is the last stage before NAND 0.
* **At rest.** While `start_n` is low, every NAND output is forced high.
  The inverter runs settle behind them, and the ring output rests high.
  Nine rings XOR to 1 in a group. Four groups XOR to 0, so the sampled bit
  is 0 while the rings are held.
* **After a restart.** When `start_n` rises, all three NANDs fall together
  and three edges travel round the ring. The output toggles about every
  `LENGTH * tau / 3`, where tau is the stage delay (0.7 ns by default).
  The nominal frequency is `f0 = 1 / (2 * LENGTH * tau)`.
* **Inertial stages.** A stage whose input changes schedules its own switch
  one stage delay later. If its input changes back before then, the switch
  is cancelled and the short pulse is swallowed. That is how two edges that
  drift together merge. Each merge removes two edges. So the ring goes from
  three edges straight to one, which is the collapse to `f0`. Nothing forces
  the collapse; it comes only from the random drift. In simulation it takes
  from a few nanoseconds (length 13, which has the most jitter) to several
  hundred nanoseconds (lengths 9, 15 and 21). Every restart comes long after
  the collapse.
* **Jitter.** Each stage switch gets a random delay offset. Its standard
  deviation is `JITTER_PS / (2 * sqrt(LENGTH))`. That makes the
  cycle-to-cycle jitter at the output equal to `JITTER_PS`: 172 ps,
  1.85 ns, 812 ps and 844 ps for lengths 9, 13, 15 and 21.
* **Variation between rings.** Each stage of each instance has its own fixed
  delay within ±5 % of tau.
* **Repeatable randomness.** The model draws from its own xorshift
  generator, seeded by `SEED`, so every run gives the same result.

With tau = 0.7 ns the collapsed rings run at about 77, 55, 48 and 35 MHz for
lengths 9, 13, 15 and 21. Placed FPGA rings were observed at 60–80 MHz. Set
`TAU_PS` per group if you want to match a particular build.

The restart pulse must last long enough for the forced-high level to reach
the whole ring. In the reference build a chain of 51 inverters set this
width, about 36 ns. Here it is 2 clocks (40 ns) from a flip-flop delay line.
In the model, any low pulse on `start_n` forces the NANDs high, at most one
stage delay after it arrives. The forced level then spreads through the ring
one stage delay at a time.
A pulse shorter than the ring's settling time can therefore leave more than
one edge in the ring, as it would in hardware.

## Sampling and post-processing

`entropy_source` samples the XOR of all 36 rings with one D flip-flop on
every clock. No synchroniser follows it: metastability of that flip-flop is
simply part of the noise. The raw stream is one bit per clock, 50 Mbit/s.

`von_neumann_corrector` pairs the raw bits without overlap. It emits the
first bit of every unequal pair, one clock after the pair ends, and flags it
with a one-clock `impulse_bit`. Equal pairs are dropped. For unbiased input,
about one bit in four survives: in simulation, 20000 corrected bits took
about 80000 clocks. If the source gets stuck, nothing is emitted, which also
acts as a crude health check. Setting `POST_PROCESS = 0` on `trng_top`
removes the corrector: every raw bit is then shifted in, one per clock.

## Output interface and its rate mismatch

The shift register takes each flagged bit at its top end. After eight bits,
`data[0]` is the oldest bit. The UART sends `data[0]` first, so bits go out
on the line in the order they were produced. The counter pulses `transmit`
one clock after the eighth bit, when the byte is complete.

A frame is 10 bit periods of 434 clocks, 4340 clocks in all. The corrector
completes a byte roughly every 32 clocks, so the line can carry fewer than
1 % of the bytes. **A request that arrives while a frame is on the line is
ignored, and that byte is lost.** The bytes that are sent are therefore a
sample of the stream, roughly one completed byte per frame time. The byte
that gets sent is chosen by when it completes, not by what it holds. If you
need every bit, add a FIFO and a faster link, or read
`bit_value`/`bit_valid` directly.

`led_active` is high during a frame. `led_done` rises at the end of a frame
and stays high until the next frame starts, so an LED can show it.

## Timing summary (defaults)

| Quantity | Value |
|---|---|
| System clock | 50 MHz |
| Raw bits | 1 per clock, one clock after the sampling edge |
| Ring restart | low for 2 clocks, every 2000 clocks (25 kHz); held low during reset |
| Corrected bits | data dependent, about 1 per 4 clocks; 1 clock after the pair |
| Transmit request | 1 clock after the 8th bit of a byte |
| Serial line | 8N1, 434 clocks per bit (115207 baud, 0.007 % fast), line low 1 clock after the request |
| Reset | synchronous, active high, reaches every clocked block |

The top also brings out `bit_valid`, `bit_value`, `byte_data` and
`byte_ready` for observation.

## Departures and limits

* The rings are behavioural models. The synthesizable part is everything
  else: the pulse generator, the XOR tree and sampling flip-flop, the
  corrector and the UART path, about 42 flip-flops in all. The reference
  FPGA build reported about 106 slice registers, but its UART was a
  different design.
* The restart pulse width comes from a 2-flop delay line, not from a chain
  of 51 inverters. Its width therefore does not depend on placement.
* In the reference build the bit impulse clocks the shift register
  directly. Here everything runs on the one system clock, and the impulse
  is a clock enable.
* Several details were this design's own choice: reset reaching every
  block, dropping bytes while the UART is busy, `done` as a level, the bit
  order on the byte bus, and the ring model itself: equal inverter runs,
  inertial stages, and jitter spread evenly over the stages.
* Ring placement is not part of the RTL. The reference build placed the
  length-9 and length-13 rings by hand across separate regions to lengthen
  their wires and increase jitter. It auto-placed the length-15 and
  length-21 rings, and kept empty gaps between regions to avoid injection
  locking between neighbouring rings. In this model, placement shows up
  only in the delay and jitter parameters.
* The statistical results below come from pseudo-random model jitter. They
  show that the datapath keeps the statistics of its source. They say
  nothing about a physical implementation, which must be validated on
  hardware with FIPS 140-2, NIST SP 800-22 and AIS 31 test suites.

## Verification

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

* `tb_multimode_ro`: for all four lengths, checks the rest level, three
  edges after each restart, the delay to the first output change, a fast
  half period of about `L*tau/3` (±15 %), collapse to one edge before every
  restart, the collapsed half period `L*tau` (±5 %), and cycle-to-cycle
  jitter within ±40 % of the target.
* `tb_ro_group`: compares the group output with nine separately built
  reference rings.
* `tb_entropy_source`: checks that each sample equals the XOR at the clock
  edge, that the rest value is 0, and that the share of ones in 20000
  samples is between 40 and 60 %. It also runs the NIST SP 800-22
  frequency and runs tests on those raw samples, which is the stream the
  design without the corrector sends.
* `tb_pulse_generator`: checks the 2000-clock period, the 2-clock width
  and the behaviour under reset.
* `tb_von_neumann_corrector`, `tb_shift_register_8`, `tb_bit_counter`,
  `tb_baud_generator`, `tb_uart_tx`, `tb_simple_uart`: each checks its
  block against a reference model in the testbench. Cycle counts are exact:
  434 clocks per bit, 4340 clocks per frame, and `transmit` one clock
  after the eighth bit.
* `tb_trng_top`: runs the whole generator at default rates with and
  without the corrector. The shared checker `trng_monitor` rebuilds the
  corrector output from the sampled raw bits and groups the bits into
  bytes. It decodes every frame on `tx` and checks that every level change
  falls on a bit boundary. The test also requires that each mechanism
  occurs: restarts, ring collapse, discarded pairs, completed bytes, frames
  sent, bytes dropped while the line was busy, and a reset in
  mid-operation.
* `tb_trng_top_full`: runs `trng_top` with no parameter changes until
  20000 corrected bits exist (about 1.6 ms simulated, about a minute of run
  time), with the same checker. It then applies the FIPS 140-1 monobit,
  poker, runs and long-run tests, and prints the FIPS 140-2 verdicts.
  Current result: 10011 ones, poker X = 14.80, longest run 14, all FIPS
  140-1 and 140-2 bounds met. For runs of six or more, the FIPS 140-1
  interval 90–223 is used. It also runs the NIST SP 800-22 frequency test
  (P = 0.876), cumulative sums test in forward mode (P = 0.544) and runs
  test (P = 0.682), and the AIS 31 autocorrelation
  test T5 (re-test Z = 2489, bounds 2326–2674). The other NIST tests and
  AIS 31 class P2 need millions of bits and are not simulated.

### Running a test with Verilator

```
verilator --binary --timing --assert -Wno-fatal \
    -Irtl -y rtl -y tb rtl/trng_pkg.sv tb/tb_trng_top_full.sv \
    --top-module tb_trng_top_full -o sim
./obj_dir/sim
```

Substitute any other testbench name. `--timing` is required wherever the ring
model is included. All files declare a 1 ns time unit with 1 ps precision,
and the ring model uses 1 ps units.

## Parameters worth changing

* `trng_top`: `PULSE_FREQ_HZ` (restart rate; the reference build found
  anything below 500 kHz worked and used 25 kHz), `PULSE_WIDTH_CYCLES`,
  `BAUD_RATE`, `CLK_FREQ_HZ`, `NUM_RINGS` (rings per length), and
  `POST_PROCESS`.
* `multimode_ro`: `TAU_PS`, `JITTER_PS` and `SEED` shape the model
  only.
* The four ring lengths and their jitter figures live in `trng_pkg`.
