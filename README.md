# Secure IR sensor link with an ADPLL-based true random number generator

An IR object sensor gives one bit: 0 when something is in front of it, 1 when
nothing is. This design sends that bit from one FPGA board to another over a
Bluetooth serial link. It hides the bit by XORing it with a fresh random bit
each time, as a one-time pad does. The random bits come from a small true
random number generator (TRNG). The TRNG samples two free-running NOR-gate
ring oscillators against the output of an all-digital phase-locked loop
(ADPLL). The ADPLL's correction ripple adds jitter, and the sampling flip-flop
is fed back into itself.

The receiving board runs the same TRNG. A discrete quad XOR IC (74HCT86) on
its breadboard XORs the received bit with the local random bit to "decrypt"
it. Between the two FPGAs sit two Arduino UNO boards and two HC-05 Bluetooth
modules: a master on the transmit side and a slave on the receive side. They
are not logic that can be written here, so their signals are ports of the RTL.

```
 transmitter board                                   receiver board
 +---------------------------------------+           +---------------------------+
 | sensor --> [reg @100MHz] --+          |           |                           |
 |                            XOR--> xorout --> Arduino/HC-05 ~~ HC-05/Arduino --> link_rx
 | adpll_trng --> q1 ---------+          |           |                  |        |
 +---------------------------------------+           | adpll_trng --> q3 --> 74HCT86 gate --> data_out
                                                     +---------------------------+
```

## Read this first: what the decryption really does

The two TRNGs are independent physical noise sources, and nothing in the
system sends the transmitter's key to the receiver. The receiver output is
therefore

    data_out = sensor ^ q1(tx, when sent) ^ q3(rx, when received)

This equals the sensor bit only when the two key bits happen to agree. In
simulation that is about half the time. A typical run recovers 8 of 19
values in `tb_sensor_sequence` and 71 of 133 deliveries in
`tb_secure_ir_link_top`.
The RTL implements the XOR encryption and decryption exactly as specified,
and the testbenches check that identity. A working secret channel would need
a shared key, which is not part of this design. Treat the link as a
demonstration of the TRNG in a data path, not as a cipher.

## The ADPLL (`adpll`)

This is the least obvious part. The ADPLL is the classic four-block loop:

```
 ref_in (f0) --XOR--> dn_up --> K counter --carry/borrow--> ID counter (DCO) --> id_out
        ^ fb                     (mod K)                     clocked 2N*f0        |
        +------------------------- divide-by-N <-------------------------------------+
```

| constant | value | meaning |
|---|---|---|
| K | 4 | modulus of the K counter (loop gain) |
| M | 16 | K clock = M * f0 = 800 MHz |
| N | 8 | feedback divider; ID clock = 2N * f0 = 800 MHz |
| f0 | 50 MHz | centre frequency = reference frequency |

These are in `rtl/trng_pkg.sv`. With these numbers the K clock and the ID
clock are both 800 MHz, so one input, `clk_dco`, drives both counters.
`adpll` asserts `M == 2*N`.

The blocks:

- **`phase_detector`**: `dn_up = ref_in ^ fb`. Locked, the two square waves
  are 90 degrees apart and `dn_up` is high half of the time.
- **`k_counter`**: an up/down counter modulo K on the K clock. While `dn_up`
  is 1 it counts down, and wrapping below 0 gives a one-clock `borrow`. While
  `dn_up` is 0 it counts up, and wrapping past K-1 gives a one-clock `carry`.
  Locked, each 50 MHz reference period has 8 clocks up and 8 clocks down.
  That is 2 carries and 2 borrows per period: the loop never sits still, and
  this ripple is part of the jitter the TRNG uses.
- **`id_counter`** (the DCO): a register `gate` toggles on every *falling*
  ID clock edge, and `id_out = clk & gate`. The output is one pulse, the high
  half of an ID clock, every two ID clocks, so 400 MHz = N * f0. A carry keeps
  `gate` high for one extra period, which inserts a pulse and advances the
  phase. A borrow keeps it low for one extra period, which deletes a pulse
  and retards the phase. Carries and borrows wait in a pending flag until
  they can act. Because `gate` only changes while the clock is low, the gated
  clock has no glitches.
- **`div_n_counter`**: counts IDout pulses modulo N and gives a square wave,
  low for 4 counts and high for 4, back at f0.

Because the XOR detector's characteristic is symmetric, the loop also locks
if carry and borrow are swapped. It then locks on the other slope. In
`tb_adpll` the loop follows a reference 3 % either side of 50 MHz, and IDout
stays at exactly 8 times the reference.

## The TRNG (`adpll_trng`, `trng_sampler`, `ring_oscillator`, `pulse_generator`)

```
 clk 100 MHz -> pulse_generator -> hold -> ring_oscillator x2 -> ro1, ro2 --+
 clk / 2 = f0 ------------------------------> adpll -> id_out ----------------+
                                                                             v
        d1 = ro1 ^ ro2 ^ id_out ^ q1  --DFF1 @ id_out--> q1 --DFF2 @ id_out/2--> random_bit
```

- **`ring_oscillator`** is a **behavioural model**. It cannot be synthesized
  as written, because a ring is a combinational loop whose speed belongs to
  the silicon. It has three NOR stages. The first is NOR(hold, feedback); the
  other two are NORs with their inputs tied, so they act as inverters. Each
  gate delay is 310 ps (335 ps for the second ring) plus a random 0-25 ps, so
  the ring period is about 1.9 ns. On an FPGA, replace it with a LUT ring
  (Xilinx needs `ALLOW_COMBINATORIAL_LOOPS` on the net) with the same ports.
- **`pulse_generator`** holds both rings for one of every four 100 MHz
  clocks. When it releases them they restart from a fixed state, so their
  phase at sampling time comes only from jitter accumulated since the
  restart. During reset it holds the rings.
- **`trng_sampler`**: DFF1 captures `ro1 ^ ro2 ^ id_out ^ q1` on each IDout
  pulse. A T flip-flop (`div2_counter`, T input = the board's `t` switch)
  halves IDout, and DFF2 re-samples Q1 on that clock. The output is one bit
  per two IDout pulses: **200 Mbit/s** nominal. With `t` low, DFF2 stops and
  the output freezes.
- IDout is both the clock of DFF1 and one of the XORed data bits. In silicon
  the data therefore changes right at the clock edge, which is where the
  metastability comes from. A two-state simulator sees the new (high) IDout
  value at the edge.
- The ADPLL reference is the 100 MHz board clock divided by two (f0 = 50 MHz).

Measured in simulation at the default parameters (`tb_adpll_trng`):

| measure | result |
|---|---|
| IDout | 400 pulses per microsecond |
| random bits | 200 per microsecond |
| SP 800-22 frequency test, 150 bits | p = 0.41 (pass) |
| SP 800-22 frequency test, 2000 bits | p = 0.50 (pass) |
| SP 800-22 runs test, 150 bits | p = 0.038 (pass at the 0.001 level used) |
| SP 800-22 runs test, 2000 bits | p < 0.001 (fail; too few runs) |

The original design's published test also fails the runs and longest-run
tests. The model's entropy depends entirely on the assumed ring jitter, so
these numbers describe the model, not a chip.

## Transmitter and receiver boards

| module | ports (board pin names) | function |
|---|---|---|
| `tx_fpga` | `clk`, `clk_dco`, `t`, `rst`, `sensor` -> `q1`, `xorout` | registers `sensor` on `clk` (reset value 1 = no object); `xorout = sensor_q ^ q1` |
| `rx_fpga` | `clk`, `clk_dco`, `t`, `rst` -> `q3` | TRNG only; the XOR is the external IC |
| `xor_ic_74hct86` | `a[3:0]`, `b[3:0]` -> `y[3:0]` | logic of the quad XOR IC |
| `secure_ir_link_top` | both boards' inputs, `link_rx` -> `q1`, `xorout`, `q3`, `data_out` | both boards side by side, gate 0 of the IC decrypts |

`xorout` is combinational from the sensor register (100 MHz domain) and DFF2
(IDout/2 domain), as in the original. Anything that samples it (the Arduino)
samples asynchronously.

## Clocks and reset

- `clk`: 100 MHz board clock. `clk_dco`: 800 MHz ADPLL clock. How the
  800 MHz clock is made on the board is not specified; on an FPGA it would
  come from a clock manager.
- Generated clocks: IDout clocks DFF1 and the divide-by-N counter, and IDout/2
  clocks DFF2. This follows the block diagram. It is not a single-clock
  synchronous design.
- `rst`: active high and asynchronous, in every register. Raise it with an
  edge, not only as a level present from time 0. While it is high IDout stops,
  and the flops clocked by IDout only reset through their asynchronous input.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/trng_pkg.sv tb/tb_secure_ir_link_top.sv \
          --top-module tb_secure_ir_link_top
./obj_dir/Vtb_secure_ir_link_top
```

Swap in any other `tb/tb_*.sv`. All run at the default parameters in a few
seconds. `--timing` is required because the ring oscillator model uses
delays. The timescale is 1 ps throughout.

| testbench | what it checks |
|---|---|
| `tb_phase_detector`, `tb_xor_ic_74hct86` | truth tables |
| `tb_k_counter` | carry/borrow against a reference count, one carry per K clocks |
| `tb_id_counter` | pulse spacing: 2 clocks nominal, each carry one 1-clock gap, each borrow one 3-clock gap, no glitches |
| `tb_div_n_counter`, `tb_div2_counter`, `tb_pulse_generator` | output against a counted reference |
| `tb_ring_oscillator` | rests while held, period within gate-delay bounds, jitter present |
| `tb_trng_sampler` | DFF1/DFF2/divider against a model, bit rate, `t` hold |
| `tb_adpll` | lock at 48.5, 50 and 51.5 MHz, IDout = 8 x reference, carries and borrows |
| `tb_adpll_trng` | rates, frequency test on 150 and 2000 bits, `t` hold |
| `tb_tx_fpga`, `tb_rx_fpga` | encryption identity; rate, balance and hold of q3 |
| `tb_secure_ir_link_top` | end to end with a sampled link model; every mechanism counted |
| `tb_sensor_sequence` | a logged 19-value sensor sequence sent through the link |

## Where this RTL departs from, or adds to, the original

- **Not reproduced gate for gate.** The original's gate-level schematics
  contain more cells than the block diagram: extra T flip-flops, AND/OR
  gates, an XOR chain and extra D flip-flops. Their wiring is not known, so
  the RTL follows the block diagram. The original reports 1 LUT for the
  transmitter and 2 for the receiver. This RTL is larger: the ADPLL alone is
  about 40 word-level cells and 11 flip-flops.
- **This design's own choices:** the borrow output of the K counter, the
  pulse insert/delete rule of the DCO, the reference source (clock / 2), the
  pulse generator's period and width, the rings' stage count, delays and
  jitter, the role of `t`, reset polarity and values, and the 50 % duty cycle
  of the divide-by-N output.
- **Bit rate.** The structure gives 200 Mbit/s. The original reports 202.47
  Mbit/s for the transmitter and 680.73 Mbit/s for the receiver. The latter
  cannot come from this structure at an 800 MHz ID clock.
- **Sensor path.** The sensor bit is only XORed with the key. It does not
  feed the TRNG's entropy.
- **Not in the RTL:** the Arduino firmware, the HC-05 modules and their AT
  command setup (UART at 9600/38400 baud), the IR sensor, the displays, and
  the 800 MHz clock source.
