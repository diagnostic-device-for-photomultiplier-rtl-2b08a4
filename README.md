# PMT diagnostic device firmware

Photomultiplier tubes in a time-of-flight detector lose gain as they age in
radiation. One way to track this is to fire short, repeatable UV light
pulses into the tube while it is installed and watch how its response drifts.
This RTL is the FPGA logic of such a pulser. It drives four UV LEDs through
fast transistor drivers. For each pulse it sets:

* **when and how long**: a 400 MHz PWM generator gives pulses of 2.5 ns to
  640 ns at 100 kHz down to about 6 kHz, in 2.5 ns steps;
* **how bright**: four 8-bit I2C DACs set the supply voltage of each LED
  driver, and so the LED current.

A TDC module controls the device over I2C while the detector runs. During
installation a PC controls it over a UART instead. Both write the same eight
8-bit registers.

The logic follows the firmware architecture in the article *Diagnostic
Device for Photomultiplier Tubes at ARP ToF Detector* (called "the device
paper" below). The paper names the blocks and describes the PWM generator and
the safety features. It leaves most encodings open, such as register order,
command format, bus rates and addresses, and timeout length. This design picks
those; the section "Departures and choices" lists them.

## Structure

```
  TDC (I2C) ---> i2c_slave --+                         +--> pwm_generator --> led_ctrl_o[3:0]
                             +--> comm_switch --> comm_handler
  PC (UART) ---> uart -------+       (link select)     +--> i2c_master --> i2c_mux --> 4 DAC buses
```

| Module | Role |
|---|---|
| `pdd_top` | Top level. Wires the blocks together and brings out the pins. |
| `pdd_pkg` | Register map, status bit positions, the `byte_beat_t` byte+valid struct, the link enum. |
| `i2c_slave` | Register access for the TDC. Writes become a byte stream; reads return the last answer. |
| `uart` | 8N1 receiver and transmitter for the PC. |
| `comm_switch` | Merges the two byte streams. Tracks which link is active and sends answers back over it. |
| `comm_handler` | Command decoder, register file, rate limit, DAC write queue, status register and command timeout. |
| `pwm_generator` | Reload counter and compare logic with shadow registers. Its output drives all four LED drivers. |
| `i2c_master` | Writes one byte to a DAC: START, address+W, data, STOP, with acknowledge checks. |
| `i2c_mux` | Connects the master to one of four DAC buses. |

Every DAC has the same I2C address, so each sits on its own pair of pins. A
DAC is picked by switching the mux, not by addressing it.

The LED drivers, the DACs with their unity-gain buffers, and the USB/UART
converter with its filters and protection are board-level analog parts. They
are not modelled. `pdd_top` brings out their digital connections as ports.

## Commanding the device

### Command bytes

Both links carry the same commands:

| Bytes | Meaning |
|---|---|
| `0000_0aaa`, `dddd_dddd` | Write `d` to register `a` |
| `1000_0aaa` | Read register `a`. The device answers with one byte. |

* Over UART, the answer comes back as a UART frame right after the command.
  The transmitter can hold one more answer while a frame goes out, so read
  commands may follow each other without a gap.
* Over I2C, a write is one transfer: `START, 0x50+W, cmd, data, STOP`.
* An I2C read is `START, 0x50+W, 0x8a, (repeated) START, 0x50+R, <byte>, NACK, STOP`.
  * The slave answers every read byte with the last answer the handler gave.
  * If the master acknowledges, the slave sends that byte again.

### Registers

| Addr | Name | Access | Meaning |
|---|---|---|---|
| 0 | STATUS | R, write 1 to clear | bit 3:0 DAC *n* did not acknowledge (sticky); bit 4 BUSY (a DAC write is running or waiting); bit 5 RELOAD_REJ (a reload below the minimum was refused, sticky) |
| 1 | RELOAD_HI | R/W | PWM reload bits 15:8. Held until RELOAD_LO is written. |
| 2 | RELOAD_LO | R/W | PWM reload bits 7:0. Writing it commits the 16-bit reload. |
| 3 | COMPARE | R/W | Pulse width: compare+1 clock cycles |
| 4–7 | DAC0–DAC3 | R/W | DAC code of LED channel 0–3. Writing it starts an I2C write to that DAC. |

Every register reads back exactly what was written, including a refused
reload. The master can compare the read-back with what it sent; the paper
describes this check. The refused bit in STATUS shows whether the PWM
generator took a reload.

### Command timeout

After the command byte of a write, the handler waits at most
`TIMEOUT_CYCLES` clocks (1 ms) for the data byte. If the byte does not come,
the handler:

* drops the command;
* resets the I2C slave's protocol engine and the UART receiver.

A link that hangs halfway through a command therefore cannot leave the device
waiting forever. Each new I2C write transfer also restarts command parsing,
and so does a change of active link.

### Choosing the link

The device listens on I2C by default. A byte from the UART makes the UART the
active link, and the next I2C write transfer makes I2C active again. There is
no arbitration, because both hosts are never connected at the same time.
`uart_mode_o` shows the active link.

## The pulse generator

This block sets the optical timing, and it has the most detail in the paper.

```
 counter   0  1  2  3  4  5 ...        reload  0  1  2 ...
 pwm_o    _|‾‾‾‾‾‾‾‾‾‾‾|____________________|‾‾‾‾‾ ...
           <- compare+1 ->
           <-------- reload+1 clocks ------->
```

* A 16-bit counter counts from 0 to `reload`, then restarts. The period is
  `reload+1` clocks, and a new cycle begins at each restart.
* The output rises when a cycle begins. It falls after the clock in which
  the counter equals `compare`, so the pulse lasts `compare+1` clocks.
* With the 8-bit compare that gives 1 to 256 clocks, which is 2.5 ns to
  640 ns at 400 MHz. That is exactly the width range the device must cover.
* The smallest width is one clock, so there is no "off" setting. To dark an
  LED, set its DAC to a low voltage.
* **Shadow registers.** Writes go into buffer registers of the same width.
  The buffers are copied into the working registers only when a new cycle
  begins. A pulse is therefore never cut short or stretched, and a period
  never changes midway, whatever the timing of the write.
* **Rate limit (100 kHz).** The limit is enforced in two places.
  * `comm_handler` refuses a reload below 3999 and sets RELOAD_REJ.
  * `pwm_generator` raises any reload below `RELOAD_MIN` to `RELOAD_MIN`
    before it enters the buffer.
  * 3999 gives a period of 4000 clocks (10 µs).
  * An assertion checks that the working reload never drops below the
    minimum.
* After reset the reload is 0xFFFF and compare is 0. The device then gives
  one 2.5 ns pulse every 65536 clocks (about 6.1 kHz).

Example: a 10 ns pulse at 100 kHz needs COMPARE = 3, RELOAD_HI = 0x0F and
RELOAD_LO = 0x9F.

All four LED outputs carry the same signal. The paper's register set has
room for only one reload and one compare, so the four channels differ only
in the drive voltage their DACs set.

## DAC updates

Writing DAC*n* does two things:

* it stores the value, which reads back at once;
* it marks DAC *n* as pending.

Whenever `i2c_master` is idle, the handler starts the lowest-numbered pending
DAC:

1. It sets the mux to that DAC's bus.
2. The master sends the DAC address (`DAC_ADDR`, 0x4C) and one data byte.

A DAC written again while its transfer is running is queued again with the
new value. If a DAC fails to acknowledge its address or data, its error bit
in STATUS is set. BUSY stays high while a transfer runs or a DAC is waiting.

A transfer has START, 18 bit times and STOP, each of `4*QUARTER` clocks. At
100 kHz SCL that is 80 × 1000 clocks = 200 µs per DAC. The UART is fast
enough to queue several DAC writes behind one another; I2C at 100 kHz is not.

## Clocking, reset and pins

* **Clock:** one clock, `clk`, at `CLK_HZ` = 400 MHz, for everything. The
  paper asks for 400 MHz only for the PWM generator. Running the control
  logic from the same clock avoids clock-domain crossings.
* **Reset:** `rst_n` is an asynchronous, active-low reset.
* **External inputs:** the I2C and UART inputs are synchronised with two
  flip-flops. Filtering and protection are assumed to sit on the board.
* **Open-drain lines** are modelled as a pull-low enable `*_oe` and a sampled
  level `*_i`. On the FPGA pin, drive the pad low when `_oe` is 1 and tristate
  it otherwise. The slave never stretches SCL, and the master is alone on each
  DAC bus, so neither needs an SCL input.

| Parameter (`pdd_top`) | Default | Source |
|---|---|---|
| `CLK_HZ` | 400 000 000 | paper (2.5 ns resolution) |
| `MAX_RATE_HZ` | 100 000 | paper; gives `RELOAD_MIN` = CLK_HZ/MAX_RATE_HZ − 1 = 3999 |
| `BAUD` | 115 200 | own choice |
| `I2C_HZ` | 100 000 (DAC buses) | own choice |
| `SLAVE_ADDR` | 0x50 | own choice |
| `DAC_ADDR` | 0x4C | own choice |
| `TIMEOUT_CYCLES` | 400 000 (1 ms) | own choice; the paper gives no length |

## Departures and choices

Taken from the paper:

* the seven firmware blocks and their connections;
* eight registers: status, PWM, and four 8-bit DACs;
* read-back of written registers;
* the 16-bit reload and the 8-bit compare, the counter reset on reload
  equality, and the toggle at compare;
* the shadow registers;
* the 100 kHz limit, enforced in more than one place;
* status bits for DAC errors and a busy DAC bus;
* the timeout between the first and second byte of a command;
* the one-byte DAC protocol;
* the 4-way I2C mux.

This design's own choices:

* the command and register encoding, and the status bit positions with
  write-1-to-clear;
* committing the reload on its low byte;
* pulse width = compare+1, chosen because it matches the 2.5–640 ns range;
* queuing DAC writes instead of refusing them while the bus is busy;
* what the timeout resets;
* one clock domain;
* the bus rates, addresses and timeout length;
* a reset state that pulses at the lowest rate.

Not covered:

* **Minimum rate.** The required 7 kHz floor is not enforced. Reloads up to
  65535 are accepted, down to about 6.1 kHz.
* **Drive timing.** The NPN and PNP drivers share one control signal. The
  paper mentions separate timing for them only as a possible improvement.
* **Board-level parts.** The analog driver, the DACs and the power circuitry
  are outside this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block's
outputs with values worked out in the testbench, and prints
`TB_RESULT checks=N failures=M`.

`tb_pdd_top` runs the whole design at the default parameters: 400 MHz,
115200 baud, 100 kHz I2C and the 1 ms timeout. It uses three simulation-only
models:

* `i2c_host_bfm`, the TDC;
* a UART model of the PC, built into the testbench;
* four copies of `dac_model`, an 8-bit I2C DAC.

The test checks the following:

* a 10 ns pulse at 100 kHz, measured on the LED outputs;
* the running 65536-clock cycle finishing before the new reload applies;
* refusal of a faster rate;
* DAC writes queued over UART, with every DAC receiving its own value;
* the error bit of a DAC that does not answer;
* read-back over both links, and switching from one link to the other and
  back;
* a half-sent command timing out.

It also counts each of these mechanisms and fails if any never happened. The
whole test takes about 7 ms of simulated time and a few seconds to run.

`tb_pwm_spec` runs the PWM generator at its default parameters over the
required timing range: 2.5 ns, 10 ns and 640 ns pulses at 100 kHz and at
7 kHz, and a 400 kHz request that comes out at 100 kHz.

To run a testbench with Verilator 5 from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/pdd_pkg.sv tb/tb_pdd_top.sv --top-module tb_pdd_top -o sim
./obj_dir/sim
```

For a block testbench, replace `tb_pdd_top` with `tb_pwm_generator`,
`tb_comm_handler`, `tb_i2c_slave`, `tb_i2c_master`, `tb_i2c_mux`, `tb_uart` or
`tb_comm_switch`, `tb_pwm_spec`. The block testbenches other than `tb_pwm_spec` shrink bit times and counts through
parameters so they finish in well under a second.

Nothing here has been run on an FPGA or timed for 400 MHz. On a real device
the PWM counter and its comparators are the critical path. The slower control
logic could move to its own, slower clock, at the cost of a clock-domain
crossing for the PWM write strobes.
