# SEU-tolerant readout controller for an SRAM neutron detector

An SRAM can serve as a neutron fluence detector. Fill it with zeroes, expose
it, and count how many bits have flipped to one: each flip is a single event
upset (SEU), and the upset count over time gives the neutron fluence. The
controller that reads such a detector sits in the same radiation field, so its
own flip-flops get upset too. This RTL is a readout controller built to keep
working when that happens.

- Every control state machine keeps its state in a register protected by an
  extended Hamming code. A single flipped bit is corrected before the state
  machine ever sees it. A double flip is detected and restarts the system.
- State values are Gray codes.
- The result sent to the host is protected by a CRC-16.

The controller periodically scans the detector memory. It counts the upset
bits and rewrites every upset word with zeroes. It then reads a temperature
sensor and a RadFET (gamma dose) sensor over serial links, and sends one
12-byte datagram on a UART line (`txd`). Two pins, `single_error` and
`double_error`, report upsets in the controller itself.

```
             +-------------------------------- roic_top ---------------------------------+
 SRAM  <---->| readout_ctrl --sens_start--> sensor_spi (Temp)  <----> temp_sclk/cs_n/miso  |
             |      |   \-------------------> sensor_spi (RadFET) <--> rad_sclk/cs_n/miso |
             |      +--dg_start--> datagram_tx --(bytes)--> uart_tx ---------------> txd  |
             |                        \-- crc16                                           |
             |  5 x seu_state_reg flags --> seu_error_monitor --> single_error,         |
             |                                   |                double_error           |
             |                                   +-- refresh --> every state machine     |
             +--------------------------------------------------------------------------+
```

## Protected state machines

This is the part that needs the most care. Each of the five state machines
(`readout_ctrl`, the two `sensor_spi` readers, `datagram_tx` and `uart_tx`)
keeps its state in a `seu_state_reg`, not in a plain register. The loop looks
like this:

```
 next-state logic --> hamming_enc --> [ code register ] --> hamming_dec --> state --+
        ^                                                                           |
        +---------------------------------------------------------------------------+
```

- **The register holds the code word, not the state.** Every cycle the stored
  word is decoded, and the decoded (corrected) value drives the state machine's
  logic. The next state is encoded and written back. So the register is
  scrubbed every clock: a single upset is corrected in the cycle it is seen,
  and it is gone from the register one edge later.
- **Code layout** (`roic_pkg::ham_encode`). For K state bits, R check bits are
  used, where R is the smallest number with 2^R >= K+R+1. The code word has
  N = K+R+1 bits:
  - bit 0 is the overall parity bit, which makes the word even;
  - bit 2^i is check bit i, covering every position whose index has bit i set;
  - the state bits fill the remaining positions in ascending order.
- **Decoding** (`hamming_dec`). The syndrome is the XOR of the indices of all
  set bits.
  - Odd parity: a single error at the position the syndrome names. It is
    corrected and `single_err` is raised. A syndrome of 0 means the parity bit
    itself flipped.
  - Even parity with a non-zero syndrome: a double error, and `double_err` is
    raised.
  - Odd parity with a syndrome beyond the word: this takes three or more flips,
    and it is also reported as a double error.
- **Double errors.** A double error cannot be corrected. In the same cycle, the
  affected register presents its initial state and loads it at the next edge.
  `seu_error_monitor` turns the event into a one-cycle `refresh` pulse on the
  next cycle. That pulse puts every state machine and the readout datapath
  (address, timer, handshake flags) back into their initial state. The readout
  controller then starts a fresh pass at once, and the next datagram reports
  the event.
- **Sizes used:**

  | state machine | protected state                       | K | code bits |
  |---------------|---------------------------------------|---|-----------|
  | readout_ctrl  | 4-bit Gray state (`rd_state_e`)       | 4 | 8         |
  | sensor_spi    | 2-bit Gray phase + 5-bit bit counter  | 7 | 12        |
  | datagram_tx   | 2-bit Gray phase + 4-bit byte index   | 6 | 11        |
  | uart_tx       | busy flag + 4-bit frame bit index     | 5 | 10        |

- **Gray codes.** Each state machine's states are assigned Gray codes. A state
  and its usual successor differ in one bit, for example
  IDLE 0000 → READ 0001 → SAMPLE 0011 → REPROG 0010 → ADVANCE 0110.
  The counters that are part of the protected state (bit and byte indices)
  count in plain binary. A state code that no state uses falls back to the
  initial state.
- **What is not protected.** Only the *control* state is protected:
  - The SRAM address counter is a plain register. An upset there only makes the
    pass read a different word; it does not derail the controller.
  - The clock dividers, shift registers, SEU counter and sensor values are
    plain registers too. An upset in them can corrupt one datagram. The
    datagram CRC is there to reveal that; the host has no way to correct it.
- **Strike model ports.** Each `seu_state_reg` has an `inject` input whose bits
  are XORed into the word stored at that edge. `roic_top` brings these out as
  `seu_inj_readout`, `seu_inj_temp`, `seu_inj_rad`, `seu_inj_dgram` and
  `seu_inj_uart`. They exist only for verification; tie them to zero in a real
  chip.

`single_error` and `double_error` are registered one-cycle pulses per cycle in
which any state machine reported an event. The monitor also counts those cycles
in two 8-bit wrapping counters. Only reset clears the counters, so the host can
take differences between datagrams.

## A measurement pass (`readout_ctrl`)

1. **Start.** The period timer starts a pass right after reset or refresh, then
   every `PERIOD` cycles (pass start to pass start).
2. **Memory scan.** The scan runs over addresses 0 … 2^ADDR_W−1:
   - `RD_READ`: the address is on `sram_addr` with `sram_oe` high.
   - `RD_SAMPLE`: `sram_oe` stays high. `sram_rdata` is compared with the
     reference word, which is all zeroes (`REF_WORD`). The number of differing
     bits is added to the 24-bit saturating SEU counter.
   - `RD_REPROG`: entered only if the word differed. `sram_we` is high for one
     cycle, with the reference word on `sram_wdata`.
   - `RD_ADVANCE`: moves to the next address.

   A clean word costs 3 cycles and an upset word 4.
3. **Sensors.** Both `sensor_spi` readers are started together. The controller
   waits until both have reported `done`.
4. **Datagram.** The controller starts `datagram_tx` and waits for its `done`.
   The SEU count stays valid on `seu_count` until the next pass starts.

At the defaults (1024 × 8 SRAM, `SCLK_DIV` 5, `BAUD_DIV` 87) a pass takes:

- about 3,072 cycles for the scan, plus 1 per upset word;
- 161 cycles for the sensors;
- 10,452 cycles for the datagram.

That is roughly 1.4 ms at 10 MHz.

The SRAM interface assumes the read data is valid within one cycle of the
address (it is combinational from the address as seen by the controller). It
also assumes a write completes in one cycle.

## Datagram and serial link

`datagram_tx` takes a snapshot of its inputs when it starts and sends 12 bytes,
most significant byte first within each field:

| byte  | content                                                            |
|-------|--------------------------------------------------------------------|
| 0     | sync `0xA5`                                                        |
| 1–3   | upset bits found in the last pass                                  |
| 4–5   | temperature sensor word                                            |
| 6–7   | RadFET sensor word                                                 |
| 8     | cycles with a corrected single error (mod 256)                     |
| 9     | cycles with a double error (mod 256)                               |
| 10–11 | CRC-16/CCITT of bytes 0–9: polynomial 0x1021, init 0xFFFF, MSB first, no final XOR (`crc16`) |

- `uart_tx` sends 8N1 frames: a start bit, eight data bits LSB first and a stop
  bit. Each bit lasts `BAUD_DIV` cycles and the line idles high.
- A byte takes 10·`BAUD_DIV` + 1 cycles including the handshake, so a datagram
  takes 12 × that.
- A datagram cut off by a refresh is simply incomplete. The host recognises it
  by the sync byte, the length and the CRC, and the datagram of the restarted
  pass follows.

## Sensor links (`sensor_spi`)

The reader is a receive-only SPI master in mode 0, one per sensor:

1. `cs_n` falls and `sclk` stays low for `SCLK_DIV` cycles.
2. Each rising `sclk` edge samples `miso`. 16 bits are read, MSB first, and
   each `sclk` half period lasts `SCLK_DIV` cycles.
3. `cs_n` rises, and `done` pulses together with the new `value`. This happens
   2·16·`SCLK_DIV` + 1 cycles after `start`.

The sensor is expected to drive its MSB when `cs_n` falls and to shift on
falling `sclk` edges.

## Parameters of `roic_top`

| parameter  | default   | meaning                                    |
|------------|-----------|--------------------------------------------|
| `ADDR_W`   | 10        | detector SRAM address width (1024 words)   |
| `DATA_W`   | 8         | detector SRAM word width                   |
| `PERIOD`   | 1,000,000 | cycles between pass starts (0.1 s at 10 MHz) |
| `BAUD_DIV` | 87        | clocks per UART bit (115,200 baud at 10 MHz) |
| `SCLK_DIV` | 5         | clocks per SPI half period (1 MHz at 10 MHz) |

Shared widths are constants in `roic_pkg`: the 24-bit SEU counter, 16-bit
sensor words and 8-bit error counters. The state encodings and the datagram
layout are defined there too.

- Reset is asynchronous and active low.
- All logic runs on one clock.
- `sram_wdata` is constant (the reference word) by design.

## Files

- `rtl/roic_pkg.sv`: Hamming sizing/encoding functions, state types, datagram
  constants, CRC step
- `rtl/hamming_enc.sv`, `rtl/hamming_dec.sv`: SEC-DED codec
- `rtl/seu_state_reg.sv`: the protected state register
- `rtl/readout_ctrl.sv`: the main state machine, address counter, SEU counter
  and period timer
- `rtl/sensor_spi.sv`, `rtl/datagram_tx.sv`, `rtl/crc16.sv`, `rtl/uart_tx.sv`,
  `rtl/seu_error_monitor.sv`
- `rtl/roic_top.sv`: the complete controller
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/roic_pkg.sv \
          tb/tb_roic_top.sv --top-module tb_roic_top
./obj_dir/Vtb_roic_top
```

Replace `roic_top` with any other module name to run its unit test. Each
testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a
watchdog if the design hangs.

`tb_roic_top` runs the complete controller at its default parameters, for
about 1.04 M cycles, in a few seconds. It models the SRAM, both sensors and a
UART receiver, and runs four passes:

1. The first pass has one single upset injected into each state register.
2. The second pass is forced by a double upset in the readout state machine.
   Its datagram is aborted by a double upset in the datagram sender.
3. The third pass restarts at once after that second refresh.
4. The fourth pass is started by the timer exactly `PERIOD` cycles later.

For every pass it checks:

- the SEU count, sensor words, error counters and CRC of each datagram;
- that the memory is clean afterwards.

It also counts that every mechanism happened. The unit tests cover the rest:

- the codec exhaustively for 4-bit states and every single and double flip;
- state register behaviour under random upsets and refresh;
- CRC against a bit-serial reference and the check value 0x29B1 of "123456789";
- bit timing of the UART and SPI links;
- datagram layout and timing;
- cycle counts of the memory scan.

## Where this design makes its own choices

The following are given by the design being implemented:

- the architecture: a state-machine controller that counts disagreements with
  an all-zero reference, reprograms upset words and reports the count to a
  host computer;
- Gray-coded states, with Hamming SEC-DED protection of the state registers;
- a refresh to the initial state on a double error;
- a CRC on the datagram;
- the serial sensor links;
- the `TxD`, `SingleError` and `DoubleError` outputs;
- an unprotected address counter.

The following are choices made for this RTL and can be changed freely:

- the code bit layout;
- the memory size and word width;
- the interface timing of the SRAM, SPI and UART;
- the 16-bit sensor words;
- the period timer that triggers passes;
- reprogramming each word right after it is read, instead of in a second pass;
- the datagram layout and its sync byte;
- the CRC polynomial;
- the pulse form of the error pins and the error counters;
- protecting the UART's state;
- the clock-rate assumption of 10 MHz behind the divider defaults.

Not included:

- the detector SRAM itself, an asymmetric cell array designed separately;
- the analogue temperature and RadFET sensors;
- the host computer;
- the pad ring and layout. The original chip was pad-limited: about 550 µm ×
  550 µm of core inside a 2.1 mm × 2.1 mm padded die in a 0.35 µm CMOS process.

Two further hardening techniques are also left out, because the design only
mentions them as options:

- triple modular redundancy, suggested as a use for the spare core area;
- a free-running refresh counter that resets the system regardless of errors.

Verilator reports a `SYNCASYNCNET` warning on `rst_n` in `roic_top`. It comes
from the `disable iff (!rst_n)` of the handshake assertions, not from the
circuit.
