# Eight-channel radiation event detector (FPGA, 400 MHz sampling, RS-232 readout)

A radiation strike on a sensor shows up as a pulse that may be only 5 ns long. This design
catches such pulses on eight sensor lines at once. It samples every line at 400 MHz (one
sample every 2.5 ns, so a 5 ns pulse covers at least two samples). It keeps a 40 ns snapshot
of all eight lines in on-chip RAM. Then it streams the snapshot to a host PC over a plain
RS-232 UART.

A UART link gives no framing beyond the byte and no delivery guarantee. So every stored
sample bit travels in its own byte, together with the channel, RAM address and position that
say where it belongs. The host can rebuild the eight waveforms from any subset of the bytes,
in any order. It can also ignore a byte it did not expect.

The target is a Xilinx Virtex-5 class FPGA with a 100 MHz board clock. The 400 MHz sample clock
comes from an on-chip PLL.

## Block diagram

```
               clk_400 (from PLL, edges aligned with clk_100)
                  |
 sensor_in[c] --> [S1]->[S2]->[S3]->[S4]      channel_demux_ram  x8
                    |     |     |     |
                    v     v     v     v
                  4-bit x 4-word RAM  <-- addr_a, we  <-- write_addr_counter
                    | out_b (port B, addr_b)                 ^ start
                    v                                        |
              readout_fsm ---------------------------------- +
                    | packet (8 bit), push          ^ buf_full   ^ acquire
                    v                               |            |
              uart_logic: sync_fifo -> uart_tx --> rs232_tx
                                       uart_rx <-- rs232_rx  (acquisition code)
```

| Module | Role |
|---|---|
| `event_detector_top` | Wires everything together. Its ports are clocks, reset, 8 sensor lines and the two serial pins |
| `channel_demux_ram` | One per channel: a 4-flip-flop shift chain at 400 MHz, plus a 4-bit by 4-word dual-port RAM written at 100 MHz |
| `write_addr_counter` | One shared write address and write enable for all eight RAMs. It makes one 40 ns recording per start |
| `readout_fsm` | Walks all RAMs bit by bit and emits packets. It pauses on buffer full. It runs the acquisition handshake |
| `uart_logic` | Transmit buffer (`sync_fifo`), transmitter (`uart_tx`), receiver (`uart_rx`) and the acquisition-code detector |
| `ed_pkg` | Sizes (8 channels, 4 samples per word, 4 words) and the packet struct |

## Sampling: how 400 MHz becomes 100 MHz words

This part is the least obvious, and it is where the design relies on the clocks.

Each channel has four D flip-flops S1 to S4 in a chain, all clocked at 400 MHz. At any instant
they hold the last four samples of the line, with S1 the newest. The RAM's write port runs on
the 100 MHz clock. On every 100 MHz edge it stores all four flip-flop outputs as one word. The
four flip-flops therefore act as a 1-to-4 serial-to-parallel converter. Each 10 ns RAM word
holds four consecutive 2.5 ns samples.

The bit order in a word is:

| word bit | flip-flop | sample |
|---|---|---|
| 0 | S4 | oldest of the four (taken 10 ns before the write edge) |
| 1 | S3 | |
| 2 | S2 | |
| 3 | S1 | newest (taken 2.5 ns before the write edge) |

A recording writes addresses 0, 1, 2, 3 on four consecutive 100 MHz edges. Sample number
`4*addr + bit` (0..15) is therefore the sample taken `(4*addr + bit) * 2.5 ns` after the window
opens, and the 16 samples together cover 40 ns. All eight channels share the write address and
write enable, so they record the same 40 ns window.

This works only because `clk_400` and `clk_100` come from the same PLL with aligned rising
edges. The 100 MHz RAM registers sample the 400 MHz flip-flops directly, with no
synchroniser. On hardware that relationship has to be given to the timing tools, and the
2.5 ns path from S1..S4 to the RAM input has to meet timing. The sensor lines enter S1 with no
synchroniser either: a sample taken during an input transition can be metastable.

## Recording: the acquisition handshake

1. The host sends the acquisition code, one byte with the value `ACQ_CODE` (default `8'h41`, ASCII `A`).
2. `uart_rx` decodes the byte. `uart_logic` turns a match into a one-cycle `acquire` pulse. Any other byte is ignored.
3. `readout_fsm` stops pushing packets at once and pulses `cnt_start` for one cycle.
4. `write_addr_counter` resets to address 0 and raises write enable. It writes addresses 0..3 on the next four 100 MHz edges. Then it drops write enable by itself.
5. Meanwhile the state machine stands by. When write enable falls, it restarts its walk at channel 0, address 0, bit 0.

From the code's stop bit to the start of the window takes only a few 100 MHz cycles. In the
end-to-end test the window opens about half a bit time before the host finishes sending the
code, because the receiver accepts a byte in the middle of its stop bit.

The transmit buffer is **not** flushed by an acquisition. Up to 16 packets from the previous
walk can still leave after the code. This is harmless because every packet says which slot it
fills. A host that wants a clean snapshot can discard the first 16 packets after sending the
code, as the end-to-end testbench does.

## Readout: packet format and order

Every stored bit becomes one byte:

| bit 7 | bits 6:5 | bits 4:3 | bits 2:0 |
|---|---|---|---|
| `val`: the sample | `loc`: bit position in the word (0 = oldest) | `addr`: RAM address | `chan`: channel |

Sample time within the window = `(4*addr + loc) * 2.5 ns`.

The state machine reads one channel at a time. Within a channel it goes address by address,
and within an address bit by bit, all in ascending order. After channel 7 it wraps to channel 0
and sends the same memory again, indefinitely, until the next acquisition. One full sweep is
8 x 4 x 4 = 128 packets.

- **Pausing.** While the UART buffer reports full, nothing is pushed and the read position
  does not move, so no packet is dropped or skipped.
- **Read latency.** The RAM read port is registered, so each new address costs one fetch
  cycle. With a free buffer a sweep takes 160 clocks of 100 MHz.
- **Throughput.** The UART is the real limit. At 115200 baud, 8N1, a sweep of 128 bytes
  takes about 11.1 ms. In practice the state machine spends almost all its time paused.

## The UART side

- `uart_tx`: 8 data bits, no parity, 1 stop bit, least significant bit first. The line idles high.
  `CLKS_PER_BIT` = 868 gives 115200 baud from 100 MHz. Consecutive bytes from the buffer are
  spaced 10 bit times plus one clock.
- `uart_rx`: two-flip-flop synchroniser, then a start-bit check at half a bit time and mid-bit
  sampling. A frame with a bad stop bit is dropped, and the receiver waits for the line to go
  high again before it looks for the next start bit.
- `sync_fifo`: 16 entries, first-word fall-through. Its `full` output is the state machine's
  pause signal.

The host can be any program with a serial port. Send `A` to record, then read bytes and drop
each `val` into slot `[chan][4*addr + loc]`.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NUM_CHANNELS` | 8 | `ed_pkg` | Sensor channels. The 3-bit `chan` field limits it to 8 |
| `SAMPLES` | 4 | `ed_pkg` | Flip-flops per channel = samples per RAM word = 400/100 MHz |
| `DEPTH` | 4 | `ed_pkg` | RAM words per channel. The 2-bit `addr` field limits it to 4 |
| `CLKS_PER_BIT` | 868 | top, `uart_logic` | UART bit time in 100 MHz clocks |
| `FIFO_DEPTH` | 16 | top, `uart_logic` | Transmit buffer entries (power of two) |
| `ACQ_CODE` | `8'h41` | top, `uart_logic` | Byte that starts a recording |

The sizes in `ed_pkg` are tied to the 8-bit packet. A longer recording or more channels would
need a wider packet or a second byte per sample.

## What comes from the original design and what is added here

These points follow the original design:

- the 8 channels, the four-flip-flop chain at 400 MHz and the 4x4-bit RAM per channel;
- the shared 100 MHz write counter and the 40 ns recording that ends by itself;
- the packet fields {value, location, address, channel};
- the endless channel-by-channel readout, and the pause that freezes the position;
- the acquisition code that makes the state machine restart the counter and wait out the recording.

These are this implementation's choices, because the original leaves them open:

- **Packet layout.** The value is in bit 7 and the channel in bits 2:0.
- **Bit order.** The oldest sample is bit 0 of a word.
- **RAM read port.** It is registered, with one cycle of latency.
- **Write enable.** It is generated inside the counter.
- **Restart point.** After a recording the walk restarts at channel 0. A second acquire during standby is ignored.
- **Reset.** It is synchronous and active high. It clears control state only, not samples or RAM.
- **UART settings.** 115200 baud, 8N1, a 16-entry buffer and code `8'h41`.

Not included:

- **PLL.** It is an FPGA clocking primitive. Instantiate the vendor's PLL or clock manager and
  feed its 400 MHz output, phase-aligned with the 100 MHz input, to `clk_400`.
- **RS-232 line driver.** `rs232_rx` and `rs232_tx` are logic-level pins.
- **Host software.** The receive-and-plot program is not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it establishes |
|---|---|
| `tb_channel_demux_ram` | Random input, random write/read addresses and enables. Every word equals the four samples before the write edge, in the documented bit order |
| `tb_write_addr_counter` | Exactly four write cycles with addresses 0..3 after each start. A restart works |
| `tb_readout_fsm` | Packet order and contents against a RAM model, no push while full, no advance during a pause, and a clean restart after acquisition. A sweep takes 160 cycles |
| `tb_sync_fifo` | Against a queue model, including full and simultaneous push and pop |
| `tb_uart_tx` / `tb_uart_rx` | Frame format, bit timing and ignored starts. Receiver tolerance of +-3 % bit-time error, glitches and framing errors |
| `tb_uart_logic` | Buffered bytes come out in order and back to back. Only the acquisition code produces `acquire` |
| `tb_event_detector_top` | The whole chip at its default parameters, with the testbench as host (see below) |

`tb_event_detector_top` drives the eight lines with hash-generated random pulses, 2.5 ns and
longer. It sends a non-code byte and then two acquisition codes at 115200 baud. For each
acquisition it decodes a full 128-packet sweep from the serial line and checks the packet order.
It then searches the stimulus for the one run of 16 consecutive 400 MHz samples that matches
the capture on all eight channels at once. It also checks that each recording lasts four
100 MHz cycles (40 ns) and that nothing is pushed while recording. It counts acquisitions,
pauses on buffer full, sweep wrap-arounds, ignored bytes and captured pulses of 5 ns or less,
and it fails if any of them never happened. It simulates about 25 ms of device time in a few
seconds.

The testbenches use aligned ideal clocks. They do not show that the 400-to-100 MHz handover or
the unsynchronised sensor inputs work on silicon.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ed_pkg.sv tb/tb_event_detector_top.sv --top-module tb_event_detector_top
./obj_dir/Vtb_event_detector_top
```

Replace the testbench name to run any other block's test. `ed_pkg.sv` must be listed first;
Verilator finds the other modules through `-y`. Lint a module on its own with
`verilator --lint-only -Wall -Irtl rtl/ed_pkg.sv rtl/<module>.sv`.
