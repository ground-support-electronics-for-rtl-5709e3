# Ground-support electronics for the MAXI Gas Slit Camera

The MAXI X-ray all-sky monitor carries twelve Gas Slit Camera (GSC)
proportional counters. Their analog electronics (the mission data processor,
MDP) send each X-ray event as a 64-bit word over a slow serial line to the
digital processor (DP), and the DP sends 32-bit commands back the same way.
To test either side before the other exists, the ground-support equipment
uses one kind of VME board (an FPGA next to 16 Mbyte of memory) that can
play either side, depending on which FPGA program is loaded:

* **pseudo-DP**: the board stands in for the DP. The host computer writes
  commands that go out to the MDP. Events coming back from the MDP are stored
  in a double buffer in the board memory, and the host reads them over VME
  while the board keeps recording.
* **pseudo-MDP**: the board stands in for the counters and their MDP. It
  answers the DP's commands and plays a list of pseudo events out of its
  memory. Each event has its own delay, so any event rate or time pattern
  can be played to the DP.

This repository holds synthesizable SystemVerilog for both FPGA
configurations, the VME slave logic, and a top level that puts two boards of
each kind in one VME crate. It follows the published description of the
system. Where that description is silent, the design makes its own choices,
and they are listed below.

## The MDP-DP serial link

Each direction has three signals: **Enable** (active low), **CLK** and
**Data**. A word goes out most significant bit first while Enable is low:
D31..D0 for a command, D63..D0 for an event. The nominal rate is
128 kbit/s, so one bit slot lasts 7.8125 us.

```
Enable ‾‾|_______________________________________________ ... ______|‾‾‾
CLK    ______|‾‾‾|___|‾‾‾|___|‾‾‾|___ ...                  |‾‾‾|_______
Data   ------X D31   X D30   X D29   X ...                 X D0    X----
          ^lead                                                 ^guard
```

In each bit slot, CLK is high in the first half and low in the second. Data
changes on the rising CLK edge, and the receiver samples it on the falling
edge, in the middle of the bit. Enable falls half a slot before the first CLK
pulse. After the last bit it stays high for at least half a slot. A frame
therefore takes NBITS + 1 slots:

| frame   | bits | slots | time     | max rate           |
|---------|------|-------|----------|--------------------|
| command | 32   | 33    | 257.8 us | 3879 commands/s    |
| event   | 64   | 65    | 507.8 us | **1969 events/s**  |

1969 events/s is the published serial transfer limit of the GSC event
stream. Here the one extra slot per frame reproduces it: 128000 / 65 =
1969.2, where 64 slots alone would give 2000.

The bit timing comes from a phase accumulator, not an integer divider. The
accumulator adds 2 x BAUD on each clock and wraps at CLK_HZ. At 24 MHz a bit
is 187.5 clocks, so the rate is exact on average, with one clock of jitter
(`serial_tx`). The receiver (`serial_rx`) passes all three signals through
two-flop synchronisers and shifts a bit in on each falling CLK edge. It
checks that the frame held exactly NBITS bits. A frame of any other length is
dropped and raises `frame_err`.

## Pseudo-DP: command register and double buffer

`pseudo_dp` joins the serial link to the board memory.

**Commands.** A host write to the command register marks the command
pending. The register is checked every clock cycle: 40 ns at the 25 MHz
pseudo-DP clock. As soon as the transmitter is free, the command goes out.
If the host writes a new command while the previous one is still pending or
on the line, the write is refused and the sticky `cmd_lost` status bit is
set. The host should poll status bit 0 (busy) before writing.

**Events.** Each received 64-bit event goes to `dbuf_writer`. The memory
holds 2^AW 32-bit words (AW = 22 gives 16 Mbyte) and is split like this:

```
word address (AW = 22)       contents
0x000000 - 0x0FFFFF          buffer A index: word 2n = size in bits (64),
                                             word 2n+1 = pointer to packet n
0x100000 - 0x1FFFFF          buffer A data:  words 2n, 2n+1 = event bits 63..32, 31..0
0x200000 - 0x2FFFFF          buffer B index
0x300000 - 0x3FFFFF          buffer B data
```

Here n counts from 0 inside each buffer, and the pointer is the absolute word
address of the packet's data. For every event the writer makes four writes:
the two data words first, then the size, then the pointer. So any packet
whose pointer the host can see already has its data in memory.

**Buffer change.** Events go into one buffer while the host reads the other.
A write to the BUFCHG register closes the current buffer and saves its
packet count, which the host reads back from BUFCHG. Writing then restarts at
packet 0 of the other buffer. If the change request arrives in the middle of
an event's four writes, it takes effect right after them. If the host changes
buffers at a regular interval, the two halves act as a ring buffer that never
runs out.

**Overflow.** One buffer holds 2^(AW-3) packets: 524,288 at full size, or
266 s of events at the 1969/s limit. Once a buffer is full, the packet
number stops advancing. Further events are counted in DROPCNT and thrown
away, and the overflow status bit stays set until the next buffer change.
Data already stored is never overwritten.

Memory is shared between the host and the writer by `mem_arbiter`, a
round-robin arbiter that grants one request per clock. Under contention a
client waits at most N-1 cycles. A frame takes more than 12,000 clocks, so
host reads never hold up recording.

## Pseudo-MDP: commands and pseudo events

`pseudo_mdp` receives the DP's commands with `serial_rx`. For each one,
`cmd_responder` latches the command, counts it and sets the **arrival flag**.
The flag stays set until the host clears it. Checking a command against the
list of known commands is left to host software. The hardware acts on its
own on three command codes, which the host loads into registers because the
flight codes are not part of this design:

* **GPS request**: a 64-bit reply is queued at once. The reply is
  `{GPSHDR register, 32-bit clock count latched when the request arrived}`.
  It goes out before the next pseudo event.
* **GSC power on**: starts `event_generator` at the START address.
* **GSC power off**: stops the generator at once.

The pattern in memory is a list of 3-word packets:

```
word 0: [31] flag = 1   [30:0] output timing T (clock cycles)
word 1: event bits 63..32
word 2: event bits 31..0
...
word  : 0x00000000      end of list (flag 0)
```

Each event is handed to the transmitter T cycles after the previous
hand-over (for the first event, T cycles after start). At 24 MHz this is T/f
seconds, from 0 up to 89.48 s. If the link is still busy, the event waits,
so a list of T = 0 packets plays back to back at 1969 events/s. Random
timing values give a random (Poisson-like) stream, and equal values give a
periodic one. The next packet is fetched while the timer runs. Because a
fetch takes about eight clocks, values of T below that are stretched to the
fetch time. The host can rewrite the pattern at any time, even during
playback. A packet that has not been fetched yet is played with its new
contents.

At 10 events/s a full 16 Mbyte memory holds 1,398,101 packets, which is
38.8 hours of events without reloading.

## Host access over VME

`vme_slave` gives each board a 32 Mbyte A32 window. It accepts single 32-bit
transfers with address modifier 0x09 or 0x0D. All other cycles get no DTACK*
and reach nothing; the crate's bus timer ends them. Inside a window:

| byte offset                    | target                          |
|--------------------------------|---------------------------------|
| `0x0000000 + 4*w`, w < 2^22    | board memory word w             |
| `0x1000000 + 4*r`              | register r (below)              |

Pseudo-DP registers: 0 CMD (write: send; read: last command), 1 STATUS
(bit 0 busy, 1 buffer being written, 2 overflow, 3 a buffer has been closed,
4 cmd_lost; any write clears cmd_lost), 2 BUFCHG (write: change buffer;
read: packets in the closed buffer), 3 EVCNT, 4 DROPCNT, 5 CURCNT (packets in
the buffer being written), 6 ERRCNT (malformed frames).

Pseudo-MDP registers: 0 CTRL (write bit 0 start, bit 1 stop; read bit 0
running, bit 1 end of list reached, bit 2 arrival flag), 1 START, 2 CMD (last
command received), 3 ARRCLR (write: clear arrival flag), 4 GPSREQ, 5 PWRON,
6 PWROFF (command codes), 7 GPSHDR, 8 EVSENT, 9 CMDCNT, 10 GPSCNT.

Inside the FPGA, the VME slave talks to the configuration over a simple
strobe/acknowledge "host bus". A one-cycle `hb_start` carries the write flag,
the word address and the data. A one-cycle `hb_ack` comes back when the
access is done. Register accesses take one cycle; memory accesses go through
the arbiter.

## Top level

`gse_top` has NB = 2 pseudo-DP boards (VME windows at A31..A25 = 0x10, 0x11)
and NB = 2 pseudo-MDP boards (0x12, 0x13) on one VME bus. Two boards per kind
is what one set-up needs: one board for each of the two GSC electronics
units, each handling six counters. In the real system the two kinds are
alternative programs of the same hardware, used in different set-ups. Here
they sit side by side and share only the bus. Each kind has its own clock:
`dp_clk` at 25 MHz and `mdp_clk` at 24 MHz. All link signals are ports. The
VME data lines are split into `vme_d_in`, and `vme_d_out` with `vme_d_oe`.
DTACK* from all boards is wire-ANDed.

To build a complete DP-MDP loop, connect `mdp_dat_*[b]` to `dp_dat_*[b]` and
`dp_cmd_*[b]` to `mdp_cmd_*[b]`. Both top-level tests are wired this way.

Parameters: `NB`, `DP_CLK`, `MDP_CLK` (Hz), `BAUD`, `AW` (memory words =
2^AW) and `VME_BASE`. All defaults are the full-size values above. Lowering
`AW` shrinks the memory, and the buffers and capacities scale with it.
Raising `BAUD` relative to the clocks speeds up simulation.

## How far this follows the published design

Taken from the published description:

* the link signals, bit order, word lengths and 128 kbit/s rate;
* the 1969 events/s limit;
* the command register checked within 40 ns and then serialised;
* the A/B double buffer, with 8 Mbyte per buffer split into an index half
  and a data half, the size at word 2n and the pointer at word 2n+1;
* the pointer stopping on overflow;
* the 3-word pseudo-event packet with its flag, the 0 to 2^31 timing field
  at 24 MHz and the all-zero end marker;
* the arrival flag, the immediate GPS reply and playback on GSC power-on;
* host rewrites of memory during operation;
* two boards per set-up and 16 Mbyte per board.

This design's own choices:

* the half-slot lead and guard, the CLK duty cycle, and the falling CLK edge
  as sampling edge;
* the 25 MHz pseudo-DP clock, inferred from the 40 ns check;
* the size unit (bits), absolute pointers and the write order in the double
  buffer;
* host-triggered buffer changes and refused command writes;
* the timing reference (time between hand-overs), flag = 1 meaning "valid
  packet", and the power-off stop;
* programmable command codes and the GPS reply format;
* the frame-length check and all counters;
* the VME cycle types, the window size and the register maps;
* round-robin memory arbitration;
* asynchronous active-low reset everywhere.

Not modelled:

* The 16 Mbyte SDRAM and its controller are modelled as one synchronous
  32-bit array with one access per clock. The real device's commands,
  refresh and 133 MHz clock are not designed here.
* The RS422 drivers and receivers, connectors, LEDs, JTAG and FPGA
  configuration loading are not part of this design.
* The GSE's handling of the SSC links (2 Mbit/s variable-length data and
  125 bit/s housekeeping) is not described, and is not built.
* The host software (command list, quick-look histograms) and the flight DP
  and MDP lie outside the boards.

## Files

| file | contents |
|------|----------|
| `rtl/gse_pkg.sv` | constants, event struct, memory request struct, register enums |
| `rtl/serial_tx.sv`, `rtl/serial_rx.sv` | link transmitter / receiver |
| `rtl/dbuf_writer.sv` | double-buffer event store |
| `rtl/event_generator.sv` | pseudo-event player |
| `rtl/cmd_responder.sv` | command arrival, GPS reply, power on/off |
| `rtl/mem_arbiter.sv`, `rtl/host_mem_bridge.sv`, `rtl/gse_memory.sv` | memory sharing, host memory port, memory array |
| `rtl/vme_slave.sv` | VME A32/D32 slave |
| `rtl/pseudo_dp.sv`, `rtl/pseudo_mdp.sv` | the two FPGA configurations |
| `rtl/gse_top.sv` | crate with NB boards of each kind |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_gse_full.sv` | one full operation at full size and real link speed |
| `tb/tb_gse_rates.sv` | periodic and random event rates at full size |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl \
    -y rtl rtl/gse_pkg.sv tb/tb_gse_top.sv --top-module tb_gse_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another test. The
package `gse_pkg` is given first; `-y rtl` lets Verilator find every other
module by its file name.

* `tb_gse_top` runs both board pairs in a loop at reduced size (AW = 8,
  32 packets per buffer) and a fast link. It makes each of these happen and
  counts it: command transfer, refused command, GPS reply, playback,
  back-to-back frames at the link limit, a programmed delay, a GPS reply
  between two events, a live rewrite of the pattern, a buffer change,
  overflow, the end marker and power-off.
* `tb_gse_full` uses all default parameters: 16 Mbyte per board, 24/25 MHz
  clocks and 128 kbit/s. It measures back-to-back event frames at
  12187-12188 clocks of 24 MHz (1969 events/s), a programmed 1 ms delay and a
  257.8 us command frame. It reads the stored events back through VME and
  takes a few seconds to run.
* `tb_gse_rates` also runs at full size. It plays a periodic pattern at
  10 events/s (T = 2,400,000 clocks) and a pattern with random gaps between
  0 and 200,000 clocks. It checks every gap between event frames against the
  larger of T and the 12187.5-clock frame time, and prints the measured mean
  rate of each pattern.
* The module tests use small memories and fast links. Each one compares its
  module's outputs with values the test works out by itself.

## Known limits

* The receivers assume the sender's clock runs well below the local clock.
  The link is synchronous to its own CLK, so the exact frequency of each box
  does not matter.
* A pseudo-DP buffer change always succeeds. The host has to finish reading
  the closed buffer before it asks for the next change, because the next
  change starts overwriting that buffer.
* The arrival flag is a single flag. If commands come faster than the host
  polls, only the latest one stays in the CMD register; the CMDCNT register
  shows how many arrived.
* The longest programmable gap between two pseudo events is
  (2^31 - 1) / 24 MHz = 89.48 s, so the slowest strictly periodic stream is
  0.0112 events/s. Slower rates such as 0.01 events/s would need a wider
  timing field or a slower timer clock.
