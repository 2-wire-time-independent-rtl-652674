# Two-wire time-independent asynchronous link

Two small processors that share no clock, run at unknown and changing
speeds and may stop at any moment (a PC in a multitasking operating
system, a microcontroller that services interrupts) need to exchange a stream
of bits over as few wires as possible. Baud-rate schemes assume that both
ends know how fast the other one is. Clocked serial buses such as SPI or I²C
assume that the slave keeps up with the master's clock. This link assumes
neither. It is **time independent**: each end reacts only to the *order* in
which the wire levels change, never to how long anything takes. A slow,
paused or interrupted host makes the link slower. It never corrupts a bit
and never loses one.

The link uses two wires, a clock wire **C** and a data wire **D**. Each
handshake cycle moves **one bit in each direction**: the master's bit to the
slave and the slave's bit to the master. The cycle is a closed chain of
request/acknowledge events. Every event can happen only after the one before
it has been seen by the other side. Because the data wire also carries the
acknowledges, no third wire is needed.

Two variants are implemented here, side by side. They differ in what the
master's pins can do:

| variant | master pins | slave pins | wires |
|---|---|---|---|
| **2I2O-2B** (main) | two weak outputs (driven through a resistor) plus two inputs | two tristate pins | C and D both carry the master's weak drive, which the slave can overdrive |
| **2B-2B** | two bidirectional pins | two bidirectional pins | C is open-drain (wired-AND, pull-up); D has a series resistor so each end can keep its own level |

## The 2I2O-2B cycle

The master's outputs MC and MD reach the wires through resistors. The
slave's pins SC and SD sit at the far end. When a slave pin is tristate, it
reads whatever the master drives. When it drives, it wins. The master reads
both wires through separate inputs at the slave end.

One cycle (master events upper case M, slave events S):

| step | who | action | meaning |
|---|---|---|---|
| Md | master | put own bit on MD | |
| Mw | master | raise MC | "my bit is available" |
| Sr | slave | sees C high, reads D | master bit taken |
| Sd | slave | drives own bit on SD | |
| Sw | slave | drives SC low | "my bit is available" |
| Sf | slave | releases SC, looks again | poll: has the master answered? |
| Mr | master | sees C low, reads D | slave bit taken |
| Ma | master | lowers MC | "your bit is read" |
| Mi | master | puts the *inverse* of the slave bit on MD | prepares the finish signal |
| Sx | slave | released SC now reads low | acknowledge seen |
| Sy | slave | releases SD | D flips to the master's inverted level |
| Mx | master | sees D equal to MD | slave done; the next cycle may start |

The hardest part to see is the **slave's poll (Sw/Sf)**. The slave cannot
leave SC driven low: the master's "bit read" answer is to lower MC, and the
slave would never see that through its own driven pin. So the slave drives
SC low, releases it, and looks at the wire. If C is still high, the master
has not answered yet, and the slave pulls C low again. While SC is released,
C reads high, which is exactly what the master would see if the slave were
not ready. A master sample that lands in that window simply tries again
later. Both ends therefore loop on a poll, and the two loops could in
principle fall into step forever (**livelock**). In this RTL they cannot:

- the master samples C on every enabled clock;
- the slave holds C low for at least `SETTLE` enabled clocks;
- `SETTLE` is at least the synchronizer depth, which elaboration checks.

So every low pulse reaches the master while the master runs at full speed.
A master whose `en` pattern happened to line up with the slave's release
windows could still miss pulses for a while. That is the same transient
livelock that software loops of equal period show. Any difference in the
two poll periods breaks it up. `repoll_o` on the slave counts how often the poll had to repeat.

The **end-of-cycle signal** uses the inverted bit. After Ma the master puts
the inverse of the slave's bit on MD. The slave is still driving its bit, so
D does not change yet. When the slave releases SD (Sy), D changes to the
master's level. The master sees this without a third wire, whatever bit was
sent.

## The 2B-2B cycle

C is pulled low by either end or released; a pull-up makes it high only when
both ends release it. D has a series resistor, so the master end (MD) and the
slave end (SD) can differ while both sides drive.

| step | who | action |
|---|---|---|
| M1 | master | holds C low, drives own bit on MD |
| M2 | master | releases C ("bit available") |
| s1 | slave | sees C high, releases SD so the master bit reaches the slave end |
| s2 | slave | reads the master bit, drives own bit on SD |
| s3 | slave | pulls C low ("read yours, mine is there") |
| s4 | slave | releases C and looks: C high means the master is not done yet, so back to s3 (poll) |
| M3 | master | sees C low, releases MD |
| M4 | master | reads the slave bit |
| M5 | master | pulls C low ("read yours") |
| s5 | slave | released C still reads low: acknowledge seen |
| s6 | slave | drives the inverse of its bit on SD ("finished") |
| M6 | master | sees MD equal to the inverse of the slave bit; the cycle is over |

Between cycles the master holds C low and leaves MD released. The slave keeps
driving its inverted bit until the next s1.

## Electrical models of the wires

The two link variants are joined by cable models. They exist so that the
whole link can be simulated; they are not logic to synthesize.

`tia_line_weak` models one wire of the 2I2O-2B cable. It is a resistor
network with four branches:

- the master output resistance `R_MASTER`;
- the cable resistor `R_CABLE`;
- the slave pin resistance `R_SLAVE`, which counts only while the slave drives;
- the master input's pull-up `R_PULLUP`.

The node voltage is the conductance-weighted mean
`V = Σ(Vi/Ri) / Σ(1/Ri)`. All six cases (master low/high × slave
low/high/tristate) are computed at elaboration time. The model outputs:

- the voltage in mV;
- the logic level seen at the threshold `VTH_MV`;
- `in_spec`, which is true only for a clean low (≤ `VIL_MV`) or a clean high (≥ `VIH_MV`);
- the fight current `VCC/(R_MASTER+R_CABLE+R_SLAVE)`, which flows while both ends drive different levels.

At the defaults (5 V, 100 Ω, 470 Ω, 35 Ω, 4.7 kΩ), the levels are:

| master | slave | V |
|---|---|---|
| low | low | 0.0 V |
| low | high | 4.7 V |
| low | tristate | 0.5 V |
| high | low | 0.3 V |
| high | high | 5.0 V |
| high | tristate | 5.0 V |

The fight current is 8.3 mA. A larger cable resistor (820 Ω) lowers the
current to 5.2 mA, but the "master low, slave released" level rises to
0.8 V, the edge of a valid low.

`tia_bb_cable` is the logic view of the 2B-2B cable:

- C is the wired-AND of the two open-drain pins;
- each end of D shows its own driver if it drives, else the far driver, else the pull-up;
- `c_both_low` and `d_contend` flag when both ends pull C low, and when the two ends drive D to different levels.

## Settle times, synchronizers and timeouts

The protocol is defined by event order. A real implementation must make sure
that order survives the wire and the input stage. Every controller here
works like this:

- It samples the wire inputs through a `SYNC_STAGES`-flop synchronizer (`tia_sync`, default 2).
- After each change it makes on a pin, it waits `SETTLE` enabled clocks (default 3) before it acts or samples again. This stands in for the software delay a processor would spend between writing a port and reading it back.
- It advances only on clocks with `en` high. `en` models host speed: gate it with any pattern to model a slow, interrupted or frozen host.

A master that waits for the slave longer than `TIMEOUT` enabled clocks
(default 65535) gives up and returns to its idle levels:

- it pulses `timeout_o`;
- the bit being received is dropped;
- the bit already sent is not sent again.

This lets the master recover when the slave host hangs or is reset
mid-cycle. The slave needs no timeout: it always returns to waiting for the
master's next request. Any reset of either end, at any point, is followed by
normal cycles again (tested).

## User interface

All four controllers have the same bit-stream interface:

- `tx_valid`/`tx_bit`/`tx_ready` take the next bit to send;
- `rx_valid`/`rx_bit`/`rx_ready` deliver the received bit.

A bit is taken or delivered on a clock where valid and ready are both high.
Each end takes care of its own receive side:

- the master starts a cycle only when it has a bit to send and its previous received bit has been taken;
- the slave waits before reading a new master bit until its previous received bit has been taken;
- the slave waits before answering until it has a bit to send.

So nothing can overflow. An end that stalls only stretches the cycle.

`busy_o` is high while a cycle is in progress.

## Modules

| module | what |
|---|---|
| `tia_pkg` | default parameters and the state enums of the four controllers |
| `tia_sync` | input synchronizer |
| `tia_master`, `tia_slave` | 2I2O-2B controllers |
| `tia_line_weak` | behavioural resistor model of one 2I2O-2B wire |
| `tia_bb_master`, `tia_bb_slave` | 2B-2B controllers |
| `tia_bb_cable` | behavioural wired-AND / series-resistor model of the 2B-2B cable |
| `tia_top` | both links side by side: master, cable, slave each |

The top has two clocks: `m_clk` for both masters and `s_clk` for both
slaves. Each end has its own reset and `en`. The wire levels, voltages,
in-spec flags and fight currents are brought out so a test can watch the
cable.

Parameters of `tia_top` (passed down to all controllers): `SETTLE`,
`SYNC_STAGES`, `TIMEOUT`. The electrical values are parameters of
`tia_line_weak`.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself. With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/tia_pkg.sv tb/tb_tia_top.sv --top-module tb_tia_top -Mdir obj_tb_tia_top
./obj_tb_tia_top/Vtb_tia_top
```

Substitute any other testbench name. Verilator finds the other modules in
`rtl/` through `-I`.

| testbench | what it exercises |
|---|---|
| `tb_tia_top` | Whole design at default parameters, both links at once, in five phases. (1) Random traffic with random stalls of all four hosts. (2) The slave frozen by a 50 % square wave; throughput is checked against free running. (3) Slaves frozen past the timeout. (4) 40 resets of single ends at random points. (5) Checked traffic after the resets. It counts each mechanism: poll repeats, timeouts, driver fights on both cables, both-low on C, contention on D, out-of-spec levels, user-side stalls. It fails if any never happened. |
| `tb_tia_echo` | Echo workload. The master sends bytes; the slave returns each bit inverted in the same cycle. Slave speed is swept from full to 1/20 of the time, on both links. Throughput must fall as the slave slows. Bytes take 329 master clocks (2I2O-2B) or 338 (2B-2B) at full speed, and 4575 at 1/20. |
| `tb_tia_master`, `tb_tia_slave`, `tb_tia_bb_master`, `tb_tia_bb_slave` | Each controller against a scripted model of the other end and of the wires. It checks the event order of every bit, back-pressure on the received bit, and (for the masters) the timeout. |
| `tb_tia_forge` | Forged signals. A generator overrides C or D of both links in random bursts, some longer than the master timeout. Data errors are allowed. Afterwards each link must deliver bits both ways again with no timeout, and the bit streams must line up at a fixed shift. |
| `tb_tia_scan` | Slave scan delay. Seven links run with the slave's `SETTLE` from 2 to 8, against a master that steps every 5th clock. It reports master clocks per bit (115, 110, 111, 115, 117, 120, 123) and re-polls per bit (4 down to 1). The shortest loop is not the fastest, because more master samples land in the slave's released phase. |
| `tb_tia_line_weak` | DC table and fight current at 470 Ω and 820 Ω. |
| `tb_tia_bb_cable` | All pin combinations. |

Concurrent assertions in the four controllers check:

- the slave only ever drives SC low;
- each side's data is on the wire before its "available" signal;
- no received bit is overrun;
- MC rises only with a bit on MD;
- the master releases D only while C is held low.

Pass `--assert` to verilator to enable them.

## What comes from the protocol and what is this design's own

These follow the protocol description:

- the event sequences of both variants;
- the inverted-bit end-of-cycle signal;
- the slave polling by driving and releasing C;
- the master timeout as the recovery mechanism;
- the wire models and their resistor and supply values (100 Ω master output, 470 Ω cable resistor with 820 Ω as the alternative, 35 Ω slave pin, 4.7 kΩ pull-up, 5 V).

These are this design's own choices:

- the whole implementation as clocked state machines (the original ends are software on a PC printer port and an 8-bit microcontroller);
- the synchronizers;
- the `SETTLE` counter and its value;
- the `en` host-speed model;
- the valid/ready bit interfaces;
- the `TIMEOUT` length;
- the reset and idle levels;
- the logic thresholds `VTH_MV`, `VIL_MV`, `VIH_MV` of the wire model;
- the echo function (bit inversion).

Not included:

- the host-side software;
- the printer-port hardware;
- the debug monitor that ran over the link;
- the state-graph tools used to analyse the protocol.

The cable models are static. They have no delays or RC settling, so a
waveform edge rate is not modelled. The `SETTLE` time is where such effects
are absorbed.
