# A UART with a timer and autonomous actions for time-triggered fieldbuses

LIN and TTP/A are fieldbuses built on a plain UART. Both are master-driven
and time-triggered. Both let a slave with a cheap on-chip RC oscillator find
the bus bit rate from a synchronization byte. A standard UART serves such a
node poorly, for three reasons:

- Its integer baud divider cannot match an arbitrary clock.
- Its free-running baud clock delays the start of a frame by up to one bit
  time. This is the send jitter.
- The software must do the synchronization, the timestamping and the timed
  sending itself.

This RTL is a UART extension module built to remove those problems. It sits
on a small memory-mapped register interface and combines a UART with a 16-bit
timer. It adds three mechanisms:

1. **A fractional baud rate generator.** The divisor EUBRS is a 12.4
   fixed-point number. It is restarted by the send command, so a frame starts
   a fixed one clock cycle after it is ordered.
2. **Automatic synchronization.** The module measures the LIN/TTP-A
   synchronization byte and writes EUBRS itself.
3. **Events and assigned actions.** An event (start bit detected, reception
   complete, timer match) triggers an action (timestamp, timer reset, send,
   receive on, receive off) one clock cycle later, without the processor.

## Files

| file | block |
|---|---|
| `rtl/uart_pkg.sv` | register addresses, register structs, event and action codes |
| `rtl/uart_ext.sv` | top level: wires the blocks below together |
| `rtl/uart_regs.sv` | the eight 16-bit interface registers |
| `rtl/uart_ctrl.sv` | control unit: commands, events, assigned actions, interrupt, status |
| `rtl/uart_sync.sv` | synchronization-byte detector and baud measurement |
| `rtl/uart_timer.sv` | timing unit: 16-bit timer and timer match |
| `rtl/uart_ebrg.sv` | enhanced baud rate generator, one channel each for transmit and receive |
| `rtl/uart_tx.sv` | transmission unit |
| `rtl/uart_rx.sv` | receive unit with 32x oversampling |
| `rtl/uart_err.sv` | error control unit |
| `rtl/uart_busdrv.sv` | bus driver: input synchronizer, spike filter, output disable |
| `tb/tb_<block>.sv` | one self-checking testbench per block; `tb_uart_ext` runs the whole module |
| `tb/tb_uart_workloads.sv` | the whole module at several clock and bit-rate combinations |

## Baud rate: what EUBRS means

EUBRS is the **sample period in clock cycles**, as a 12.4 fixed-point number
(register value / 16). A bit cell is 32 samples long. So:

    cycles per bit = 32 * EUBRS / 16 = 2 * EUBRS
    baud rate      = f_clk / (2 * EUBRS)

Each channel of `uart_ebrg` is a phase accumulator. Every clock adds 16, the
length of one clock period in 1/16-cycle units. When the sum reaches EUBRS, a
sample tick is issued and EUBRS is subtracted. The remainder carries over, so
tick k falls exactly in cycle ceil(k * EUBRS / 16) after the restart. The
error does not build up over the frame. At 1 MHz and 19200 bit/s, EUBRS = 26
gives 52 cycles per bit, an error of 0.16 %. An integer divider with 16
samples per bit would give 1.7 % at a 5 MHz clock.

The usable range is 16 to 65535: 32 to 131070 cycles per bit. Values below
16 are treated as 16, since there can be at most one sample per clock. The
reset value, 26, is 19200 bit/s at 1 MHz.

The closed-form bit-time formula this design started from, taken literally,
gives a bit time 64 times shorter for the same register value. This design
follows the statements that a bit has 32 samples and that synchronization
sets EUBRS = (timer value)/16. Both hold exactly only with the meaning above
(see the synchronization section). A consequence is that a bit must last at
least 32 clock cycles. A 0.5 MHz clock therefore cannot run 115 kbit/s here.
It would need 4.3 cycles per bit.

**No send jitter.** The transmitter's baud channel is held at phase 0 while
it is idle. The send action restarts the channel and puts the start bit on
the line on the same clock edge. From the processor's point of view, the
command register is written on edge *k* and the start bit appears on the bus
after edge *k+1*. Every bit then lasts exactly 32 ticks. The receiver
likewise restarts its own channel on the start-bit edge.

## Synchronization (`uart_sync`)

The synchronization byte is a normal 11-bit frame. Its start bit and data
bits 0x55 (LSB first) make nine cells of alternating level (0,1,0,1,...,0).
The parity bit and the stop bit follow at '1'. The byte is preceded by bus
silence.

The byte is received as follows:

1. Writing the command register with SncE = 1 starts the search. From then
   until success, the transmitter and the receiver are held. RDY is low and
   BUSY is high.
2. The unit waits for `SILENCE_CYC` cycles of '1' on the filtered line. It
   then waits for a falling edge.
3. On the first falling edge it clears the module's timer. It then reads the
   timer at each following edge.
4. At each edge it measures the cell that just ended and compares it with the
   cell before it. A difference over 4 % (|a-b|*25 > b) rejects the pattern.
   So does a cell that grows past that limit, or a timer wrap. After a
   rejection the unit goes back to waiting for silence.
5. At the fifth falling edge the timer holds T8, the length of eight bit
   cells.
6. At the ninth edge, the rising edge that ends bit 7, the unit writes
   EUBRS = T8/16, rounded to the nearest integer, and sets SncR.

Why T8/16: one bit is T8/8 cycles. One sample is T8/256 cycles, which in
1/16-cycle units is T8/16. The 16-bit timer limits the search to bit times
under 8191 cycles.

How close the result gets: the bit time after synchronization is 2*EUBRS
cycles, so it is set to a resolution of 2 cycles. After rounding, the error is
at most about 1 cycle per bit. `tb_uart_workloads` measures it by running
synchronization, three received bytes and one sent byte at each of these
settings:

| clock, bit rate | cycles per bit | EUBRS | bit time | deviation |
|---|---|---|---|---|
| 1 MHz, 19200 | 52.08 | 26 | 52 | -0.16 % |
| 1.1 MHz (1 MHz drifted 10 %), 19200 | 57.29 | 29 | 58 | +1.24 % |
| 4.9152 MHz, 19200 | 256.00 | 128 | 256 | 0 % |
| 5 MHz, 19200 | 260.42 | 130 | 260 | -0.16 % |
| 42 MHz, 115200 | 364.58 | 182 | 364 | -0.16 % |

In the drift case, the byte received with the old setting (26) is misread.
After resynchronizing it is received correctly.

## Events and assigned actions (`uart_ctrl`)

The command register (Data 1) holds the following fields:

| field | bits | meaning |
|---|---|---|
| SncE | 0 | start synchronization |
| EvS | 2:1 | event: 00 none, 01 start bit detected, 10 receive complete, 11 timer = TS/TM |
| AsA | 5:3 | action: 001 timestamp (TS/TM := timer), 010 timer reset, 011 send message register, 100 receive mode on, 101 receive mode off; others do nothing |
| EI | 6 | interrupt when the action runs |
| ERRI | 7 | interrupt on any error |

What happens after a command write:

- **Timing.** A write raises a one-cycle strobe. The control unit acts on the
  next clock edge.
- **EvS = 00.** The action runs on that edge.
- **Any other event.** The action is armed. It runs on the clock edge that
  ends the event's cycle, so one clock after the event.
- **Armed commands run once.** A new command replaces an armed one.
- **After an action.** Every executed action sets EvF. With EI set, it also
  sets INT.

The start-bit event comes one cycle after the filtered line falls. The line
itself lags the bus pin by 2 + `FILTER_LEN` cycles. So a start-bit timestamp
is the timer value 2 + `FILTER_LEN` + 1 cycles after the edge on the pin, a
fixed offset.

Typical uses:

| EvS / AsA | effect |
|---|---|
| 01 / 001 | timestamp the next incoming frame |
| 11 / 011 | send at a precise timer value |
| 10 / 010 | restart the time base at the end of a received message |
| 00 / 100 | switch receive mode on now |

## Registers (`uart_regs`)

The module is selected when `base_i == BASE_ADDR` (all ones by default). The
eight registers are at `addr_i`:

| addr | register | contents |
|---|---|---|
| 0 | status | OvSErr[15] TrErr[14] ParErr[13] EvF[12] OvF[11] RBR[10] TBR[9] SncR[8] LOOR[7] FSS[4] BUSY[3] ERR[2] RDY[1] INT[0]. Writing 1 clears OvSErr, TrErr, ParErr, EvF, OvF, SncR and INT. |
| 1 | config | LOOW[7] EFSS[4] OUTD[3] SRES[2] ID[1] INTA[0]. INTA and SRES clear themselves. |
| 2 | data 0 | ParEna[15] Odd[14] Stop[13] (two stop bits) TxCnt[12] MsgLength[11:8] (0 = 16) OverS_High[7:4] OverS_Low[3:0] |
| 3 | data 1 | command register (above) |
| 4 | data 2 | message: data to send, or the last word received. Reading it clears RBR. |
| 5 | data 3 | timer: counts clock cycles; writable |
| 6 | data 4 | TS/TM: timestamp, or the timer-match value |
| 7 | data 5 | EUBRS |

Status bits in more detail:

- **RBR** is set on receive completion.
- **OvF** is set when a word arrives while RBR is still set. The new word
  overwrites the old one.
- **TBR** means the transmitter is idle.
- **ERR** is the OR of the four error flags.
- **INTA** clears INT. **ID** masks `irq_o`.

Config bits in more detail:

- **EFSS** enters the fail-safe state one cycle after the write. That state
  aborts transfers, disarms commands, blocks new ones and leaves the bus
  recessive.
- **OUTD** keeps the bus output recessive.
- **SRES** resets the module-specific state and registers one cycle after
  the write.

The bit positions, the reset values, the clear rules, and the meaning of the
generic bits (INT, RDY, ERR, BUSY, FSS, INTA, ID, SRES, OUTD, EFSS) are this
design's choices. So is the rule that hardware wins over a processor write to
the same register in the same cycle. LOOW is only stored and read back as
LOOR. TxCnt is only stored. No function is defined for either.

Bus interface: `rdata_o` is combinational. A write lands on the clock edge
that samples `wr_i`. `wr_i` and `rd_i` must not be high together; this is
asserted.

## Receiving, oversampling and errors

**Receive unit (`uart_rx`).** Receive mode must be on. A falling edge on the
filtered line starts a frame. Each cell is sampled 32 times, and the count of
'1' samples decides the bit:

- a count above 2*OverS_High reads '1';
- a count below 2*OverS_Low reads '0';
- anything in between is undefined. It sets OvSErr and takes the majority
  value.

A start bit that reads '1' is a false start and is dropped. The default
bounds are 10 and 6, so '1' means more than 20 of 32 samples and '0' means
fewer than 12.

**Error control unit (`uart_err`).** It sets the following flags:

- **ParErr:** parity mismatch.
- **TrErr:** a received stop bit read as '0', or the bus read back in the
  middle of a transmitted bit differing from that bit (a collision on the
  wired-AND bus).
- **OvSErr:** undefined bit.
- **OvF:** overflow.

**Bus driver (`uart_busdrv`).** It synchronizes the bus input with two flops.
It then passes a level only after it has been stable for `FILTER_LEN` cycles,
so shorter spikes never reach the receiver or the synchronizer.

## Parameters of `uart_ext`

| parameter | default | meaning |
|---|---|---|
| `BASE_W`, `BASE_ADDR` | 8, 8'hFF | width and value of the base address that selects the module |
| `EUBRS_RESET` | 26 | EUBRS after reset (19200 bit/s at 1 MHz) |
| `FILTER_LEN` | 4 | spike filter length in cycles |
| `SYNC_SILENCE_CYC` | 16 | bus silence required before a synchronization byte |

## How far to trust it

Each block has a self-checking testbench with values computed independently
of the RTL:

- tick times against the ideal fixed-point schedule;
- frames built bit by bit;
- a reference timer model;
- exact cycle counts for latencies.

Each testbench was also run against a deliberately broken copy of its block
and failed there. `tb_uart_workloads` runs the clock and bit-rate
combinations listed under synchronization.

`tb_uart_ext` runs the whole module at its default parameters against a
modelled remote node on a wired-AND bus. It checks all of the following, and
counts each mechanism:

- synchronization at 64 cycles per bit (EUBRS = 32);
- a send starting exactly one cycle after the command write;
- the start-bit timestamp value, to the cycle;
- the timer reset on receive completion;
- a send starting exactly at a timer match;
- parity, overflow, oversampling and collision errors, with interrupts;
- the spike filter;
- receive mode off, output disable, the fail-safe state and software reset.

Not verified:

- behaviour with a drifting clock during a frame;
- LIN break fields;
- any gate-level or FPGA timing.

Where this design departs from, or fills in, the source description:

- **EUBRS scale.** The scale explained above is a choice. The consequence is
  that at least 32 clock cycles are needed per bit.
- **Register layout.** The register bit positions and the generic
  status/config semantics are this design's own.
- **Rounding.** T8/16 is rounded to the nearest integer.
- **Filter and silence lengths.** The spike filter and the silence length are
  simple choices.
- **Armed commands.** They run once; they are not periodic.
- **Unlisted event/action pairs.** Pairs outside the documented table are
  executed rather than rejected.

## Simulating

Each testbench is a top module with no ports. It prints
`TB_RESULT checks=N failures=M` and ends. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_uart_ext \
        -Irtl -y rtl -y tb rtl/uart_pkg.sv tb/tb_uart_ext.sv -o sim
    ./obj_dir/sim

For another block, replace `tb_uart_ext` with its testbench. The end-to-end
run takes under a second. To change the bit time of the remote node in
`tb_uart_ext`, edit `BT`; the expected EUBRS follows (8*BT/16).
