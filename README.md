# Update Link: a deterministic timing, synchronization and data link

The Update Link keeps many chassis of a low-level RF system in step. One
master, the Update Link Master (ULM), sends a single stream of 32-bit words
over 1 Gbps serial links. Crosspoint switches copy that one transmitter to
every receiver. Every chassis runs from the same 100 MHz clock. Each receiver
also forces its transceiver to the same word alignment every time the link
starts. Together these make the delay from the master to every receiver fixed
and equal. An event in the stream is therefore seen by every receiver in the
same clock cycle.

The stream carries three kinds of traffic:

* **the Update event**, every 10 us. It defines the update period. All
  synthesizers load new settings on it.
* **a 48-bit time stamp**, in the three words after each Update. Diagnostic
  data from different chassis can be lined up with it.
* **data and other events** from anywhere in the system. Data written on a
  daughter card travels up a tree of FIFOs to the master, which then
  broadcasts it to everyone.

This repository holds the FPGA logic of that system in SystemVerilog: the
master's scheduler, the receiver with its link-alignment controller, the
uplink FIFO tree, and a minimal synthesizer that uses the link. The serial
hardware between FPGAs has no RTL here; the testbench models it.

## Word format and link timing

Every transmission is one 32-bit word (`ul_pkg::ul_word_t`):

| bits  | field | meaning                                               |
|-------|-------|-------------------------------------------------------|
| 31:16 | PID   | packet identifier; each kind of data has its own PID  |
| 15:0  | data  | payload; for PID 0 it is an event code                |

PID 0 marks a timing event. On the wire, a word travels with a valid flag
(`ul_sym_t`). An invalid symbol stands for the idle characters the transceiver
sends when there is nothing to send.

With 8B/10B coding a 32-bit word takes 40 line bits. At 1 Gbps that is 40 ns,
or 4 cycles of the 100 MHz clock. So the master has one **word slot** every
`SLOT_CLKS = 4` clocks and 250 slots in each 1000-clock update period. A
faster line rate only changes `SLOT_CLKS`, but it must come to a whole number
of clocks per word. At 2 Gbps that is 2 clocks. At the transceiver's highest
rate, 3.125 Gbps, a word takes 1.28 clocks, so that rate does not fit a
100 MHz slot counter.

The following codes are choices of this design. Change them in `ul_pkg.sv`.

| constant     | value   | use                                          |
|--------------|---------|----------------------------------------------|
| `EVT_UPDATE` | 0x0001  | event code of the Update event                 |
| `EVT_LATCH`  | 0x0002  | event code: synthesizers latch their phase    |
| `PID_TS2/1/0`| 0x0001..3 | time stamp bits 47:32, 31:16, 15:0          |
| `PID_FHI/FLO`| 0x0010/11 | revolution frequency, high and low half     |
| `PID_PHI/PLO`| 0x0020/21 | reference synthesizer's latched phase       |

## Fixed latency: the barrel shifter problem

Two things make the delay of a GTX-type transceiver vary. The first is its
elastic buffer and clock correction. Because all chassis share the 100 MHz
clock, both can be switched off, so that source of variation disappears.

The second is harder. The receiver turns the bit stream into parallel words
through a 20-bit barrel shifter. After the link locks, the shifter sits at
an arbitrary position, and each position means a different delay. The fix is
in `gtx_init_ctrl`:

1. Wait until the tile reports that its own initialisation is done
   (`resetdone`).
2. Read the barrel shifter position through the Dynamic Reconfiguration Port
   (DRP).
3. If the position is `TARGET`, declare the link `aligned` and stop.
4. Otherwise, read the PLL control register and write it back with
   `UNLOCK_MASK` set. This unlocks the PLL that makes the parallel clock.
   Hold it unlocked for `HOLD_CLKS`, write the register back with the bit
   clear, then wait `SETTLE_CLKS`.
5. The PLL relocks, the shifter lands somewhere new, and the loop returns to
   step 1. `attempts` counts the relocks.

The vendor does not document the register that holds the shifter position.
So `BS_ADDR`, `BS_MASK`, `PLL_ADDR` and `UNLOCK_MASK` are placeholders: set
them for the real tile before using this block in hardware. Real shifters
also come back to a few favourite positions far more often than chance would
suggest. A faster algorithm that tries several ways of unlocking the PLL can
help with that, but no such algorithm is given here. This controller uses one
unlock method again and again. If `resetdone` falls while the link is
aligned, the controller starts over.

`ulr` (the Update Link Receiver) puts this controller in front of the word
decoder. No symbol reaches the decoder until the link is aligned, so a
receiver never gives an Update pulse at the wrong delay.

Each DRP access is one `den` pulse, with `dwe`/`daddr`/`di`, and ends with
`drdy`. Only one access is open at a time, and an assertion checks this.

## The master's broadcast schedule (`ulm_core`)

`ulm_update_gen` counts clocks and marks the word slots. It fills four
reserved slots at the start of every period:

| slot | word                                     |
|------|------------------------------------------|
| 0    | PID 0, `EVT_UPDATE`                      |
| 1    | `PID_TS2`, time stamp bits 47:32         |
| 2    | `PID_TS1`, time stamp bits 31:16         |
| 3    | `PID_TS0`, time stamp bits 15:0          |

The time stamp is the count of 100 MHz clocks since reset, taken at slot 0.

A word-slot scanner fills the other 246 slots from a set of FIFOs. It polls
them in this order:

1. control-system timing events chosen for rebroadcast (`ulm_event_encoder`:
   an 8-bit code from a timing link receiver, a 256-bit enable mask written by
   the host, sent as event code `{8'h01, code}`);
2. words the host processor writes by hand (`host_wr`);
3. one FIFO per RF Controller uplink (16).

An uplink word that arrives at a full FIFO is lost and counted in `drop_cnt`.
`tx` is registered, so the Update event leaves one clock after slot 0.

**Consolidator mode.** The master has only 16 transceivers, so at most 16 RF
Controllers can send data back to it. A larger system needs a second chassis
with the same logic that gathers the data of further controllers into one
stream and passes it to the real master. Pulling `master_mode` low
(`ulm_master_mode` at the top) puts `ulm_core` in that role. It then sends no
Update event and no time stamp, and all 250 slots carry FIFO words. Nothing
else changes.

## The uplink tree and the FIFO scanner

Data goes up the tree in three steps, and each level has FIFOs and a poller:

* **daughter card** (`xmc_uplink`). FIFO 0 is high priority: it holds the
  processor's 32-bit values, split into two words, high half first, each with
  its own PID. FIFO 1 holds the phase report of the card's synthesizer. The
  scanner feeds the card's Aurora link at 2.5 Gbps.
* **carrier** (`rfc_uplink`). There is one FIFO per daughter site (6), filled
  from that site's Aurora link. A full FIFO holds its link off (`au_ready`
  low), so nothing is lost at this level. A seventh FIFO takes the carrier's
  own synthesizer report. Words go to the master in the carrier's own 1-in-4
  word slots. This path does not need to be deterministic.
* **master** (`ulm_core`), as above.

All three levels use the same poller, `ul_fifo_scanner`. It visits FIFOs in
index order and wraps around. It skips empty FIFOs, and takes at most
`LIMIT[i]` words from FIFO `i` before moving on. The limits therefore set how
the link bandwidth is shared. A move to the next non-empty FIFO takes one
clock when the current FIFO is empty. When a FIFO reaches its limit, the move
happens in the same clock as the last word. `limit_hit` pulses when a FIFO
uses its whole limit.

Default limits: 4 at the master for every FIFO, 4 and 1 on a daughter card,
2 on a carrier. FIFO depth is 16 everywhere. All FIFOs (`ul_fifo`) are
single-clock, first-word-fall-through.

Capacity is worth keeping in mind. A carrier can send one word per slot, and
so can the master. When all 16 carriers send at once, the master can drain
only one of their words per slot. The full-system test loads the tree on
purpose: all 96 daughter cards write 12 words at the same moment. About 70%
of those words are then dropped at the master's 16-word FIFOs. Size the
master FIFOs to the bursts you expect.

## Receivers and synthesizers

`ulr_decoder` looks at each word that arrives. A PID 0 word gives
`evt_valid`/`evt_code`, plus `update` for the Update event. Any other PID
gives `data_valid`/`data_word`. The three time stamp words are joined back
into `timestamp`, with `ts_valid` set. Every output is registered, one clock
after its word.

`ul_dds` is the part of a direct digital synthesizer that the link drives.
The two frequency halves go into a shadow register, and `update` loads them
into the frequency register. That register is added to a 32-bit phase
accumulator every clock. All receivers see `update` in the same clock, so
every accumulator in the system moves in lockstep. On `EVT_LATCH`, each
synthesizer copies its phase into `latched`. A synthesizer whose `is_ref` is
set then offers the latched value as two uplink words, so the others can
compare their own latched phase against it. The sine lookup and DAC side of
a real DDS are not part of this design.

`ul_endpoint` joins a receiver and a synthesizer. Every carrier and every
daughter card has one.

## Top level (`ul_system`)

`ul_system` contains one master, `N_RFC = 16` carriers and
`N_RFC * N_XMC = 96` daughter cards. The serial parts are not in the RTL and
connect at the ports:

| ports                                   | connect to                                   |
|-----------------------------------------|----------------------------------------------|
| `ulm_tx`                                | master's GTX transmitter -> crosspoint -> SFPs |
| `rfc_rx`, `xmc_rx`                      | each receiver's GTX receiver                 |
| `*_resetdone`, `*_drp_req`, `*_drp_rsp` | that receiver's tile status and DRP          |
| `rfc_uplink_tx` -> `ulm_uplink_rx`      | carrier GTX transmitter -> master GTX receiver |
| `xmc_au_*` -> `rfc_au_*`                | Aurora link user interfaces                  |
| `host_*`, `mask_*`                      | master's processor                           |
| `ulm_master_mode`                       | master (1) or consolidator (0) configuration |
| `tl_*`                                  | control-system timing link receivers         |
| `xmc_cpu_*`                             | daughter-card processors                     |
| `rfc_is_ref`, `xmc_is_ref`              | choose the reference synthesizer             |
| `rfc_status`, `xmc_status`              | each endpoint's state (`ep_status_t`)        |

The master's 16 transceivers limit the return path to 16 carriers. More
carriers can receive the broadcast (the crosspoints have 34 outputs), but
their return data would have to be merged first by a second chassis in
consolidator mode.

## Files

| file                    | content                                             |
|-------------------------|-----------------------------------------------------|
| `rtl/ul_pkg.sv`         | word, symbol, DRP and status types; codes and PIDs  |
| `rtl/ul_fifo.sv`        | FIFO                                                |
| `rtl/ul_fifo_scanner.sv`| poller with per-FIFO limits                         |
| `rtl/ulm_update_gen.sv` | period timer, slot strobes, Update and time stamp words |
| `rtl/ulm_event_encoder.sv` | timing event selection and encoding              |
| `rtl/ulm_core.sv`       | master                                              |
| `rtl/gtx_init_ctrl.sv`  | barrel shifter alignment through the DRP            |
| `rtl/ulr_decoder.sv`, `rtl/ulr.sv` | receiver                                 |
| `rtl/ul_dds.sv`, `rtl/ul_endpoint.sv` | synthesizer, receiver plus synthesizer |
| `rtl/xmc_uplink.sv`, `rtl/rfc_uplink.sv` | daughter and carrier uplinks       |
| `rtl/ul_system.sv`      | whole system                                        |
| `tb/gtx_rx_model.sv`    | behavioural transceiver: delay that depends on shifter position, DRP, relock |
| `tb/aurora_model.sv`    | behavioural Aurora link: latency, 5/8 rate, flow control |
| `tb/tb_*.sv`            | self-checking testbenches, one per block (none for `ul_endpoint`, covered by `tb_ul_system`) |

## Simulating

Every testbench checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ul_system \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ul_pkg.sv tb/tb_ul_system.sv
./obj_dir/Vtb_ul_system +verilator+rand+reset+2
```

To run another testbench, change the name `tb_ul_system`.
`+verilator+rand+reset+2` starts every uninitialised variable at a random
value. The design resets everything it reads.

`tb_ul_system` runs the whole system at its default size: 112 receivers, each
with a transceiver model at a different random shifter position. It takes
about 90,000 clocks, a few seconds of simulation after a build of under a
minute. In that run:

* every link aligned within about 44,000 clocks, after 4,500 relocks in all;
* all 112 receivers saw each Update in the same clock, 7 clocks after the
  master sent it;
* every receiver rebuilt the time stamp;
* an enabled timing event was rebroadcast and a disabled one was not;
* a manual word got through;
* a frequency written on one daughter card reached all 112 synthesizers at
  the same update, and their phases stayed identical;
* the phase latch and the reference report arrived with the right value;
* under the load burst, Aurora hold-off, both poll limits and master FIFO
  overflow all happened, and every word was either broadcast or counted as
  dropped;
* a new frequency was written in each of six periods in a row, at the
  100 kHz rate the loops run at, and each one was in force in all 112
  synthesizers after the next Update;
* in consolidator mode, no Update left the master, but data still did.

The block testbenches check cycle timing as well: a slot every 4 clocks, 250
slots and one Update per 1000 clocks, and decoder and synthesizer timing to
the clock.

To try other choices, change these parameters:

* `ulm_core`: `FIFO_DEPTH`, `*_LIMIT`, `PERIOD_CLKS`, `SLOT_CLKS`
* `ul_fifo_scanner`: `LIMIT` array
* `gtx_init_ctrl`: DRP addresses, `TARGET`, waits

## What is this design's own, and what is left out

The design follows the source description in these points:

* the word format and PID 0 for events;
* the 10 us Update period and the 48-bit time stamp in the three following
  words;
* the 1 Gbps link, which gives 250 words per period;
* the common 100 MHz clock;
* the alignment procedure: wait for reset done, read the shifter over DRP,
  unlock and relock the PLL until the shifter is at the right position;
* FIFOs and pollers at every level, with fixed order and per-FIFO limits;
* 6 daughter sites per carrier and 16 uplinks at the master;
* the frequency example (two 16-bit halves, applied on the next Update) and
  the phase latch with a reference report.

These points are choices of this design:

* all codes and PIDs in the table above;
* what the time stamp counts, and its word order;
* the DRP register addresses and bits (placeholders), the target position,
  and the wait times;
* FIFO depths, the number of daughter-card FIFOs, poll order and limits;
* the carrier's own report FIFO;
* dropping on a full master FIFO;
* consolidator mode as a `master_mode` input;
* the timing-link input format and the enable mask;
* gating the decoder until the link is aligned;
* the 32-bit phase accumulator.

Not built:

* the transceivers, crosspoints, SFPs, the fan-out chip on each controller,
  and the Aurora core (all vendor or analog parts; the testbenches model them);
* the processors and their software;
* the timing link receivers;
* the crosspoint control interface and powering down unused channels;
* the wiring of a consolidating second chassis into a larger system (its
  mode is built, see above);
* the board parts of the master (flash, DDR2, Ethernet, monitoring,
  configuration CPLD).
