# WUGS-20 link interface: switch port and adapter glue in SystemVerilog

Each port of the WUGS-20 gigabit ATM switch ends in two chips. The Output Port
Processor (OPP) hands cells to a plug-in link adapter card. The Input Port
Processor (IPP) takes cells back from it. Between them and the card is a
UTOPIA-like parallel interface of 16 or 32 bits. The adapter card chooses the
width, the flow-control style and some cell options with strap pins, so one
switch board can carry SONET framers at 155 Mb/s to 2.4 Gb/s, or G-Link serial
links.

This RTL implements the link side of that interface:

* **the OPP transmit engine** (`opp_link_tx`). It cuts time into fixed cell
  cycles ("fly-wheeling"), decides in each cycle whether to send a data cell,
  an unassigned cell or nothing, and formats the cell with a freshly computed
  HEC.
* **the RESET_OPP generator** (`opp_reset_sync`). This is the small circuit
  that gives the adapter a reset which falls at once and rises in step with
  the adapter's own clock.
* **the IPP receive engine** (`ipp_link_rx`). It captures words on the
  adapter's free-running strobes and carries them into the switch clock
  domain. If the 32-bit path is really two independent 16-bit links, it
  de-skews them. It then frames cells on SOC, checks the HEC, and ignores its
  input during the start-up period and while the link is down.
* **the glue logic of the dual 155 Mb/s SONET adapter card**
  (`dual_sonet_tx_glue`, `dual_sonet_rx_glue`). It lets one switch port drive
  two fibers through one dual framer chip. The fiber is selected and reported
  with the top bit of the VPI, and the HEC is patched so that the receiving
  IPP filters unwanted cells for free.

`wugs_link_top` puts them together: a switch port (reset generator, OPP,
IPP) and, beside it, the dual-155 glue with its own ports.

## Block map

```
               fabric clock clk                        adapter clock CLK_LINK
  rst_n ──► opp_reset_sync ───────────────────────────► reset_opp_n (RESET_OPP)
                                 │
  tx_cell_* ─────────────────► opp_link_tx ───────────► d_l/h_opp, dav_*_n, soc_*
  (CLK_LINK domain)               ▲   ▲                  tca_ff_link, tca_link
                                  straps                 (from the adapter)

  rx_cell_* ◄── ipp_link_rx ◄── STRB_L/H_LINK, D_L/H_LINK, SOC_L/H_LINK, UP_L/H_LINK
  (fabric clock)   (FIFOs per strobe domain)

  dual-155 card (ad_* ports):
    connector OPP pins ──► dual_sonet_tx_glue ──► TDAT, TWRENB1/2 ──► framer (fiber 0/1)
    connector IPP pins ◄── dual_sonet_rx_glue ◄── RDAT, RSOC, RCA1/2 ◄── framer
```

Shared types and constants are in `link_pkg`: the cell struct `cell_t`, the
cycle lengths, the TYPE_LINK codes, the LINKINFO byte layout and the HEC
function. `atm_hec` wraps that function as a module. `async_fifo` is the
dual-clock FIFO inside the IPP.

## Cells on the wire

A cell is 53 bytes: four header bytes, the HEC and 48 payload bytes. The
port sends one more byte per cell, so it fills a whole number of words. Bytes
go most significant first.

16-bit mode, 27 words:

| word | bits 15:8 | bits 7:0 |
|------|-----------|----------|
| 0 | HEADER 1 | HEADER 2 |
| 1 | HEADER 3 | HEADER 4 |
| 2 | HEC | LINKINFO |
| 3..26 | PAYLOAD 1, 3, ... 47 | PAYLOAD 2, 4, ... 48 |

32-bit mode, 14 words:

| word | 31:24 | 23:16 | 15:8 | 7:0 |
|------|-------|-------|------|-----|
| 0 | HEADER 1 | HEADER 2 | HEADER 3 | HEADER 4 |
| 1 | HEC | 0 | 0 | LINKINFO |
| 2..13 | PAYLOAD 1, 5, ... | | | PAYLOAD 4, 8, ... 48 |

The byte order of 32-bit word 1 (HEC first, LINKINFO last) is this design's
reading. The specification says only that word 1 is the HEC plus three zero
bytes, with a LINKINFO byte among them when PAD_ZERO is low.

LINKINFO is zero when the PAD_ZERO strap is high, which is what UTOPIA framers
expect. When PAD_ZERO is low, the OPP passes the byte that came with the cell.
Its layout is in `link_pkg::linkinfo_t`:

| bits | content |
|------|---------|
| 7:5 | 0 |
| 4 | EADR[16] |
| 3 | EADR[0] |
| 2 | AAL5 |
| 1 | VPT |
| 0 | CS |

The IPP ignores every non-HEC byte of the HEC word. Received cells therefore
come out with LINKINFO = 0.

The HEC is the ATM CRC-8: polynomial x^8 + x^2 + x + 1 over the four header
bytes, XORed with 55h. Two facts check it:

* An all-zero header (the unassigned cell) gets HEC 55h.
* Flipping VPI[7] (header bit 27) flips HEC bits 7, 5 and 4. The dual-155
  glue relies on this.

## Transmit: the fly-wheel and flow control

The OPP runs a period counter on CLK_LINK: 1..27 in 16-bit mode, 1..14 in
32-bit mode. A cell starts in period 1 and fills the whole cycle, or the
cycle stays empty: SOC low, DAV high and data zero. The decision for the next
cycle is made at the clock edge that ends the last period:

```
period      ... | 25 | 26 | 27 | 1 (SOC, word 0) | 2 | ...
TCA_FF_LINK           ^ latched at the end of 26 (13 in 32-bit mode)
TCA_LINK                   ^ used directly at the end of 27 (16-bit only)
decision                   ^ next cycle: data cell / unassigned / nothing
```

* **Which TCA counts.** TCA_FF_LINK suits UTOPIA framers that raise TxClav a
  few words before the end of a cell. It is latched one period early, which
  leaves a full clock for the decision. TCA_LINK is for older 16-bit framers
  that signal only in the last word. It goes straight into the decision
  without a flip-flop, so its set-up path is long (the specification limits
  CLK_LINK to 25 MHz when it is used), and it is masked in 32-bit mode. The
  link is ready if either one says so.
* **What is sent.**
  * ready, and a cell is waiting: the data cell;
  * ready, no cell, UNASSIGN_EN high: an unassigned cell (all zero, HEC 55h);
  * otherwise: nothing.
* **Switch side.** `tx_cell_valid` presents a cell on `tx_cell`.
  `tx_cell_take` pulses in the last period when the OPP takes it, and the
  source must then remove or replace the cell at that edge. This handshake
  belongs to this design. In the real chip the cell comes from the OPP's
  internal buffer, which is outside the link interface.
* **After reset.** While RESET_OPP is low, SOC stays low. The first cycle
  after release starts at period 1 with TCA_FF_LINK counted as not ready.
  The first cell can therefore start in the second cycle.

In 32-bit mode the `_h` copies of DAV and SOC follow the `_l` ones. In
16-bit mode the high half is driven quiet (data 0, DAV high, SOC low).

## RESET_OPP

`opp_reset_sync` is built exactly as the circuit is drawn:

1. The switch reset, already synchronous to the fabric clock, is retimed by
   one CLK flip-flop.
2. That signal feeds a four-stage shift register on CLK_LINK. The register
   has no reset.
3. The retimed reset and the last shift stage are ANDed. The result drives
   the asynchronous clear of the output flip-flop, whose D input is the
   retimed reset.

As a result, RESET_OPP falls as soon as the reset arrives, with or without
CLK_LINK. It rises on the CLK_LINK edge after the reset has been high through
four CLK_LINK periods (the fifth edge). If the reset pulse is shorter than
four CLK_LINK periods, RESET_OPP falls a second time when the pulse's low
value reaches the last stage. This matches the circuit's known behaviour, and
the testbench checks it.

## Receive: strobes, clock crossing and de-skew

The adapter pushes words into the IPP without handshake. Each rising strobe
edge delivers a word, and SOC marks word 0. The IPP runs on the much faster
switch clock (120 MHz in the real switch, against strobes of at most 80 MHz).

* **Capture.** Each half of the bus is registered on its own strobe.
  * 16-bit mode uses only the low half.
  * In 32-bit mode without de-skew both strobes come from one clock. The high
    strobe may lead by up to 2 ns or lag by up to the clock period minus
    10 ns. The high half is therefore
    re-registered on the next low-strobe edge, and the low half is delayed by
    one stage to stay aligned.
* **Clock crossing.** Words go through `async_fifo`: Gray-coded pointers
  with two-flop synchronisers, 8 entries by default (`FIFO_DEPTH`). The
  fabric side pops one word per clock, so the FIFO stays nearly empty.
  A word that arrives when the FIFO is full is counted in `overflow_count`.
* **De-skew** (32-bit with D_SKEW_LINK high). This mode exists for a 2.4 Gb/s
  link made of two independent 1.2 Gb/s links, where each half arrives on its
  own strobe with its own SOC, up to a full period apart.
  * Each half has its own FIFO. In the fabric domain the two heads are
    paired into one 32-bit word.
  * If one head shows SOC and the other does not, the half without SOC is
    behind. Its words are dropped until both heads show SOC.
  * This re-aligns the halves at every cell. It works only because senders
    in this mode must fly-wheel: a cell or nothing in every 14-word cycle.
    Unassigned cells are what keep the alignment fresh on an idle link.
* **Framing.** A word with SOC starts a cell, and a SOC in mid-cell restarts
  it. After 27 or 14 words the HEC is compared with the one computed over the
  header.
  * A good cell gives a one-clock `rx_cell_valid` pulse and counts in
    `cell_count`.
  * A bad cell gives a pulse on `hec_err`, counts in `hec_err_count`, and is
    discarded.
* **Acceptance.** No cell is accepted or counted before all of these hold:
  * 2^IGNORE_LOG2 fabric clocks have passed since reset (2^24 by default,
    about 0.14 s at 120 MHz, while adapters program their framers and may
    send garbage);
  * UP_L_LINK is low;
  * in de-skew mode, UP_H_LINK is low as well.

  UP and TYPE_LINK are synchronised with two flip-flops. TYPE_LINK is
  reported as a `link_type_e`.

## The dual 155 Mb/s adapter glue

One OPP/IPP pair drives a dual SONET framer with two fibers. The switch
software names the fiber in VPI[7], the top VPI bit. VPI[7] is bit 11 of the
first 16-bit word, because HEADER 1 holds GFC[3:0] and VPI[7:4].

**Transmit (`dual_sonet_tx_glue`, on CLK_LINK = framer TFCLK, 25 MHz).**

* In the SOC word, bit 11 picks the fiber. A register holds the choice for
  the rest of the cell.
* DAV_L_OPP is steered to TWRENB1 (fiber 0) or TWRENB2 (fiber 1). Both
  enables are active low.
* Bit 11 is cleared on its way out, so both fibers carry VPIs 0-127. The
  framer computes its own HEC.
* The OPP has only one cell-available input. TCA_FF_LINK is therefore
  TCA1 AND TCA2: one busy fiber stops both. This head-of-line blocking is
  accepted in the original design and kept here.

**Receive (`dual_sonet_rx_glue`, on the 25 MHz clock shared by the framer's
RFCLK and STRB_L_LINK).**

* A small FSM serves the framer's cell-available flags RCA1 and RCA2.
  * When both are set, it alternates between them.
  * It holds the chosen read enable for 27 reads, then idles one clock so
    the flags can update.
* The framer's read timing is taken as UTOPIA level 1: a word appears in the
  clock after its read edge, and RSOC comes with word 0.
* On each cell the glue writes the fiber number into VPI[7]. For fiber 1 it
  also toggles HEC bits 7, 5 and 4 (bits 15, 13 and 12 of word 2).

Only VPI[7] = 0 is legal on the fibers. Because the HEC is patched by fiber
and not by the old bit, illegal cells reach the IPP with a broken HEC, and the
IPP drops and counts them:

| fiber | VPI[7] on fiber | VPI[7] to IPP | HEC | IPP sees HEC |
|-------|-----------------|---------------|-----|--------------|
| 0 | 0 | 0 | unchanged | correct |
| 0 | 1 | 0 | unchanged | wrong |
| 1 | 0 | 1 | toggled | correct |
| 1 | 1 | 1 | toggled | wrong |

The read FSM, its alternating priority and the one-clock gap are this
design's own. The original card has such FSMs, but their states are not
published.

## Top level

`wugs_link_top #(IGNORE_LOG2 = 24)` has these ports:

* **Fabric side:** `clk`, `rst_n`, the transmit handshake `tx_cell_*`, and
  the receive outputs `rx_*` (cells, counters, link status, link type).
* **Switch connector pins,** named after the specification's signals (active
  low ends in `_n`):
  * the straps WIDTH_LINK, UNASSIGN_EN, PAD_ZERO, D_SKEW_LINK, TYPE_LINK;
  * the OPP pins;
  * the IPP pins.
* **Dual-155 glue ports** with prefix `ad_`. On that card,
  `ad_d_l_opp` meets `d_l_opp` and so on; the framer pins go to the framer
  chip.

Other adapters (single 155 Mb/s, 622 Mb/s and 2.4 Gb/s SONET, G-Link) connect
their chips to the connector pins directly and leave the `ad_` ports unused.

Clock domains:

* `clk`: reset retiming and all of the IPP after its FIFOs;
* `clk_link`: the OPP and the RESET_OPP shift register;
* `strb_l_link`, `strb_h_link`: IPP capture;
* `ad_clk_link`, `ad_strb_l_link`: the glue.

## Rates

All rates below assume the clock limits the specification gives (CLK_LINK
and strobes up to 80 MHz, 25 MHz with TCA_LINK).

| link | mode | needed cells/s | clock needed | within limit |
|------|------|----------------|--------------|--------------|
| 155 Mb/s SONET | 16-bit, 25 MHz | 0.353 M | 9.5 MHz | yes (0.926 M slots/s) |
| dual 155 Mb/s | 16-bit, 25 MHz | 0.706 M | 19.1 MHz | yes (0.926 M OPP, 0.893 M glue reads) |
| 622 Mb/s SONET | 16-bit | 1.41 M | 38.1 MHz | yes |
| 2.4 Gb/s SONET | 32-bit | 5.65 M | 79.1 MHz | yes, 1% margin |
| 1.25 Gb/s G-Link | 16-bit | 62.5 MHz words | 62.5 MHz | yes |
| 2.5 Gb/s double G-Link | 32-bit de-skew | two 62.5 MHz halves | 62.5 MHz | yes |

Cell rates use the standard SONET payload rates. `wugs_link_rates_tb` runs
the 155 Mb/s, 622 Mb/s, 2.4 Gb/s SONET and double G-Link rows against a
120 MHz fabric clock. In each it checks back-to-back cell spacing, delivery,
no FIFO overflow and the measured cell rate. The RTL itself sets no clock
limit; meeting a given frequency is a synthesis question.

## Departures and open points

* The switch-side transmit handshake and the receive-side outputs (pulse,
  counters, status) are interfaces of this design. The real chips connect
  these paths to internal buffers, and those buffers are not part of the link
  interface.
* 32-bit word 1 is HEC, 0, 0, LINKINFO (see above).
* Idle transmit cycles drive data 0, and the unused high half in 16-bit mode
  is driven quiet. The specification leaves both undefined.
* IPP:
  * FIFO depth, counter widths, the two-flop synchronisers, and the
    SOC-in-mid-cell restart are choices of this design.
  * The de-skew method is the simplest one that meets the stated skew window
    and the fly-wheel rule. The original circuit is not published.
* The dual-155 write enables are active low. The framer pin names say `.L`,
  although the prose calls them `.H`.
* Not built, because they are vendor parts or their logic is not given:
  * the framers, SIPO and G-Link chips, optics, clock recovery and
    oscillators;
  * the microcontroller of the single 155 Mb/s card;
  * the handshake FSMs for that card's asynchronous framer FIFOs;
  * the PAL that programs the dual framer's registers (addresses are known,
    bit positions are not);
  * the PAL that forms UP from the framer's out-of-frame and loss-of-lock
    signals;
  * the IIC_CLK/IIC_DATA path, which the IPP does not support.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `atm_hec_tb` | HEC against a long-division reference for 2000 random headers; all-zero header gives 55h; VPI[7] flips exactly bits 7, 5, 4 |
| `opp_reset_sync_tb` | immediate fall, rise on the 5th CLK_LINK edge, double-low on a short pulse, falling without CLK_LINK |
| `opp_link_tx_tb` | cycle length and SOC position in both modes, word-by-word cell images, TCA_FF_LINK latch point, TCA_LINK used directly and masked in 32-bit mode, the UNASSIGN_EN table, PAD_ZERO, no SOC during reset |
| `ipp_link_rx_tb` | cells in 16-bit, 32-bit and de-skew (13 ns skew) mode come out intact and in order; bad HECs dropped and counted; nothing accepted during start-up or with UP high; TYPE_LINK |
| `dual_sonet_tx_glue_tb` | enable steering per cell, bit 11 cleared only in the SOC word, the TCA AND |
| `dual_sonet_rx_glue_tb` | against a framer model: every cell arrives in order per fiber, reads alternate when both fibers have cells, VPI[7] and HEC patched per the table above, HEC correct exactly for cells that arrived with VPI[7] = 0 |
| `wugs_link_top_tb` | end to end, start-up shortened to 2^8 clocks: 16-bit and 32-bit loopback, de-skew with 13 ns skew, the dual-155 card with a framer loopback model; counts every mechanism (data cells per mode, unassigned, empty cycles, TCA_LINK, PAD_ZERO, link-down drops, start-up drops, HEC errors, each fiber, the TCA AND stall, RESET_OPP) and fails if one never happened |
| `wugs_link_rates_tb` | the port at adapter clock rates (25, 62.5 and 80 MHz link clocks, 120 MHz fabric): cell-cycle spacing of back-to-back cells, every cell delivered, no overflow, measured cells/s against each line's need |
| `wugs_link_top_full_tb` | the top at its default sizes: measures the full 2^24-clock start-up period, then loops five cells through a 16-bit port (about 10 s in Verilator) |

To run one with Verilator 5 (the package goes first):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/link_pkg.sv tb/wugs_link_top_tb.sv \
    --top-module wugs_link_top_tb -o sim
./obj_dir/sim
```

Lint (`verilator --lint-only -Wall`) leaves two kinds of warnings:

* unused package constants;
* reset nets that also appear in assertion `disable iff` clauses.

Neither affects the logic.
