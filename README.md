# Low-voltage SRAM FIFOs for body-area sensor nodes

A wearable ECG or physiological sensor samples slowly and almost all the
time, and sends its data to a host in short, fast bursts. The buffer between
the two sides is a FIFO. It spends most of its life holding data, so its
leakage and its write energy dominate. This RTL describes two SRAM-based
FIFOs built around that observation. Both run their cells near or below the
transistor threshold (0.5 V and 0.3 V):

* **`fifo16k`**: 1024 words x 16 bits, written at 50 kHz and read at 625 kHz.
  It uses 10-transistor dual-port cells. Three ideas save power:
  * **Per-word power gating.** A FIFO is filled and emptied in order, so the
    words holding data are known from the two pointers. Every word has its
    own supply switch. The switch turns on when a write to that word starts
    and off once the word has been read out. Empty words leak nothing.
  * **Counter-based pointers.** The pointers are plain counters with a
    decoder, not shift registers, so only a few flip-flops toggle per
    access.
  * **Self-timed access windows.** Replica cells that see the same process,
    voltage and temperature as the array decide how long each word line
    stays open.
* **`dvs_fifo2k`**: 128 words x 16 bits of 9-transistor cells, in eight
  16-word sub-blocks. Each sub-block has its own supply, which moves between
  three levels:
  * cut off (floating) while it is empty;
  * 0.3 V (VDDL) while it is being filled or holds data;
  * 0.5 V (VDDH) only while it is being read out at the fast rate.

  The supply changes are scheduled from the pointers ahead of time, so the
  FIFO never waits for a supply to settle.

`wban_fifo_top` places the two FIFOs side by side, each with its own pins.
They are two separate chips in two technologies and share nothing.

## Pins and use

Both FIFOs have the same pins:

| pin | meaning |
|---|---|
| `clk_w`, `clk_r` | write and read clocks, unrelated to each other |
| `cen` | 1 = disabled: pointers return to 0, every word or sub-block is powered down, `q` is cleared |
| `wen`, `ren` | active-low write and read requests, sampled at the rising edge of their clock |
| `d[15:0]` | write data, sampled with `wen` |
| `q[15:0]` | read data. It is valid from the end of the read window until the next read, well before the next `clk_r` edge |

`dvs_fifo2k` also brings out `vcs[k]`, the supply level of each sub-block:
`VCS_OFF`, `VCS_LOW`, `VCS_HIGH`, or `VCS_SHORT` as an error code.

**There are no full or empty flags.** The controller around the FIFO must
count for itself:
* write only while fewer than `WORDS` words are unread;
* read only words whose write has completed.

The DVS FIFO has one more rule. The writer must stay one sub-block behind
the reader's previous lap, because a sub-block is re-armed only after it has
been read out and has floated. The testbenches include such a controller.

One access is one clock edge. The edge opens a window pulse: WP for writes,
RP for reads. The word line of the addressed word is the decoder output ANDed
with that pulse. The pointer steps when the pulse ends, so the first word
written or read is word 0 and the word line never moves inside a window.

## Self-timed windows (replica column)

At 0.5 V, cell delays vary by large factors with process and temperature, so
a fixed pulse is either wasteful or unsafe. Both FIFOs have a replica column,
`replica_column`, whose bit lines are as long as a data column's.

**Write.** WP also writes the two replica cells, each the opposite of what
it held:
* The write-0 replica is written through a bit line that the write driver
  must pull down through its full load. Its delay grows with the column
  length.
* The write-1 replica's bit line is held high. Its delay is set by the
  access transistor alone.

Which of the two is slower depends on the corner. `write_window_ctrl` ANDs
the two completion signals into **W_ok**, which the worst-case detector
provides. W_ok passes through an inverter delay line (`delay_line`) for
margin and then asynchronously clears WP. The write window is therefore:

    t_WP = max(t_write0_replica, t_write1_replica) + t_delay_line

**Read.** RP also opens a replica read cell that stores the value that
discharges its read bit line. When that line has fallen, **R-ok** fires.
R-ok has two effects:
* `sense_amp_bank` captures the data bit lines into `q`;
* RP is cleared, which ends the read and the sense current.

The read window is the replica's cell delay plus its bit-line delay.

The delays of the cell, bit-line, delay-line and switch models are
parameters in ns. Their defaults are placeholders chosen so the windows come
out at 25 to 33 ns. The real values depend on silicon and are not derived
here. The testbenches check the window lengths against these formulas.

## Per-word power control (16 Kb)

`power_ctrl` keeps one cutoff/active state per word:
* a word becomes active at the `clk_w` edge that starts its write;
* it returns to cutoff at the end of the RP pulse that reads it out.

A write event and a read event for the same word arrive on different clocks.
So the state is kept as two toggle bits, one flipped by each side, and
`power_on = set_t ^ clr_t`. Neither side ever writes the other's flip-flops.
`fifo_array` models a word whose supply is off as having lost its contents:
it reads as zero. The testbenches use this to check that power is really
removed.

## Sub-block supply control (2 Kb DVS)

Each sub-block has a power switch (`power_switch`) with three transistors:
* MPH, a pMOS to VDDH, gate `ps_h`, on when 0;
* MPL, a pMOS to VDDL, gate `ps_l`, on when 0;
* a discharge nMOS, gate `dsch`, on when 1.

Each sub-block also has a five-state controller (`apsc_fsm`), clocked by the
read clock:

    FLOAT --arm--> LOW --wake--> WAIT --> TYP --release--> DSCH --> FLOAT

* **Arm.** The write of the last word of sub-block k-1 arms sub-block k, so
  k is at VDDL before its first write. This request comes from the write
  clock. It is a toggle that crosses into the read domain through a
  two-flop synchroniser, and is acknowledged only once k is floating.
  Sub-block 0 leaves reset in LOW.
* **Wake.** Reading the last word of k-1, or reading k while it is still at
  VDDL, starts the wake-up. WAIT is one read clock with both pMOS off. It is
  a break-before-make gap, so VDDH is never shorted to VDDL. The switch
  model reports `VCS_SHORT` if that ever happens, and an assertion checks
  it.
* **Release.** One read clock after the read of k's last word has started,
  the sub-block discharges and floats. Its data are gone.

In steady reading, at most two sub-blocks are at VDDH: the one being
finished and the one woken for the next word. Writes happen at VDDL, and
reads in a burst happen at VDDH. Only the very first read after an idle
period starts at VDDL, and its sub-block switches to VDDH during that read.
`apsc_ctrl` decodes the two pointers into these requests.

The DVS scheme pays off when a read burst covers enough sub-blocks to repay
the energy of charging and discharging them. The energy model of this design
puts the break-even at about 1.73 sub-block accesses per burst, so about two
sub-blocks (32 words). The array holds 8 sub-blocks, and up to 7 (112 words)
can be filled before a read-out.

## Modules

| module | kind | what it is |
|---|---|---|
| `wban_fifo_top` | RTL | both FIFOs side by side |
| `fifo16k` | RTL | 16 Kb FIFO |
| `dvs_fifo2k` | RTL | 2 Kb DVS FIFO |
| `fifo_array` | RTL | word array with per-word supply and wired-AND read bit lines |
| `fifo_pointer` | RTL | counter, decoder, word-line AND gates |
| `write_window_ctrl` | RTL | WP register and worst-case detector |
| `read_window_ctrl` | RTL | RP register and R-ok |
| `sense_amp_bank` | RTL | output capture at R-ok |
| `power_ctrl` | RTL | per-word cutoff/active control |
| `apsc_ctrl`, `apsc_fsm` | RTL | sub-block supply scheduling |
| `fifo_pkg` | package | supply-level and controller-state enums |
| `sram_cell_10t`, `sram_cell_9t` | behavioural | bit-cells with write/read delays; the 9T delays depend on the supply level |
| `replica_column` | behavioural | replica write-0, write-1 and read cells with bit-line delays |
| `delay_line` | behavioural | transport delay |
| `power_switch` | behavioural | MPH/MPL/discharge switch giving the sub-block supply |

The behavioural models contain `#` delays and are for simulation only. The
RTL modules use asynchronous set and reset the way the circuit does. WP and
RP are flip-flops that are set by a clock and cleared by their own
completion signals. The per-word and per-sub-block states change on both
clocks. Those paths are deliberate, but a standard synchronous timing flow
does not cover them.

Not modelled:
* the supply generator for VDDL (a switched-capacitor converter);
* the sensor node around the FIFOs;
* anything analog beyond fixed delays, such as leakage, noise margins and
  energy.

## Where this RTL makes its own choices

* **Pointer stepping.** The counter advances at the end of the window. A
  counter that steps at the clock edge, as a circuit description would put
  it, gives the same one-step-per-access behaviour, but it would address the
  next word during the current window.
* **Read polarity.** A selected cell whose storage node is 0 pulls its read
  bit line low, so the sensed bit equals the stored bit. The replica read
  cell stores the discharging value.
* **Discharge state.** DSCH, one read clock with the discharge transistor
  on, sits between Typical and Floating. Its length is this design's choice.
* **Clock domain.** The sub-block controllers run on the read clock.
* **Output.** `q` holds its value between reads. `cen` clears `q`, the
  pointers and all power states asynchronously.
* **Test clocks.** The DVS tests use the model's periods of 33 µs write and
  1.6 µs read.

## Simulating

Each `tb/<module>_tb.sv` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert --top-module wban_fifo_top_tb \
      rtl/fifo_pkg.sv $(ls rtl/*.sv | grep -v fifo_pkg) tb/wban_fifo_top_tb.sv
    ./obj_dir/Vwban_fifo_top_tb

The `rtl/` modules are synthesizable RTL except the behavioural models.
`--timing` is needed for the delays.

`wban_fifo_top_tb` runs both FIFOs at full size and default parameters, at
50 kHz/625 kHz and 33 µs/1.6 µs, about 64 ms of simulated time and well under a minute
of run time:
* the 16 Kb FIFO is filled to all 1024 words twice and drained;
* the 2 Kb FIFO goes through about a dozen fill and drain bursts;
* all data are checked against a scoreboard.

It counts each mechanism and fails if any never occurs:
* word power-on and cut-off with loss of contents;
* W_ok and the delay-line end of every write window;
* R-ok and sense capture on every read;
* pointer wrap;
* every sub-block transition FLOAT→LOW→WAIT→TYP→DSCH→FLOAT;
* writes at VDDL and reads at VDDH.

The block testbenches check the window lengths to 10 ps against the formulas
above, and check that data are valid within one read clock.
