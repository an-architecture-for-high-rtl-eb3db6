# Bank-switched DSP cards for hierarchical real-time control

A workstation or PC (the *host*) supervises up to eight TMS320 signal
processors, each on its own card next to the plant it controls. The processors
run the fast inner loops (a robot joint, a converter's switching instants)
every few hundred microseconds. The host runs the slow, heavy outer layer
(trajectories, learning, operator interface) every few tens of milliseconds.
The two levels share no bus cycles while they compute. Each card carries
**two RAM banks**: one belongs to the host and the other to the DSP. Each side
reads and writes its own bank at its own speed. When the host has prepared new
data, it asks for a **bank switch**. The DSP grants it at a sampling instant of
its choice by exchanging the two banks with a single I/O instruction. The swap
is both the data transfer and the synchronisation of the two levels. The DSP
spends one instruction on it, whatever the amount of data.

This repository holds synthesizable SystemVerilog for the digital logic of one
card (`dsp_card`) and for the card rack on the host's buses (`dsp_system`, the
top). It also has a self-checking testbench for every module. The processors,
the host and the analog plant interface are outside the RTL. Their pins are
ports of the top, and the testbenches play their part.

## The system

```
             host
   SAB  ======+=========+=========+====  16-bit system address bus
   SDB  ======+=========+=========+====  16-bit system data bus
              |         |         |
          dsp_card  dsp_card ... dsp_card     (up to 8, N_CARDS)
              |         |         |
           TMS320    TMS320    TMS320       (outside the RTL)
              |         |         |
            plant     plant     plant
```

Every card sees both buses. A card knows its own address from three jumpers
(`card_id`). In `dsp_system` the cards' SDB drivers, which are 3-state
buffers on the board, are modelled as gated outputs ORed together. `sdb_oe`
tells the host that some card is driving. An assertion fires if two cards
drive at once.

Inside a card (`dsp_card`):

| block | module | job |
|---|---|---|
| card address comparator | `card_addr_comp` | matches the SAB card field against the jumpers while ATN is set |
| command register | `command_reg` | stores one command per card; executes it at each CE |
| status register | `status_reg` | snapshot of the card state, read by the host on SDB[7:0] |
| RAM1, RAM2 | `ram_bank` | 2048 x 16-bit banks |
| bank switchers | `bank_switcher` | route host and DSP to the two banks, crossed over by Q2 |
| RAM control logic | `ram_ctrl` | Q1 (pending request, BIO, ACK) and Q2 (bank state) |
| PROM | `prom` | permanent DSP code below the bifurcation address |
| internal address comparator | `int_addr_comp` | detects the DSP's I/O address page |
| I/O control logic | `io_ctrl` | 3-to-8 decode of the port number for OUT and IN |
| timer | `sample_timer` | sampling interrupt, 100 us .. 819.1 ms |
| I/O ports | `plant_io` | plant address bus, plant data bus and strobes |

Shared constants, the command type and the SAB helper functions are in
`card_pkg`.

## The bank switch handshake

This is the heart of the design and the part to understand first. Two
flip-flops in `ram_ctrl` carry it:

* **Q1** is a set-reset flip-flop that holds "the host wants a switch". The
  host's *bank switch request* command sets it. Its inverted output drives the
  DSP's `BIO` pin, which the DSP can test with a single branch instruction. Its
  true output is the **ACK** bit (bit 1) of the status register.
* **Q2** is a toggle flip-flop that holds which bank is whose. With Q2 = 0,
  RAM1 is the host's and RAM2 the DSP's; with Q2 = 1 they are crossed.

An `OUT` instruction by the DSP to **I/O port 0** resets Q1 and toggles Q2 in
the same clock. One switch then goes:

1. The host fills its bank with new inputs for the DSP, then sends the switch
   request. Q1 = 1, BIO goes low and ACK reads 1.
2. The DSP keeps computing from its own bank. At every sampling interrupt it
   looks at BIO. In software it also counts down a semaphore, which the host
   wrote into the bank. The DSP switches only when the count has run out, so
   the host decides how many sampling periods pass between exchanges.
3. When it decides to switch, the DSP executes `OUT` to port 0. The banks
   cross over, BIO returns high and ACK falls to 0.
4. The host polls the status register until ACK is 0. It now owns the bank
   that the DSP has just filled with its results, and it starts again at 1.

If the DSP's semaphore runs out while no request is pending, the host has
overrun its time slot. The DSP can report that through the card flags, which
are status bits 3..7 and are written by the DSP on port 4.

If a host request and a DSP switch strobe fall in the same clock, the request
wins and stays pending, so no request is lost. The *forced bank switching*
command toggles Q2 from the host side. The host uses it while the DSP is held
in reset, to download code and parameters into both banks.

## Talking to a card: command words on the SAB

The host has only a 16-bit address port. Bank addresses need 14 bits, which
leaves two bits as control lines:

| SAB bits | meaning when ATN=0 | meaning when ATN=1 |
|---|---|---|
| 15 | ATN = 0 | ATN = 1: this word is a command |
| 14 | CE: execute the stored commands | ignored |
| 13:0 | bank word address (11 bits used with 2-kword banks) | bits 10:8 card address, bits 7:0 command lines |

The command register works in two phases. First, a word with ATN set stores a
command in the one card whose address matches. Then, every rising edge of CE
executes the stored commands **in all cards at once**. A card that should not
react must hold the *idle* command (all zero). This lets one CE start a group
of cards, or switch all their banks, at the same instant. It also means that a
block transfer needs only one command word: store *bank write* once, then give
one CE per word with the address on SAB and the data on SDB.

Command lines (`card_pkg`, one bit each, idle = `8'h00`):

| bit | command | action at CE |
|---|---|---|
| 0 | bank write | write SDB into the host-side bank at SAB[10:0] |
| 1 | bank switch request (CHGREQ) | set Q1 |
| 2 | bank read | drive the host-side bank word at SAB[10:0] on SDB while CE is high |
| 3 | latch card status | snapshot the status inputs |
| 4 | card status read | drive the snapshot on SDB[7:0] while CE is high |
| 5 | run | release the DSP's reset |
| 6 | reset | hold the DSP in reset |
| 7 | forced bank switching | toggle Q2 |

Status bits: 0 = Q2 (bank state), 1 = ACK (request pending), 2 = DSP running,
3..7 = card flags written by the DSP.

`card_pkg::sab_command(card, cmd)` and `card_pkg::sab_execute(addr)` build the
two kinds of SAB word.

## The DSP's view of the card

The TMS320 has separate program and data spaces. The banks and the PROM sit
in **program** space, and the DSP moves words between the spaces with its
table-read and table-write instructions (`TBLR`, `TBLW`). So the banks can hold
program sections that the host replaces while the system runs, as well as
data.

The program space is Y-shaped. Addresses below `bif_addr`, a jumper setting,
read the PROM. Addresses at or above it reach whichever bank the DSP owns at
that moment. The low address bits select the bank word, with no offset. With
2-kword banks and `bif_addr = 12'h800`, program addresses 0x800..0xFFF are bank
words 0..2047. A table write goes to the bank when it is at or above the
bifurcation. Table writes below it, into the PROM, are ignored.

I/O instructions put the port number on A2..A0 with A11..A3 at zero.
`int_addr_comp` detects that page. This separates an `OUT` from a `TBLW`, which
uses the same WE strobe. `io_ctrl` then decodes the port:

| port | OUT | IN |
|---|---|---|
| 0 | switch the banks | – |
| 1 | sampling timer preset (units of 100 us; 0 stops it) | – |
| 2 | plant address bus | – |
| 3 | plant data bus (with `plant_wr_n` strobe) | plant data bus (with `plant_rd_n`) |
| 4 | card flags (status bits 3..7) | – |

The timer interrupts the DSP on `tms_int_n` (one clock low) every preset x
100 us. After power-up the DSP is held in reset (`tms_rs_n` low) until the host
sends *run*. That leaves time to download code first.

## Timing model and departures from the original board

The original card is TTL logic with two asynchronous sides: the host's bus
cycles and the DSP's. This RTL is a synchronous model of the same logic.

* **One clock.** Everything runs on `clk`, assumed to be 20 MHz (the timer's
  `TICK_DIV = 2000` makes 100 us). Host and DSP strobes are taken as
  synchronous to it. An edge action (bank write, request, switch, latch,
  run/reset, port write) happens once, on the first clock of its strobe, so a
  strobe may last any number of clocks. Connecting truly asynchronous host or
  DSP buses would need synchronisers in front of the card. They are not
  included.
* **Memories.** Banks and PROM read combinationally and write on the clock
  edge, like asynchronous static RAM sampled by the card clock.
* **3-state buses** are multiplexers and OR-gated enables. The DSP data bus is
  split into `tms_d_in` and `tms_d_out`, and the plant data bus into
  `plant_dout` and `plant_din`.
* **Choices made here, not taken from the original:** which SAB bits are ATN
  and CE, the command-line numbers other than CHGREQ = line 1, the status bits
  other than ACK = bit 1, the I/O ports other than port 0, the timer's time
  base and its 13-bit preset, the 8-bit plant address, the PROM size (2048
  words) and the reset values. All of these are in `card_pkg` or are module
  parameters.
* **PROM contents** are TMS320 machine code that is not part of this
  repository. Set `PROM_INIT` to a `$readmemh` file; without one the PROM reads
  zero.
* **Not modelled:** the processors, the host, the D/A, resolver-to-digital and
  A/D converters of the plant, and the DSP and host software (semaphore
  countdown, control laws). The testbenches contain a behavioural version of
  the two software loops.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_CARDS` | 8 | `dsp_system` | cards on the buses (3-bit card address) |
| `BANK_WORDS` | 2048 | `dsp_system`, `dsp_card` | words per bank; the original allows extension to 4096 |
| `PROM_WORDS` | 2048 | `dsp_card` | PROM size |
| `DSP_AW` | 12 | both | DSP address width (TMS32010) |
| `DW` | 16 | both | data width |
| `PA_W` | 8 | both | plant address width |
| `TICK_DIV` | 2000 | both | clocks per 100 us timer tick |
| `PRESET_W` | 13 | `dsp_card` | timer preset width |
| `PROM_INIT` | "" | `dsp_card` | PROM image file |

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends it with a
failure if it hangs. Run from the repository root; the package must come
first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/card_pkg.sv tb/tb_dsp_system.sv --top-module tb_dsp_system -Mdir obj
obj/Vtb_dsp_system
```

Replace `tb_dsp_system` with any other `tb_<module>`. `tb_prom` and
`tb_dsp_card` read `tb/prom_test.hex`, in which word i is
0x1357*i + 0x2468 modulo 2^16.

* `tb_dsp_system` runs the complete system at its default sizes: eight cards
  with 2-kword banks and a 100 us sampling period. The host downloads both
  banks of every card with the DSPs in reset, using a forced switch to reach
  the second bank. It checks that a card holding idle ignores CE. It starts all
  cards with one broadcast *run*. It then runs four rounds of: write inputs and
  a semaphore, broadcast a switch request, poll ACK, and read back the outputs.
  Each emulated DSP counts its semaphore down on timer interrupts and switches
  when the count is out and BIO is low. It computes output = input + plant
  input through the plant ports, counts its samples in the bank and reports its
  switch count in the card flags. The test checks every value, and it counts
  each mechanism: broadcast, bank read and write, status read, request,
  deferred request, DSP switch, forced switch, run, reset, timer interrupt,
  plant read and write, PROM read, table write and code download. A mechanism
  that never occurs is a failure. The run takes well under a second.
* `tb_dsp_card` gives one card directed checks: another card's commands are
  ignored; block transfers need one command word; CE in a command word is
  ignored; the PROM/bank split follows the bifurcation jumpers; table writes
  land only in the bank; the full handshake; forced switching; the timer period;
  the plant ports; the flags; run and reset.
* `tb_learning_workload` reproduces the data flow of a robot application:
  iterative learning control of a three-joint arm. One card runs a
  proportional-plus-derivative loop every 400 us (timer preset 4), and the host
  exchanges banks every 20 ms (50 samples, semaphore 49). With each exchange,
  the host downloads 300 words of reference and feedforward samples. Every
  other sample, the DSP logs position error and controller output into its
  bank, 150 words per exchange. An integrating plant model sits on the plant
  buses. The test checks every logged word against what the plant saw, and it
  checks that the exchanges are exactly 400 000 clocks (20 ms) apart. It
  simulates 80 ms of operation in a few seconds.
* Each leaf module has its own testbench, exhaustive where the input space is
  small and random against a reference model otherwise.

Sizing for that application: a 20 ms exchange needs about 525 words per bank
(logs plus reference segments for three joints). Each bank holds 2048 words.
The 400 us sampling period is preset 4 of a timer that reaches 819.1 ms.

## How far to trust it

All modules pass lint with Verilator (`-Wall`, warnings only for outputs left
deliberately unconnected) and elaborate in Yosys. Every testbench passes, and
every one of them has been shown to fail against a deliberately broken copy of
its module. The logic follows the block diagram of the card, the schematic of
the bank switching flip-flops and the description of the command mechanism.
The bit-level encodings and bus timing listed under *Choices made here* are
not from the original. Software on the DSP or host has to agree with
`card_pkg`. Nothing here has been tried against a real TMS320 bus timing.
