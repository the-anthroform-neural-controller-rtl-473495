# NBbus: a broadcast bus for a distributed neural-circuit emulator

This is synthesizable SystemVerilog for the interconnect of a neural controller. In this
controller, models of groups of spinal neurons ("meta-neurons") run as programs on several
floating-point DSP cards. Every meta-neuron needs, as its inputs, the outputs of many
others. Biological neurons fire at most about once a millisecond, so the system refreshes
every connection once per millisecond. It does this without point-to-point links.

The **Neural Broadcast Bus (NBbus)** solves that problem with one idea: the bus is a
*shared memory of meta-neuron outputs* that is kept up to date by broadcast.

* Every meta-neuron has a bus address, 0..1023. The output of a meta-neuron is one 32-bit
  (IEEE single) value.
* A single bus master steps through the addresses. A complete pass takes exactly one
  millisecond.
* Each card has a dual-ported memory with one word per address, plus a 1-bit "hosted" flag
  per address. When an address comes round, each card's state machine checks the flag.
  * If the card hosts that meta-neuron, it reads the word and drives it onto the data lines.
  * Otherwise it copies the data lines into that word.
* The DSP never touches the bus. It reads the inputs it needs from its own dual-port, which
  always holds a copy of every output that is at most 1 ms old. It writes its own outputs
  into the same memory.

With 1024 meta-neurons this refreshes 1024 × 1023 = 1,047,552 connections per millisecond.
Moving a meta-neuron to another card only means moving its program and its hosted flag.

Around the bus sit two host-side features:
* A host computer configures the master over a serial line.
* The host talks to one processor card at a time over a shared serial line. It chooses that
  card with a card-select register, which the master broadcasts once per millisecond.

## Block map

```
anc_top                         whole controller, N_CARDS cards on one bus
├── host_interface              serial command port from the host -> master registers
│   └── uart_rx                 8N1 receiver
├── nbbus_master                address sequencer, slot timing, card-select broadcast
└── processor_card  [N_CARDS]   bus-side logic of one card (the DSP sits at its ports)
    ├── nbbus_interface
    │   ├── nbbus_fsm           check flag -> drive or copy
    │   └── dual_port_memory    1024 x 32-bit words + 1024 hosted flags
    └── card_host_link          card selection, serial gating, request line
nbbus_pkg                       sizes, nb_ctl_t (the master's bus lines)
```

These parts of a real card are **not** in the RTL:
* the DSP (a TMS320C30-class floating-point processor) and its local memory;
* the development-system port;
* the I/O daughter cards (ADC, DAC, PWM, quadrature decoders) and their connector;
* the bus repeaters that join groups of cards.

Their signals are the ports of `processor_card` and `anc_top`. In the testbenches, the
testbench code plays the DSPs and the host.

## A bus slot, cycle by cycle

This timing is this design's own; the published design gives only the behaviour. With the
defaults the clock is 32.768 MHz and a slot is `SLOT_CYCLES = 32` clocks. So 1024 slots
take 32,768 clocks, which is exactly 1 ms.

| slot cycle        | master (`nb_ctl_t`)                 | every card's `nbbus_fsm`                                   |
|-------------------|-------------------------------------|------------------------------------------------------------|
| 0                 | `addr_valid`=1; `addr` = new address (held for the whole slot) | reads word and flag of `addr` from the dual-port |
| 1                 |                                     | flag set → DRIVE, otherwise LISTEN                         |
| 2 … SLOT-1        |                                     | DRIVE: `drv_en`=1 and `drv_data` = the stored word          |
| SLOT-2            | `sample`=1                          | LISTEN: writes the data lines into the word                |
| next 0            | next address                        | `drv_en` is already low                                    |

Slots follow each other with no gap. `SLOT_CYCLES` may be as small as 4.

The data lines are a wired OR: `anc_top` ORs the gated outputs of all cards. The hosted
flags must give each address at most one owner. An assertion in `anc_top` checks that no
two cards drive at once. Addresses that no card hosts read as zero.

## The dual-ported memory and its two rules

`dual_port_memory` has a **processor port** and a **bus port**.

The processor port uses an 11-bit word address:
* `p_addr[10] = 0`: the data words.
* `p_addr[10] = 1`: the hosted flags (bit 0 of the data).

A request is `p_cs` for one cycle. If the request is accepted, read data come back one
cycle later, with `p_rvalid`.

1. **Clash.** If the processor touches the word the bus port is using in that same cycle,
   `p_busy` is raised. The processor access is not performed, and the processor must hold
   its request until `p_busy` drops. The bus side always goes ahead because its slot timing
   is fixed. In a slot the bus port is busy for at most two cycles: the read in cycle 0 and,
   for a listener, the write in the `sample` cycle.
2. **Hosted words belong to the processor.** A bus-side write to a word whose flag is set is
   dropped. Without this rule, a card that sets a flag while that address's slot is already
   under way would copy the bus value into its freshly written output.

The flags are cleared by reset, so no card drives until its DSP claims addresses. The data
words are not reset.

## Choosing the address sequence

After reset the master counts 0..1023. The host can change that through `host_interface`.
The host sends 8N1 frames at `CLKS_PER_BIT = 4` clocks per bit, which is about 8 Mbaud at
32.768 MHz. The commands are:

| bytes              | effect                                                      |
|--------------------|-------------------------------------------------------------|
| `01 C`             | card-select register ← C                                    |
| `02 L0 L1`         | sequence length ← {L1,L0}                                   |
| `03 I0 I1 A0 A1`   | sequence table entry {I1,I0} ← address {A1,A0}              |
| `04 M`             | mode ← M[0]: 0 = count 0..length-1, 1 = table 0..length-1   |

Unknown opcodes are ignored. The command set is this design's own.

* **Shorter cycle.** In count mode a smaller length refreshes every used address more
  often. For example, length 100 gives a 3,200-clock cycle.
* **Weighted sequence.** Table mode (`SEQ_DEPTH = 2048` entries) lets some addresses appear
  more often than others. For example, with 1,9,2,9,3,9,… address 9 is refreshed in every
  second slot.

Each table entry takes one slot. So a table that interleaves address 9 with all 1023 other
addresses takes about 2 ms, and the other addresses are then refreshed every 2 ms, not
every 1 ms. Changes to the length, mode or table take effect at the next slot boundary.

## Talking to one card

* `nbbus_master` broadcasts its 8-bit card-select register every `MS_CYCLES` clocks. It uses
  `cs_strobe` and `card_sel`, which are lines separate from the address lines, so the
  broadcast costs no slot.
* Each card's `card_host_link` latches the broadcast card address. While that address equals
  its `CARD_ID`, the card passes the shared host serial line (`host_ser`) to its DSP and
  puts the DSP's transmit onto the return line. Other cards hold both lines idle (high), and
  the return line is the AND of all cards.
* The selection holds until a different card is broadcast. So after a change it takes up
  to 1 ms for the new card to be selected.
* In `anc_top`, card *i* has card address *i*.
* Any card can raise the shared host request line, which is an OR of all cards. Finding the
  card that asked is left to the host, which polls the cards by selecting them one by one.

## Parameters

| parameter      | default | where                      | meaning / origin |
|----------------|---------|----------------------------|------------------|
| `N_ADDR`       | 1024    | `nbbus_pkg`                | meta-neuron addresses (published size) |
| `DATA_W`       | 32      | `nbbus_pkg`                | value width (published size) |
| `CARD_W`       | 8       | `nbbus_pkg`                | card address width, so up to 256 cards (published size) |
| `N_CARDS`      | 10      | `anc_top`                  | cards on one electrical bus group (published; up to 256 allowed) |
| `SLOT_CYCLES`  | 32      | `anc_top`, `nbbus_master`  | clocks per slot (own choice) |
| `MS_CYCLES`    | 32768   | `anc_top`, `nbbus_master`  | clocks per millisecond (own choice of clock) |
| `SEQ_DEPTH`    | 2048    | `anc_top`, master, host if | sequence-table entries (own choice) |
| `CLKS_PER_BIT` | 4       | `anc_top`, `host_interface`| serial bit time (≈ the published 8 Mbaud) |

If you change the clock, keep `SLOT_CYCLES × N_ADDR = MS_CYCLES`. That keeps the full
address cycle at 1 ms.

After synthesis, the default `anc_top` holds:
* 10 × 32 Kbit of dual-port memory;
* a 20 Kbit sequence table;
* about 11,000 flip-flops, most of them the 10 × 1024 hosted flags.

## Simulating

Every testbench is self-checking. Each one prints one line:
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/nbbus_pkg.sv tb/tb_anc_top.sv --top-module tb_anc_top
./obj_dir/Vtb_anc_top +verilator+rand+reset+2
```

Replace `tb_anc_top` with any testbench below. The `+verilator+rand+reset+2` option starts
every uninitialised variable at a random value. Every testbench finishes in seconds.

| testbench             | what it shows |
|-----------------------|---------------|
| `tb_dual_port_memory` | both ports against a reference copy; clash → `p_busy`, retried write lands; hosted words ignore bus writes |
| `tb_nbbus_fsm`        | drive window (cycles 2..SLOT-1), copy in the `sample` cycle, for 400 random slots |
| `tb_nbbus_interface`  | two cards plus testbench hosts exchange all 1024 words over three passes; timed clashes |
| `tb_card_host_link`   | selection only on the strobe, serial gating both ways, request register |
| `tb_processor_card`   | one card on a modelled bus: drives exactly its hosted words, copies all others, host link |
| `tb_nbbus_master`     | order 0..1023, full cycle = 32,768 clocks, card select once per ms, short cycle, table 1,9,2,9,3,9 |
| `tb_host_interface`   | every command, unknown opcode, frame with a bad stop bit, request synchroniser |
| `tb_anc_top`          | whole controller at default size. It runs 100 meta-neurons on 10 cards (see below). |
| `tb_full_network`     | 1024 fully connected meta-neurons on 10 cards: exactly 1024 drives and 9216 copies per ms; every card holds every value |
| `tb_stretch_reflex`   | a 5-meta-neuron reflex circuit (afferent → motor, synergist, inhibitory interneuron → antagonist) across 3 cards, with trivial per-ms programs; checks values and the 1 ms / 2 ms path delays |

`tb_anc_top` checks:
* the full cycle takes 1 ms;
* every card holds every value;
* processor waits on a clash;
* selection of card 2, then card 7;
* the host request line;
* the cycle shortened to 100 addresses;
* a 198-entry weighted table.

It counts each of these mechanisms and fails if one never happened.

## Where this RTL departs from, or adds to, the published design

* **Clock and bus timing.** The clock frequency, the slot length, and the split of a slot
  into `addr_valid` and `sample` strobes are this design's choices. So is carrying the card
  address on separate lines. Only the 1 ms cycle, the 1024 addresses, the 32-bit data and
  the 8-bit card address are given.
* **Data lines.** The data lines are a wired OR of gated outputs, not tri-state drivers.
* **Host command protocol.** The serial framing and command set are this design's own.
  Commands for the master and program downloads to a DSP use separate serial lines here.
  The published design says only that one serial link carries both.
* **State machine.** The published design implemented the bus state machine in a
  programmable logic array. Its states and timing here are this design's own.
* **Dual-port arbitration.** On a clash the processor port waits; which port waits was not
  specified. The rule that a hosted word ignores bus writes is an addition, explained above.
* **Weighted sequences.** The published example claims that interleaving one address with
  all the others keeps the others at a 1 ms refresh. With one table entry per slot, as built
  here, they are refreshed every 2 ms instead.
* **System size.** The default is one group of 10 cards. Larger systems join such groups with
  bus repeaters. `N_CARDS` can be raised to 256, but the repeaters themselves are not
  modelled.
* **Connection delays.** Programmable delays per connection are meant to be done in the DSP
  software (ring buffers). No delay hardware exists here.
* **Not included:** the DSP, local memory, development port, I/O daughter cards and their
  connector, the repeaters, and the arm's valves and sensors.
