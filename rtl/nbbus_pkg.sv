// nbbus_pkg -- constants and types shared by the Neural Broadcast Bus (NBbus) blocks.
//
// The NBbus is a broadcast bus: one master steps through meta-neuron addresses and,
// for each address, the single card that hosts that meta-neuron places the 32-bit output
// value on the shared data lines while every other card may read it. The address space
// (1024 meta-neurons), the 32-bit data width and the 8-bit processor-card address are the
// system's published sizes. The grouping of the control lines into one struct, and the
// split of a bus slot into an address strobe and a data sample strobe, are this design's
// own choices.
package nbbus_pkg;

  localparam int unsigned N_ADDR = 1024;          // meta-neuron addresses on the bus
  localparam int unsigned ADDR_W = $clog2(N_ADDR); // 10 address lines
  localparam int unsigned DATA_W = 32;            // one IEEE single-precision value
  localparam int unsigned CARD_W = 8;             // card-select register width: 256 cards

  typedef logic [ADDR_W-1:0] nb_addr_t;
  typedef logic [DATA_W-1:0] nb_data_t;
  typedef logic [CARD_W-1:0] card_addr_t;

  // Lines driven by the bus master and seen by every card.
  typedef struct packed {
    logic       addr_valid; // one cycle at the start of a slot: addr carries a new address
    logic       sample;     // one cycle near the end of a slot: data lines are settled
    nb_addr_t   addr;       // meta-neuron address, held for the whole slot
    logic       cs_strobe;  // one cycle per millisecond: card_sel carries the selected card
    card_addr_t card_sel;   // processor card that owns the host serial link
  } nb_ctl_t;

endpackage
