// anc_top -- the neural controller: NBbus master, host interface and a group of
// processor cards on one Neural Broadcast Bus.
//
// Meta-neuron programs run on the cards' DSPs. Each meta-neuron has a bus address; the
// master visits every address once per millisecond, the card hosting it puts its latest
// output value on the data lines and every other card copies it into its dual-ported
// memory. So every card always holds a copy, at most one millisecond old, of every
// meta-neuron output: a fully connected network of up to 1024 meta-neurons.
//
// Bus wiring. The data lines are resolved here as the OR of each card's gated output;
// the hosted flags must make at most one card drive an address (an assertion checks it).
// The host serial return line is the AND of the cards' idle-high outputs and the host
// request line the OR of the cards' requests. The host reaches the master through the
// host interface (host_cmd_rx) and the selected card through host_ser / card_ser.
//
// N_CARDS = 10 is one electrical bus group; the published system joins up to 256 cards
// (the 8-bit card address) by bus repeaters, which are not logic and are not modelled.
// Card i has card address i. The DSP of every card is outside this module: its signals
// are the dsp_* array ports, indexed by card. Default timing: 32.768 MHz clock, 32 clocks
// per bus slot, so 1024 slots take exactly 1 ms.
module anc_top
  import nbbus_pkg::*;
#(
  parameter int unsigned N_CARDS      = 10,
  parameter int unsigned SLOT_CYCLES  = 32,
  parameter int unsigned MS_CYCLES    = 32768,
  parameter int unsigned SEQ_DEPTH    = 2048,
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // host computer
  input  logic            host_cmd_rx,              // commands to the bus master
  input  logic            host_ser,                 // serial data to the selected card
  output logic            card_ser,                 // serial data from the selected card
  output logic            host_req,                 // some card requests a connection
  // DSP side of each processor card
  input  logic            dsp_cs     [N_CARDS],
  input  logic            dsp_we     [N_CARDS],
  input  logic [ADDR_W:0] dsp_addr   [N_CARDS],
  input  nb_data_t        dsp_wdata  [N_CARDS],
  output nb_data_t        dsp_rdata  [N_CARDS],
  output logic            dsp_rvalid [N_CARDS],
  output logic            dsp_busy   [N_CARDS],
  input  logic            dsp_tx     [N_CARDS],
  output logic            dsp_rx     [N_CARDS],
  input  logic            dsp_req    [N_CARDS],
  output logic            selected   [N_CARDS],
  // bus observation
  output nb_ctl_t         nb_ctl,
  output nb_data_t        nb_data,
  output logic            seq_wrap,
  output logic [N_CARDS-1:0] drive_ev,                // card i drove the data lines this slot
  output logic [N_CARDS-1:0] update_ev                // card i copied the data lines
);
  localparam int unsigned SEQ_W = $clog2(SEQ_DEPTH);
  localparam int unsigned LEN_W = SEQ_W + 1;

  initial assert (N_CARDS >= 1 && N_CARDS <= 256) else $error("anc_top: 1..256 cards");

  logic             cfg_card_we, cfg_len_we, cfg_mode_we, cfg_mode, cfg_seq_we;
  card_addr_t       cfg_card;
  logic [LEN_W-1:0] cfg_len;
  logic [SEQ_W-1:0] cfg_seq_idx;
  nb_addr_t         cfg_seq_addr;

  nb_data_t         drv_data [N_CARDS];
  logic [N_CARDS-1:0] drv_en, card_ser_v, req_v;

  host_interface #(.CLKS_PER_BIT(CLKS_PER_BIT), .SEQ_DEPTH(SEQ_DEPTH)) u_host (
    .clk, .rst_n, .host_rx(host_cmd_rx), .card_req(|req_v), .host_req,
    .cfg_card_we, .cfg_card, .cfg_len_we, .cfg_len, .cfg_mode_we, .cfg_mode,
    .cfg_seq_we, .cfg_seq_idx, .cfg_seq_addr
  );

  nbbus_master #(.SLOT_CYCLES(SLOT_CYCLES), .MS_CYCLES(MS_CYCLES), .SEQ_DEPTH(SEQ_DEPTH)) u_master (
    .clk, .rst_n,
    .cfg_card_we, .cfg_card, .cfg_len_we, .cfg_len, .cfg_mode_we, .cfg_mode,
    .cfg_seq_we, .cfg_seq_idx, .cfg_seq_addr,
    .ctl(nb_ctl), .seq_wrap
  );

  for (genvar i = 0; i < N_CARDS; i++) begin : g_card
    processor_card #(.CARD_ID(card_addr_t'(i))) u_card (
      .clk, .rst_n, .ctl(nb_ctl), .bus_data(nb_data),
      .drv_data(drv_data[i]), .drv_en(drv_en[i]),
      .host_ser, .card_ser(card_ser_v[i]), .req_out(req_v[i]),
      .dsp_cs(dsp_cs[i]), .dsp_we(dsp_we[i]), .dsp_addr(dsp_addr[i]),
      .dsp_wdata(dsp_wdata[i]), .dsp_rdata(dsp_rdata[i]), .dsp_rvalid(dsp_rvalid[i]),
      .dsp_busy(dsp_busy[i]), .dsp_tx(dsp_tx[i]), .dsp_rx(dsp_rx[i]),
      .dsp_req(dsp_req[i]), .selected(selected[i]),
      .drive_ev(drive_ev[i]), .update_ev(update_ev[i])
    );
  end

  // wired-OR data lines
  always_comb begin
    nb_data = '0;
    for (int i = 0; i < N_CARDS; i++)
      if (drv_en[i]) nb_data |= drv_data[i];
  end

  assign card_ser = &card_ser_v;

  // at most one card may drive the data lines
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv_en));

endmodule
