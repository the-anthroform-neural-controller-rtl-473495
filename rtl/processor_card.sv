// processor_card -- the bus-side logic of one processor card.
//
// A card carries a floating-point DSP, its local memory, an I/O daughter-card connector
// and the logic built here: the NBbus interface (dual-ported memory and state machine)
// and the card's end of the host serial link. The DSP, its memory and the daughter cards
// are bought-in or separately designed parts; their signals are this module's ports:
// the DSP's access to the dual-port (dsp_*), its serial port (dsp_tx / dsp_rx) and its
// host request. CARD_ID is the card's 8-bit address for host selection.
module processor_card
  import nbbus_pkg::*;
#(
  parameter card_addr_t CARD_ID = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // NBbus
  input  nb_ctl_t         ctl,
  input  nb_data_t        bus_data,
  output nb_data_t        drv_data,
  output logic            drv_en,
  // host I/O lines
  input  logic            host_ser,
  output logic            card_ser,
  output logic            req_out,
  // processor side
  input  logic            dsp_cs,
  input  logic            dsp_we,
  input  logic [ADDR_W:0] dsp_addr,
  input  nb_data_t        dsp_wdata,
  output nb_data_t        dsp_rdata,
  output logic            dsp_rvalid,
  output logic            dsp_busy,
  input  logic            dsp_tx,
  output logic            dsp_rx,
  input  logic            dsp_req,
  // status
  output logic            selected,
  output logic            drive_ev,
  output logic            update_ev
);
  nbbus_interface u_nbif (
    .clk, .rst_n, .ctl, .bus_data, .drv_data, .drv_en,
    .p_cs(dsp_cs), .p_we(dsp_we), .p_addr(dsp_addr), .p_wdata(dsp_wdata),
    .p_rdata(dsp_rdata), .p_rvalid(dsp_rvalid), .p_busy(dsp_busy),
    .drive_ev, .update_ev
  );

  card_host_link #(.CARD_ID(CARD_ID)) u_link (
    .clk, .rst_n, .cs_strobe(ctl.cs_strobe), .card_sel(ctl.card_sel),
    .host_ser, .card_ser, .dsp_tx, .dsp_rx, .dsp_req, .req_out, .selected
  );

endmodule
