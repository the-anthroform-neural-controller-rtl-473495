// nbbus_interface -- the NBbus interface hardware of one processor card.
//
// A dual-ported memory sits between the processor and the bus, and a state machine
// serves the bus side of it. To the processor the whole NBbus looks like a block of
// 1024 words, one per meta-neuron: it reads any word at any time to get the latest value
// of that meta-neuron, writes the output of each meta-neuron it hosts into that
// meta-neuron's word, and sets the hosted flag of those addresses. The state machine
// broadcasts hosted words when their address comes round and copies every other address
// from the bus. The processor port is described in dual_port_memory; the bus timing in
// nbbus_fsm. This structure is the published one.
module nbbus_interface
  import nbbus_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // NBbus
  input  nb_ctl_t         ctl,
  input  nb_data_t        bus_data,
  output nb_data_t        drv_data,
  output logic            drv_en,
  // processor port
  input  logic            p_cs,
  input  logic            p_we,
  input  logic [ADDR_W:0] p_addr,
  input  nb_data_t        p_wdata,
  output nb_data_t        p_rdata,
  output logic            p_rvalid,
  output logic            p_busy,
  // events
  output logic            drive_ev,
  output logic            update_ev
);
  logic     m_re, m_we, m_flag;
  nb_addr_t m_addr;
  nb_data_t m_wdata, m_rdata;

  nbbus_fsm u_fsm (
    .clk, .rst_n, .ctl, .bus_data, .drv_data, .drv_en,
    .m_re, .m_we, .m_addr, .m_wdata, .m_rdata, .m_flag,
    .drive_ev, .update_ev
  );

  dual_port_memory u_dpm (
    .clk, .rst_n,
    .p_cs, .p_we, .p_addr, .p_wdata, .p_rdata, .p_rvalid, .p_busy,
    .b_re(m_re), .b_we(m_we), .b_addr(m_addr), .b_wdata(m_wdata),
    .b_rdata(m_rdata), .b_flag(m_flag)
  );

endmodule
