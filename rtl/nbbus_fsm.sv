// nbbus_fsm -- per-card NBbus state machine (the card's bus-side controller).
//
// For every address the master broadcasts, the machine looks up the card's hosted flag
// for that address in the dual-ported memory and then either
//   * DRIVE: the card hosts the meta-neuron, so it reads the current output value from
//     the dual-port and places it on the NBbus data lines until the end of the slot, or
//   * LISTEN: another card hosts it, so it copies the NBbus data lines into the same word
//     of the dual-port when the master raises `sample`.
// The processor thus only reads and writes its dual-port; all bus traffic is automatic.
//
// Timing within a slot (cycle 0 has addr_valid): cycle 0 issues the memory read of word
// and flag; cycle 1 decides; the value is driven from cycle 2 until the cycle after
// `sample`; a listener writes the dual-port in the `sample` cycle. The states and this
// timing are this design's own; the published design gives the behaviour (check the flag,
// then read or write the bus) and says it was built as a programmable-logic state machine.
// `drive_ev` and `update_ev` pulse once per driven or copied slot. m_wdata is the data
// lines passed straight to the memory and update_ev equals m_we; both are separate ports
// only so that the memory connection and the event output read clearly. The card-select
// fields of ctl are not used here.
module nbbus_fsm
  import nbbus_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  nb_ctl_t  ctl,
  input  nb_data_t bus_data,
  output nb_data_t drv_data,
  output logic     drv_en,
  // bus port of the dual-ported memory
  output logic     m_re,
  output logic     m_we,
  output nb_addr_t m_addr,
  output nb_data_t m_wdata,
  input  nb_data_t m_rdata,
  input  logic     m_flag,
  // events
  output logic     drive_ev,
  output logic     update_ev
);
  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DRIVE, S_LISTEN} state_t;
  state_t   state;
  nb_addr_t addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      addr_q   <= '0;
      drv_data <= '0;
      drv_en   <= 1'b0;
    end else begin
      if (ctl.addr_valid) begin
        // a new slot always restarts the machine
        state  <= S_CHECK;
        addr_q <= ctl.addr;
        drv_en <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE:  ;
          S_CHECK: if (m_flag) begin
                     state    <= S_DRIVE;
                     drv_data <= m_rdata;
                     drv_en   <= 1'b1;
                   end else begin
                     state    <= S_LISTEN;
                   end
          S_DRIVE: if (ctl.sample) state <= S_IDLE;
          S_LISTEN: if (ctl.sample) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
        if (state == S_IDLE) drv_en <= 1'b0;
      end
    end
  end

  always_comb begin
    m_re      = ctl.addr_valid;
    m_addr    = ctl.addr_valid ? ctl.addr : addr_q;
    m_we      = (state == S_LISTEN) && ctl.sample && !ctl.addr_valid;
    m_wdata   = bus_data;
    drive_ev  = (state == S_CHECK) && m_flag && !ctl.addr_valid;
    update_ev = m_we;
  end

endmodule
