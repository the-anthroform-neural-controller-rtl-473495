// dual_port_memory -- the dual-ported data transfer memory of a processor card.
//
// It holds one 32-bit word for every meta-neuron address and a 1-bit flag per address that
// marks the meta-neurons this card hosts. It has two independent ports:
//
//   * The processor port (p_*) sees an 11-bit word address: 0..1023 are the data words,
//     1024..2047 the hosted flags (bit 0 of the word). A request is cs high for one cycle
//     with we, addr and wdata; it is accepted in that cycle unless `p_busy` is high, in which
//     case the processor must hold the request and retry. Read data appear on p_rdata with
//     `p_rvalid` one cycle after the accepted request.
//   * The bus port (b_*) is used by the NBbus state machine. A read (b_re) returns the word
//     and the flag of b_addr one cycle later; a write (b_we) stores a word.
//
// When both ports touch the same address in the same cycle the processor port waits
// (p_busy) and the bus port goes ahead, because the bus side has fixed slot timing and the
// processor does not. That a port waits on a clash follows the published description; the
// priority, the address map of the flags and the one-cycle timing are this design's own.
// The flags are cleared by reset so that no card drives the bus before it is configured;
// the data words are not reset. A bus write to a word whose flag is set is dropped: a
// hosted word belongs to the processor, even if the flag was set while the slot of that
// address was already under way.
module dual_port_memory
  import nbbus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor port
  input  logic        p_cs,
  input  logic        p_we,
  input  logic [ADDR_W:0] p_addr,
  input  nb_data_t    p_wdata,
  output nb_data_t    p_rdata,
  output logic        p_rvalid,
  output logic        p_busy,
  // NBbus port
  input  logic        b_re,
  input  logic        b_we,
  input  nb_addr_t    b_addr,
  input  nb_data_t    b_wdata,
  output nb_data_t    b_rdata,
  output logic        b_flag
);
  nb_data_t          mem [N_ADDR];
  logic [N_ADDR-1:0] hosted;
  logic              p_go;
  logic              p_flag_sel;
  nb_addr_t          p_word;

  assign p_flag_sel = p_addr[ADDR_W];
  assign p_word     = p_addr[ADDR_W-1:0];
  assign p_busy     = p_cs && (b_re || b_we) && (p_word == b_addr);
  assign p_go       = p_cs && !p_busy;

  // data words: two write ports that never hit the same word in one cycle; the bus port
  // only writes words this card does not host
  always_ff @(posedge clk) begin
    if (b_we && !hosted[b_addr]) mem[b_addr] <= b_wdata;
    if (p_go && p_we && !p_flag_sel) mem[p_word] <= p_wdata;
    if (b_re) b_rdata <= mem[b_addr];
    if (p_go && !p_we) p_rdata <= p_flag_sel ? nb_data_t'(hosted[p_word]) : mem[p_word];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hosted   <= '0;
      b_flag   <= 1'b0;
      p_rvalid <= 1'b0;
    end else begin
      if (p_go && p_we && p_flag_sel) hosted[p_word] <= p_wdata[0];
      if (b_re) b_flag <= hosted[b_addr];
      p_rvalid <= p_go && !p_we;
    end
  end

  // the two ports must never write the same word in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(b_we && p_go && p_we && !p_flag_sel && p_word == b_addr));

endmodule
