// nbbus_master -- the single bus master of the Neural Broadcast Bus.
//
// The master divides time into bus slots of SLOT_CYCLES clocks. In the first cycle of a
// slot it puts a meta-neuron address on the address lines with `addr_valid`; the address
// is held for the whole slot. In cycle SLOT_CYCLES-2 it raises `sample`: the card that
// hosts the address has been driving the data lines since cycle 2, and every other card
// copies the value then. Slots follow each other without gaps.
//
// Address sequence. After reset the master steps through addresses 0..1023 and starts
// again, which with the defaults (32 clocks per slot, 32.768 MHz clock) is one complete
// cycle per millisecond, as the system requires. The host can shorten the cycle (mode 0,
// addresses 0..len-1, so every connection is refreshed more often) or switch to a
// programmed table (mode 1, entries 0..len-1 of a SEQ_DEPTH-entry sequence memory),
// which lets one address appear more often than others, e.g. 1,9,2,9,3,9,...
// Table writes, the length and the mode take effect at the next slot boundary.
//
// Card select. Every MS_CYCLES clocks the master puts its 8-bit card-select register on
// the card-select lines with `cs_strobe`. These lines are separate from the address and
// data lines here, so the broadcast costs no bus slot; that split, the slot timing, the
// clock rate and the table depth are this design's own choices.
//
// Interface: cfg_* write strobes come from the host interface; ctl goes to every card;
// seq_wrap pulses in the cycle in which the first address of the sequence is issued.
module nbbus_master
  import nbbus_pkg::*;
#(
  parameter int unsigned SLOT_CYCLES = 32,     // clocks per bus slot (32.768 MHz / 1024 kHz)
  parameter int unsigned MS_CYCLES   = 32768,  // clocks per millisecond
  parameter int unsigned SEQ_DEPTH   = 2048,   // entries in the programmable sequence table
  localparam int unsigned SEQ_W = $clog2(SEQ_DEPTH),
  localparam int unsigned LEN_W = SEQ_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration from the host interface
  input  logic             cfg_card_we,
  input  card_addr_t       cfg_card,
  input  logic             cfg_len_we,
  input  logic [LEN_W-1:0] cfg_len,
  input  logic             cfg_mode_we,
  input  logic             cfg_mode,      // 0: count 0..len-1, 1: sequence table
  input  logic             cfg_seq_we,
  input  logic [SEQ_W-1:0] cfg_seq_idx,
  input  nb_addr_t         cfg_seq_addr,
  // bus
  output nb_ctl_t          ctl,
  output logic             seq_wrap
);
  localparam int unsigned SC_W = $clog2(SLOT_CYCLES);
  localparam int unsigned MS_W = $clog2(MS_CYCLES);

  initial assert (SLOT_CYCLES >= 4) else $error("nbbus_master: SLOT_CYCLES must be >= 4");

  nb_addr_t         seq_mem [SEQ_DEPTH];
  nb_addr_t         seq_rdata;
  logic [SC_W-1:0]  slot_cnt;
  logic [MS_W-1:0]  ms_cnt;
  logic [LEN_W-1:0] len;
  logic             mode;
  card_addr_t       card_reg;
  logic [SEQ_W-1:0] pos, pos_next;
  nb_addr_t         addr_q;
  logic             slot_end;
  logic [LEN_W-1:0] eff_len;

  // in counting mode a length beyond the address space counts the whole space
  always_comb begin
    eff_len = len;
    if (!mode && len > LEN_W'(N_ADDR)) eff_len = LEN_W'(N_ADDR);
    if (eff_len == '0) eff_len = LEN_W'(1);
    if (LEN_W'(pos) + 1'b1 >= eff_len) pos_next = '0;
    else                               pos_next = pos + 1'b1;
  end

  assign slot_end = (slot_cnt == SC_W'(SLOT_CYCLES - 1));

  // sequence table: one write port (host), one read port for the next entry
  always_ff @(posedge clk) begin
    if (cfg_seq_we) seq_mem[cfg_seq_idx] <= cfg_seq_addr;
  end
  assign seq_rdata = seq_mem[pos_next];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_cnt <= '0;
      ms_cnt   <= '0;
      len      <= LEN_W'(N_ADDR);
      mode     <= 1'b0;
      card_reg <= '0;
      pos      <= '0;
      addr_q   <= '0;
    end else begin
      if (cfg_len_we)  len      <= cfg_len;
      if (cfg_mode_we) mode     <= cfg_mode;
      if (cfg_card_we) card_reg <= cfg_card;
      ms_cnt <= (ms_cnt == MS_W'(MS_CYCLES - 1)) ? '0 : ms_cnt + 1'b1;
      if (slot_end) begin
        slot_cnt <= '0;
        pos      <= pos_next;
        addr_q   <= mode ? seq_rdata : nb_addr_t'(pos_next);
      end else begin
        slot_cnt <= slot_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    ctl.addr_valid = (slot_cnt == '0);
    ctl.sample     = (slot_cnt == SC_W'(SLOT_CYCLES - 2));
    ctl.addr       = addr_q;
    ctl.cs_strobe  = (ms_cnt == '0);
    ctl.card_sel   = card_reg;
  end

  assign seq_wrap = ctl.addr_valid && (pos == '0);

endmodule
