// card_host_link -- a processor card's end of the host serial link.
//
// All cards share one serial line from the host and one back to it, but only one card
// at a time may use them. Once every millisecond the bus master broadcasts the address
// of the selected card (cs_strobe with card_sel). This block latches that address; while
// it equals CARD_ID the card is `selected`: the host line is connected to the processor's
// serial receive pin and the processor's transmit pin to the return line. Otherwise the
// processor sees an idle (high) line and the card sends idle (high), so the return line
// can be the AND of all cards. The selection holds until another card is broadcast.
// The processor's request for service is put on the shared host request line
// (registered; the line is the OR of all cards). No card is selected after reset until
// the first broadcast. Selection by broadcast follows the published design; the idle-high
// gating and the reset behaviour are this design's own.
module card_host_link
  import nbbus_pkg::*;
#(
  parameter card_addr_t CARD_ID = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cs_strobe,
  input  card_addr_t card_sel,
  input  logic       host_ser,     // serial data from the host (shared line)
  output logic       card_ser,     // serial data to the host (ANDed over all cards)
  input  logic       dsp_tx,       // processor serial transmit
  output logic       dsp_rx,       // processor serial receive
  input  logic       dsp_req,      // processor asks the host for a connection
  output logic       req_out,      // this card's share of the host request line
  output logic       selected
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      selected <= 1'b0;
      req_out  <= 1'b0;
    end else begin
      if (cs_strobe) selected <= (card_sel == CARD_ID);
      req_out <= dsp_req;
    end
  end

  assign dsp_rx   = selected ? host_ser : 1'b1;
  assign card_ser = selected ? dsp_tx   : 1'b1;

endmodule
