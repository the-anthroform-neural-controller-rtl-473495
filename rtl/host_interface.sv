// host_interface -- serial command port between the host computer and the NBbus master.
//
// The host steers the controller over a serial line: it selects the processor card that
// owns the host serial link (an 8-bit card-select register in the master) and configures
// the address sequence the master broadcasts. This block receives that line (8N1 frames,
// CLKS_PER_BIT clocks per bit; 4 clocks at 32.768 MHz is about 8 Mbaud) and turns byte
// commands into one-cycle register-write strobes for the master:
//
//   0x01 C            card-select register   <= C
//   0x02 L0 L1        sequence length        <= {L1,L0}      (low LEN_W bits)
//   0x03 I0 I1 A0 A1  sequence table[{I1,I0}] <= {A1,A0}     (low SEQ_W / 10 bits)
//   0x04 M            sequence mode          <= M[0]  (0 count, 1 table)
//
// Unknown opcodes are ignored. The strobes follow the last byte of a command by one
// cycle. The host request line, a wired OR of all processor cards' requests, is passed to
// the host through a two-flop synchroniser. The command set and its encoding are this
// design's own; the published design only says what the serial link is used for.
module host_interface
  import nbbus_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 4,
  parameter int unsigned SEQ_DEPTH    = 2048,
  localparam int unsigned SEQ_W = $clog2(SEQ_DEPTH),
  localparam int unsigned LEN_W = SEQ_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             host_rx,       // serial line from the host
  input  logic             card_req,      // wired OR of the cards' host requests
  output logic             host_req,      // request line seen by the host
  output logic             cfg_card_we,
  output card_addr_t       cfg_card,
  output logic             cfg_len_we,
  output logic [LEN_W-1:0] cfg_len,
  output logic             cfg_mode_we,
  output logic             cfg_mode,
  output logic             cfg_seq_we,
  output logic [SEQ_W-1:0] cfg_seq_idx,
  output nb_addr_t         cfg_seq_addr
);
  typedef enum logic [7:0] {
    OP_CARD = 8'h01,
    OP_LEN  = 8'h02,
    OP_SEQ  = 8'h03,
    OP_MODE = 8'h04
  } opcode_e;

  logic [7:0]  rx_data;
  logic        rx_valid;
  logic [7:0]  op;
  logic [2:0]  nbytes;    // argument bytes received so far
  logic [31:0] args;      // argument bytes, first byte in bits 7:0
  logic        busy;      // inside a command
  logic [1:0]  req_sync;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(host_rx), .data(rx_data), .valid(rx_valid)
  );

  function automatic logic [2:0] arg_count(input logic [7:0] code);
    unique case (code)
      OP_CARD, OP_MODE: return 3'd1;
      OP_LEN:           return 3'd2;
      OP_SEQ:           return 3'd4;
      default:          return 3'd0;
    endcase
  endfunction

  // argument bytes including the one arriving now
  logic [31:0] a;
  always_comb begin
    a = args;
    a[8*nbytes[1:0] +: 8] = rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op           <= '0;
      nbytes       <= '0;
      args         <= '0;
      busy         <= 1'b0;
      req_sync     <= '0;
      cfg_card_we  <= 1'b0;
      cfg_len_we   <= 1'b0;
      cfg_mode_we  <= 1'b0;
      cfg_seq_we   <= 1'b0;
      cfg_card     <= '0;
      cfg_len      <= '0;
      cfg_mode     <= 1'b0;
      cfg_seq_idx  <= '0;
      cfg_seq_addr <= '0;
    end else begin
      req_sync    <= {req_sync[0], card_req};
      cfg_card_we <= 1'b0;
      cfg_len_we  <= 1'b0;
      cfg_mode_we <= 1'b0;
      cfg_seq_we  <= 1'b0;
      if (rx_valid) begin
        if (!busy) begin
          if (arg_count(rx_data) != 3'd0) begin
            op     <= rx_data;
            busy   <= 1'b1;
            nbytes <= '0;
          end
        end else begin
          args   <= a;
          nbytes <= nbytes + 1'b1;
          if (nbytes + 1'b1 == arg_count(op)) begin
            busy <= 1'b0;
            unique case (op)
              OP_CARD: begin cfg_card_we <= 1'b1; cfg_card <= a[7:0]; end
              OP_LEN:  begin cfg_len_we  <= 1'b1; cfg_len  <= a[LEN_W-1:0]; end
              OP_MODE: begin cfg_mode_we <= 1'b1; cfg_mode <= a[0]; end
              OP_SEQ:  begin
                cfg_seq_we   <= 1'b1;
                cfg_seq_idx  <= a[SEQ_W-1:0];
                cfg_seq_addr <= a[16 +: ADDR_W];
              end
              default: ;
            endcase
          end
        end
      end
    end
  end

  assign host_req = req_sync[1];

endmodule
