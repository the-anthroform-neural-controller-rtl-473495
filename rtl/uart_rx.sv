// uart_rx -- asynchronous serial receiver, 8 data bits, no parity, one stop bit, LSB first.
//
// The line is brought in through a two-flop synchroniser. A falling edge starts a frame;
// the start bit is checked half a bit later, then each data bit is sampled in its middle,
// CLKS_PER_BIT clock cycles apart. A byte is presented on `data` with a one-cycle `valid`
// pulse when a correct stop bit (high) has been seen; a frame whose stop bit is low is dropped.
// The frame format is this design's own choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1) + 1;

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;
  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  initial assert (CLKS_PER_BIT >= 2) else $error("uart_rx: CLKS_PER_BIT must be at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= S_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rx};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (!sync[1]) begin
          state <= S_START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        S_START: if (cnt != 0) cnt <= cnt - 1'b1;
                 else if (sync[1]) state <= S_IDLE;   // glitch, not a start bit
                 else begin
                   state <= S_DATA;
                   cnt   <= CW'(CLKS_PER_BIT - 1);
                   bitn  <= '0;
                 end
        S_DATA: if (cnt != 0) cnt <= cnt - 1'b1;
                else begin
                  shreg <= {sync[1], shreg[7:1]};
                  cnt   <= CW'(CLKS_PER_BIT - 1);
                  if (bitn == 3'd7) state <= S_STOP;
                  bitn  <= bitn + 1'b1;
                end
        S_STOP: if (cnt != 0) cnt <= cnt - 1'b1;
                else begin
                  state <= S_IDLE;
                  if (sync[1]) begin
                    data  <= shreg;
                    valid <= 1'b1;
                  end
                end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
