// tb_host_interface -- self-checking test of the host command port.
// A serial transmitter in the testbench (8N1, 4 clocks per bit) sends each command and
// the testbench checks that exactly the right configuration strobe fires once with the
// right value: card select, sequence length, sequence table entry and mode. It also checks
// that unknown opcodes and a frame with a bad stop bit are ignored, and that the host
// request line follows the cards' request two clocks later.
module tb_host_interface;
  import nbbus_pkg::*;

  localparam int CPB = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_rx = 1'b1, card_req = 1'b0, host_req;
  logic cfg_card_we, cfg_len_we, cfg_mode_we, cfg_mode, cfg_seq_we;
  card_addr_t cfg_card;
  logic [11:0] cfg_len;
  logic [10:0] cfg_seq_idx;
  nb_addr_t cfg_seq_addr;
  int checks = 0, failures = 0;
  int n_card = 0, n_len = 0, n_mode = 0, n_seq = 0;

  host_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (cfg_card_we) n_card++;
    if (cfg_len_we)  n_len++;
    if (cfg_mode_we) n_mode++;
    if (cfg_seq_we)  n_seq++;
  end

  task automatic send(input logic [7:0] b, input bit good_stop = 1);
    @(negedge clk);
    host_rx = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin host_rx = b[i]; repeat (CPB) @(negedge clk); end
    host_rx = good_stop; repeat (CPB) @(negedge clk);
    host_rx = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  task automatic settle();
    repeat (4 * CPB) @(negedge clk);
  endtask

  initial begin
    int c0, l0, m0, s0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // card select
    c0 = n_card;
    send(8'h01); send(8'hA7); settle();
    check(n_card == c0 + 1 && cfg_card == 8'hA7, "card-select command");
    // sequence length 0x3FF
    l0 = n_len;
    send(8'h02); send(8'hFF); send(8'h03); settle();
    check(n_len == l0 + 1 && cfg_len == 12'h3FF, $sformatf("length command (%h)", cfg_len));
    // table entry 0x123 <- address 0x2AB
    s0 = n_seq;
    send(8'h03); send(8'h23); send(8'h01); send(8'hAB); send(8'h02); settle();
    check(n_seq == s0 + 1 && cfg_seq_idx == 11'h123 && cfg_seq_addr == 10'h2AB,
          $sformatf("table command (%h <- %h)", cfg_seq_idx, cfg_seq_addr));
    // mode
    m0 = n_mode;
    send(8'h04); send(8'h01); settle();
    check(n_mode == m0 + 1 && cfg_mode == 1'b1, "mode command");
    // unknown opcode and its would-be argument do nothing
    c0 = n_card; l0 = n_len; m0 = n_mode; s0 = n_seq;
    send(8'h7E); settle();
    check(n_card == c0 && n_len == l0 && n_mode == m0 && n_seq == s0, "unknown opcode ignored");
    // a frame with a bad stop bit is dropped: the card command then takes the next byte
    send(8'h01); send(8'h11, 0); send(8'h22); settle();
    check(n_card == c0 + 1 && cfg_card == 8'h22, "bad frame dropped");
    // random card-select values
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      c0 = n_card;
      send(8'h01); send(v); settle();
      check(n_card == c0 + 1 && cfg_card == v, "random card select");
    end
    // host request passes through with a two-clock synchroniser
    @(negedge clk); card_req = 1'b1;
    @(negedge clk); check(host_req == 1'b0, "request not yet through");
    @(negedge clk); check(host_req == 1'b1, "request through after two clocks");
    card_req = 1'b0;
    repeat (3) @(negedge clk); check(host_req == 1'b0, "request released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
