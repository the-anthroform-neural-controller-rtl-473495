// tb_card_host_link -- self-checking test of a card's host-link selection.
// Card address 0x2A. Checks that no card is selected after reset, that a card-select
// broadcast of 0x2A connects the serial lines both ways, that the selection holds while
// the card-select lines change without a strobe, that a broadcast of another card
// disconnects it (idle-high lines), and that the request is registered onto req_out.
module tb_card_host_link;
  import nbbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_strobe = 0, host_ser = 1, dsp_tx = 1, dsp_req = 0;
  card_addr_t card_sel = '0;
  logic card_ser, dsp_rx, req_out, selected;
  int checks = 0, failures = 0;

  card_host_link #(.CARD_ID(8'h2A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic broadcast(input card_addr_t c);
    @(negedge clk); cs_strobe = 1; card_sel = c;
    @(negedge clk); cs_strobe = 0;
  endtask

  // drive random serial bits and check the gating against the expected selection
  task automatic traffic(input bit expect_sel, input string what);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      host_ser = 1'($urandom); dsp_tx = 1'($urandom);
      card_sel = card_addr_t'($urandom);   // no strobe: must not matter
      #1;
      check(selected == expect_sel, {what, ": selection"});
      check(dsp_rx == (expect_sel ? host_ser : 1'b1), {what, ": host to processor"});
      check(card_ser == (expect_sel ? dsp_tx : 1'b1), {what, ": processor to host"});
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    traffic(0, "after reset");
    broadcast(8'h2A);
    traffic(1, "selected");
    broadcast(8'h2B);
    traffic(0, "other card selected");
    broadcast(8'h2A);
    traffic(1, "selected again");
    broadcast(8'h00);
    traffic(0, "card 0 selected");
    // request line
    @(negedge clk); dsp_req = 1;
    #1 check(req_out == 0, "request registered, not combinational");
    @(negedge clk); check(req_out == 1, "request out");
    dsp_req = 0;
    @(negedge clk); check(req_out == 0, "request withdrawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
