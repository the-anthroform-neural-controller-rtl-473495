// tb_anc_top -- end-to-end test of the whole controller at its default size
// (10 processor cards, 1024 addresses, 32 clocks per slot, 32768 clocks per millisecond).
//
// The testbench plays the host computer (serial commands to the bus master, serial data
// and the request line of the cards) and the DSP of every card. 100 meta-neurons,
// addresses 0..99, are spread over the 10 cards (address a on card a mod 10), the size of
// the fully connected example network. Scenario:
//   1. every DSP marks and writes its meta-neurons; after one millisecond every card must
//      hold every meta-neuron's value, and the address cycle must take exactly 1 ms;
//   2. new values are written, with accesses timed to clash with the bus (processor wait);
//   3. the host selects card 2, then card 7; only the selected card's serial lines connect;
//   4. a card raises the host request line;
//   5. the host shortens the cycle to the 100 used addresses (32 x faster update);
//   6. the host switches to a table 1,9,2,9,3,9,... so address 9 is refreshed every
//      second slot.
// Each mechanism is counted and a failure is counted for one that never happened.
module tb_anc_top;
  import nbbus_pkg::*;

  localparam int NC = 10, SLOT = 32, MS = 32768, CPB = 4, NM = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_cmd_rx = 1'b1, host_ser = 1'b1, card_ser, host_req;
  logic            dsp_cs [NC], dsp_we [NC], dsp_rvalid [NC], dsp_busy [NC];
  logic            dsp_tx [NC], dsp_rx [NC], dsp_req [NC], selected [NC];
  logic [ADDR_W:0] dsp_addr [NC];
  nb_data_t        dsp_wdata [NC], dsp_rdata [NC];
  nb_ctl_t         nb_ctl;
  nb_data_t        nb_data;
  logic            seq_wrap;
  logic [NC-1:0]   drive_ev, update_ev;

  anc_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_drive = 0, n_update = 0, n_busy = 0, n_select = 0, n_req = 0, n_short = 0, n_table = 0;
  nb_data_t value [NM];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    n_drive  += $countones(drive_ev);
    n_update += $countones(update_ev);
  end

  initial begin
    repeat (12 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- host side: serial commands ----
  task automatic send(input logic [7:0] b);
    @(negedge clk);
    host_cmd_rx = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin host_cmd_rx = b[i]; repeat (CPB) @(negedge clk); end
    host_cmd_rx = 1'b1; repeat (2 * CPB) @(negedge clk);
  endtask

  // ---- DSP side ----
  task automatic acc(input int k, input bit we, input logic [ADDR_W:0] a,
                     input nb_data_t d, output nb_data_t q);
    @(negedge clk); dsp_cs[k] = 1; dsp_we[k] = we; dsp_addr[k] = a; dsp_wdata[k] = d;
    #1 while (dsp_busy[k]) begin n_busy++; @(negedge clk); #1; end
    @(negedge clk); dsp_cs[k] = 0; dsp_we[k] = 0;
    q = dsp_rdata[k];
  endtask

  task automatic wait_wrap();
    do @(negedge clk); while (!seq_wrap);
  endtask

  task automatic check_all(input string what);
    nb_data_t q;
    for (int k = 0; k < NC; k++)
      for (int a = 0; a < NM; a++) begin
        acc(k, 0, {1'b0, nb_addr_t'(a)}, '0, q);
        check(q == value[a], $sformatf("%s: card %0d word %0d = %h, expected %h",
                                       what, k, a, q, value[a]));
      end
  endtask

  task automatic serial_check(input int want);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      host_ser = 1'($urandom);
      for (int k = 0; k < NC; k++) dsp_tx[k] = (k == want) ? 1'($urandom) : 1'b1;
      #1;
      for (int k = 0; k < NC; k++) begin
        check(selected[k] == (k == want), $sformatf("card %0d selection", k));
        check(dsp_rx[k] == ((k == want) ? host_ser : 1'b1), $sformatf("card %0d serial in", k));
      end
      check(card_ser == dsp_tx[want], "selected card's serial reaches the host");
    end
  endtask

  // address history for the rate checks
  longint last_seen [N_ADDR];

  initial begin
    nb_data_t q;
    longint t0, t1;
    int prev;
    for (int k = 0; k < NC; k++) begin
      dsp_cs[k] = 0; dsp_we[k] = 0; dsp_addr[k] = '0; dsp_wdata[k] = '0;
      dsp_tx[k] = 1; dsp_req[k] = 0;
    end
    for (int a = 0; a < NM; a++) value[a] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. configure and fill
    for (int a = 0; a < NM; a++) begin
      acc(a % NC, 1, {1'b1, nb_addr_t'(a)}, 32'h1, q);
      acc(a % NC, 1, {1'b0, nb_addr_t'(a)}, value[a], q);
    end
    wait_wrap(); t0 = cyc;
    wait_wrap(); t1 = cyc;
    check(t1 - t0 == longint'(MS), $sformatf("full address cycle takes %0d clocks", t1 - t0));
    check_all("after one ms");

    // 2. new values, some timed against the bus
    for (int a = 0; a < NM; a++) begin
      value[a] = $urandom;
      if (a < 10) begin
        // hit the word in the cycle its slot begins
        do @(negedge clk); while (!(nb_ctl.addr == nb_addr_t'((a + 1023) % 1024) &&
                                    nb_ctl.sample));
        @(negedge clk);   // last cycle of the slot before address a
        dsp_cs[a % NC] = 1; dsp_we[a % NC] = 1; dsp_addr[a % NC] = {1'b0, nb_addr_t'(a)};
        dsp_wdata[a % NC] = value[a];
        @(negedge clk); #1;
        check(dsp_busy[a % NC], "processor waits on a clash");
        while (dsp_busy[a % NC]) begin n_busy++; @(negedge clk); #1; end
        @(negedge clk); dsp_cs[a % NC] = 0; dsp_we[a % NC] = 0;
      end else begin
        acc(a % NC, 1, {1'b0, nb_addr_t'(a)}, value[a], q);
      end
    end
    wait_wrap(); wait_wrap();
    check_all("after new values");

    // 3. host selection of cards
    send(8'h01); send(8'd2);
    do @(negedge clk); while (!nb_ctl.cs_strobe);
    @(negedge clk);
    serial_check(2);
    send(8'h01); send(8'd7);
    do @(negedge clk); while (!nb_ctl.cs_strobe);
    @(negedge clk);
    check(selected[7] && !selected[2], "selection moved to card 7");
    n_select = 2;
    serial_check(7);

    // 4. host request
    dsp_req[4] = 1;
    repeat (4) @(negedge clk);
    if (host_req) n_req++;
    check(host_req, "host request line raised");
    dsp_req[4] = 0;
    repeat (4) @(negedge clk);
    check(!host_req, "host request line released");

    // 5. shorter cycle: only the 100 used addresses
    send(8'h02); send(8'(NM)); send(8'h00);
    wait_wrap(); t0 = cyc;
    wait_wrap(); t1 = cyc;
    check(t1 - t0 == longint'(NM * SLOT), $sformatf("short cycle takes %0d clocks", t1 - t0));
    if (t1 - t0 == longint'(NM * SLOT)) n_short++;
    for (int a = 0; a < NM; a++) value[a] = $urandom;
    for (int a = 0; a < NM; a++) acc(a % NC, 1, {1'b0, nb_addr_t'(a)}, value[a], q);
    wait_wrap(); wait_wrap();
    check_all("short cycle");

    // 6. table 1,9,2,9,...: address 9 in every second slot
    for (int i = 0; i < 2 * (NM - 1); i++) begin
      int e;
      e = (i % 2) ? 9 : ((i / 2) < 9 ? (i / 2) : (i / 2) + 1);
      send(8'h03); send(8'(i)); send(8'(i >> 8)); send(8'(e)); send(8'(e >> 8));
    end
    send(8'h02); send(8'(2 * (NM - 1))); send(8'((2 * (NM - 1)) >> 8));
    send(8'h04); send(8'h01);
    wait_wrap();
    prev = -1;
    for (int s = 0; s < 2 * (NM - 1); s++) begin
      do @(negedge clk); while (!nb_ctl.addr_valid);
      if (nb_ctl.addr == 10'd9) begin
        if (prev >= 0) check(s - prev == 2, "address 9 every second slot");
        prev = s;
        n_table++;
      end
    end
    for (int a = 0; a < NM; a++) value[a] = $urandom;
    for (int a = 0; a < NM; a++) acc(a % NC, 1, {1'b0, nb_addr_t'(a)}, value[a], q);
    wait_wrap(); wait_wrap();
    check_all("table mode");

    // mechanisms
    check(n_drive > 0,  "mechanism: card drives the bus");
    check(n_update > 0, "mechanism: card copies from the bus");
    check(n_busy > 0,   "mechanism: processor waits on a dual-port clash");
    check(n_select > 0, "mechanism: host card selection");
    check(n_req > 0,    "mechanism: host request line");
    check(n_short > 0,  "mechanism: shortened address cycle");
    check(n_table > 0,  "mechanism: programmed address sequence");
    $display("drive %0d update %0d busy %0d select %0d request %0d short %0d table %0d",
             n_drive, n_update, n_busy, n_select, n_req, n_short, n_table);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
