// tb_processor_card -- one processor card (card address 3) on a testbench-driven bus.
// The testbench plays the bus master (8-clock slots over addresses 0..1023, a card-select
// broadcast every 4096 clocks), the other cards (it drives every address the card does
// not host) and the card's DSP. Checks: the card drives exactly its hosted words with the
// values its DSP wrote, copies every other word from the bus, and connects its serial
// lines and request only while card 3 is the one broadcast.
module tb_processor_card;
  import nbbus_pkg::*;

  localparam int SLOT = 8, MS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  nb_ctl_t ctl;
  nb_data_t bus_data, drv_data, dsp_wdata = '0, dsp_rdata;
  logic drv_en, card_ser, req_out, dsp_rvalid, dsp_busy, dsp_rx, selected, drive_ev, update_ev;
  logic host_ser = 1, dsp_cs = 0, dsp_we = 0, dsp_tx = 1, dsp_req = 0;
  logic [ADDR_W:0] dsp_addr = '0;
  card_addr_t sel_card = '0;
  int checks = 0, failures = 0, n_drive = 0;

  nb_data_t value [N_ADDR];
  bit       mine  [N_ADDR];

  processor_card #(.CARD_ID(8'd3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit run = 0;
  int slot_c = 0, cur = 0, ms_c = 0;
  always @(posedge clk) if (run) begin
    slot_c <= (slot_c == SLOT - 1) ? 0 : slot_c + 1;
    if (slot_c == SLOT - 1) cur <= (cur + 1) % N_ADDR;
    ms_c <= (ms_c == MS - 1) ? 0 : ms_c + 1;
  end
  always_comb begin
    ctl = '0;
    ctl.addr_valid = run && slot_c == 0;
    ctl.sample     = run && slot_c == SLOT - 2;
    ctl.addr       = nb_addr_t'(cur);
    ctl.cs_strobe  = run && ms_c == 0;
    ctl.card_sel   = sel_card;
    bus_data = drv_en ? drv_data : '0;
    if (run && !mine[cur] && slot_c >= 2) bus_data |= value[cur];
  end
  always @(negedge clk) if (run) begin
    if (slot_c >= 2 && mine[cur]) begin
      check(drv_en && drv_data == value[cur], $sformatf("card drives hosted word %0d", cur));
    end else if (slot_c >= 2) begin
      check(!drv_en, $sformatf("card silent on word %0d", cur));
    end
    if (drive_ev) n_drive++;
  end

  task automatic acc(input bit we, input logic [ADDR_W:0] a, input nb_data_t d,
                     output nb_data_t q);
    @(negedge clk); dsp_cs = 1; dsp_we = we; dsp_addr = a; dsp_wdata = d;
    #1 while (dsp_busy) begin @(negedge clk); #1; end
    @(negedge clk); dsp_cs = 0; dsp_we = 0;
    q = dsp_rdata;
  endtask

  task automatic serial_check(input bit expect_sel, input string what);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      host_ser = 1'($urandom); dsp_tx = 1'($urandom); dsp_req = 1'($urandom);
      #1;
      check(selected == expect_sel, {what, ": selected"});
      check(dsp_rx == (expect_sel ? host_ser : 1'b1), {what, ": host to DSP"});
      check(card_ser == (expect_sel ? dsp_tx : 1'b1), {what, ": DSP to host"});
    end
    dsp_req = 0;
  endtask

  initial begin
    nb_data_t q;
    for (int i = 0; i < N_ADDR; i++) begin
      value[i] = $urandom; mine[i] = ($urandom_range(0, 9) == 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_ADDR; i++)
      if (mine[i]) begin
        acc(1, {1'b0, nb_addr_t'(i)}, value[i], q);
        acc(1, {1'b1, nb_addr_t'(i)}, 32'h1, q);
      end
    run = 1;
    repeat (SLOT * N_ADDR + 2 * SLOT) @(negedge clk);
    for (int i = 0; i < N_ADDR; i++) begin
      acc(0, {1'b0, nb_addr_t'(i)}, '0, q);
      check(q == value[i], $sformatf("word %0d after a full cycle", i));
    end
    // host link: not selected, then card 3 broadcast, then card 4
    serial_check(0, "card 0 broadcast");
    sel_card = 8'd3;
    do @(negedge clk); while (ms_c != 1);
    serial_check(1, "card 3 broadcast");
    @(negedge clk); dsp_req = 1;
    @(negedge clk); check(req_out, "host request out");
    dsp_req = 0;
    sel_card = 8'd4;
    do @(negedge clk); while (ms_c != 1);
    serial_check(0, "card 4 broadcast");
    check(n_drive > 0, "hosted slots driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
