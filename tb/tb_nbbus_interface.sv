// tb_nbbus_interface -- two cards' NBbus interfaces exchanging meta-neuron outputs.
// The testbench is the bus master (8-clock slots, addresses 0..1023 in order) and resolves
// the data lines as the OR of the drivers. Card A hosts the even addresses below 512,
// card B the odd ones; the rest are hosted by the testbench itself, which drives a known
// value. After each full pass both processors read back every word and must find the
// latest value written by whichever party hosts it. One processor also keeps hitting the
// word on the bus to check that it is made to wait and that its write still lands.
module tb_nbbus_interface;
  import nbbus_pkg::*;

  localparam int SLOT = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  nb_ctl_t ctl;
  nb_data_t bus_data, tb_drv;
  logic tb_drv_en;
  int checks = 0, failures = 0, n_busy = 0, n_drive = 0, n_update = 0;

  // per-card signals
  nb_data_t drv_data [2], p_wdata [2], p_rdata [2];
  logic drv_en [2], p_cs [2], p_we [2], p_rvalid [2], p_busy [2], drive_ev [2], update_ev [2];
  logic [ADDR_W:0] p_addr [2];

  nb_data_t value [N_ADDR];   // current output of every meta-neuron
  int       host  [N_ADDR];   // 0: card A, 1: card B, 2: testbench

  for (genvar k = 0; k < 2; k++) begin : g
    nbbus_interface u (
      .clk, .rst_n, .ctl, .bus_data, .drv_data(drv_data[k]), .drv_en(drv_en[k]),
      .p_cs(p_cs[k]), .p_we(p_we[k]), .p_addr(p_addr[k]), .p_wdata(p_wdata[k]),
      .p_rdata(p_rdata[k]), .p_rvalid(p_rvalid[k]), .p_busy(p_busy[k]),
      .drive_ev(drive_ev[k]), .update_ev(update_ev[k])
    );
  end

  always_comb begin
    bus_data = '0;
    if (drv_en[0]) bus_data |= drv_data[0];
    if (drv_en[1]) bus_data |= drv_data[1];
    if (tb_drv_en) bus_data |= tb_drv;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus master model and testbench-hosted drivers
  bit run = 0;
  int slot_c = 0;
  int cur = 0;
  always @(posedge clk) begin
    if (run) begin
      slot_c <= (slot_c == SLOT - 1) ? 0 : slot_c + 1;
      if (slot_c == SLOT - 1) cur <= (cur + 1) % N_ADDR;
    end
  end
  always_comb begin
    ctl = '0;
    ctl.addr_valid = run && slot_c == 0;
    ctl.sample     = run && slot_c == SLOT - 2;
    ctl.addr       = nb_addr_t'(cur);
    tb_drv_en      = run && host[cur] == 2 && slot_c >= 2;
    tb_drv         = value[cur];
  end
  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (drive_ev[k]) n_drive++;
      if (update_ev[k]) n_update++;
    end
    check(!(drv_en[0] && drv_en[1]), "never two card drivers");
  end

  // processor k: one access, retried while busy
  task automatic acc(input int k, input bit we, input logic [ADDR_W:0] a,
                     input nb_data_t d, output nb_data_t q);
    @(negedge clk); p_cs[k] = 1; p_we[k] = we; p_addr[k] = a; p_wdata[k] = d;
    #1 while (p_busy[k]) begin n_busy++; @(negedge clk); #1; end
    @(negedge clk); p_cs[k] = 0; p_we[k] = 0;
    q = p_rdata[k];
    if (!we) check(p_rvalid[k], "read data valid");
  endtask

  initial begin
    nb_data_t q;
    for (int k = 0; k < 2; k++) begin p_cs[k] = 0; p_we[k] = 0; p_addr[k] = '0; p_wdata[k] = '0; end
    for (int i = 0; i < N_ADDR; i++) begin
      value[i] = $urandom;
      host[i] = (i < 512) ? (i % 2) : 2;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // each processor marks and fills its hosted words
    for (int i = 0; i < 512; i++) begin
      acc(host[i], 1, {1'b1, nb_addr_t'(i)}, 32'h1, q);
      acc(host[i], 1, {1'b0, nb_addr_t'(i)}, value[i], q);
    end
    run = 1;
    for (int pass = 0; pass < 3; pass++) begin
      // one full cycle of all addresses, then check every word on both cards
      repeat (SLOT * N_ADDR + SLOT) @(negedge clk);
      for (int i = 0; i < N_ADDR; i += 3)
        for (int k = 0; k < 2; k++) begin
          acc(k, 0, {1'b0, nb_addr_t'(i)}, '0, q);
          check(q == value[i], $sformatf("pass %0d card %0d word %0d: %h, expected %h",
                                         pass, k, i, q, value[i]));
        end
      // new outputs from every host
      for (int i = 0; i < N_ADDR; i += 5) begin
        value[i] = $urandom;
        if (host[i] != 2) begin
          // write at the word now on the bus to provoke a clash sometimes
          acc(host[i], 1, {1'b0, nb_addr_t'(i)}, value[i], q);
        end
      end
      // processor writes timed to hit the word the bus is reading in that cycle
      for (int j = 0; j < 10; j++) begin
        int a;
        do @(negedge clk); while (slot_c != SLOT - 1);
        a = (cur + 1) % N_ADDR;
        if (host[a] != 2) begin
          value[a] = $urandom;
          acc(host[a], 1, {1'b0, nb_addr_t'(a)}, value[a], q);
        end
      end
    end
    check(n_busy > 0, "processor made to wait at least once");
    check(n_drive > 0 && n_update > 0, "drive and update slots seen");
    $display("busy waits %0d, drive slots %0d, update slots %0d", n_busy, n_drive, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
