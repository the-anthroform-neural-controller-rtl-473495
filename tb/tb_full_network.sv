// tb_full_network -- the largest network one bus carries: 1024 fully connected
// meta-neurons on the default 10 cards (address a hosted by card a mod 10).
// Checks that one address cycle takes exactly 1 ms (32768 clocks), that in one cycle every
// address is driven exactly once (1024 drive slots) and copied by the other 9 cards
// (9216 copies), and that after a cycle every card holds all 1024 current outputs, twice
// over with fresh values. With 1024 outputs each reaching 1023 meta-neurons, that is
// 1,047,552 connections refreshed per millisecond.
module tb_full_network;
  import nbbus_pkg::*;

  localparam int NC = 10, MS = 32768;

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
  int n_drive = 0, n_update = 0;
  nb_data_t value [N_ADDR];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    n_drive  += $countones(drive_ev);
    n_update += $countones(update_ev);
  end

  initial begin
    repeat (16 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic acc(input int k, input bit we, input logic [ADDR_W:0] a,
                     input nb_data_t d, output nb_data_t q);
    @(negedge clk); dsp_cs[k] = 1; dsp_we[k] = we; dsp_addr[k] = a; dsp_wdata[k] = d;
    #1 while (dsp_busy[k]) begin @(negedge clk); #1; end
    @(negedge clk); dsp_cs[k] = 0; dsp_we[k] = 0;
    q = dsp_rdata[k];
  endtask

  task automatic wait_wrap();
    do @(negedge clk); while (!seq_wrap);
  endtask

  // all ten processors read their whole dual-port in parallel
  task automatic check_all(input string what);
    for (int k = 0; k < NC; k++)
      fork
        automatic int kk = k;
        begin
          nb_data_t q;
          for (int a = 0; a < N_ADDR; a++) begin
            acc(kk, 0, {1'b0, nb_addr_t'(a)}, '0, q);
            check(q == value[a], $sformatf("%s: card %0d word %0d", what, kk, a));
          end
        end
      join_none
    wait fork;
  endtask

  task automatic write_all();
    for (int k = 0; k < NC; k++)
      fork
        automatic int kk = k;
        begin
          nb_data_t q;
          for (int a = kk; a < N_ADDR; a += NC) acc(kk, 1, {1'b0, nb_addr_t'(a)}, value[a], q);
        end
      join_none
    wait fork;
  endtask

  initial begin
    nb_data_t q;
    longint t0;
    int d0, u0;
    for (int k = 0; k < NC; k++) begin
      dsp_cs[k] = 0; dsp_we[k] = 0; dsp_addr[k] = '0; dsp_wdata[k] = '0;
      dsp_tx[k] = 1; dsp_req[k] = 0;
    end
    for (int a = 0; a < N_ADDR; a++) value[a] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < N_ADDR; a++) acc(a % NC, 1, {1'b1, nb_addr_t'(a)}, 32'h1, q);
    write_all();
    for (int round = 0; round < 2; round++) begin
      wait_wrap();
      t0 = cyc; d0 = n_drive; u0 = n_update;
      wait_wrap();
      check(cyc - t0 == longint'(MS), $sformatf("address cycle of %0d clocks", cyc - t0));
      check(n_drive - d0 == N_ADDR, $sformatf("%0d drive slots per ms", n_drive - d0));
      check(n_update - u0 == (NC - 1) * N_ADDR, $sformatf("%0d copies per ms", n_update - u0));
      check_all($sformatf("round %0d", round));
      for (int a = 0; a < N_ADDR; a++) value[a] = $urandom;
      write_all();
    end
    $display("drive slots %0d, copies %0d", n_drive, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
