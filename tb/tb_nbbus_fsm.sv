// tb_nbbus_fsm -- self-checking test of the per-card NBbus state machine.
// The testbench plays the bus master (slots of SLOT cycles: addr_valid in cycle 0,
// sample in cycle SLOT-2) and the dual-ported memory (one-cycle read of word and flag).
// Half the addresses are marked hosted. For a hosted address the machine must drive the
// stored word in cycles 2..SLOT-1 and nothing else; for any other address it must write the
// value on the data lines into the memory in the sample cycle and never drive.
module tb_nbbus_fsm;
  import nbbus_pkg::*;

  localparam int SLOT = 8;
  localparam int NSLOTS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  nb_ctl_t  ctl;
  nb_data_t bus_data, drv_data, m_wdata, m_rdata;
  logic     drv_en, m_re, m_we, m_flag, drive_ev, update_ev;
  nb_addr_t m_addr;
  int checks = 0, failures = 0, n_drive = 0, n_update = 0;

  nb_data_t mem  [N_ADDR];
  logic     flag [N_ADDR];

  nbbus_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SLOT * NSLOTS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model: one-cycle read, write in the cycle
  always_ff @(posedge clk) begin
    if (m_re) begin m_rdata <= mem[m_addr]; m_flag <= flag[m_addr]; end
    if (m_we) mem[m_addr] <= m_wdata;
  end

  initial begin
    nb_addr_t a;
    nb_data_t v, expect_word;
    for (int i = 0; i < N_ADDR; i++) begin
      mem[i] = $urandom; flag[i] = ($urandom_range(0, 1) == 1);
    end
    ctl = '0; bus_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSLOTS; s++) begin
      a = nb_addr_t'($urandom_range(0, N_ADDR - 1));
      v = $urandom;
      expect_word = mem[a];
      for (int c = 0; c < SLOT; c++) begin
        @(negedge clk);
        ctl.addr_valid = (c == 0);
        ctl.sample     = (c == SLOT - 2);
        ctl.addr       = a;
        bus_data       = flag[a] ? (drv_en ? drv_data : '0) : v;
        #1;
        if (flag[a]) begin
          check(drv_en == (c >= 2), $sformatf("hosted %0d: drive enable in cycle %0d", a, c));
          if (c >= 2) check(drv_data == expect_word, $sformatf("hosted %0d: driven value", a));
          check(!m_we, "hosted address never written from the bus");
          if (drive_ev) n_drive++;
        end else begin
          check(!drv_en, $sformatf("listener %0d drives in cycle %0d", a, c));
          check(m_we == (c == SLOT - 2), $sformatf("listener %0d: write in cycle %0d", a, c));
          if (m_we) check(m_addr == a && m_wdata == v, "listener writes bus value to its word");
          if (update_ev) n_update++;
        end
      end
      // after the sample cycle the memory holds the bus value for a listened address
      if (!flag[a]) check(mem[a] == v, "memory updated from the bus");
      else          check(mem[a] == expect_word, "hosted word unchanged");
    end
    check(n_drive > 0 && n_update > 0, "both drive and update events seen");
    $display("drive slots %0d, update slots %0d", n_drive, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
