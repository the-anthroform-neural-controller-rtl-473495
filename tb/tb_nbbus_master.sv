// tb_nbbus_master -- self-checking test of the NBbus master at its default timing.
// Checks: after reset addresses 0..1023 are broadcast in order, one per 32-clock slot,
// so a complete address cycle takes exactly one millisecond (32768 clocks) and the card
// address is broadcast once per millisecond; `sample` falls two cycles before each slot
// ends; a shortened cycle (length 5) repeats addresses 0..4; table mode broadcasts a
// programmed sequence 1,9,2,9,3,9; a card-select write appears at the next broadcast.
module tb_nbbus_master;
  import nbbus_pkg::*;

  localparam int SLOT = 32, MS = 32768, DEPTH = 2048;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_card_we = 0, cfg_len_we = 0, cfg_mode_we = 0, cfg_mode = 0, cfg_seq_we = 0;
  card_addr_t cfg_card = '0;
  logic [11:0] cfg_len = '0;
  logic [10:0] cfg_seq_idx = '0;
  nb_addr_t cfg_seq_addr = '0;
  nb_ctl_t ctl;
  logic seq_wrap;
  int checks = 0, failures = 0;
  longint cyc = 0;

  nbbus_master dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (6 * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slot framing: addr_valid every SLOT cycles, sample SLOT-2 cycles after it
  longint last_av = -1, last_cs = -1;
  int n_cs = 0;
  always @(negedge clk) if (rst_n) begin
    if (ctl.addr_valid) begin
      if (last_av >= 0) check(cyc - last_av == longint'(SLOT), "slot length");
      last_av = cyc;
    end
    if (ctl.sample) check(last_av >= 0 && cyc - last_av == longint'(SLOT - 2), "sample position");
    if (ctl.cs_strobe) begin
      if (last_cs >= 0) check(cyc - last_cs == longint'(MS), "card-select broadcast once per ms");
      last_cs = cyc; n_cs++;
    end
  end

  // collect the address of each slot
  task automatic next_addr(output nb_addr_t a);
    do @(negedge clk); while (!ctl.addr_valid);
    a = ctl.addr;
  endtask

  task automatic cfg(input int kind, input int v, input int idx = 0);
    @(negedge clk);
    case (kind)
      0: begin cfg_card_we = 1; cfg_card = card_addr_t'(v); end
      1: begin cfg_len_we = 1; cfg_len = 12'(v); end
      2: begin cfg_mode_we = 1; cfg_mode = v[0]; end
      3: begin cfg_seq_we = 1; cfg_seq_idx = 11'(idx); cfg_seq_addr = nb_addr_t'(v); end
    endcase
    @(negedge clk);
    cfg_card_we = 0; cfg_len_we = 0; cfg_mode_we = 0; cfg_seq_we = 0;
  endtask

  initial begin
    nb_addr_t a;
    longint t0;
    static int seq [6] = '{1, 9, 2, 9, 3, 9};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // full counting cycle
    // the first slot starts as reset is released
    #1 check(ctl.addr_valid && ctl.addr == 0 && seq_wrap, "first slot carries address 0");
    t0 = cyc;
    for (int i = 1; i < N_ADDR; i++) begin
      next_addr(a);
      check(a == nb_addr_t'(i), $sformatf("address %0d in order (got %0d)", i, a));
    end
    next_addr(a);
    check(a == 0 && seq_wrap, "cycle restarts at 0");
    check(cyc - t0 == longint'(MS), $sformatf("one full address cycle per ms (%0d clocks)", cyc - t0));
    // card select register
    cfg(0, 8'h5A);
    do @(negedge clk); while (!ctl.cs_strobe);
    check(ctl.card_sel == 8'h5A, "new card address broadcast");
    // shortened cycle
    cfg(1, 5);
    for (int i = 0; i < 20; i++) begin
      next_addr(a);
      if (seq_wrap) break;
    end
    for (int i = 0; i < 15; i++) begin
      check(a == nb_addr_t'(i % 5), $sformatf("short cycle address %0d", a));
      if ((i % 5) == 0) check(seq_wrap, "short cycle wraps");
      next_addr(a);
    end
    // table mode
    for (int i = 0; i < 6; i++) cfg(3, seq[i], i);
    cfg(1, 6);
    cfg(2, 1);
    for (int i = 0; i < 20; i++) begin
      next_addr(a);
      if (seq_wrap) break;
    end
    for (int i = 0; i < 18; i++) begin
      check(a == nb_addr_t'(seq[i % 6]), $sformatf("table entry %0d gives %0d", i % 6, a));
      next_addr(a);
    end
    check(n_cs >= 2, "card-select broadcasts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
