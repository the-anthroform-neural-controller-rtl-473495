// tb_dual_port_memory -- self-checking test of the dual-ported data transfer memory.
// Writes and reads words and hosted flags through both ports against a reference copy,
// checks the one-cycle read latency of each port, and makes the two ports clash on the
// same word to check that the processor port waits (busy, no write) while the bus port
// proceeds, and that different words never clash.
module tb_dual_port_memory;
  import nbbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic p_cs = 0, p_we = 0, b_re = 0, b_we = 0;
  logic [ADDR_W:0] p_addr = '0;
  nb_data_t p_wdata = '0, p_rdata, b_wdata = '0, b_rdata;
  nb_addr_t b_addr = '0;
  logic p_rvalid, p_busy, b_flag;
  int checks = 0, failures = 0;
  nb_data_t ref_mem [N_ADDR];
  logic     ref_flag [N_ADDR];

  dual_port_memory dut (.*);

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

  task automatic p_write(input logic [ADDR_W:0] a, input nb_data_t d);
    @(negedge clk); p_cs = 1; p_we = 1; p_addr = a; p_wdata = d;
    @(negedge clk); p_cs = 0; p_we = 0;
  endtask

  task automatic p_read(input logic [ADDR_W:0] a, output nb_data_t d);
    @(negedge clk); p_cs = 1; p_we = 0; p_addr = a;
    @(negedge clk); p_cs = 0;
    check(p_rvalid, "processor read valid after one cycle");
    d = p_rdata;
  endtask

  task automatic b_read(input nb_addr_t a, output nb_data_t d, output logic f);
    @(negedge clk); b_re = 1; b_addr = a;
    @(negedge clk); b_re = 0;
    d = b_rdata; f = b_flag;
  endtask

  initial begin
    nb_data_t d; logic f; nb_addr_t a;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // flags come out of reset cleared
    for (int i = 0; i < 16; i++) begin
      a = nb_addr_t'($urandom_range(0, N_ADDR - 1));
      b_read(a, d, f);
      check(f == 1'b0, "flag clear after reset");
    end
    // processor writes all words, reads some back through both ports
    for (int i = 0; i < N_ADDR; i++) begin
      ref_mem[i] = $urandom; ref_flag[i] = 1'b0;
      p_write({1'b0, nb_addr_t'(i)}, ref_mem[i]);
    end
    for (int i = 0; i < 64; i++) begin
      a = nb_addr_t'($urandom_range(0, N_ADDR - 1));
      p_read({1'b0, a}, d);
      check(d == ref_mem[a], $sformatf("processor read of word %0d", a));
      b_read(a, d, f);
      check(d == ref_mem[a] && f == 1'b0, $sformatf("bus read of word %0d", a));
    end
    // hosted flags
    for (int i = 0; i < 32; i++) begin
      a = nb_addr_t'($urandom_range(0, N_ADDR - 1));
      ref_flag[a] = 1'b1;
      p_write({1'b1, a}, 32'h1);
    end
    for (int i = 0; i < N_ADDR; i += 7) begin
      b_read(nb_addr_t'(i), d, f);
      check(f == ref_flag[i], $sformatf("bus sees flag of %0d", i));
      p_read({1'b1, nb_addr_t'(i)}, d);
      check(d == 32'(ref_flag[i]), $sformatf("processor sees flag of %0d", i));
    end
    // bus writes, processor reads; a hosted word ignores bus writes
    for (int i = 0; i < 128; i++) begin
      a = (i < 32) ? nb_addr_t'(i * 7) : nb_addr_t'($urandom_range(0, N_ADDR - 1));
      d = $urandom;
      if (!ref_flag[a]) ref_mem[a] = d;
      @(negedge clk); b_we = 1; b_addr = a; b_wdata = d;
      @(negedge clk); b_we = 0;
      p_read({1'b0, a}, d);
      check(d == ref_mem[a], ref_flag[a] ? "hosted word keeps the processor's value"
                                         : "processor reads word written by the bus");
    end
    // clash: same word in the same cycle -> processor waits, bus writes
    a = 10'd77;
    p_write({1'b1, a}, 32'h0);   // not hosted
    @(negedge clk);
    b_we = 1; b_addr = a; b_wdata = 32'hCAFE_0001;
    p_cs = 1; p_we = 1; p_addr = {1'b0, a}; p_wdata = 32'hDEAD_0002;
    #1 check(p_busy == 1'b1, "processor port busy on clash");
    @(negedge clk); b_we = 0;
    #1 check(p_busy == 1'b0, "busy released when bus port idle");
    @(negedge clk); p_cs = 0; p_we = 0;   // retried write completes
    p_read({1'b0, a}, d);
    check(d == 32'hDEAD_0002, "retried processor write lands after the bus write");
    // clash on a read
    @(negedge clk);
    b_re = 1; b_addr = a; p_cs = 1; p_we = 0; p_addr = {1'b0, a};
    #1 check(p_busy == 1'b1, "processor read waits on clash");
    @(negedge clk); b_re = 0; p_cs = 0;
    check(p_rvalid == 1'b0, "no read data for a refused request");
    // different words never clash
    @(negedge clk);
    b_re = 1; b_addr = 10'd5; p_cs = 1; p_we = 1; p_addr = {1'b0, 10'd6}; p_wdata = 32'h1234_5678;
    #1 check(p_busy == 1'b0, "no clash on different words");
    @(negedge clk); b_re = 0; p_cs = 0; p_we = 0;
    p_read({1'b0, 10'd6}, d);
    check(d == 32'h1234_5678, "parallel access to different words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
