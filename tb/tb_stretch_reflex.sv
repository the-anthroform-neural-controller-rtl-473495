// tb_stretch_reflex -- the stretch reflex laid out on the bus as a five-meta-neuron circuit.
// Meta-neuron addresses: 2 dorsal root ganglion (spindle afferent), 3 alpha motor of the
// stretched muscle, 4 alpha motor of the synergist, 5 'Ia' inhibitory interneuron,
// 6 alpha motor of the antagonist. Card 0 hosts 2 and 3, card 1 hosts 4, card 2 hosts 5
// and 6, and each reads its inputs from its own dual-port only.
// The testbench's DSP programs are deliberately trivial stand-ins for meta-neuron models,
// run once per millisecond (at each wrap of the address cycle), on IEEE single values
// (the 32-bit format the bus carries):
//   n2 = stretch, n3 = n2, n4 = 0.5*n2, n5 = n2, n6 = 1 - n5.
// Checks: every output on the bus equals its function of the inputs seen one step
// earlier; a step in stretch reaches the stretched muscle's motor output one millisecond
// later and the antagonist two milliseconds later (one extra meta-neuron in the path).
module tb_stretch_reflex;
  import nbbus_pkg::*;

  localparam int NC = 10, MS = 32768, STEPS = 12;

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

  int checks = 0, failures = 0, n_steps = 0;
  nb_data_t on_bus [7];      // value of addresses 2..6 seen on the bus this millisecond
  real stretch;

  always #5 clk = ~clk;

  initial begin
    repeat ((STEPS + 4) * MS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk)
    if (nb_ctl.sample && nb_ctl.addr >= 2 && nb_ctl.addr <= 6) on_bus[3'(nb_ctl.addr)] = nb_data;

  task automatic acc(input int k, input bit we, input logic [ADDR_W:0] a,
                     input nb_data_t d, output nb_data_t q);
    @(negedge clk); dsp_cs[k] = 1; dsp_we[k] = we; dsp_addr[k] = a; dsp_wdata[k] = d;
    #1 while (dsp_busy[k]) begin @(negedge clk); #1; end
    @(negedge clk); dsp_cs[k] = 0; dsp_we[k] = 0;
    q = dsp_rdata[k];
  endtask

  // IEEE single <-> real, built from the double-precision conversions (normal numbers and
  // zero only; the mantissa is truncated to 23 bits)
  function automatic real f(nb_data_t w);
    logic [63:0] d;
    if (w[30:0] == '0) return 0.0;
    d = {w[31], 11'(int'(w[30:23]) - 127 + 1023), w[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction
  function automatic nb_data_t b(real r);
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:0] == '0) return '0;
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  // one millisecond step of every card's program
  task automatic run_programs();
    nb_data_t q2a, q2b, q2c, q5;
    // read inputs first (all cards), then write outputs
    acc(1, 0, {1'b0, 10'd2}, '0, q2b);
    acc(2, 0, {1'b0, 10'd2}, '0, q2c);
    acc(2, 0, {1'b0, 10'd5}, '0, q5);
    acc(0, 0, {1'b0, 10'd2}, '0, q2a);
    acc(0, 1, {1'b0, 10'd3}, q2a, q2a);            // n3 = n2 (previous step)
    acc(0, 1, {1'b0, 10'd2}, b(stretch), q2a);     // n2 = stretch
    acc(1, 1, {1'b0, 10'd4}, b(0.5 * f(q2b)), q2b);
    acc(2, 1, {1'b0, 10'd5}, q2c, q2c);
    acc(2, 1, {1'b0, 10'd6}, b(1.0 - f(q5)), q5);
  endtask

  initial begin
    nb_data_t q;
    nb_data_t prev [7], exp3, exp4, exp5, exp6;
    static real stim [STEPS] = '{0.0, 0.0, 0.0, 0.8, 0.8, 0.8, 0.8, 0.2, 0.2, 0.2, 0.2, 0.2};
    for (int k = 0; k < NC; k++) begin
      dsp_cs[k] = 0; dsp_we[k] = 0; dsp_addr[k] = '0; dsp_wdata[k] = '0;
      dsp_tx[k] = 1; dsp_req[k] = 0;
    end
    check(b(1.0) == 32'h3F80_0000 && b(0.8) == 32'h3F4C_CCCC && b(-2.5) == 32'hC020_0000,
          "single-precision encoding");
    check(f(32'h3F00_0000) == 0.5, "single-precision decoding");
    repeat (3) @(negedge clk);
    rst_n = 1;
    // each card marks its meta-neurons and starts them at zero
    acc(0, 1, {1'b1, 10'd2}, 1, q); acc(0, 1, {1'b1, 10'd3}, 1, q);
    acc(1, 1, {1'b1, 10'd4}, 1, q);
    acc(2, 1, {1'b1, 10'd5}, 1, q); acc(2, 1, {1'b1, 10'd6}, 1, q);
    for (int a = 2; a <= 6; a++) acc(a == 4 ? 1 : (a >= 5 ? 2 : 0), 1, {1'b0, nb_addr_t'(a)}, b(0.0), q);
    for (int a = 2; a <= 6; a++) prev[a] = b(0.0);
    prev[6] = b(0.0);
    for (int t = 0; t < STEPS; t++) begin
      do @(negedge clk); while (!seq_wrap);
      // what the bus carried during the millisecond that just ended
      if (t > 0) begin
        check(on_bus[2] == b(stim[t - 1]), $sformatf("ms %0d: afferent 2 carries the stretch", t));
        check(on_bus[3] == exp3, $sformatf("ms %0d: motor 3 = %f", t, f(on_bus[3])));
        check(on_bus[4] == exp4, $sformatf("ms %0d: synergist 4 = %f", t, f(on_bus[4])));
        check(on_bus[5] == exp5, $sformatf("ms %0d: interneuron 5 = %f", t, f(on_bus[5])));
        check(on_bus[6] == exp6, $sformatf("ms %0d: antagonist 6 = %f", t, f(on_bus[6])));
        // latency through the circuit: one step to the motor neurons, two to the antagonist
        if (t >= 2) check(on_bus[3] == b(stim[t - 2]), $sformatf("ms %0d: motor 3 follows stretch one ms later", t));
        if (t >= 3) begin
          check(on_bus[6] == b(1.0 - f(b(stim[t - 3]))), $sformatf("ms %0d: antagonist follows two ms later", t));
          if (stim[t - 3] != stim[t - 2]) n_steps++;
        end
      end
      for (int a = 2; a <= 6; a++) prev[a] = (t > 0) ? on_bus[a] : b(0.0);
      // expected outputs of this step, from the values of the previous one
      exp3 = prev[2];
      exp4 = b(0.5 * f(prev[2]));
      exp5 = prev[2];
      exp6 = b(1.0 - f(prev[5]));
      stretch = stim[t];
      run_programs();
    end
    check(n_steps == 2, "both stretch steps observed at the antagonist");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
