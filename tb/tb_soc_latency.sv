// Single-shot dispatch latency of tapasco_cascabel_soc at its default
// parameters (512-slot queue, 16 counter PEs of one kernel), following the
// latency measurement of the published evaluation: one Job on a counter PE
// that waits N cycles, followed by a Barrier that interrupts the host, for
// N = 1, 16, 8192 and 2^22 cycles of the 450 MHz PE clock. The host clock
// runs at 250 MHz.
//
// For each N the testbench measures the time from the completed header
// write of the Job to the host interrupt, and subtracts the N cycles of
// execution; what remains is the on-chip overhead of queueing, launching,
// interrupt handling and the barrier. Checks: the interrupt comes no earlier
// than the execution time allows, the overhead stays below 1 us, it does not
// depend on N by more than a few PE-clock cycles, exactly one Job is launched
// and one Barrier completed per run, and the PE's return register holds N.
module tb_soc_latency;
  import cascabel_pkg::*;
  localparam int DEPTH = 512, NUM_PES = 16;
  localparam real ARCH_NS = 2.222;

  logic host_clk = 0, host_rst_n = 0, arch_clk = 0, arch_rst_n = 0;
  axil_req_t host_req = '0;
  axil_rsp_t host_rsp;
  logic host_irq, init_done, err_unknown_kernel, sel_stall, barrier_waiting,
        job_launched, barrier_completed, pe_released;
  logic [31:0] jobs_launched, barriers_done;
  logic [NUM_PES-1:0] pe_busy;
  int checks = 0, failures = 0;

  tapasco_cascabel_soc dut (.*);

  always #2 host_clk = ~host_clk;        // 250 MHz
  always #1.111 arch_clk = ~arch_clk;    // 450 MHz

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge host_clk);
    host_req.aw_valid = 1; host_req.aw_addr = a; host_req.w_valid = 1; host_req.w_data = d;
    host_req.w_strb = 4'hF; host_req.b_ready = 1;
    do @(posedge host_clk); while (!(host_rsp.aw_ready && host_rsp.w_ready));
    @(negedge host_clk);
    host_req.aw_valid = 0; host_req.w_valid = 0;
    while (!host_rsp.b_valid) @(negedge host_clk);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge host_clk);
    host_req.ar_valid = 1; host_req.ar_addr = a; host_req.r_ready = 1;
    do @(posedge host_clk); while (!host_rsp.ar_ready);
    @(negedge host_clk);
    host_req.ar_valid = 0;
    while (!host_rsp.r_valid) @(negedge host_clk);
    d = host_rsp.r_data;
  endtask

  int host_irqs = 0;
  realtime irq_time;
  always @(posedge host_clk) if (host_rst_n && host_irq) begin
    host_irqs++;
    irq_time = $realtime;
  end

  // Return registers of the PEs, observed inside the design.
  logic [63:0] pe_ret [NUM_PES];
  for (genvar p = 0; p < NUM_PES; p++) begin : g_ret
    assign pe_ret[p] = dut.g_pe[p].u_pe.ret_val;
  end

  localparam int N_RUNS = 4;
  int unsigned counts [N_RUNS] = '{1, 16, 8192, 1 << 22};
  real overhead [N_RUNS];

  logic [31:0] slot, d;
  realtime t0;
  int jobs0, barriers0, irqs0;
  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1;
    repeat (2) @(posedge arch_clk);
    arch_rst_n = 1;
    wait (init_done);
    for (int r = 0; r < N_RUNS; r++) begin
      jobs0 = jobs_launched; barriers0 = barriers_done; irqs0 = host_irqs;
      // Reserve and fill both entries, then commit the Job's header last but
      // one and the Barrier's header last.
      rd(DEPTH * 64, slot);
      wr(slot * 64 + 8, counts[r]);
      wr(slot * 64 + 12, 32'd0);
      rd(DEPTH * 64, d);
      wr(d * 64, {16'd0, 1'b1, 13'd0, ENTRY_BARRIER});
      wr(slot * 64, {16'd1, 5'd0, 3'd1, 6'd0, ENTRY_JOB});
      t0 = $realtime;
      wait (host_irqs == irqs0 + 1);
      overhead[r] = (irq_time - t0) - real'(counts[r]) * ARCH_NS;
      $display("N = %0d cycles: interrupt after %0.1f ns, on-chip overhead %0.1f ns",
               counts[r], irq_time - t0, overhead[r]);
      check(overhead[r] >= 0.0, "interrupt not before the execution time has passed");
      check(overhead[r] < 1000.0, "on-chip overhead below 1 us");
      check(jobs_launched == jobs0 + 1, "one job launched");
      check(barriers_done == barriers0 + 1, "one barrier completed");
      repeat (10) @(posedge host_clk);
      check(host_irqs == irqs0 + 1, "exactly one host interrupt");
      check(pe_ret[r] == 64'(counts[r]), "return value of PE r is N (PEs are used in FIFO order)");
    end
    for (int r = 1; r < N_RUNS; r++)
      check(overhead[r] - overhead[0] < 4 * 4.0 && overhead[0] - overhead[r] < 4 * 4.0,
            $sformatf("overhead independent of N (run %0d)", r));
    check(!err_unknown_kernel, "no unknown kernel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge arch_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
