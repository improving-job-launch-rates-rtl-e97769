// End-to-end testbench for tapasco_cascabel_soc: the multi-kernel pipeline
// application (array init -> update -> sum) with two PEs per kernel, as in
// the published pipeline example, on counter PEs. Kernel IDs 1, 2, 3 stand
// for init, update and sum; PEs 0-1, 2-3 and 4-5 belong to them. The queue
// is shrunk to 8 slots so the host meets a full queue.
//
// Schedule (software-pipelined, one Barrier per batch): batch b holds four
// init jobs of iteration b, four update jobs of iteration b-1 and four sum
// jobs of iteration b-2, interleaved across kernels, then a Barrier; only
// the last Barrier asks for a host interrupt. Four jobs per kernel on two
// PEs force jobs to wait for idle PEs. One batch also commits two entries in reverse order, and one job names
// a Kernel ID that does not exist.
//
// Checks: every Barrier completes with all PEs idle; no job of a batch
// starts before the previous Barrier; all jobs launch; exactly one host
// interrupt, after the last Barrier; all six PEs are busy at once at some
// point (full utilisation after the pipeline has filled); and each mechanism
// - stall for an idle PE, barrier wait, silent barrier, interrupting barrier,
// full queue, out-of-order commit, unknown Kernel ID - happened.
module tb_tapasco_cascabel_soc;
  import cascabel_pkg::*;
  localparam int NUM_PES = 6, NUM_KERNELS = 3, DEPTH = 8, BATCHES = 6;
  localparam logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KIDS = {16'd3, 16'd2, 16'd1};
  localparam logic [NUM_PES-1:0][7:0] PEK = {8'd2, 8'd2, 8'd1, 8'd1, 8'd0, 8'd0};

  logic host_clk = 0, host_rst_n = 0, arch_clk = 0, arch_rst_n = 0;
  axil_req_t host_req = '0;
  axil_rsp_t host_rsp;
  logic host_irq, init_done, err_unknown_kernel, sel_stall, barrier_waiting,
        job_launched, barrier_completed, pe_released;
  logic [31:0] jobs_launched, barriers_done;
  logic [NUM_PES-1:0] pe_busy;
  int checks = 0, failures = 0;

  tapasco_cascabel_soc #(.QUEUE_DEPTH(DEPTH), .NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS),
                         .KERNEL_IDS(KIDS), .PE_KERNEL(PEK)) dut (.*);

  always #2 host_clk = ~host_clk;       // 250 MHz host clock
  always #1.25 arch_clk = ~arch_clk;    // 400 MHz PE clock, as in the pipeline measurement

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int n_stall = 0, n_wait = 0, n_silent = 0, n_irq_barrier = 0, n_full = 0,
      n_ooo = 0, n_unknown = 0, max_busy = 0, host_irqs = 0, n_released = 0;
  int launched_before_barrier [int];
  int barrier_seen = 0;

  always @(posedge arch_clk) if (arch_rst_n) begin
    automatic int b = 0;
    if (sel_stall) n_stall++;
    if (barrier_waiting) n_wait++;
    if (pe_released) n_released++;
    for (int i = 0; i < NUM_PES; i++) b += int'(pe_busy[i]);
    if (b > max_busy) max_busy = b;
    if (barrier_completed) begin
      barrier_seen++;
      launched_before_barrier[barrier_seen] = int'(jobs_launched);
    end
  end
  // One cycle after a barrier is consumed all PEs are idle and acknowledged.
  always @(posedge arch_clk) if (arch_rst_n && barrier_completed)
    check(pe_busy == '0, "barrier completes with all PEs idle");
  always @(posedge host_clk) if (host_rst_n && host_irq) host_irqs++;

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

  task automatic reserve(output logic [31:0] slot);
    rd(DEPTH * 64, slot);
    while (slot == 32'hFFFF_FFFF) begin
      n_full++;
      repeat (20) @(posedge host_clk);
      rd(DEPTH * 64, slot);
    end
  endtask

  // Write an entry into a reserved slot: parameter words, header last.
  task automatic fill(input logic [31:0] slot, input logic [ENTRY_W-1:0] e);
    for (int w = 2; w < 6; w++) wr(slot * 64 + 32'(w) * 4, e[32*w +: 32]);
    wr(slot * 64, e[31:0]);
  endtask

  function automatic logic [ENTRY_W-1:0] job(input int kernel, input int cycles);
    entry_t e = '0;
    e.etype = ENTRY_JOB; e.kernel_id = KIDS[kernel]; e.num_params = 3'd2;
    e.params[0] = 64'(cycles); e.params[1] = 64'(kernel);
    return encode_entry(e);
  endfunction

  function automatic logic [ENTRY_W-1:0] barrier(input bit irq);
    entry_t e = '0;
    e.etype = ENTRY_BARRIER; e.barrier_irq = irq;
    return encode_entry(e);
  endfunction

  int total_jobs = 0;
  int batch_jobs [int];
  logic [31:0] s, s1, s2;
  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1; arch_rst_n = 1;
    wait (init_done);
    for (int b = 0; b < BATCHES + 2; b++) begin
      batch_jobs[b] = 0;
      // Jobs are interleaved across kernels: the queue does not reorder, so
      // a kernel's waiting job would otherwise hold back the other kernels.
      for (int j = 0; j < 4; j++) begin
        for (int k = 0; k < NUM_KERNELS; k++) begin
          // Kernel k works on iteration b - k; only iterations 0..BATCHES-1 exist.
          if (b - k >= 0 && b - k < BATCHES) begin
            if (b == 2 && j == 0 && k == 1) begin
              // Update and sum jobs committed in reverse order.
              reserve(s1); reserve(s2);
              fill(s2, job(2, 190));
              fill(s1, job(1, 170));
              n_ooo++;
              total_jobs += 2; batch_jobs[b] += 2;
              k++;
            end else begin
              reserve(s); fill(s, job(k, 150 + 20 * k + j));
              total_jobs++; batch_jobs[b]++;
            end
          end
        end
      end
      if (b == 3) begin
        entry_t e = '0;
        e.etype = ENTRY_JOB; e.kernel_id = 16'd7; e.num_params = 3'd1;
        reserve(s); fill(s, encode_entry(e));
        n_unknown++;
      end
      reserve(s); fill(s, barrier(b == BATCHES + 1));
    end
    wait (host_irqs == 1);
    repeat (100) @(posedge arch_clk);
    check(jobs_launched == 32'(total_jobs), $sformatf("all %0d jobs launched (%0d)", total_jobs, jobs_launched));
    check(n_released == total_jobs, "every job's PE returned to its FIFO");
    check(barriers_done == BATCHES + 2, "all barriers done");
    check(host_irqs == 1, "one host interrupt");
    check(pe_busy == '0, "all idle at end");
    // Barrier b completes after exactly the jobs of batches 0..b.
    begin
      int acc = 0;
      for (int b = 0; b < BATCHES + 2; b++) begin
        acc += batch_jobs[b];
        check(launched_before_barrier[b + 1] == acc, $sformatf("barrier %0d after %0d jobs", b, acc));
      end
    end
    n_silent = int'(barriers_done) - host_irqs;
    n_irq_barrier = host_irqs;
    check(err_unknown_kernel && n_unknown == 1, "unknown kernel flagged");
    check(max_busy == NUM_PES, $sformatf("full utilisation reached (max %0d busy)", max_busy));
    $display("mechanisms: stall=%0d wait=%0d silent_barrier=%0d irq_barrier=%0d queue_full=%0d out_of_order=%0d unknown_kernel=%0d",
             n_stall, n_wait, n_silent, n_irq_barrier, n_full, n_ooo, n_unknown);
    check(n_stall > 0, "mechanism: stall for idle PE");
    check(n_wait > 0, "mechanism: barrier wait");
    check(n_silent > 0, "mechanism: silent barrier");
    check(n_irq_barrier > 0, "mechanism: interrupting barrier");
    check(n_full > 0, "mechanism: queue full");
    check(n_ooo > 0, "mechanism: out-of-order commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge arch_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
