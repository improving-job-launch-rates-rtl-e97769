// Testbench for cascabel, the dispatcher alone, with the composition drawn
// for it in the published design: kernel #1 with six PEs (0-5) and kernel
// #2 with three PEs (6-8). The PEs are behavioural models in this testbench,
// attached straight to the dispatcher's AXI4-Lite manager port: PE p owns
// the 4 KiB window at p * 0x1000, records parameter writes, runs for the
// number of cycles in parameter #1 after a start, and then holds its
// interrupt high until ISR is written.
//
// The host enqueues, through the queue's AXI4-Lite port, batches of jobs
// for both kernels separated by Barriers, more jobs than there are PEs (so
// jobs must wait for idle PEs), only the last Barrier asking for a host
// interrupt, plus one job with an unknown Kernel ID. Checks: every job
// starts exactly once, on a PE of its own kernel, with its own parameters;
// no job starts before every job ahead of a Barrier has finished; a PE never
// gets a second job while busy; one host interrupt arrives, after all jobs;
// the unknown kernel is flagged; each mechanism (stall for an idle PE,
// barrier wait, silent barrier, barrier interrupt) happened.
module tb_cascabel;
  import cascabel_pkg::*;
  localparam int NUM_PES = 9, NUM_KERNELS = 2, DEPTH = 16;
  localparam logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KIDS = {16'd2, 16'd1};
  localparam logic [NUM_PES-1:0][7:0] PEK = {8'd1, 8'd1, 8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};

  logic host_clk = 0, host_rst_n = 0, arch_clk = 0, arch_rst_n = 0;
  axil_req_t host_req = '0, m_req;
  axil_rsp_t host_rsp, m_rsp;
  logic host_irq;
  logic [NUM_PES-1:0] pe_irq;
  logic init_done, err_unknown_kernel, sel_stall, barrier_waiting, job_launched,
        barrier_completed, pe_released;
  logic [31:0] jobs_launched, barriers_done;
  int checks = 0, failures = 0;

  cascabel #(.QUEUE_DEPTH(DEPTH), .NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS),
             .KERNEL_IDS(KIDS), .PE_KERNEL(PEK)) dut (.*);

  always #2 host_clk = ~host_clk;
  always #1.111 arch_clk = ~arch_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- PE models
  logic [31:0] pe_param [NUM_PES][8];
  int          pe_left  [NUM_PES];
  logic [NUM_PES-1:0] pe_busy = '0, pe_isr = '0;
  logic aw_got = 0, w_got = 0, b_pend = 0;
  logic [31:0] a_q, d_q;
  assign pe_irq = pe_isr;

  always_comb begin
    m_rsp = '0;
    m_rsp.aw_ready = m_req.aw_valid && !aw_got && !b_pend;
    m_rsp.w_ready  = m_req.w_valid && !w_got && !b_pend;
    m_rsp.b_valid  = b_pend;
  end

  // Scoreboard: job tag = parameter #2 low word.
  typedef struct { int kernel; int epoch; logic [63:0] p0, p1, p2; int nparams; } job_t;
  job_t jobs[int];
  bit   started[int], finished[int];
  int   tag_on_pe [NUM_PES];
  int   n_started = 0, n_finished = 0, gen_epoch_done[int];
  int   init_writes = 0, host_irqs = 0, stalls = 0, waits = 0;

  function automatic bit epoch_clear(input int epoch);
    foreach (jobs[t]) if (jobs[t].epoch < epoch && !finished[t]) return 0;
    return 1;
  endfunction

  always_ff @(posedge arch_clk) begin
    logic [31:0] a, d;
    int p, t;
    if (!arch_rst_n) begin
      aw_got <= 0; w_got <= 0; b_pend <= 0;
    end else begin
    if (sel_stall) stalls++;
    if (barrier_waiting) waits++;
    for (int i = 0; i < NUM_PES; i++) if (pe_busy[i]) begin
      if (pe_left[i] <= 1) begin
        pe_busy[i] <= 0; pe_isr[i] <= 1;
        finished[tag_on_pe[i]] = 1; n_finished++;
      end else pe_left[i] <= pe_left[i] - 1;
    end
    if (m_req.aw_valid && m_rsp.aw_ready) begin aw_got <= 1; a_q <= m_req.aw_addr; end
    if (m_req.w_valid && m_rsp.w_ready)   begin w_got <= 1; d_q <= m_req.w_data; end
    a = aw_got ? a_q : m_req.aw_addr;
    d = w_got ? d_q : m_req.w_data;
    if ((aw_got || (m_req.aw_valid && m_rsp.aw_ready)) &&
        (w_got || (m_req.w_valid && m_rsp.w_ready)) && !b_pend) begin
      aw_got <= 0; w_got <= 0; b_pend <= 1;
      p = int'(a[31:12]);
      if (p >= NUM_PES) begin checks++; failures++; $display("FAIL: write to %h", a); end
      else if (a[11:0] == 12'h004 || a[11:0] == 12'h008) init_writes++;
      else if (a[11:0] == 12'h00C) pe_isr[p] <= pe_isr[p] ^ d[0];
      else if (a[11:0] >= 12'h020 && a[11:0] < 12'h060) pe_param[p][(a[11:0] - 12'h20) >> 3 | a[2]] <= d;
      else if (a[11:0] == 12'h000 && d[0]) begin
        t = int'(pe_param[p][2]);
        check(!pe_busy[p] && !pe_isr[p], $sformatf("PE %0d free when started", p));
        check(jobs.exists(t) && !started[t], $sformatf("job tag %0d known and new", t));
        if (jobs.exists(t)) begin
          check(jobs[t].kernel == int'(PEK[p]), $sformatf("job %0d on PE %0d of its kernel", t, p));
          check({pe_param[p][1], pe_param[p][0]} == jobs[t].p0, "param #1");
          if (jobs[t].nparams == 3)
            check({pe_param[p][5], pe_param[p][4]} == jobs[t].p2, "param #3");
          check(epoch_clear(jobs[t].epoch), $sformatf("job %0d respects its barrier", t));
        end
        started[t] = 1; n_started++;
        tag_on_pe[p] = t;
        pe_busy[p] <= 1; pe_left[p] <= int'(pe_param[p][0]);
      end
    end
    if (b_pend && m_req.b_ready) b_pend <= 0;
    end
  end

  always @(posedge host_clk) if (host_rst_n && host_irq) begin
    host_irqs++;
    check(n_finished == jobs.size(), "host interrupt only after all jobs");
  end

  // ------------------------------------------------------------- host driver
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

  task automatic enqueue(input logic [ENTRY_W-1:0] e);
    logic [31:0] slot;
    do rd(DEPTH * 64, slot); while (slot == 32'hFFFF_FFFF);
    for (int w = 15; w >= 0; w--) wr(slot * 64 + 32'(w) * 4, e[32*w +: 32]);
  endtask

  int next_tag = 100, epoch = 0;
  task automatic enqueue_job(input int kernel, input int cycles);
    entry_t e = '0;
    job_t j;
    j.kernel = kernel; j.epoch = epoch; j.nparams = (next_tag % 2) ? 3 : 2;
    j.p0 = 64'(cycles); j.p1 = 64'(next_tag); j.p2 = {32'hABCD, 32'(next_tag)};
    jobs[next_tag] = j;
    e.etype = ENTRY_JOB; e.kernel_id = KIDS[kernel]; e.num_params = 3'(j.nparams);
    e.params[0] = j.p0; e.params[1] = j.p1; e.params[2] = j.p2;
    next_tag++;
    enqueue(encode_entry(e));
  endtask

  task automatic enqueue_barrier(input bit irq);
    entry_t e = '0;
    e.etype = ENTRY_BARRIER; e.barrier_irq = irq;
    epoch++;
    enqueue(encode_entry(e));
  endtask

  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1; arch_rst_n = 1;
    wait (init_done);
    check(init_writes == 2 * NUM_PES, "GIER/IER set-up of every PE");
    // Batch 1: 8 jobs on kernel #1 (6 PEs: 2 must wait), 4 on kernel #2.
    for (int i = 0; i < 8; i++) enqueue_job(0, 2000 + 7 * i);
    for (int i = 0; i < 4; i++) enqueue_job(1, 30 + 5 * i);
    enqueue_barrier(0);
    // Batch 2.
    for (int i = 0; i < 3; i++) enqueue_job(1, 20);
    for (int i = 0; i < 3; i++) enqueue_job(0, 25 + i);
    enqueue_barrier(0);
    // A job for a kernel that does not exist.
    begin
      entry_t e = '0;
      e.etype = ENTRY_JOB; e.kernel_id = 16'd99; e.num_params = 3'd1;
      enqueue(encode_entry(e));
    end
    // Batch 3, then the interrupting barrier.
    for (int i = 0; i < 10; i++) enqueue_job(i % 2, 10 + i);
    enqueue_barrier(1);
    wait (host_irqs == 1);
    repeat (50) @(posedge arch_clk);
    check(n_started == jobs.size(), $sformatf("all %0d jobs started (%0d)", jobs.size(), n_started));
    check(n_finished == jobs.size(), "all jobs finished");
    check(host_irqs == 1, "exactly one host interrupt");
    check(jobs_launched == 32'(jobs.size()), "launch counter");
    check(barriers_done == 3, "three barriers");
    check(err_unknown_kernel, "unknown kernel flagged");
    check(stalls > 0, "mechanism: job waited for an idle PE");
    check(waits > 0, "mechanism: barrier waited for PEs");
    $display("stall cycles %0d, barrier wait cycles %0d", stalls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge arch_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
