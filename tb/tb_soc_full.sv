// Full-size testbench: tapasco_cascabel_soc with every parameter at its
// default (512-slot queue, 16 counter PEs of one kernel), running the job
// throughput benchmark of the published evaluation: jobs whose counter PE
// waits one clock cycle, host clock 250 MHz, PE clock 450 MHz, and one
// interrupting Barrier at the end.
//
// To measure the dispatcher rather than the testbench's host driver, the
// host fills the queue while the architecture side is still in reset, then
// releases it. Checks: all jobs launch; every PE is used; the host interrupt
// arrives after the last job; and the sustained on-chip rate beats the
// published end-to-end maximum of 6 million jobs per second, i.e. at most 75
// PE-clock cycles per job at 450 MHz.
module tb_soc_full;
  import cascabel_pkg::*;
  localparam int DEPTH = 512, NUM_PES = 16, N_JOBS = 480;

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

  longint cyc = 0, first_launch = -1, last_launch = -1, irq_cycle = -1;
  logic [NUM_PES-1:0] used = '0;
  int host_irqs = 0, max_busy = 0;
  always @(posedge arch_clk) if (arch_rst_n) begin
    automatic int b = 0;
    cyc++;
    for (int i = 0; i < NUM_PES; i++) b += int'(pe_busy[i]);
    if (b > max_busy) max_busy = b;
    used |= pe_busy;
    if (job_launched) begin
      if (first_launch < 0) first_launch = cyc;
      last_launch = cyc;
    end
  end
  always @(posedge host_clk) if (host_rst_n && host_irq) begin
    host_irqs++;
    irq_cycle = cyc;
  end

  logic [31:0] slot;
  real cpj, rate;
  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1;
    for (int i = 0; i <= N_JOBS; i++) begin
      rd(DEPTH * 64, slot);
      check(slot == 32'(i), "slot reserved");
      if (i < N_JOBS) begin
        wr(slot * 64 + 8, 32'd1);   // parameter #1: one clock cycle
        wr(slot * 64 + 12, 32'd0);
        wr(slot * 64, {16'd1, 5'd0, 3'd1, 6'd0, ENTRY_JOB});
      end else begin
        wr(slot * 64, {16'd0, 1'b1, 13'd0, ENTRY_BARRIER});
      end
    end
    repeat (4) @(posedge arch_clk);
    arch_rst_n = 1;
    wait (host_irqs == 1);
    repeat (20) @(posedge arch_clk);
    check(jobs_launched == N_JOBS, $sformatf("all jobs launched (%0d)", jobs_launched));
    check(barriers_done == 1, "barrier done");
    check(used == '1, "every PE used");
    check(irq_cycle > last_launch, "host interrupt after the last launch");
    check(!err_unknown_kernel, "no unknown kernel");
    cpj  = real'(last_launch - first_launch) / real'(N_JOBS - 1);
    rate = 450.0e6 / cpj;
    $display("on-chip dispatch: %0.2f cycles per job = %0.2f Mjobs/s at 450 MHz, max %0d PEs busy",
             cpj, rate / 1.0e6, max_busy);
    check(cpj <= 75.0, "at least 6 Mjobs/s at 450 MHz");
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
