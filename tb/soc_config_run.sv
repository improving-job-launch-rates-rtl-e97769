// Test harness used by tb_soc_configs: one tapasco_cascabel_soc in a given
// composition (number of PEs, number of kernels, kernel of each PE), with
// its own host and PE clocks, driven through one complete run.
//
// Kernel k (0-based) has Kernel ID k+1. The host enqueues ROUNDS Jobs for
// every kernel, interleaved across kernels, then a Barrier that interrupts
// the host. The counter PE of a Job waits 1000*(k+1) + 7*j + 5 cycles for
// round j, so the value a PE finally returns tells which kernel's Job it ran.
// Checks: every Job launches, one Barrier completes, exactly one host
// interrupt arrives, every PE ran a Job, every PE's last Job was of its own
// kernel, and no Job was flagged as unknown. `done` rises when the run is
// over; `checks` and `failures` are then final.
module soc_config_run
  import cascabel_pkg::*;
#(
  parameter int unsigned NUM_PES     = 10,
  parameter int unsigned NUM_KERNELS = 4,
  parameter logic [NUM_PES-1:0][7:0] PEK = '0,
  parameter int unsigned ROUNDS      = 4,
  parameter string       NAME        = "config"
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DEPTH = 512;

  function automatic logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] kernel_ids();
    for (int k = 0; k < NUM_KERNELS; k++) kernel_ids[k] = KERNEL_ID_W'(k + 1);
  endfunction
  localparam logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KIDS = kernel_ids();

  logic host_clk = 0, host_rst_n = 0, arch_clk = 0, arch_rst_n = 0;
  axil_req_t host_req = '0;
  axil_rsp_t host_rsp;
  logic host_irq, init_done, err_unknown_kernel, sel_stall, barrier_waiting,
        job_launched, barrier_completed, pe_released;
  logic [31:0] jobs_launched, barriers_done;
  logic [NUM_PES-1:0] pe_busy;

  tapasco_cascabel_soc #(.NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS),
                         .KERNEL_IDS(KIDS), .PE_KERNEL(PEK)) dut (.*);

  always #2 host_clk = ~host_clk;        // 250 MHz
  always #1.111 arch_clk = ~arch_clk;    // 450 MHz

  initial begin done = 0; checks = 0; failures = 0; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL (%s): %s", NAME, what); end
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

  int host_irqs = 0, stalls = 0;
  logic [NUM_PES-1:0] used = '0;
  always @(posedge host_clk) if (host_rst_n && host_irq) host_irqs++;
  always @(posedge arch_clk) if (arch_rst_n) begin
    used |= pe_busy;
    if (sel_stall) stalls++;
  end

  logic [63:0] pe_ret [NUM_PES];
  for (genvar p = 0; p < NUM_PES; p++) begin : g_ret
    assign pe_ret[p] = dut.g_pe[p].u_pe.ret_val;
  end

  logic [31:0] slot;
  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1;
    repeat (2) @(posedge arch_clk);
    arch_rst_n = 1;
    for (int j = 0; j < ROUNDS; j++)
      for (int k = 0; k < NUM_KERNELS; k++) begin
        rd(DEPTH * 64, slot);
        wr(slot * 64 + 8, 32'(1000 * (k + 1) + 7 * j + 5));
        wr(slot * 64 + 12, 32'd0);
        wr(slot * 64, {KIDS[k], 5'd0, 3'd1, 6'd0, ENTRY_JOB});
      end
    rd(DEPTH * 64, slot);
    wr(slot * 64, {16'd0, 1'b1, 13'd0, ENTRY_BARRIER});
    wait (host_irqs == 1);
    repeat (20) @(posedge host_clk);
    check(jobs_launched == ROUNDS * NUM_KERNELS, $sformatf("all jobs launched (%0d)", jobs_launched));
    check(barriers_done == 1, "barrier completed");
    check(host_irqs == 1, "one host interrupt");
    check(used == '1, "every PE ran a job");
    check(!err_unknown_kernel, "no unknown kernel");
    for (int p = 0; p < NUM_PES; p++)
      check(int'(pe_ret[p] / 1000) == int'(PEK[p]) + 1,
            $sformatf("PE %0d ran a job of its own kernel (returned %0d)", p, pe_ret[p]));
    $display("%s: %0d PEs, %0d kernels, %0d jobs, %0d stall cycles", NAME, NUM_PES,
             NUM_KERNELS, jobs_launched, stalls);
    done = 1;
  end
endmodule
