// Testbench for selector: a composition of 6 PEs in two kernels (IDs 0x11
// with PEs 0,2,4 and 0x22 with PEs 1,3,5, mixed on purpose). Checks that jobs
// get idle PEs of their own kernel in FIFO order, that a job blocks (stall)
// while its kernel has no idle PE and proceeds once one is released, that
// jobs for the other kernel are unaffected, that an unknown Kernel ID is
// flagged and dropped, and that all_idle tracks the FIFOs.
module tb_selector;
  import cascabel_pkg::*;
  localparam int NUM_PES = 6, NUM_KERNELS = 2, PW = 3;
  localparam logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KIDS = {16'h0022, 16'h0011};
  localparam logic [NUM_PES-1:0][7:0] PEK = {8'd1, 8'd0, 8'd1, 8'd0, 8'd1, 8'd0};

  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready;
  logic [KERNEL_ID_W-1:0] job_kernel_id = '0;
  launch_args_t job_args = '0, launch_args;
  logic launch_valid, launch_ready = 1;
  logic [PW-1:0] launch_pe;
  logic release_valid = 0;
  logic [PW-1:0] release_pe = '0;
  logic all_idle, stall, err_unknown_kernel;
  int checks = 0, failures = 0, stalls = 0;

  selector #(.NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS), .PW(PW),
             .KERNEL_IDS(KIDS), .PE_KERNEL(PEK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && stall) stalls++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Offer one job; wait until accepted (or give up after max_wait cycles);
  // return the PE it was launched on.
  task automatic send_job(input logic [15:0] kid, input logic [63:0] p0, input int max_wait,
                          output int pe, output logic accepted);
    int n = 0;
    @(negedge clk);
    job_valid = 1; job_kernel_id = kid;
    job_args = '0; job_args.num_params = 3'd1; job_args.params[0] = p0;
    accepted = 0;
    while (n < max_wait) begin
      #1;
      if (job_ready) begin accepted = 1; break; end
      @(negedge clk); n++;
    end
    @(negedge clk);
    job_valid = 0;
    pe = -1;
    if (accepted) begin
      check(launch_valid, "launch request after acceptance");
      check(launch_args.params[0] == p0, "parameters passed on");
      pe = int'(launch_pe);
    end
  endtask

  task automatic free_pe(input int pe);
    @(negedge clk);
    release_valid = 1; release_pe = PW'(pe);
    @(negedge clk);
    release_valid = 0;
  endtask

  int pe; logic acc;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(all_idle, "all idle after reset");
    // Kernel 0x11 owns PEs 0,2,4 in that order.
    send_job(16'h0011, 64'hA0, 5, pe, acc); check(acc && pe == 0, $sformatf("k1 first PE 0, got %0d", pe));
    check(!all_idle, "not idle with a PE taken");
    send_job(16'h0011, 64'hA1, 5, pe, acc); check(acc && pe == 2, $sformatf("k1 second PE 2, got %0d", pe));
    send_job(16'h0022, 64'hB0, 5, pe, acc); check(acc && pe == 1, $sformatf("k2 first PE 1, got %0d", pe));
    send_job(16'h0011, 64'hA2, 5, pe, acc); check(acc && pe == 4, $sformatf("k1 third PE 4, got %0d", pe));
    // Kernel 0x11 exhausted: next job must block.
    send_job(16'h0011, 64'hA3, 6, pe, acc); check(!acc, "job blocks without idle PE");
    check(stalls >= 6, "stall asserted while blocked");
    // Release PE 2: the job now gets it.
    fork
      send_job(16'h0011, 64'hA3, 20, pe, acc);
      begin repeat (3) @(negedge clk); free_pe(2); end
    join
    check(acc && pe == 2, $sformatf("blocked job gets released PE 2, got %0d", pe));
    // Unknown kernel.
    @(negedge clk); job_valid = 1; job_kernel_id = 16'h0033; #1;
    check(err_unknown_kernel && job_ready, "unknown kernel flagged and dropped");
    @(negedge clk); job_valid = 0; #1;
    check(!launch_valid, "no launch for unknown kernel");
    // Back-pressure from the launcher holds the request.
    launch_ready = 0;
    send_job(16'h0022, 64'hB1, 5, pe, acc); check(acc && pe == 3, "k2 second PE 3");
    @(negedge clk); check(launch_valid && launch_pe == 3, "request held under back-pressure");
    launch_ready = 1;
    @(negedge clk);
    // Release all busy PEs: 0, 4, 2, 1, 3 (kernel 0x11 then order 0,4,2).
    free_pe(0); free_pe(4); free_pe(2); free_pe(1); free_pe(3);
    #1 check(all_idle, "all idle after all releases");
    send_job(16'h0011, 64'hA4, 5, pe, acc); check(acc && pe == 0, "FIFO order after releases: 0");
    send_job(16'h0011, 64'hA5, 5, pe, acc); check(acc && pe == 4, "FIFO order after releases: 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
