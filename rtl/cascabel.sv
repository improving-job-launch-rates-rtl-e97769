// cascabel: hardware job dispatcher placed between the host interface and
// the architecture of processing elements (PEs). The host enqueues Jobs and
// Barriers into a memory-mapped queue; the dispatcher starts each Job on an
// idle PE of the requested kernel and executes Barriers on chip, so that a
// chain of dependent jobs runs without host round trips and the host is
// interrupted only when a Barrier asks for it.
//
// Structure, as in the published design: job_queue (host clock) feeds the
// dispatcher (architecture clock). The head entry goes to the selector if it
// is a Job, or to the barrier unit if it is a Barrier. The selector takes an
// idle PE from the FIFO of the job's kernel and hands it to the launcher,
// which writes the PE's parameter and control registers over the AXI4-Lite
// manager port. PE completion interrupts go to the interrupt controller,
// which has the launcher acknowledge them and returns the PE to its FIFO;
// Barrier interrupts go on to the host as host_irq.
//
// Entries of an unknown type are discarded; Jobs naming an unknown Kernel ID
// are discarded and set the sticky err_unknown_kernel flag (this design's
// choice). Entries are processed strictly in queue order.
//
// Parameters: QUEUE_DEPTH queue slots; NUM_PES PEs, PE p of kernel
// PE_KERNEL[p] (an index into KERNEL_IDS) with registers at
// PE_BASE + p * 0x1000. host_irq is a one-cycle pulse in the host clock.
// Status counters and the stall/wait strobes are in the architecture clock.
module cascabel
  import cascabel_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 512,
  parameter int unsigned NUM_PES     = 16,
  parameter int unsigned NUM_KERNELS = 1,
  parameter logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KERNEL_IDS = {NUM_KERNELS{16'd1}},
  parameter logic [NUM_PES-1:0][7:0] PE_KERNEL = '0,
  parameter logic [AXI_AW-1:0] PE_BASE = '0
) (
  input  logic               host_clk,
  input  logic               host_rst_n,
  input  axil_req_t          host_req,
  output axil_rsp_t          host_rsp,
  output logic               host_irq,

  input  logic               arch_clk,
  input  logic               arch_rst_n,
  output axil_req_t          m_req,
  input  axil_rsp_t          m_rsp,
  input  logic [NUM_PES-1:0] pe_irq,

  output logic               init_done,
  output logic               err_unknown_kernel,
  output logic               sel_stall,
  output logic               barrier_waiting,
  output logic               job_launched,
  output logic               barrier_completed,
  output logic               pe_released,
  output logic [31:0]        jobs_launched,
  output logic [31:0]        barriers_done
);
  localparam int unsigned PW = (NUM_PES > 1) ? $clog2(NUM_PES) : 1;

  // Queue.
  logic               deq_valid, deq_ready;
  logic [ENTRY_W-1:0] deq_entry;

  job_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .host_clk, .host_rst_n, .host_req, .host_rsp,
    .arch_clk, .arch_rst_n,
    .deq_valid, .deq_entry, .deq_ready
  );

  // Head entry demultiplexer.
  entry_t       head;
  launch_args_t head_args;
  logic         is_job, is_barrier;
  logic         job_ready, barrier_ready;

  assign head                 = decode_entry(deq_entry);
  assign head_args.num_params = head.num_params;
  assign head_args.params     = head.params;
  assign is_job               = deq_valid && head.etype == ENTRY_JOB;
  assign is_barrier           = deq_valid && head.etype == ENTRY_BARRIER;
  assign deq_ready            = is_job ? job_ready : is_barrier ? barrier_ready : 1'b1;

  // Selector.
  logic          launch_valid, launch_ready, all_idle, unknown_kernel;
  logic [PW-1:0] launch_pe;
  launch_args_t  launch_args;
  logic          release_valid;
  logic [PW-1:0] release_pe;

  selector #(
    .NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS), .PW(PW),
    .KERNEL_IDS(KERNEL_IDS), .PE_KERNEL(PE_KERNEL)
  ) u_selector (
    .clk(arch_clk), .rst_n(arch_rst_n),
    .job_valid(is_job), .job_kernel_id(head.kernel_id), .job_args(head_args), .job_ready,
    .launch_valid, .launch_pe, .launch_args, .launch_ready,
    .release_valid, .release_pe,
    .all_idle, .stall(sel_stall), .err_unknown_kernel(unknown_kernel)
  );

  // Launcher.
  logic          ack_valid, ack_done;
  logic [PW-1:0] ack_pe, ack_done_pe;

  launcher #(.NUM_PES(NUM_PES), .PW(PW), .PE_BASE(PE_BASE)) u_launcher (
    .clk(arch_clk), .rst_n(arch_rst_n),
    .launch_valid, .launch_pe, .launch_args, .launch_ready,
    .ack_valid, .ack_pe, .ack_done, .ack_done_pe,
    .m_req, .m_rsp,
    .init_done, .busy(), .launched(job_launched)
  );

  // Barrier unit.
  logic barrier_irq;

  barrier_unit u_barrier (
    .clk(arch_clk), .rst_n(arch_rst_n),
    .barrier_valid(is_barrier), .barrier_irq_flag(head.barrier_irq), .barrier_ready,
    .all_idle,
    .barrier_done(barrier_completed), .irq_req(barrier_irq), .waiting(barrier_waiting), .barriers_done
  );

  // Interrupt controller.
  irq_ctrl #(.NUM_PES(NUM_PES), .PW(PW)) u_irq (
    .clk(arch_clk), .rst_n(arch_rst_n),
    .pe_irq,
    .ack_valid, .ack_pe, .ack_done, .ack_done_pe,
    .release_valid, .release_pe,
    .barrier_irq,
    .host_clk, .host_rst_n, .host_irq
  );

  assign pe_released = release_valid;

  always_ff @(posedge arch_clk or negedge arch_rst_n) begin
    if (!arch_rst_n) begin
      err_unknown_kernel <= 1'b0;
      jobs_launched      <= '0;
    end else begin
      if (unknown_kernel) err_unknown_kernel <= 1'b1;
      if (job_launched)   jobs_launched <= jobs_launched + 1'b1;
    end
  end
endmodule
