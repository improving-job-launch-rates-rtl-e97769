// selector: picks an idle processing element (PE) for each job. As in the
// published design it keeps one FIFO of idle PE IDs per Kernel ID, filled at
// reset with every PE of that kernel. A job's Kernel ID selects the FIFO; the
// head PE ID is dequeued and handed, with the job's parameters, to the
// launcher. If that FIFO is empty the job waits (job_ready stays low, `stall`
// is high) until a PE of the kernel becomes idle again. PEs return through the
// release port when the interrupt controller has seen their completion.
//
// The kernel of each PE (PE_KERNEL, an index into KERNEL_IDS) is fixed at
// elaboration, as the dispatcher is generated per system composition. A job
// whose Kernel ID matches no kernel is dropped with a one-cycle
// err_unknown_kernel pulse: the published design does not say what happens
// then, this is this design's choice.
//
// Timing: a job is accepted in the cycle its FIFO is non-empty and the output
// register is free or being emptied; the launch request appears in the next
// cycle. One job per cycle; one release per cycle. all_idle is high when every
// FIFO holds all its PEs, i.e. no PE is busy or waiting for launch.
module selector
  import cascabel_pkg::*;
#(
  parameter int unsigned NUM_PES     = 16,
  parameter int unsigned NUM_KERNELS = 1,
  parameter int unsigned PW          = (NUM_PES > 1) ? $clog2(NUM_PES) : 1,
  parameter logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KERNEL_IDS = {NUM_KERNELS{16'd1}},
  parameter logic [NUM_PES-1:0][7:0] PE_KERNEL = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,

  input  logic                   job_valid,
  input  logic [KERNEL_ID_W-1:0] job_kernel_id,
  input  launch_args_t           job_args,
  output logic                   job_ready,

  output logic                   launch_valid,
  output logic [PW-1:0]          launch_pe,
  output launch_args_t           launch_args,
  input  logic                   launch_ready,

  input  logic                   release_valid,
  input  logic [PW-1:0]          release_pe,

  output logic                   all_idle,
  output logic                   stall,
  output logic                   err_unknown_kernel
);
  function automatic int unsigned count_pes(int unsigned k);
    int unsigned n = 0;
    for (int unsigned p = 0; p < NUM_PES; p++) if (32'(PE_KERNEL[p]) == k) n++;
    return n;
  endfunction

  // PE indices of kernel k, packed lowest PE first.
  function automatic logic [NUM_PES*PW-1:0] pe_list(int unsigned k);
    logic [NUM_PES*PW-1:0] l = '0;
    int unsigned n = 0;
    for (int unsigned p = 0; p < NUM_PES; p++)
      if (32'(PE_KERNEL[p]) == k) begin
        l[n*PW +: PW] = PW'(p);
        n++;
      end
    return l;
  endfunction

  logic [NUM_KERNELS-1:0] match, fifo_empty, fifo_full, fifo_pop, fifo_push;
  logic [PW-1:0]          fifo_head [NUM_KERNELS];

  for (genvar k = 0; k < NUM_KERNELS; k++) begin : g_kernel
    localparam int unsigned CNT = count_pes(k);
    localparam int unsigned D   = (CNT > 0) ? CNT : 1;
    localparam logic [NUM_PES*PW-1:0] LIST = pe_list(k);

    assign match[k]     = (job_kernel_id == KERNEL_IDS[k]);
    assign fifo_push[k] = release_valid && (32'(PE_KERNEL[release_pe]) == k);

    idle_pe_fifo #(
      .W(PW), .DEPTH(D), .INIT_COUNT(CNT), .INIT_VALS(LIST[D*PW-1:0])
    ) u_fifo (
      .clk, .rst_n,
      .push(fifo_push[k]), .push_data(release_pe),
      .pop(fifo_pop[k]),   .pop_data(fifo_head[k]),
      .empty(fifo_empty[k]), .full(fifo_full[k])
    );
  end

  logic out_free, any_match, sel_empty;
  logic [PW-1:0] sel_head;
  assign out_free = !launch_valid || launch_ready;

  always_comb begin
    any_match = 1'b0;
    sel_empty = 1'b1;
    sel_head  = '0;
    fifo_pop  = '0;
    for (int k = 0; k < NUM_KERNELS; k++) begin
      if (match[k] && !any_match) begin
        any_match = 1'b1;
        sel_empty = fifo_empty[k];
        sel_head  = fifo_head[k];
        fifo_pop[k] = job_valid && !fifo_empty[k] && out_free;
      end
    end
  end

  assign job_ready          = !any_match || (!sel_empty && out_free);
  assign stall              = job_valid && any_match && sel_empty;
  assign err_unknown_kernel = job_valid && !any_match;
  assign all_idle           = &fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_valid <= 1'b0;
      launch_pe    <= '0;
      launch_args  <= '0;
    end else if (out_free) begin
      launch_valid <= job_valid && any_match && !sel_empty;
      if (job_valid && any_match && !sel_empty) begin
        launch_pe   <= sel_head;
        launch_args <= job_args;
      end
    end
  end
endmodule
