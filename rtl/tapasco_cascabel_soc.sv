// tapasco_cascabel_soc: a complete dispatch system, the hardware job
// dispatcher (cascabel) in front of an architecture of NUM_PES counter
// processing elements, as used for the job throughput and latency
// measurements: 16 counter PEs of a single kernel. The host side is an
// AXI4-Lite subordinate port into the job queue plus the barrier interrupt;
// the architecture side (its own clock) is the dispatcher's AXI4-Lite
// manager, routed by the control interconnect to the PEs' register files,
// and the PEs' interrupt wires gathered into one vector for the dispatcher.
//
// Platform parts that the host reaches this system through (PCIe bridge,
// DMA, memory controllers, the host interrupt controller) are outside this
// module: host_req/host_rsp and host_irq are where they would attach. The
// counter PEs have no memory port, so no data interconnect is needed.
//
// Defaults: a 512-entry queue, 16 PEs, one kernel with Kernel ID 1. Any
// composition can be set with NUM_KERNELS, KERNEL_IDS and PE_KERNEL (kernel
// index of each PE); all PEs are counter PEs whatever their kernel.
module tapasco_cascabel_soc
  import cascabel_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 512,
  parameter int unsigned NUM_PES     = 16,
  parameter int unsigned NUM_KERNELS = 1,
  parameter logic [NUM_KERNELS-1:0][KERNEL_ID_W-1:0] KERNEL_IDS = {NUM_KERNELS{16'd1}},
  parameter logic [NUM_PES-1:0][7:0] PE_KERNEL = '0
) (
  input  logic               host_clk,
  input  logic               host_rst_n,
  input  axil_req_t          host_req,
  output axil_rsp_t          host_rsp,
  output logic               host_irq,

  input  logic               arch_clk,
  input  logic               arch_rst_n,

  output logic               init_done,
  output logic               err_unknown_kernel,
  output logic               sel_stall,
  output logic               barrier_waiting,
  output logic               job_launched,
  output logic               barrier_completed,
  output logic               pe_released,
  output logic [31:0]        jobs_launched,
  output logic [31:0]        barriers_done,
  output logic [NUM_PES-1:0] pe_busy
);
  axil_req_t          arch_req;
  axil_rsp_t          arch_rsp;
  axil_req_t          pe_req [NUM_PES];
  axil_rsp_t          pe_rsp [NUM_PES];
  logic [NUM_PES-1:0] pe_irq;

  cascabel #(
    .QUEUE_DEPTH(QUEUE_DEPTH), .NUM_PES(NUM_PES), .NUM_KERNELS(NUM_KERNELS),
    .KERNEL_IDS(KERNEL_IDS), .PE_KERNEL(PE_KERNEL), .PE_BASE('0)
  ) u_cascabel (
    .host_clk, .host_rst_n, .host_req, .host_rsp, .host_irq,
    .arch_clk, .arch_rst_n, .m_req(arch_req), .m_rsp(arch_rsp), .pe_irq,
    .init_done, .err_unknown_kernel, .sel_stall, .barrier_waiting,
    .job_launched, .barrier_completed, .pe_released, .jobs_launched, .barriers_done
  );

  axil_decoder #(.NUM_SUB(NUM_PES), .WINDOW_BITS(PE_WINDOW_BITS), .BASE('0)) u_ctrl_ic (
    .clk(arch_clk), .rst_n(arch_rst_n),
    .m_req(arch_req), .m_rsp(arch_rsp),
    .s_req(pe_req), .s_rsp(pe_rsp)
  );

  for (genvar p = 0; p < NUM_PES; p++) begin : g_pe
    counter_pe u_pe (
      .clk(arch_clk), .rst_n(arch_rst_n),
      .s_req(pe_req[p]), .s_rsp(pe_rsp[p]),
      .irq(pe_irq[p]), .busy(pe_busy[p])
    );
  end
endmodule
