// irq_ctrl: the dispatcher's interrupt controller. In the published design,
// PE completion interrupts no longer go to the host; they are evaluated on
// chip to put the finished PE back into the idle FIFO of its kernel, and only
// a Barrier that asks for it raises an interrupt to the host.
//
// How it works: each PE interrupt line is sampled and a rising edge sets the
// PE's pending bit (so both level and pulse interrupts work). The lowest
// pending PE is offered to the launcher on ack_valid/ack_pe; the launcher
// clears the PE's interrupt status register and reports ack_done with the PE
// it served on ack_done_pe. In that cycle the pending bit is cleared and the
// PE is released to the selector (release_valid/release_pe), all in the same
// cycle. Pending bits and the lowest-index choice are this design's own.
//
// Host side: a one-cycle barrier_irq pulse (architecture clock) toggles a
// flag that crosses into the host clock through a two-flop synchroniser; each
// toggle becomes a one-cycle host_irq pulse, three to four host cycles later.
// Barrier interrupts must be at least two host cycles apart to be counted
// separately; a Barrier waits for all PEs to finish, which always takes far
// longer.
module irq_ctrl #(
  parameter int unsigned NUM_PES = 16,
  parameter int unsigned PW      = (NUM_PES > 1) ? $clog2(NUM_PES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,

  input  logic [NUM_PES-1:0] pe_irq,

  output logic               ack_valid,
  output logic [PW-1:0]      ack_pe,
  input  logic               ack_done,
  input  logic [PW-1:0]      ack_done_pe,

  output logic               release_valid,
  output logic [PW-1:0]      release_pe,

  input  logic               barrier_irq,

  input  logic               host_clk,
  input  logic               host_rst_n,
  output logic               host_irq
);
  logic [NUM_PES-1:0] irq_q, pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q   <= '0;
      pending <= '0;
    end else begin
      irq_q <= pe_irq;
      for (int p = 0; p < NUM_PES; p++) begin
        if (ack_done && 32'(ack_done_pe) == p) pending[p] <= 1'b0;
        if (pe_irq[p] && !irq_q[p])            pending[p] <= 1'b1;
      end
    end
  end

  always_comb begin
    ack_valid = 1'b0;
    ack_pe    = '0;
    for (int p = NUM_PES - 1; p >= 0; p--) begin
      if (pending[p]) begin
        ack_valid = 1'b1;
        ack_pe    = PW'(p);
      end
    end
  end

  assign release_valid = ack_done;
  assign release_pe    = ack_done_pe;

  // Barrier interrupt to the host clock domain.
  logic toggle_arch, toggle_host, toggle_host_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           toggle_arch <= 1'b0;
    else if (barrier_irq) toggle_arch <= !toggle_arch;
  end

  sync_2ff #(.W(1)) u_sync (
    .clk(host_clk), .rst_n(host_rst_n), .d(toggle_arch), .q(toggle_host)
  );

  always_ff @(posedge host_clk or negedge host_rst_n) begin
    if (!host_rst_n) begin
      toggle_host_q <= 1'b0;
      host_irq      <= 1'b0;
    end else begin
      toggle_host_q <= toggle_host;
      host_irq      <= toggle_host ^ toggle_host_q;
    end
  end

  a_ack_pending: assert property (@(posedge clk) disable iff (!rst_n)
    ack_done |-> pending[ack_done_pe])
    else $error("irq_ctrl: acknowledge for a PE without pending interrupt");
endmodule
