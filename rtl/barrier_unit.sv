// barrier_unit: executes Barrier entries of the job queue. As in the
// published design, a Barrier holds back every later entry until all
// previously launched PEs have finished; if its interrupt flag is set, its
// completion is signalled to the host, otherwise it completes silently. This
// lets the host enqueue a whole pipeline of dependent jobs and be interrupted
// only once, at the last Barrier.
//
// "All PEs finished" is taken from the selector: every idle-PE FIFO holding
// all its PEs (all_idle) means no job is being launched, running or waiting
// for its interrupt to be acknowledged. barrier_ready is high in the first
// cycle in which a Barrier is at the head of the queue and all_idle holds;
// that cycle consumes the entry. One cycle later barrier_done pulses, and
// irq_req pulses with it when the flag was set. `waiting` is high while a
// Barrier blocks the queue. barriers_done counts completed Barriers.
module barrier_unit (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        barrier_valid,
  input  logic        barrier_irq_flag,
  output logic        barrier_ready,

  input  logic        all_idle,

  output logic        barrier_done,
  output logic        irq_req,
  output logic        waiting,
  output logic [31:0] barriers_done
);
  assign barrier_ready = barrier_valid && all_idle;
  assign waiting       = barrier_valid && !all_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      barrier_done  <= 1'b0;
      irq_req       <= 1'b0;
      barriers_done <= '0;
    end else begin
      barrier_done <= barrier_ready;
      irq_req      <= barrier_ready && barrier_irq_flag;
      if (barrier_ready) barriers_done <= barriers_done + 1'b1;
    end
  end
endmodule
