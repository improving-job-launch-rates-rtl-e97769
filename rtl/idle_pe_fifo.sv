// idle_pe_fifo: FIFO of the IDs of idle processing elements (PEs) of one
// kernel. The dispatcher keeps one such FIFO per Kernel ID: a job takes the PE
// at the head, and a PE whose job has finished is pushed back at the tail.
// At reset the FIFO holds all INIT_COUNT PEs of its kernel, INIT_VALS[0]
// first, as the published design prescribes for system start-up.
//
// Interface: pop_data is the head entry and is valid while !empty (first-word
// fall-through). push and pop may happen in the same cycle; pushing while full
// and popping while empty are illegal and are caught by assertions. A FIFO
// never holds more than the number of PEs of its kernel, so DEPTH = INIT_COUNT
// suffices. Storage is a register array so that it can be loaded at reset;
// this is this design's choice, the published design counts the FIFOs among
// its BlockRAMs.
module idle_pe_fifo #(
  parameter int unsigned W          = 4,
  parameter int unsigned DEPTH      = 4,
  parameter int unsigned INIT_COUNT = DEPTH,
  parameter logic [DEPTH*W-1:0] INIT_VALS = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  push_data,
  input  logic          pop,
  output logic [W-1:0]  pop_data,
  output logic          empty,
  output logic          full
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [IW-1:0] rd_idx, wr_idx;
  logic [CW-1:0] count;

  function automatic logic [IW-1:0] next_idx(input logic [IW-1:0] i);
    return (32'(i) == DEPTH - 1) ? '0 : i + 1'b1;
  endfunction

  assign empty    = (count == '0);
  assign full     = (32'(count) == DEPTH);
  assign pop_data = mem[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= INIT_VALS[i*W +: W];
      rd_idx <= '0;
      wr_idx <= IW'(INIT_COUNT % DEPTH);
      count  <= CW'(INIT_COUNT);
    end else begin
      if (push) begin
        mem[wr_idx] <= push_data;
        wr_idx      <= next_idx(wr_idx);
      end
      if (pop) rd_idx <= next_idx(rd_idx);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("idle_pe_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("idle_pe_fifo: pop while empty");
endmodule
