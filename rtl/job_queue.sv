// job_queue: the Cascabel job/barrier queue. A BlockRAM ring of DEPTH 512-bit
// entries that the host fills over an AXI4-Lite subordinate port (host clock)
// and the dispatcher drains from a valid/ready stream (architecture clock).
//
// As in the published design, the queue is a memory-mapped BlockRAM managed
// by a read and a write pointer, and pointer updates are atomic so that many
// host threads can submit at once: a pointer moves in the same access that
// uses it. How a host thread claims a slot is this design's own:
//
//   1. read RESERVE: returns the index of a free slot and advances the write
//      (reservation) pointer in the same access; returns 0xFFFF_FFFF if the
//      queue is full and then changes nothing,
//   2. write the parameter words of that slot (slot*64 + 8 .. slot*64 + 63),
//   3. write the header word (slot*64 + 0) last: this marks the slot ready.
//
// Ready slots are handed over in slot order: the commit pointer moves past a
// slot only once it and every slot before it are ready, so entries leave the
// queue in reservation order even when threads finish writing out of order.
//
// Host address map (byte addresses, 32-bit words):
//   0 .. DEPTH*64-1       slot memory, slot s word w at s*64 + w*4 (read/write)
//   REG_BASE + 0x0        RESERVE  (read: reserve a slot, see above)
//   REG_BASE + 0x4        WPTR     (read: reservation pointer, no side effect)
//   REG_BASE + 0x8        RPTR     (read: dispatcher read pointer, synchronised)
//   REG_BASE + 0xC        FREE     (read: number of unreserved slots)
// with REG_BASE = DEPTH*64. Register writes are accepted and ignored.
//
// Clocking: the commit pointer crosses to the architecture clock and the read
// pointer crosses back, both Gray coded through two-flop synchronisers. On
// the dispatcher side each dequeue (deq_valid && deq_ready) returns the head
// entry and advances the read pointer in the same cycle; the output register
// refills the next cycle, so the stream carries one entry per cycle. The
// entry in the output register has already left its slot, so a stalled
// queue holds DEPTH + 1 entries. A
// committed entry appears at deq_valid about four architecture cycles after
// the header write completes. Host writes complete in two host cycles (accept,
// response); reads in two.
module job_queue
  import cascabel_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                host_clk,
  input  logic                host_rst_n,
  input  axil_req_t           host_req,
  output axil_rsp_t           host_rsp,

  input  logic                arch_clk,
  input  logic                arch_rst_n,
  output logic                deq_valid,
  output logic [ENTRY_W-1:0]  deq_entry,
  input  logic                deq_ready
);
  localparam int unsigned IW       = $clog2(DEPTH);        // slot index width
  localparam int unsigned PW       = IW + 1;               // pointer with wrap bit
  localparam int unsigned REG_BASE = DEPTH * ENTRY_BYTES;

  // Slot storage: written word-wise from the host, read whole on the SoC side.
  logic [ENTRY_W-1:0] mem [DEPTH];

  // ---------------------------------------------------------------- host side
  logic [PW-1:0]    resv_ptr, commit_ptr, rptr_host;
  logic [PW-1:0]    rptr_gray_sync;
  logic [DEPTH-1:0] slot_ready;

  logic [PW-1:0] commit_gray_q;
  logic [PW-1:0] rptr_gray_q;

  assign rptr_host = PW'(gray2bin(32'(rptr_gray_sync)));

  logic [PW-1:0] used_slots;
  logic [PW-1:0] free_slots;
  assign used_slots = resv_ptr - rptr_host;
  assign free_slots = PW'(DEPTH) - used_slots;

  logic wr_fire, rd_fire;
  logic b_valid_q, r_valid_q;
  logic [31:0] r_data;
  assign wr_fire = host_req.aw_valid && host_req.w_valid && !b_valid_q;
  assign rd_fire = host_req.ar_valid && !r_valid_q;

  always_comb begin
    host_rsp          = '0;
    host_rsp.aw_ready = wr_fire;
    host_rsp.w_ready  = wr_fire;
    host_rsp.ar_ready = rd_fire;
    host_rsp.b_valid  = b_valid_q;
    host_rsp.b_resp   = AXI_RESP_OKAY;
    host_rsp.r_valid  = r_valid_q;
    host_rsp.r_data   = r_data;
    host_rsp.r_resp   = AXI_RESP_OKAY;
  end

  logic          wr_is_mem, rd_is_mem;
  logic [IW-1:0] wr_slot, rd_slot;
  logic [3:0]    wr_word, rd_word;
  assign wr_is_mem = host_req.aw_addr < REG_BASE;
  assign rd_is_mem = host_req.ar_addr < REG_BASE;
  assign wr_slot   = host_req.aw_addr[6 +: IW];
  assign wr_word   = host_req.aw_addr[5:2];
  assign rd_slot   = host_req.ar_addr[6 +: IW];
  assign rd_word   = host_req.ar_addr[5:2];

  // A header write marks its slot ready only if the slot is reserved and not
  // yet committed.
  logic [IW-1:0] wr_off;
  logic [PW-1:0] outstanding;
  logic          wr_slot_reserved;
  assign wr_off           = wr_slot - commit_ptr[IW-1:0];
  assign outstanding      = resv_ptr - commit_ptr;
  assign wr_slot_reserved = PW'(wr_off) < outstanding;

  logic commit_step;
  assign commit_step = (commit_ptr != resv_ptr) && slot_ready[commit_ptr[IW-1:0]];

  // Slot memory, host port.
  always_ff @(posedge host_clk) begin
    if (wr_fire && wr_is_mem) begin
      for (int b = 0; b < 4; b++)
        if (host_req.w_strb[b])
          mem[wr_slot][32*wr_word + 8*b +: 8] <= host_req.w_data[8*b +: 8];
    end
  end

  logic [31:0] mem_rd_word;
  always_ff @(posedge host_clk) begin
    if (rd_fire && rd_is_mem) mem_rd_word <= mem[rd_slot][32*rd_word +: 32];
  end

  logic rd_from_mem_q;
  logic [31:0] reg_rd_q;

  always_ff @(posedge host_clk or negedge host_rst_n) begin
    if (!host_rst_n) begin
      resv_ptr         <= '0;
      commit_ptr       <= '0;
      slot_ready       <= '0;
      commit_gray_q    <= '0;
      b_valid_q <= 1'b0;
      r_valid_q <= 1'b0;
      rd_from_mem_q    <= 1'b0;
      reg_rd_q         <= '0;
    end else begin
      commit_gray_q <= PW'(bin2gray(32'(commit_ptr)));

      if (commit_step) begin
        slot_ready[commit_ptr[IW-1:0]] <= 1'b0;
        commit_ptr <= commit_ptr + 1'b1;
      end

      if (wr_fire) begin
        b_valid_q <= 1'b1;
        if (wr_is_mem && wr_word == 4'd0 && host_req.w_strb == 4'hF && wr_slot_reserved)
          slot_ready[wr_slot] <= 1'b1;
      end else if (host_req.b_ready) begin
        b_valid_q <= 1'b0;
      end

      if (rd_fire) begin
        r_valid_q <= 1'b1;
        rd_from_mem_q    <= rd_is_mem;
        reg_rd_q         <= '0;
        if (!rd_is_mem) begin
          unique case (host_req.ar_addr[3:2])
            2'd0: begin
              if (free_slots != '0) begin
                reg_rd_q <= 32'(resv_ptr[IW-1:0]);
                resv_ptr <= resv_ptr + 1'b1;
              end else begin
                reg_rd_q <= 32'hFFFF_FFFF;
              end
            end
            2'd1: reg_rd_q <= 32'(resv_ptr);
            2'd2: reg_rd_q <= 32'(rptr_host);
            default: reg_rd_q <= 32'(free_slots);
          endcase
        end
      end else if (host_req.r_ready) begin
        r_valid_q <= 1'b0;
      end
    end
  end

  assign r_data = rd_from_mem_q ? mem_rd_word : reg_rd_q;

  sync_2ff #(.W(PW)) u_rptr_sync (
    .clk(host_clk), .rst_n(host_rst_n), .d(rptr_gray_q), .q(rptr_gray_sync)
  );

  // -------------------------------------------------------- dispatcher side
  logic [PW-1:0] rptr;
  logic [PW-1:0] commit_gray_sync, commit_arch;

  sync_2ff #(.W(PW)) u_commit_sync (
    .clk(arch_clk), .rst_n(arch_rst_n), .d(commit_gray_q), .q(commit_gray_sync)
  );
  assign commit_arch = PW'(gray2bin(32'(commit_gray_sync)));

  logic empty, fetch;
  assign empty = (rptr == commit_arch);
  assign fetch = !empty && (!deq_valid || deq_ready);

  always_ff @(posedge arch_clk) begin
    if (fetch) deq_entry <= mem[rptr[IW-1:0]];
  end

  always_ff @(posedge arch_clk or negedge arch_rst_n) begin
    if (!arch_rst_n) begin
      rptr        <= '0;
      rptr_gray_q <= '0;
      deq_valid   <= 1'b0;
    end else begin
      rptr_gray_q <= PW'(bin2gray(32'(rptr)));
      if (fetch) begin
        rptr      <= rptr + 1'b1;
        deq_valid <= 1'b1;
      end else if (deq_ready) begin
        deq_valid <= 1'b0;
      end
    end
  end

  // Pointer order: read <= commit <= reservation, never more than DEPTH apart.
  a_ptr_order: assert property (@(posedge host_clk) disable iff (!host_rst_n)
    outstanding <= used_slots && used_slots <= PW'(DEPTH))
    else $error("job_queue: pointer order violated");

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $fatal(1, "job_queue: DEPTH must be a power of two");
  end
endmodule
