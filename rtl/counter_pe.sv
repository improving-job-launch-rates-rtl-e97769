// counter_pe: the benchmark processing element (PE) used to measure job
// launch rate and latency. A job's parameter #1 gives a number of clock
// cycles; the PE waits that long and then signals completion through its
// interrupt wire. It exposes the standard PE control interface: an AXI4-Lite
// subordinate backed by the register file below, plus one interrupt output
// (and a `busy` status output, high while counting).
//
//   0x00 control   write bit0 = 1: start. Read: bit0 start/busy,
//                  bit1 done (cleared by this read), bit2 idle, bit3 ready
//   0x04 GIER      bit0 global interrupt enable
//   0x08 IER       bit0 done interrupt enable, bit1 ready interrupt enable
//   0x0C ISR       bit0 done, bit1 ready; writing 1 toggles a bit (so 1 clears)
//   0x10 return    low word of the return value (the cycle count run)
//   0x14 return    high word
//   0x20 param #1  low word (cycles to wait), 0x24 high word
//   0x30 param #2 .. 0x54 param #4 high word: stored, read back, unused
// irq = GIER & |(ISR & IER), a level that stays high until ISR is cleared.
//
// The offsets of control, GIER, IER, ISR, return value and parameters, and
// the count-then-interrupt behaviour, follow the published design; the bit
// assignments inside control/IER/ISR follow the usual Vivado HLS convention
// and are this design's assumption. Timing: the start write is accepted in
// one cycle; the PE is then busy for max(1, param #1) cycles, and irq rises
// in the cycle after the last busy cycle. Writes and reads take two cycles
// (accept, response).
module counter_pe
  import cascabel_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output logic      irq,
  output logic      busy
);
  logic        done_flag;
  logic [63:0] remaining, ret_val;
  logic        gier;
  logic [1:0]  ier, isr;
  logic [63:0] params [MAX_PARAMS];

  logic b_valid_q, r_valid_q;
  logic [31:0] r_data_q;
  logic wr_fire, rd_fire;
  assign wr_fire = s_req.aw_valid && s_req.w_valid && !b_valid_q;
  assign rd_fire = s_req.ar_valid && !r_valid_q;

  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = wr_fire;
    s_rsp.w_ready  = wr_fire;
    s_rsp.ar_ready = rd_fire;
    s_rsp.b_valid  = b_valid_q;
    s_rsp.b_resp   = AXI_RESP_OKAY;
    s_rsp.r_valid  = r_valid_q;
    s_rsp.r_data   = r_data_q;
    s_rsp.r_resp   = AXI_RESP_OKAY;
  end

  logic [11:0] waddr, raddr;
  assign waddr = s_req.aw_addr[11:0];
  assign raddr = s_req.ar_addr[11:0];

  // Parameter window: 0x20..0x5F, parameter (addr-0x20)/0x10, word addr[2].
  function automatic logic is_param(input logic [11:0] a);
    return a >= PE_REG_PARAM0 && a < PE_REG_PARAM0 + 12'(MAX_PARAMS * PE_PARAM_STRIDE)
           && a[3] == 1'b0;
  endfunction

  logic start;
  assign start = wr_fire && waddr == PE_REG_CTRL && s_req.w_data[0] && !busy;

  logic finish;
  assign finish = busy && remaining <= 64'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done_flag <= 1'b0;
      remaining <= '0;
      ret_val   <= '0;
      gier      <= 1'b0;
      ier       <= '0;
      isr       <= '0;
      for (int i = 0; i < MAX_PARAMS; i++) params[i] <= '0;
      b_valid_q <= 1'b0;
      r_valid_q <= 1'b0;
      r_data_q  <= '0;
    end else begin
      // Counter.
      if (start) begin
        busy      <= 1'b1;
        remaining <= params[0];
      end else if (busy) begin
        remaining <= remaining - 1'b1;
        if (finish) begin
          busy      <= 1'b0;
          done_flag <= 1'b1;
          ret_val   <= params[0];
          isr       <= isr | ier;
        end
      end

      // Register writes.
      if (wr_fire) begin
        b_valid_q <= 1'b1;
        unique case (waddr)
          PE_REG_GIER: gier <= s_req.w_data[0];
          PE_REG_IER:  ier  <= s_req.w_data[1:0];
          PE_REG_ISR:  isr  <= (finish ? (isr | ier) : isr) ^ s_req.w_data[1:0];
          default: begin
            if (is_param(waddr))
              params[waddr[5:4] - 2'd2][32*waddr[2] +: 32] <= s_req.w_data;
          end
        endcase
      end else if (s_req.b_ready) begin
        b_valid_q <= 1'b0;
      end

      // Register reads.
      if (rd_fire) begin
        r_valid_q <= 1'b1;
        r_data_q  <= '0;
        unique case (raddr)
          PE_REG_CTRL: begin
            r_data_q  <= {28'd0, !busy, !busy, done_flag, busy};
            done_flag <= 1'b0;
          end
          PE_REG_GIER:  r_data_q <= {31'd0, gier};
          PE_REG_IER:   r_data_q <= {30'd0, ier};
          PE_REG_ISR:   r_data_q <= {30'd0, isr};
          PE_REG_RET:   r_data_q <= ret_val[31:0];
          12'h014:      r_data_q <= ret_val[63:32];
          default: begin
            if (is_param(raddr)) r_data_q <= params[raddr[5:4] - 2'd2][32*raddr[2] +: 32];
          end
        endcase
      end else if (s_req.r_ready) begin
        r_valid_q <= 1'b0;
      end
    end
  end

  assign irq = gier && |(isr & ier);
endmodule
