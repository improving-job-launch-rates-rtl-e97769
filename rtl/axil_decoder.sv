// axil_decoder: the control interconnect between the dispatcher and the
// processing elements (the "control aggregator" of the system template). It
// routes one AXI4-Lite manager to NUM_SUB subordinates, each owning a window
// of 2**WINDOW_BITS bytes starting at BASE: subordinate i answers
// BASE + i * 2**WINDOW_BITS. Addresses are passed on unchanged. Accesses
// outside all windows are answered with DECERR (reads return 0).
//
// The published design names this interconnect only; its structure here is
// this design's own: one write and one read may be outstanding at a time,
// each routed to a subordinate chosen when its address is first presented.
// Write path: address seen (cycle 0), AW/W forwarded from cycle 1 until the
// subordinate accepts, then its B response passed back combinationally.
// Read path likewise. Writes and reads proceed independently.
module axil_decoder
  import cascabel_pkg::*;
#(
  parameter int unsigned NUM_SUB     = 16,
  parameter int unsigned WINDOW_BITS = PE_WINDOW_BITS,
  parameter logic [AXI_AW-1:0] BASE  = '0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [NUM_SUB],
  input  axil_rsp_t s_rsp [NUM_SUB]
);
  localparam int unsigned SW = (NUM_SUB > 1) ? $clog2(NUM_SUB) : 1;

  typedef enum logic [1:0] { T_IDLE, T_ADDR, T_RESP } txn_e;

  // Window index of an address, and whether it maps to a subordinate.
  function automatic logic [AXI_AW-1:0] window_of(input logic [AXI_AW-1:0] a);
    return (a - BASE) >> WINDOW_BITS;
  endfunction

  txn_e          wr_st, rd_st;
  logic [SW-1:0] wsel, rsel;
  logic          wmiss, rmiss;
  logic          aw_done, w_done;

  logic [AXI_AW-1:0] aw_win, ar_win;
  assign aw_win = window_of(m_req.aw_addr);
  assign ar_win = window_of(m_req.ar_addr);

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < NUM_SUB; i++) begin
      s_req[i]         = '0;
      s_req[i].aw_addr = m_req.aw_addr;
      s_req[i].w_data  = m_req.w_data;
      s_req[i].w_strb  = m_req.w_strb;
      s_req[i].ar_addr = m_req.ar_addr;
    end

    // Write path.
    if (wr_st == T_ADDR && !wmiss) begin
      s_req[wsel].aw_valid = m_req.aw_valid && !aw_done;
      s_req[wsel].w_valid  = m_req.w_valid && !w_done;
      m_rsp.aw_ready       = s_rsp[wsel].aw_ready && !aw_done;
      m_rsp.w_ready        = s_rsp[wsel].w_ready && !w_done;
    end else if (wr_st == T_ADDR && wmiss) begin
      m_rsp.aw_ready = !aw_done;
      m_rsp.w_ready  = !w_done;
    end else if (wr_st == T_RESP) begin
      if (wmiss) begin
        m_rsp.b_valid = 1'b1;
        m_rsp.b_resp  = AXI_RESP_DECERR;
      end else begin
        s_req[wsel].b_ready = m_req.b_ready;
        m_rsp.b_valid       = s_rsp[wsel].b_valid;
        m_rsp.b_resp        = s_rsp[wsel].b_resp;
      end
    end

    // Read path.
    if (rd_st == T_ADDR && !rmiss) begin
      s_req[rsel].ar_valid = m_req.ar_valid;
      m_rsp.ar_ready       = s_rsp[rsel].ar_ready;
    end else if (rd_st == T_ADDR && rmiss) begin
      m_rsp.ar_ready = 1'b1;
    end else if (rd_st == T_RESP) begin
      if (rmiss) begin
        m_rsp.r_valid = 1'b1;
        m_rsp.r_resp  = AXI_RESP_DECERR;
      end else begin
        s_req[rsel].r_ready = m_req.r_ready;
        m_rsp.r_valid       = s_rsp[rsel].r_valid;
        m_rsp.r_data        = s_rsp[rsel].r_data;
        m_rsp.r_resp        = s_rsp[rsel].r_resp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_st     <= T_IDLE;
      rd_st     <= T_IDLE;
      wsel    <= '0;
      rsel    <= '0;
      wmiss   <= 1'b0;
      rmiss   <= 1'b0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      unique case (wr_st)
        T_IDLE: if (m_req.aw_valid) begin
          wr_st     <= T_ADDR;
          wsel    <= SW'(aw_win);
          wmiss   <= (m_req.aw_addr < BASE) || (aw_win >= AXI_AW'(NUM_SUB));
          aw_done <= 1'b0;
          w_done  <= 1'b0;
        end
        T_ADDR: begin
          if (m_req.aw_valid && m_rsp.aw_ready) aw_done <= 1'b1;
          if (m_req.w_valid && m_rsp.w_ready)   w_done  <= 1'b1;
          if ((aw_done || (m_req.aw_valid && m_rsp.aw_ready)) &&
              (w_done || (m_req.w_valid && m_rsp.w_ready)))
            wr_st <= T_RESP;
        end
        T_RESP: if (m_rsp.b_valid && m_req.b_ready) wr_st <= T_IDLE;
        default: wr_st <= T_IDLE;
      endcase

      unique case (rd_st)
        T_IDLE: if (m_req.ar_valid) begin
          rd_st   <= T_ADDR;
          rsel  <= SW'(ar_win);
          rmiss <= (m_req.ar_addr < BASE) || (ar_win >= AXI_AW'(NUM_SUB));
        end
        T_ADDR: if (m_req.ar_valid && m_rsp.ar_ready) rd_st <= T_RESP;
        T_RESP: if (m_rsp.r_valid && m_req.r_ready) rd_st <= T_IDLE;
        default: rd_st <= T_IDLE;
      endcase
    end
  end
endmodule
