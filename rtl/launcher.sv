// launcher: the dispatcher's AXI4-Lite manager into the PE architecture. A
// state machine that starts a job on the PE chosen by the selector by writing
// the job's parameters and then the control register of that PE, as in the
// published design. Each 64-bit parameter i (0-based) goes out as two 32-bit
// writes, low word to 0x20 + 0x10*i and high word to 0x24 + 0x10*i; then
// 0x1 (start) is written to the control register at 0x00.
//
// The same port also carries two kinds of write that this design adds
// because it replaces the host runtime for the PEs it manages:
//   - after reset, for every PE: GIER = 1 and IER = 1 (enable the done
//     interrupt), the set-up the host runtime otherwise performs;
//   - after a PE's completion interrupt: ISR = 1, which acknowledges and
//     clears the interrupt (requested by the interrupt controller on
//     ack_valid/ack_pe and answered by a one-cycle ack_done naming the
//     acknowledged PE on ack_done_pe).
// Acknowledges have priority over launches, so PEs return to the idle pool
// as early as possible.
//
// PE p's registers sit at PE_BASE + p * 0x1000. Writes are issued one at a
// time: address and data together, then the response is awaited. A write
// takes three cycles (issue, acceptance, response) with a subordinate that
// accepts at once and answers in the next cycle, so a job with n parameters
// takes 3 * (2n + 1) cycles from acceptance to `launched` (high in the last
// one); the launcher is idle again one cycle later. The launcher only
// writes: its read channel is tied off (ar_valid low, r_ready high) and every
// write is a full 32-bit word (w_strb all ones).
module launcher
  import cascabel_pkg::*;
#(
  parameter int unsigned NUM_PES = 16,
  parameter int unsigned PW      = (NUM_PES > 1) ? $clog2(NUM_PES) : 1,
  parameter logic [AXI_AW-1:0] PE_BASE = '0
) (
  input  logic          clk,
  input  logic          rst_n,

  input  logic          launch_valid,
  input  logic [PW-1:0] launch_pe,
  input  launch_args_t  launch_args,
  output logic          launch_ready,

  input  logic          ack_valid,
  input  logic [PW-1:0] ack_pe,
  output logic          ack_done,
  output logic [PW-1:0] ack_done_pe,

  output axil_req_t     m_req,
  input  axil_rsp_t     m_rsp,

  output logic          init_done,
  output logic          busy,
  output logic          launched
);
  typedef enum logic [1:0] {
    M_INIT,
    M_IDLE,
    M_LAUNCH,
    M_ACK
  } mode_e;

  mode_e        mode;
  logic [PW-1:0] pe;
  launch_args_t args;
  logic [3:0]   step;        // write number within the current operation
  logic         wr_active;   // a write is in flight
  logic         aw_done, w_done;
  logic [11:0]  wr_off;
  logic [31:0]  wr_data;

  function automatic logic [AXI_AW-1:0] pe_addr(input logic [PW-1:0] p, input logic [11:0] off);
    return PE_BASE + (AXI_AW'(p) << PE_WINDOW_BITS) + AXI_AW'(off);
  endfunction

  // Register offset and data of write `step` of the current operation, and
  // whether it is the last one.
  logic [11:0] nxt_off;
  logic [31:0] nxt_data;
  logic        nxt_last;
  logic [3:0]  n_words;      // parameter words to write, at most 2 * MAX_PARAMS
  assign n_words = (args.num_params > NPARAM_W'(MAX_PARAMS)) ? 4'(2 * MAX_PARAMS)
                                                            : {args.num_params, 1'b0};
  always_comb begin
    nxt_off  = PE_REG_CTRL;
    nxt_data = 32'h1;
    nxt_last = 1'b1;
    unique case (mode)
      M_INIT: begin
        nxt_off  = step[0] ? PE_REG_IER : PE_REG_GIER;
        nxt_data = 32'h1;
        nxt_last = step[0];
      end
      M_LAUNCH: begin
        if (step < n_words) begin
          nxt_off  = PE_REG_PARAM0 + 12'(PE_PARAM_STRIDE) * 12'(step[3:1]) + (step[0] ? 12'h4 : 12'h0);
          nxt_data = args.params[step[2:1]][step[0]*32 +: 32];
          nxt_last = 1'b0;
        end else begin
          nxt_off  = PE_REG_CTRL;
          nxt_data = 32'h1;
          nxt_last = 1'b1;
        end
      end
      M_ACK: begin
        nxt_off  = PE_REG_ISR;
        nxt_data = 32'h1;
        nxt_last = 1'b1;
      end
      default: ;
    endcase
  end

  logic wr_complete;
  assign wr_complete = wr_active && aw_done && w_done && m_rsp.b_valid;

  // Both completion strobes are high in the cycle the last write's response
  // arrives, so the interrupt controller and the selector see them before the
  // launcher is idle again.
  assign launched     = wr_complete && nxt_last && (mode == M_LAUNCH);
  assign ack_done     = wr_complete && nxt_last && (mode == M_ACK);
  assign ack_done_pe  = pe;
  assign launch_ready = (mode == M_IDLE) && !ack_valid;
  assign init_done    = (mode != M_INIT);
  assign busy         = (mode != M_IDLE);

  always_comb begin
    m_req          = '0;
    m_req.aw_valid = wr_active && !aw_done;
    m_req.aw_addr  = pe_addr(pe, wr_off);
    m_req.w_valid  = wr_active && !w_done;
    m_req.w_data   = wr_data;
    m_req.w_strb   = 4'hF;
    m_req.b_ready  = wr_active && aw_done && w_done;
    m_req.r_ready  = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= M_INIT;
      pe        <= '0;
      args      <= '0;
      step      <= '0;
      wr_active <= 1'b0;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      wr_off    <= '0;
      wr_data   <= '0;
    end else begin

      if (wr_active) begin
        if (m_req.aw_valid && m_rsp.aw_ready) aw_done <= 1'b1;
        if (m_req.w_valid  && m_rsp.w_ready)  w_done  <= 1'b1;
      end

      if (mode == M_IDLE) begin
        if (ack_valid) begin
          mode <= M_ACK;
          pe   <= ack_pe;
          step <= '0;
        end else if (launch_valid) begin
          mode <= M_LAUNCH;
          pe   <= launch_pe;
          args <= launch_args;
          step <= '0;
        end
      end else if (!wr_active) begin
        // Issue the next write of the current operation.
        wr_active <= 1'b1;
        aw_done   <= 1'b0;
        w_done    <= 1'b0;
        wr_off    <= nxt_off;
        wr_data   <= nxt_data;
      end else if (wr_complete) begin
        wr_active <= 1'b0;
        step      <= step + 1'b1;
        if (nxt_last) begin
          step <= '0;
          unique case (mode)
            M_INIT: begin
              if (32'(pe) == NUM_PES - 1) begin
                mode <= M_IDLE;
                pe   <= '0;
              end else begin
                pe <= pe + 1'b1;
              end
            end
            M_LAUNCH: mode <= M_IDLE;
            M_ACK:    mode <= M_IDLE;
            default: mode <= M_IDLE;
          endcase
        end
      end
    end
  end

  // AXI4-Lite: address and data stay stable while waiting for ready.
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.aw_valid && !m_rsp.aw_ready |=> m_req.aw_valid && $stable(m_req.aw_addr))
    else $error("launcher: AW changed before acceptance");
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.w_valid && !m_rsp.w_ready |=> m_req.w_valid && $stable(m_req.w_data))
    else $error("launcher: W changed before acceptance");
endmodule
