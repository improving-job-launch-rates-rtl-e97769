// cascabel_pkg: types and constants shared by the Cascabel hardware job
// dispatcher, the AXI4-Lite interconnect and the processing elements (PEs).
//
// Queue entries are 512 bits wide and are either a Job or a Barrier. A Job
// carries a Kernel ID, a parameter count and up to four 64-bit parameters; a
// Barrier carries a flag asking for a host interrupt on completion. The entry
// width, the two entry kinds, the four 64-bit parameters and the barrier flag
// follow the published design. The bit positions below are this design's own:
//
//   bits [1:0]     entry type (0 = Job, 1 = Barrier)
//   bits [10:8]    number of parameters (0..4), Jobs only
//   bit  [15]      host interrupt request, Barriers only
//   bits [31:16]   Kernel ID, Jobs only
//   bits [63:32]   reserved, written as zero
//   bits [64*i+127 : 64*i+64]  parameter i+1, i = 0..3
//   bits [511:320] reserved
//
// The first 32-bit word of an entry is its header. The host writes the header
// last; that write commits the entry to the queue.
//
// PE register offsets follow the TaPaSCo/Vivado HLS register map (control,
// GIER, IER, ISR, return value, parameters every 0x10 bytes from 0x20).
// All AXI4-Lite buses are 32 bits wide with 32-bit addresses, carried as one
// request struct (manager to subordinate) and one response struct.
package cascabel_pkg;

  localparam int unsigned ENTRY_W      = 512;
  localparam int unsigned ENTRY_BYTES  = ENTRY_W / 8;    // 64 bytes
  localparam int unsigned MAX_PARAMS   = 4;
  localparam int unsigned PARAM_W      = 64;
  localparam int unsigned KERNEL_ID_W  = 16;
  localparam int unsigned NPARAM_W     = 3;

  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;

  typedef enum logic [1:0] {
    ENTRY_JOB     = 2'd0,
    ENTRY_BARRIER = 2'd1
  } entry_type_e;

  typedef logic [PARAM_W-1:0] param_t;

  // Decoded view of one queue entry.
  typedef struct packed {
    entry_type_e              etype;
    logic [KERNEL_ID_W-1:0]   kernel_id;
    logic [NPARAM_W-1:0]      num_params;
    logic                     barrier_irq;
    param_t [MAX_PARAMS-1:0]  params;     // params[0] is parameter #1
  } entry_t;

  function automatic entry_t decode_entry(input logic [ENTRY_W-1:0] raw);
    entry_t e;
    e.etype       = entry_type_e'(raw[1:0]);
    e.num_params  = raw[10:8];
    e.barrier_irq = raw[15];
    e.kernel_id   = raw[31:16];
    for (int i = 0; i < MAX_PARAMS; i++) e.params[i] = raw[64 + 64*i +: 64];
    return e;
  endfunction

  function automatic logic [ENTRY_W-1:0] encode_entry(input entry_t e);
    logic [ENTRY_W-1:0] raw;
    raw         = '0;
    raw[1:0]    = e.etype;
    raw[10:8]   = e.num_params;
    raw[15]     = e.barrier_irq;
    raw[31:16]  = e.kernel_id;
    for (int i = 0; i < MAX_PARAMS; i++) raw[64 + 64*i +: 64] = e.params[i];
    return raw;
  endfunction

  // PE register map (byte offsets inside one PE's control window).
  localparam logic [11:0] PE_REG_CTRL   = 12'h000;
  localparam logic [11:0] PE_REG_GIER   = 12'h004;
  localparam logic [11:0] PE_REG_IER    = 12'h008;
  localparam logic [11:0] PE_REG_ISR    = 12'h00C;
  localparam logic [11:0] PE_REG_RET    = 12'h010;
  localparam logic [11:0] PE_REG_PARAM0 = 12'h020;
  localparam int unsigned PE_PARAM_STRIDE = 'h10;

  // Byte size of one PE's control window in the architecture address space.
  localparam int unsigned PE_WINDOW_BITS  = 12;

  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_DECERR = 2'b11;

  typedef struct packed {
    logic              aw_valid;
    logic [AXI_AW-1:0] aw_addr;
    logic              w_valid;
    logic [AXI_DW-1:0] w_data;
    logic [3:0]        w_strb;
    logic              b_ready;
    logic              ar_valid;
    logic [AXI_AW-1:0] ar_addr;
    logic              r_ready;
  } axil_req_t;

  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    logic [1:0]        b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [AXI_DW-1:0] r_data;
    logic [1:0]        r_resp;
  } axil_rsp_t;

  // A job handed from the selector to the launcher.
  typedef struct packed {
    logic [NPARAM_W-1:0]      num_params;
    param_t [MAX_PARAMS-1:0]  params;
  } launch_args_t;

  // Gray code conversion for pointers that cross clock domains.
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
