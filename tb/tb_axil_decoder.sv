// Testbench for axil_decoder with 4 subordinates of 4 KiB at 0x4000_0000.
// Each subordinate is a small register-file model in the testbench that
// accepts after random delays and tags its read data with its own index.
// Checks: writes land only in the addressed subordinate; reads return the
// addressed subordinate's data; out-of-window accesses get DECERR and touch
// nothing; reads and writes overlap.
module tb_axil_decoder;
  import cascabel_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  axil_req_t m_req = '0;
  axil_rsp_t m_rsp;
  axil_req_t s_req [N];
  axil_rsp_t s_rsp [N];
  int checks = 0, failures = 0;

  axil_decoder #(.NUM_SUB(N), .WINDOW_BITS(12), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Subordinate models: 16 registers each, random ready delays.
  logic [31:0] regs [N][16];
  int writes_seen [N];
  for (genvar i = 0; i < N; i++) begin : g_sub
    logic aw_got = 0, w_got = 0, b_pend = 0, r_pend = 0, en = 0;
    logic [31:0] a_q, d_q, r_q;
    always_comb begin
      s_rsp[i] = '0;
      s_rsp[i].aw_ready = s_req[i].aw_valid && !aw_got && !b_pend && en;
      s_rsp[i].w_ready  = s_req[i].w_valid && !w_got && !b_pend && en;
      s_rsp[i].b_valid  = b_pend;
      s_rsp[i].ar_ready = s_req[i].ar_valid && !r_pend && en;
      s_rsp[i].r_valid  = r_pend;
      s_rsp[i].r_data   = r_q;
    end
    always_ff @(posedge clk) begin
      logic [31:0] a, d;
      en <= ($urandom_range(0, 1) == 0);
      if (rst_n) begin
      if (s_req[i].aw_valid && s_rsp[i].aw_ready) begin aw_got <= 1; a_q <= s_req[i].aw_addr; end
      if (s_req[i].w_valid && s_rsp[i].w_ready)   begin w_got <= 1; d_q <= s_req[i].w_data; end
      a = aw_got ? a_q : s_req[i].aw_addr;
      d = w_got ? d_q : s_req[i].w_data;
      if ((aw_got || (s_req[i].aw_valid && s_rsp[i].aw_ready)) &&
          (w_got || (s_req[i].w_valid && s_rsp[i].w_ready)) && !b_pend) begin
        regs[i][a[5:2]] <= d;
        writes_seen[i]++;
        aw_got <= 0; w_got <= 0; b_pend <= 1;
      end
      if (b_pend && s_req[i].b_ready) b_pend <= 0;
      if (s_req[i].ar_valid && s_rsp[i].ar_ready) begin
        r_pend <= 1;
        r_q <= {8'(i), 24'(regs[i][s_req[i].ar_addr[5:2]])};
      end
      if (r_pend && s_req[i].r_ready) r_pend <= 0;
      end
    end
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    m_req.aw_valid = 1; m_req.aw_addr = a; m_req.w_valid = 1; m_req.w_data = d; m_req.w_strb = 4'hF;
    m_req.b_ready = 1;
    fork
      begin do @(posedge clk); while (!m_rsp.aw_ready); #1 m_req.aw_valid = 0; end
      begin do @(posedge clk); while (!m_rsp.w_ready);  #1 m_req.w_valid = 0; end
    join
    while (!m_rsp.b_valid) @(negedge clk);
    resp = m_rsp.b_resp;
    @(negedge clk);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    m_req.ar_valid = 1; m_req.ar_addr = a; m_req.r_ready = 1;
    do @(posedge clk); while (!m_rsp.ar_ready);
    #1 m_req.ar_valid = 0;
    while (!m_rsp.r_valid) @(negedge clk);
    d = m_rsp.r_data; resp = m_rsp.r_resp;
    @(negedge clk);
  endtask

  logic [31:0] d; logic [1:0] resp, resp2;
  int n_before [N];
  initial begin
    for (int i = 0; i < N; i++) begin
      writes_seen[i] = 0;
      for (int r = 0; r < 16; r++) regs[i][r] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int r = 0; r < 4; r++) begin
        wr(BASE + 32'(i) * 32'h1000 + 32'(r) * 4, 32'(i * 100 + r), resp);
        check(resp == AXI_RESP_OKAY, "write OKAY");
      end
    for (int i = 0; i < N; i++) check(writes_seen[i] == 4, $sformatf("sub %0d got its 4 writes", i));
    for (int i = N - 1; i >= 0; i--)
      for (int r = 0; r < 4; r++) begin
        rd(BASE + 32'(i) * 32'h1000 + 32'(r) * 4, d, resp);
        check(resp == AXI_RESP_OKAY && d == {8'(i), 24'(i * 100 + r)},
              $sformatf("read sub %0d reg %0d: %h", i, r, d));
      end
    for (int i = 0; i < N; i++) n_before[i] = writes_seen[i];
    wr(BASE + 32'(N) * 32'h1000, 32'hDEAD, resp);
    check(resp == AXI_RESP_DECERR, "write above windows: DECERR");
    wr(BASE - 4, 32'hDEAD, resp);
    check(resp == AXI_RESP_DECERR, "write below base: DECERR");
    rd(BASE + 32'h0010_0000, d, resp);
    check(resp == AXI_RESP_DECERR && d == 0, "read outside: DECERR");
    for (int i = 0; i < N; i++) check(writes_seen[i] == n_before[i], "DECERR touches nothing");
    // Overlapping read and write to different subordinates.
    fork
      wr(BASE + 32'h3000 + 32'h8, 32'h77, resp);
      rd(BASE + 32'h1000 + 32'h4, d, resp2);
    join
    check(resp == AXI_RESP_OKAY && resp2 == AXI_RESP_OKAY && d == {8'd1, 24'd101}, "overlapped access");
    rd(BASE + 32'h3000 + 32'h8, d, resp);
    check(d == {8'd3, 24'h77}, "overlapped write landed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
