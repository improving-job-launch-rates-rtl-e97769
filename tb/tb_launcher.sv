// Testbench for launcher. A subordinate model in the testbench accepts
// address and data after independent random delays (phase 1) or at once
// (phase 2) and logs every write. Checks: the reset-time GIER/IER set-up of
// every PE; the exact write sequence of a launch (parameter words low then
// high, control last) at the PE's address window; that an acknowledge
// request wins over a waiting launch and produces one ISR write and one
// ack_done naming the PE; and, with the zero-delay subordinate, that a job
// with n parameters takes 3 * (2n + 1) cycles from acceptance to `launched`.
module tb_launcher;
  import cascabel_pkg::*;
  localparam int NUM_PES = 4, PW = 2;
  localparam logic [31:0] BASE = 32'h0001_0000;

  logic clk = 0, rst_n = 0;
  logic launch_valid = 0, launch_ready;
  logic [PW-1:0] launch_pe = '0;
  launch_args_t launch_args = '0;
  logic ack_valid = 0, ack_done;
  logic [PW-1:0] ack_pe = '0, ack_done_pe;
  axil_req_t m_req;
  axil_rsp_t m_rsp;
  logic init_done, busy, launched;
  int checks = 0, failures = 0;

  launcher #(.NUM_PES(NUM_PES), .PW(PW), .PE_BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Subordinate model.
  bit random_delays = 1;
  logic [31:0] log_addr[$], log_data[$];
  logic aw_got = 0, w_got = 0;
  logic [31:0] aw_a, w_d;
  always_comb begin
    m_rsp = '0;
    m_rsp.aw_ready = m_req.aw_valid && !aw_got && (!random_delays || aw_en);
    m_rsp.w_ready  = m_req.w_valid && !w_got && (!random_delays || w_en);
    m_rsp.b_valid  = b_pend;
  end
  logic b_pend = 0, aw_en = 0, w_en = 0;
  always_ff @(posedge clk) begin
    aw_en <= ($urandom_range(0, 2) == 0);
    w_en  <= ($urandom_range(0, 2) == 0);
    if (rst_n) begin
    if (m_req.aw_valid && m_rsp.aw_ready) begin aw_got <= 1; aw_a <= m_req.aw_addr; end
    if (m_req.w_valid && m_rsp.w_ready)   begin w_got <= 1; w_d <= m_req.w_data; end
    if (b_pend && m_req.b_ready) b_pend <= 0;
    if ((aw_got || (m_req.aw_valid && m_rsp.aw_ready)) && (w_got || (m_req.w_valid && m_rsp.w_ready)) && !b_pend) begin
      log_addr.push_back(aw_got ? aw_a : m_req.aw_addr);
      log_data.push_back(w_got ? w_d : m_req.w_data);
      aw_got <= 0; w_got <= 0; b_pend <= 1;
    end
    end
  end

  int launched_n = 0, acked_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (launched) launched_n++;
    if (ack_done) acked_n++;
  end

  task automatic expect_write(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] ga, gd;
    if (log_addr.size() == 0) begin
      checks++; failures++; $display("FAIL: missing write %h=%h", a, d); return;
    end
    ga = log_addr.pop_front(); gd = log_data.pop_front();
    check(ga == a && gd == d, $sformatf("write %h=%h, got %h=%h", a, d, ga, gd));
  endtask

  task automatic do_launch(input int pe, input int n, output int cycles);
    @(negedge clk);
    launch_valid = 1; launch_pe = PW'(pe);
    launch_args = '0; launch_args.num_params = 3'(n);
    for (int i = 0; i < 4; i++) launch_args.params[i] = {32'(pe * 16 + i), 32'hC0DE_0000 + 32'(i)};
    while (!launch_ready) @(negedge clk);
    @(negedge clk);
    launch_valid = 0;
    cycles = 1;
    while (!launched) begin @(negedge clk); cycles++; end
    @(negedge clk);
  endtask

  task automatic expect_launch(input int pe, input int n);
    logic [31:0] w = BASE + 32'(pe) * 32'h1000;
    for (int i = 0; i < n; i++) begin
      expect_write(w + 32'h20 + 32'(i) * 32'h10, 32'hC0DE_0000 + 32'(i));
      expect_write(w + 32'h24 + 32'(i) * 32'h10, 32'(pe * 16 + i));
    end
    expect_write(w, 32'h1);
  endtask

  int cyc;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    for (int p = 0; p < NUM_PES; p++) begin
      expect_write(BASE + 32'(p) * 32'h1000 + 32'h4, 32'h1);
      expect_write(BASE + 32'(p) * 32'h1000 + 32'h8, 32'h1);
    end
    check(log_addr.size() == 0, "only set-up writes after reset");
    do_launch(2, 3, cyc); expect_launch(2, 3);
    do_launch(1, 0, cyc); expect_launch(1, 0);
    do_launch(3, 4, cyc); expect_launch(3, 4);
    do_launch(0, 7, cyc); expect_launch(0, 4);   // count above 4 is clamped
    check(launched_n == 4, "one launched strobe per job");
    // Acknowledge wins over a waiting launch.
    @(negedge clk);
    ack_valid = 1; ack_pe = 2'd3; launch_valid = 1; launch_pe = 2'd1;
    launch_args = '0; launch_args.num_params = 3'd1;
    launch_args.params[0] = {32'd16, 32'hC0DE_0000};
    while (!ack_done) @(negedge clk);
    check(ack_done_pe == 2'd3, "ack_done names the PE");
    ack_valid = 0;
    while (!launch_ready) @(negedge clk);
    @(negedge clk); launch_valid = 0;
    while (!launched) @(negedge clk);
    @(negedge clk);
    expect_write(BASE + 32'h3000 + 32'hC, 32'h1);
    expect_launch(1, 1);
    check(acked_n == 1, "one ack_done");
    // Cycle counts with a zero-delay subordinate.
    random_delays = 0;
    for (int n = 0; n <= 4; n++) begin
      do_launch(n % NUM_PES, n, cyc);
      check(cyc == 3 * (2 * n + 1), $sformatf("%0d params: %0d cycles, expected %0d", n, cyc, 3 * (2 * n + 1)));
      expect_launch(n % NUM_PES, n);
    end
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
