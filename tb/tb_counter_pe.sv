// Testbench for counter_pe: register read-back at the standard offsets,
// start with parameter #1 = N, busy for exactly max(1, N) cycles, interrupt
// only when GIER and IER enable it, ISR toggle-on-write acknowledge, done bit
// cleared by reading control, return value = N.
module tb_counter_pe;
  import cascabel_pkg::*;

  logic clk = 0, rst_n = 0;
  axil_req_t s_req = '0;
  axil_rsp_t s_rsp;
  logic irq, busy;
  int checks = 0, failures = 0;

  counter_pe dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    s_req.aw_valid = 1; s_req.aw_addr = a; s_req.w_valid = 1; s_req.w_data = d; s_req.w_strb = 4'hF;
    s_req.b_ready = 1;
    do @(posedge clk); while (!(s_rsp.aw_ready && s_rsp.w_ready));
    @(negedge clk);
    s_req.aw_valid = 0; s_req.w_valid = 0;
    while (!s_rsp.b_valid) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req.ar_valid = 1; s_req.ar_addr = a; s_req.r_ready = 1;
    do @(posedge clk); while (!s_rsp.ar_ready);
    @(negedge clk);
    s_req.ar_valid = 0;
    while (!s_rsp.r_valid) @(negedge clk);
    d = s_rsp.r_data;
    @(negedge clk);
  endtask

  // Start a count of n cycles and measure how long busy stays high.
  task automatic run(input int n, output int busy_cycles);
    wr(32'h20, 32'(n));
    wr(32'h24, 32'h0);
    @(negedge clk);
    s_req.aw_valid = 1; s_req.aw_addr = 32'h0; s_req.w_valid = 1; s_req.w_data = 32'h1; s_req.w_strb = 4'hF;
    @(posedge clk); #1;
    s_req.aw_valid = 0; s_req.w_valid = 0;
    busy_cycles = 0;
    while (busy) begin @(posedge clk); #1; busy_cycles++; end
  endtask

  logic [31:0] d;
  int bc;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Register read-back.
    for (int i = 0; i < 4; i++) begin
      wr(32'h20 + 32'(i) * 32'h10, 32'h1000 + 32'(i));
      wr(32'h24 + 32'(i) * 32'h10, 32'h2000 + 32'(i));
    end
    for (int i = 0; i < 4; i++) begin
      rd(32'h20 + 32'(i) * 32'h10, d); check(d == 32'h1000 + 32'(i), $sformatf("param %0d low", i));
      rd(32'h24 + 32'(i) * 32'h10, d); check(d == 32'h2000 + 32'(i), $sformatf("param %0d high", i));
    end
    rd(32'h0, d); check(d[2] && !d[0], "idle after reset");
    // Interrupts disabled: done but no irq.
    run(5, bc);
    check(bc == 5, $sformatf("5-cycle count, busy %0d", bc));
    repeat (2) @(negedge clk);
    check(!irq, "no irq while disabled");
    rd(32'h0, d); check(d[1], "done bit set");
    rd(32'h0, d); check(!d[1], "done bit cleared by read");
    rd(32'h10, d); check(d == 32'd5, "return value");
    // Enable interrupts as the dispatcher does.
    wr(32'h4, 32'h1); wr(32'h8, 32'h1);
    rd(32'h4, d); check(d == 32'h1, "GIER read-back");
    rd(32'h8, d); check(d == 32'h1, "IER read-back");
    run(1, bc);
    check(bc == 1, $sformatf("1-cycle count, busy %0d", bc));
    @(negedge clk);
    check(irq, "irq after done");
    rd(32'hC, d); check(d == 32'h1, "ISR done bit");
    wr(32'hC, 32'h1);
    check(!irq, "irq cleared by ISR write");
    run(37, bc);
    check(bc == 37, $sformatf("37-cycle count, busy %0d", bc));
    @(negedge clk);
    check(irq, "irq after second job");
    wr(32'hC, 32'h1);
    // Zero cycles still runs one cycle.
    run(0, bc);
    check(bc == 1, "zero count runs one cycle");
    @(negedge clk);
    wr(32'h4, 32'h0);
    check(!irq, "GIER masks irq");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
