// Testbench for idle_pe_fifo: checks the reset contents (all PEs of the
// kernel, lowest first), first-word fall-through pops, pushes after pops,
// simultaneous push and pop, wrap-around and the empty/full flags, against a
// queue model kept in the testbench.
module tb_idle_pe_fifo;
  localparam int W = 4, DEPTH = 5;
  localparam logic [DEPTH*W-1:0] INIT = {4'd9, 4'd7, 4'd5, 4'd3, 4'd1};

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] push_data = '0, pop_data;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  idle_pe_fifo #(.W(W), .DEPTH(DEPTH), .INIT_COUNT(DEPTH), .INIT_VALS(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic do_push, input logic [W-1:0] d, input logic do_pop);
    @(negedge clk);
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(pop_data == model[0], $sformatf("head %0d vs %0d", pop_data, model[0]));
    push = do_push; push_data = d; pop = do_pop;
    @(posedge clk); #1;
    if (do_pop) void'(model.pop_front());
    if (do_push) model.push_back(d);
    push = 0; pop = 0;
  endtask

  initial begin
    model = '{4'd1, 4'd3, 4'd5, 4'd7, 4'd9};
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(0, 0, 1); step(0, 0, 1);          // take two PEs
    step(1, 4'd3, 0);                      // one comes back
    step(1, 4'd1, 1);                      // push and pop together
    for (int i = 0; i < 4; i++) step(0, 0, 1);  // drain
    step(0, 0, 0);
    check(empty, "empty after drain");
    for (int i = 0; i < DEPTH; i++) step(1, W'(i + 10), 0); // refill, wraps
    step(0, 0, 0);
    check(full, "full after refill");
    for (int i = 0; i < 3; i++) step(1, W'(i), 1);
    for (int i = 0; i < DEPTH; i++) step(0, 0, 1);
    step(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
