// Testbench for barrier_unit: a Barrier must wait while PEs are busy, complete
// in the first cycle all PEs are idle, pulse barrier_done one cycle later and
// raise irq_req only when its flag is set.
module tb_barrier_unit;
  logic clk = 0, rst_n = 0;
  logic barrier_valid = 0, barrier_irq_flag = 0, all_idle = 0;
  logic barrier_ready, barrier_done, irq_req, waiting;
  logic [31:0] barriers_done;
  int checks = 0, failures = 0;

  barrier_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_barrier(input logic flag, input int busy_cycles);
    int waited = 0;
    @(negedge clk);
    barrier_valid = 1; barrier_irq_flag = flag; all_idle = (busy_cycles == 0);
    for (int i = 0; i < busy_cycles; i++) begin
      @(negedge clk);
      check(!barrier_ready && waiting, "barrier must wait while PEs busy");
      check(!barrier_done, "no completion while busy");
      waited++;
      if (i == busy_cycles - 1) all_idle = 1;
    end
    #1 check(barrier_ready && !waiting, "barrier accepted once all idle");
    @(negedge clk);
    barrier_valid = 0;
    check(barrier_done, "barrier_done one cycle after acceptance");
    check(irq_req == flag, "irq_req follows flag");
    @(negedge clk);
    check(!barrier_done && !irq_req, "pulses last one cycle");
    check(waited == busy_cycles, "wait length");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_barrier(1'b0, 5);
    run_barrier(1'b1, 3);
    run_barrier(1'b1, 0);
    check(barriers_done == 3, "barrier count");
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
