// Testbench for irq_ctrl: PE interrupt edges must become acknowledge
// requests, lowest PE first; an acknowledge must release exactly that PE in
// the same cycle; a level interrupt that stays high must not be requested
// twice; a barrier interrupt must reach the host clock domain as exactly one
// host_irq pulse, within a bounded number of host cycles.
module tb_irq_ctrl;
  localparam int NUM_PES = 8, PW = 3;

  logic clk = 0, rst_n = 0, host_clk = 0, host_rst_n = 0;
  logic [NUM_PES-1:0] pe_irq = '0;
  logic ack_valid, ack_done = 0;
  logic [PW-1:0] ack_pe, ack_done_pe = '0;
  logic release_valid;
  logic [PW-1:0] release_pe;
  logic barrier_irq = 0, host_irq;
  int checks = 0, failures = 0, host_pulses = 0;

  irq_ctrl #(.NUM_PES(NUM_PES), .PW(PW)) dut (.*);

  always #2.222 clk = ~clk;     // architecture clock, 225 MHz here
  always #4 host_clk = ~host_clk; // host clock, 125 MHz here
  always @(posedge host_clk) if (host_rst_n && host_irq) host_pulses++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ack(input int pe);
    @(negedge clk);
    ack_done = 1; ack_done_pe = PW'(pe);
    #0.1 check(release_valid && release_pe == PW'(pe), $sformatf("release of PE %0d", pe));
    @(negedge clk);
    ack_done = 0;
    pe_irq[pe] = 0;  // the acknowledge clears the PE's level interrupt
  endtask

  initial begin
    repeat (3) @(posedge host_clk);
    rst_n = 1; host_rst_n = 1;
    @(negedge clk);
    check(!ack_valid, "no request after reset");
    pe_irq[5] = 1; pe_irq[2] = 1;
    @(negedge clk); @(negedge clk);
    check(ack_valid && ack_pe == 2, "lowest pending PE first");
    ack(2);
    @(negedge clk);
    check(ack_valid && ack_pe == 5, "then PE 5");
    pe_irq[0] = 1;  // arrives while PE 5 waits
    @(negedge clk); @(negedge clk);
    check(ack_valid && ack_pe == 0, "new lower PE overtakes");
    ack(5);         // the launcher had already taken PE 5
    @(negedge clk);
    check(ack_valid && ack_pe == 0, "PE 0 still pending");
    ack(0);
    @(negedge clk); @(negedge clk);
    check(!ack_valid, "nothing pending");
    // A level that stays high is requested once only.
    pe_irq[7] = 1;
    @(negedge clk); @(negedge clk);
    ack_done = 1; ack_done_pe = 3'd7;
    @(negedge clk); ack_done = 0;
    repeat (4) @(negedge clk);
    check(!ack_valid, "held level not requested twice");
    pe_irq[7] = 0;
    // Barrier interrupt crossing.
    @(negedge clk); barrier_irq = 1; @(negedge clk); barrier_irq = 0;
    repeat (6) @(posedge host_clk);
    check(host_pulses == 1, $sformatf("one host pulse, got %0d", host_pulses));
    repeat (10) @(negedge clk);
    @(negedge clk); barrier_irq = 1; @(negedge clk); barrier_irq = 0;
    repeat (6) @(posedge host_clk);
    check(host_pulses == 2, $sformatf("second host pulse, got %0d", host_pulses));
    repeat (10) @(posedge host_clk);
    check(host_pulses == 2, "no spurious host pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
