// Testbench for job_queue with 8 slots, host clock 250 MHz and architecture
// clock 450 MHz. Checks: FREE count; reserve returns consecutive slots;
// entries written word by word come out bit-exact; a header written to a
// later slot waits until the earlier slot is committed (in-order hand-over);
// a header for an unreserved slot is ignored; a full queue refuses
// reservations with 0xFFFF_FFFF and accepts again after a dequeue; host
// read-back of slot memory; back-to-back committed entries stream out one per
// architecture cycle.
module tb_job_queue;
  import cascabel_pkg::*;
  localparam int DEPTH = 8;
  localparam logic [31:0] REG = DEPTH * 64;

  logic host_clk = 0, host_rst_n = 0, arch_clk = 0, arch_rst_n = 0;
  axil_req_t host_req = '0;
  axil_rsp_t host_rsp;
  logic deq_valid, deq_ready = 0;
  logic [ENTRY_W-1:0] deq_entry;
  int checks = 0, failures = 0;

  job_queue #(.DEPTH(DEPTH)) dut (.*);

  always #2 host_clk = ~host_clk;
  always #1.111 arch_clk = ~arch_clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge host_clk);
    host_req.aw_valid = 1; host_req.aw_addr = a; host_req.w_valid = 1; host_req.w_data = d;
    host_req.w_strb = 4'hF; host_req.b_ready = 1;
    do @(posedge host_clk); while (!(host_rsp.aw_ready && host_rsp.w_ready));
    @(negedge host_clk);
    host_req.aw_valid = 0; host_req.w_valid = 0;
    while (!host_rsp.b_valid) @(negedge host_clk);
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge host_clk);
    host_req.ar_valid = 1; host_req.ar_addr = a; host_req.r_ready = 1;
    do @(posedge host_clk); while (!host_rsp.ar_ready);
    @(negedge host_clk);
    host_req.ar_valid = 0;
    while (!host_rsp.r_valid) @(negedge host_clk);
    d = host_rsp.r_data;
  endtask

  function automatic logic [ENTRY_W-1:0] make_entry(input int seed);
    logic [ENTRY_W-1:0] e;
    for (int w = 0; w < 16; w++) e[32*w +: 32] = 32'(seed) * 32'h0101_0101 + 32'(w);
    e[1:0] = 2'(seed % 2);
    return e;
  endfunction

  // Write all words of an entry, header (word 0) only if `commit`.
  task automatic write_entry(input int slot, input logic [ENTRY_W-1:0] e, input bit commit);
    for (int w = 1; w < 16; w++) wr(32'(slot) * 64 + 32'(w) * 4, e[32*w +: 32]);
    if (commit) wr(32'(slot) * 64, e[31:0]);
  endtask

  // Expected entries in order; the consumer compares every dequeued entry.
  logic [ENTRY_W-1:0] expq[$];
  int deq_count = 0, burst = 0, max_burst = 0;
  always @(posedge arch_clk) begin
    if (deq_valid && deq_ready) begin
      deq_count++;
      burst++;
      if (burst > max_burst) max_burst = burst;
      if (expq.size() == 0) begin checks++; failures++; $display("FAIL: unexpected entry"); end
      else check(deq_entry == expq.pop_front(), "entry bit-exact and in order");
    end else begin
      burst = 0;
    end
  end

  logic [31:0] d, s1, s2;
  int got;
  initial begin
    repeat (3) @(posedge host_clk);
    host_rst_n = 1; arch_rst_n = 1;
    rd(REG + 32'hC, d); check(d == DEPTH, "FREE after reset");
    deq_ready = 1;
    // One entry.
    rd(REG, d); check(d == 0, "first reservation is slot 0");
    expq.push_back(make_entry(1));
    write_entry(0, make_entry(1), 1);
    repeat (20) @(posedge arch_clk);
    check(deq_count == 1 && expq.size() == 0, "entry delivered");
    // Out-of-order commit.
    rd(REG, s1); rd(REG, s2);
    check(s1 == 1 && s2 == 2, "consecutive reservations");
    expq.push_back(make_entry(2)); expq.push_back(make_entry(3));
    write_entry(2, make_entry(3), 1);
    repeat (20) @(posedge arch_clk);
    check(deq_count == 1, "later slot waits for earlier one");
    write_entry(1, make_entry(2), 1);
    repeat (20) @(posedge arch_clk);
    check(deq_count == 3 && expq.size() == 0, "both delivered in slot order");
    // Header to an unreserved slot is ignored.
    wr(32'(5) * 64, 32'h1);
    repeat (20) @(posedge arch_clk);
    check(deq_count == 3, "unreserved slot not committed");
    // Read-back of slot memory.
    rd(32'(1) * 64 + 32'(7) * 4, d); check(d == make_entry(2)[32*7 +: 32], "slot read-back");
    // Fill the queue with the dispatcher stopped.
    deq_ready = 0;
    got = 0;
    for (int i = 0; i < DEPTH + 3; i++) begin
      rd(REG, d);
      if (d != 32'hFFFF_FFFF) begin
        got++;
        expq.push_back(make_entry(10 + i));
        write_entry(int'(d), make_entry(10 + i), 1);
      end
    end
    // DEPTH slots plus the entry already moved to the output register.
    check(got == DEPTH + 1, $sformatf("queue takes DEPTH + 1 entries, took %0d", got));
    rd(REG + 32'hC, d); check(d == 0, "FREE is 0 when full");
    rd(REG, d); check(d == 32'hFFFF_FFFF, "full queue refuses reservation");
    // Drain all: the entries stream back to back.
    repeat (10) @(posedge arch_clk);
    @(negedge arch_clk); deq_ready = 1;
    repeat (40) @(posedge arch_clk);
    check(deq_count == 4 + DEPTH && expq.size() == 0, "all delivered after fill");
    check(max_burst >= DEPTH, $sformatf("one entry per cycle when backed up, burst %0d", max_burst));
    repeat (10) @(posedge host_clk);
    rd(REG + 32'hC, d); check(d == DEPTH, "FREE back to DEPTH");
    rd(REG + 32'h8, d); check(d == 4 + DEPTH, "RPTR counts dequeues");
    rd(REG, d); check(d == (4 + DEPTH) % DEPTH, "reservation continues after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge arch_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
