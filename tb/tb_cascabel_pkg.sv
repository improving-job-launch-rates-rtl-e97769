// Testbench for cascabel_pkg: checks the queue entry layout, the entry
// encode/decode functions, the Gray-code functions used for the pointer
// clock crossing, and the PE register offsets.
//
// Entries: random Jobs and Barriers are encoded and every field is checked
// at its documented bit position (type [1:0], parameter count [10:8],
// interrupt flag [15], Kernel ID [31:16], parameter i at 64+64*i), with the
// reserved bits zero; decoding the raw word must give the entry back, and
// decoding random raw words must pick the same bit positions.
// Gray code: bin2gray(b) = b ^ (b >> 1), gray2bin inverts it, and
// consecutive values differ in exactly one bit, across wrap-around too.
// Register offsets: control 0x00, GIER 0x04, IER 0x08, ISR 0x0C, return
// 0x10, parameter #1 at 0x20 and a 0x10 stride.
module tb_cascabel_pkg;
  import cascabel_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  entry_t e, d;
  logic [ENTRY_W-1:0] raw;
  logic [31:0] b, g, g_next;
  bit ok;

  initial begin
    check($bits(entry_t) == 2 + 16 + 3 + 1 + 4 * 64, "entry_t width");
    check(ENTRY_W == 512 && ENTRY_BYTES == 64, "entry size 512 bit / 64 byte");

    for (int n = 0; n < 200; n++) begin
      e.etype       = ($urandom_range(0, 1) == 0) ? ENTRY_JOB : ENTRY_BARRIER;
      e.kernel_id   = 16'($urandom());
      e.num_params  = 3'($urandom_range(0, 4));
      e.barrier_irq = 1'($urandom());
      for (int i = 0; i < MAX_PARAMS; i++) e.params[i] = rnd64();
      raw = encode_entry(e);
      ok = (raw[1:0] == 2'(e.etype)) && (raw[10:8] == e.num_params) &&
           (raw[15] == e.barrier_irq) && (raw[31:16] == e.kernel_id) &&
           (raw[7:2] == '0) && (raw[14:11] == '0) && (raw[63:32] == '0) &&
           (raw[511:320] == '0);
      for (int i = 0; i < MAX_PARAMS; i++) ok &= (raw[64 + 64 * i +: 64] == e.params[i]);
      check(ok, $sformatf("encode_entry field positions (entry %0d)", n));
      d = decode_entry(raw);
      check(d == e, $sformatf("decode_entry(encode_entry(e)) == e (entry %0d)", n));
    end

    for (int n = 0; n < 50; n++) begin
      for (int w = 0; w < ENTRY_W / 32; w++) raw[32 * w +: 32] = $urandom();
      d = decode_entry(raw);
      ok = (2'(d.etype) == raw[1:0]) && (d.num_params == raw[10:8]) &&
           (d.barrier_irq == raw[15]) && (d.kernel_id == raw[31:16]) &&
           (d.params[0] == raw[127:64]) && (d.params[3] == raw[319:256]);
      check(ok, $sformatf("decode_entry of a raw word (%0d)", n));
    end

    for (int n = 0; n < 300; n++) begin
      b = (n < 100) ? 32'(n) : $urandom();
      g = bin2gray(b);
      check(g == (b ^ (b >> 1)), "bin2gray");
      check(gray2bin(g) == b, "gray2bin inverts bin2gray");
      g_next = bin2gray(b + 1);
      check($countones(g ^ g_next) == 1, "consecutive Gray codes differ in one bit");
    end
    // Wrap-around of a 10-bit pointer (512-slot queue plus wrap bit).
    check($countones(10'(bin2gray(32'd1023)) ^ 10'(bin2gray(32'd0))) == 1,
          "10-bit Gray pointer wraps with one bit change");

    check(PE_REG_CTRL == 12'h000 && PE_REG_GIER == 12'h004 && PE_REG_IER == 12'h008 &&
          PE_REG_ISR == 12'h00C && PE_REG_RET == 12'h010, "PE control register offsets");
    check(PE_REG_PARAM0 == 12'h020 && PE_PARAM_STRIDE == 'h10, "PE parameter offsets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
