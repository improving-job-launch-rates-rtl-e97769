// Runs tapasco_cascabel_soc in the compositions of the published resource
// study, side by side, each through a complete run (see soc_config_run):
//   - 32 PEs of 16 kernel types, two PEs per kernel (largest number of
//     kernel types at 32 PEs);
//   - 32 PEs of four kernel types, eight PEs per kernel (largest number of
//     PEs with four kernel types);
//   - 10 PEs of four kernel types with 3, 3, 2 and 2 PEs, the layout of
//     the idle-PE FIFOs shown for that study;
//   - 24 PEs of three kernel types, eight PEs per kernel, the composition
//     of the published three-kernel pipeline measurement.
// Each run enqueues four Jobs per kernel (eight for the 8-PE kernels, so
// that every PE runs one) and an interrupting Barrier.
// Passes when every run's checks pass before the watchdog.
module tb_soc_configs;
  function automatic logic [31:0][7:0] blocks(input int per_kernel);
    for (int p = 0; p < 32; p++) blocks[p] = 8'(p / per_kernel);
  endfunction
  localparam logic [31:0][7:0] PEK_32_16 = blocks(2);
  localparam logic [31:0][7:0] PEK_32_4  = blocks(8);
  localparam logic [23:0][7:0] PEK_24_3  = blocks(8);
  localparam logic [9:0][7:0]  PEK_10_4  = {8'd3, 8'd3, 8'd2, 8'd2, 8'd1, 8'd1, 8'd1,
                                            8'd0, 8'd0, 8'd0};

  logic done_a, done_b, done_c, done_d;
  int checks_a, checks_b, checks_c, checks_d, fail_a, fail_b, fail_c, fail_d;

  soc_config_run #(.NUM_PES(32), .NUM_KERNELS(16), .PEK(PEK_32_16), .NAME("32 PEs / 16 kernels"))
    u_a (.done(done_a), .checks(checks_a), .failures(fail_a));
  soc_config_run #(.NUM_PES(32), .NUM_KERNELS(4), .PEK(PEK_32_4), .ROUNDS(8), .NAME("32 PEs / 4 kernels"))
    u_b (.done(done_b), .checks(checks_b), .failures(fail_b));
  soc_config_run #(.NUM_PES(10), .NUM_KERNELS(4), .PEK(PEK_10_4), .NAME("10 PEs / 4 kernels"))
    u_c (.done(done_c), .checks(checks_c), .failures(fail_c));
  soc_config_run #(.NUM_PES(24), .NUM_KERNELS(3), .PEK(PEK_24_3), .ROUNDS(8), .NAME("24 PEs / 3 kernels"))
    u_d (.done(done_d), .checks(checks_d), .failures(fail_d));

  initial begin
    wait (done_a && done_b && done_c && done_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c + checks_d,
             fail_a + fail_b + fail_c + fail_d);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c + checks_d,
             fail_a + fail_b + fail_c + fail_d + 1);
    $finish;
  end
endmodule
