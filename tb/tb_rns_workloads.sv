// tb_rns_workloads: runs the comparator pair at each evaluated word width,
// N = 8, 16, 32 and 64 (moduli 2^N-1, 2^N, 2^N+1), with random operand pairs
// and binary reference values computed in 256-bit arithmetic.
module tb_rns_workloads;
  int checks = 0, failures = 0;

  logic done8, done16, done32, done64;
  int   c8, f8, c16, f16, c32, f32, c64, f64;

  rns_cmp_checker #(.N(8),  .ITER(20000)) u8  (.done(done8),  .checks(c8),  .failures(f8));
  rns_cmp_checker #(.N(16), .ITER(20000)) u16 (.done(done16), .checks(c16), .failures(f16));
  rns_cmp_checker #(.N(32), .ITER(20000)) u32 (.done(done32), .checks(c32), .failures(f32));
  rns_cmp_checker #(.N(64), .ITER(20000)) u64 (.done(done64), .checks(c64), .failures(f64));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done8 && done16 && done32 && done64);
    checks   = c8 + c16 + c32 + c64;
    failures = failures + f8 + f16 + f32 + f64;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
