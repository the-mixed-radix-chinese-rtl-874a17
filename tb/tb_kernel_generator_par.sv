// tb_kernel_generator_par: self-checking test of kernel_generator_par, the
// A_X / B_X generator with parallel structure.
//
// The reference kernel is obtained directly from the binary value X, with no
// use of the design's formulas: since X = (2^N+1)*(2^N*A_X + B_X) + x1 with
// x1 = X mod 2^N+1, A_X = floor(X / (2^N*(2^N+1))) and
// B_X = floor(X / (2^N+1)) mod 2^N. N = 4 is run for every X in [0, M); N = 8
// and N = 16 for random X plus the corners (X = 0, M-1, x1 = 2^N). The counts
// of the three cases of the A_X formula (Z, Z-1, Z') are checked to be
// non-zero.
module tb_kernel_generator_par;
  int checks = 0, failures = 0;
  int n_z = 0, n_zm1 = 0, n_zp = 0;

  logic [4:0]  x1_4;  logic [3:0]  x2_4, x3_4, a_4, b_4;
  logic [8:0]  x1_8;  logic [7:0]  x2_8, x3_8, a_8, b_8;
  logic [16:0] x1_16; logic [15:0] x2_16, x3_16, a_16, b_16;

  kernel_generator_par #(.N(4))  dut4  (.x1(x1_4),  .x2(x2_4),  .x3(x3_4),  .a_x(a_4),  .b_x(b_4));
  kernel_generator_par #(.N(8))  dut8  (.x1(x1_8),  .x2(x2_8),  .x3(x3_8),  .a_x(a_8),  .b_x(b_8));
  kernel_generator_par #(.N(16)) dut16 (.x1(x1_16), .x2(x2_16), .x3(x3_16), .a_x(a_16), .b_x(b_16));

  function automatic longint unsigned modulus(int n);
    return ((64'd1 << n) - 1) * (64'd1 << n) * ((64'd1 << n) + 1);
  endfunction

  // checks one kernel result against the reference for value xv at width n
  task automatic check(int n, longint unsigned xv, longint unsigned a, longint unsigned b,
                       longint unsigned x1v, longint unsigned x2v);
    longint unsigned p1 = (64'd1 << n) + 1;
    longint unsigned p2 = 64'd1 << n;
    longint unsigned ea = xv / (p2 * p1);
    longint unsigned eb = (xv / p1) % p2;
    checks++;
    if (a != ea || b != eb) begin
      failures++;
      if (failures < 10) $display("N=%0d X=%0d A=%0d/%0d B=%0d/%0d", n, xv, a, ea, b, eb);
    end
    if (x1v == p2) n_zp++;
    else if (x2v < x1v) n_zm1++;
    else n_z++;
  endtask

  function automatic longint unsigned rnd64();
    return {32'($urandom), 32'($urandom)};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned xv;
    // N = 4: every value of the dynamic range
    for (longint unsigned v = 0; v < modulus(4); v++) begin
      x1_4 = 5'(v % 17); x2_4 = 4'(v % 16); x3_4 = 4'(v % 15);
      #1;
      check(4, v, 64'(a_4), 64'(b_4), 64'(x1_4), 64'(x2_4));
    end
    // N = 8 and N = 16: corners and random values
    for (int i = 0; i < 40000; i++) begin
      case (i)
        0: xv = 0;
        1: xv = modulus(8) - 1;
        2: xv = 256;                       // x1 = 2^N
        default: xv = rnd64() % modulus(8);
      endcase
      if (i >= 3 && i % 7 == 0) xv = xv - (xv % 257) + 256;   // force x1 = 2^N
      if (xv >= modulus(8)) xv = 256;
      x1_8 = 9'(xv % 257); x2_8 = 8'(xv % 256); x3_8 = 8'(xv % 255);
      #1;
      check(8, xv, 64'(a_8), 64'(b_8), 64'(x1_8), 64'(x2_8));

      case (i)
        0: xv = 0;
        1: xv = modulus(16) - 1;
        2: xv = 65536;
        default: xv = rnd64() % modulus(16);
      endcase
      if (i >= 3 && i % 7 == 0) xv = xv - (xv % 65537) + 65536;
      if (xv >= modulus(16)) xv = 65536;
      x1_16 = 17'(xv % 65537); x2_16 = 16'(xv % 65536); x3_16 = 16'(xv % 65535);
      #1;
      check(16, xv, 64'(a_16), 64'(b_16), 64'(x1_16), 64'(x2_16));
    end
    checks++;
    if (n_z == 0 || n_zm1 == 0 || n_zp == 0) begin
      failures++;
      $display("a case of the A_X formula was never exercised");
    end
    $display("cases: Z=%0d Z-1=%0d Z'=%0d", n_z, n_zm1, n_zp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
