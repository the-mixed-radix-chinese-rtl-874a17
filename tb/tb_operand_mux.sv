// tb_operand_mux: self-checking test of operand_mux at N = 8. For every valid
// x1 (0..2^N) and random x2, x3 it checks, modulo 2^N-1, that
// t1 = 2^(N-1)*x1', t2 = -x2, t3 = 2^(N-1)*x3, and that the mux output m is t1
// when x1 < 2^N and 2^(N-1)-1 when x1 = 2^N.
module tb_operand_mux;
  int checks = 0, failures = 0;

  localparam int N = 8;
  localparam int M = (1 << N) - 1;

  logic [N:0]   x1;
  logic [N-1:0] x2, x3, t1, t2, t3, m;

  operand_mux #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .t1(t1), .t2(t2), .t3(t3), .m(m));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i <= (1 << N); i++) begin
        x1 = (N+1)'(i);
        x2 = N'($urandom);
        x3 = N'($urandom_range(M - 1, 0));
        if (r == 0) begin x2 = N'(i); x3 = N'(i % M); end
        #1;
        checks++;
        if (int'(t1) % M != ((i % (1 << N)) * (1 << (N-1))) % M) failures++;
        checks++;
        if (int'(t2) % M != (M - int'(x2) % M) % M) failures++;
        checks++;
        if (int'(t3) % M != (int'(x3) * (1 << (N-1))) % M) failures++;
        checks++;
        if (m != ((i == (1 << N)) ? N'((1 << (N-1)) - 1) : t1)) failures++;
        if (failures == 1 && checks < 8) $display("first failure at x1=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
