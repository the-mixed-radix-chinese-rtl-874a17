// tb_csa_eac: self-checking test of csa_eac (carry-save adder modulo 2^N-1
// with end-around carry) at N = 8 and N = 5. For random and corner operands it
// checks that s + cy is congruent to a + b + c modulo 2^N-1, computed here
// with plain integer arithmetic.
module tb_csa_eac;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, c8, s8, cy8;
  logic [4:0] a5, b5, c5, s5, cy5;

  csa_eac #(.N(8)) dut8 (.a(a8), .b(b8), .c(c8), .s(s8), .cy(cy8));
  csa_eac #(.N(5)) dut5 (.a(a5), .b(b5), .c(c5), .s(s5), .cy(cy5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      if (i < 8) begin
        a8 = (i & 1) ? 8'hFF : 8'h00; b8 = (i & 2) ? 8'hFF : 8'h00; c8 = (i & 4) ? 8'hFF : 8'h00;
      end else begin
        a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      end
      a5 = 5'($urandom); b5 = 5'($urandom); c5 = 5'($urandom);
      #1;
      checks++;
      if ((int'(s8) + int'(cy8)) % 255 != (int'(a8) + int'(b8) + int'(c8)) % 255) begin
        failures++;
        if (failures < 10) $display("N=8 mismatch a=%h b=%h c=%h s=%h cy=%h", a8, b8, c8, s8, cy8);
      end
      checks++;
      if ((int'(s5) + int'(cy5)) % 31 != (int'(a5) + int'(b5) + int'(c5)) % 31) begin
        failures++;
        if (failures < 10) $display("N=5 mismatch a=%h b=%h c=%h s=%h cy=%h", a5, b5, c5, s5, cy5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
