// tb_csa_eac_dec: self-checking test of csa_eac_dec, the simplified
// carry-save stage that adds a, b and the constant 11...10 modulo 2^N-1.
// Exhaustive at N = 8 and N = 4: s + cy must be congruent to a + b - 1.
module tb_csa_eac_dec;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, s8, cy8;
  logic [3:0] a4, b4, s4, cy4;

  csa_eac_dec #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8), .cy(cy8));
  csa_eac_dec #(.N(4)) dut4 (.a(a4), .b(b4), .s(s4), .cy(cy4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a8 = 8'(i); b8 = 8'(i >> 8);
      a4 = 4'(i); b4 = 4'(i >> 4);
      #1;
      checks++;
      if ((int'(s8) + int'(cy8)) % 255 != (int'(a8) + int'(b8) + 254) % 255) begin
        failures++;
        if (failures < 10) $display("N=8 mismatch a=%h b=%h s=%h cy=%h", a8, b8, s8, cy8);
      end
      if (i < 256) begin
        checks++;
        if ((int'(s4) + int'(cy4)) % 15 != (int'(a4) + int'(b4) + 14) % 15) begin
          failures++;
          if (failures < 10) $display("N=4 mismatch a=%h b=%h s=%h cy=%h", a4, b4, s4, cy4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
