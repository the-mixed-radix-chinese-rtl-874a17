// tb_ones_comp_adder: exhaustive self-checking test of ones_comp_adder at
// N = 8 (all 65536 operand pairs) and N = 3. The result must equal
// (a + b) mod 2^N-1 in canonical form, never the all-ones pattern.
module tb_ones_comp_adder;
  int checks = 0, failures = 0;

  logic [7:0] a8, b8, s8;
  logic [2:0] a3, b3, s3;

  ones_comp_adder #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8));
  ones_comp_adder #(.N(3)) dut3 (.a(a3), .b(b3), .s(s3));

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
      a3 = 3'(i); b3 = 3'(i >> 3);
      #1;
      checks++;
      if (int'(s8) != (int'(a8) + int'(b8)) % 255) begin
        failures++;
        if (failures < 10) $display("N=8 a=%0d b=%0d s=%0d", a8, b8, s8);
      end
      if (i < 64) begin
        checks++;
        if (int'(s3) != (int'(a3) + int'(b3)) % 7) begin
          failures++;
          if (failures < 10) $display("N=3 a=%0d b=%0d s=%0d", a3, b3, s3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
