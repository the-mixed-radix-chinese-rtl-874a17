// tb_binary_comparator: exhaustive self-checking test of binary_comparator at
// W = 9 (all 2^18 operand pairs): gt = (a > b), eq = (a == b).
module tb_binary_comparator;
  int checks = 0, failures = 0;

  logic [8:0] a, b;
  logic       gt, eq;

  binary_comparator #(.W(9)) dut (.a(a), .b(b), .gt(gt), .eq(eq));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 18); i++) begin
      a = 9'(i); b = 9'(i >> 9);
      #1;
      checks++;
      if (gt != (int'(a) > int'(b)) || eq != (int'(a) == int'(b))) begin
        failures++;
        if (failures < 10) $display("a=%0d b=%0d gt=%b eq=%b", a, b, gt, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
