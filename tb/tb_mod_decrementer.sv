// tb_mod_decrementer: exhaustive self-checking test of mod_decrementer at
// N = 8, 4 and 5 (a width that is not a power of two). y must equal
// (z - 1) mod 2^N-1 in canonical form; z = all-ones is read as zero. Includes
// the two worked cases 0100 -> 0011 and 0000 -> 1110 at N = 4.
module tb_mod_decrementer;
  int checks = 0, failures = 0;

  logic [7:0] z8, y8;
  logic [3:0] z4, y4;
  logic [4:0] z5, y5;

  mod_decrementer #(.N(8)) dut8 (.z(z8), .y(y8));
  mod_decrementer #(.N(4)) dut4 (.z(z4), .y(y4));
  mod_decrementer #(.N(5)) dut5 (.z(z5), .y(y5));

  function automatic int dec_ref(int z, int m);
    return (z % m + m - 1) % m;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z4 = 4'b0100; #1; checks++; if (y4 != 4'b0011) failures++;
    z4 = 4'b0000; #1; checks++; if (y4 != 4'b1110) failures++;
    for (int i = 0; i < 256; i++) begin
      z8 = 8'(i); z4 = 4'(i); z5 = 5'(i);
      #1;
      checks++;
      if (int'(y8) != dec_ref(i, 255)) begin
        failures++;
        if (failures < 10) $display("N=8 z=%b y=%b", z8, y8);
      end
      if (i < 16) begin
        checks++;
        if (int'(y4) != dec_ref(i, 15)) begin
          failures++;
          if (failures < 10) $display("N=4 z=%b y=%b", z4, y4);
        end
      end
      if (i < 32) begin
        checks++;
        if (int'(y5) != dec_ref(i, 31)) begin
          failures++;
          if (failures < 10) $display("N=5 z=%b y=%b", z5, y5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
