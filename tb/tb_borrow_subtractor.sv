// tb_borrow_subtractor: exhaustive self-checking test of borrow_subtractor at
// N = 8: d = (x2 - x1l) mod 2^N and borrow = (x2 < x1l). Includes the worked
// case x2 = 1, x1l = 6 at N = 3, which gives d = 011 with a borrow.
module tb_borrow_subtractor;
  int checks = 0, failures = 0;

  logic [7:0] x2, x1l, d;
  logic       borrow;
  logic [2:0] p2, p1l, pd;
  logic       pborrow;

  borrow_subtractor #(.N(8)) dut  (.x2(x2), .x1l(x1l), .d(d), .borrow(borrow));
  borrow_subtractor #(.N(3)) dut3 (.x2(p2), .x1l(p1l), .d(pd), .borrow(pborrow));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p2 = 3'd1; p1l = 3'd6; #1;
    checks++;
    if (pd != 3'b011 || !pborrow) failures++;
    for (int i = 0; i < 65536; i++) begin
      x2 = 8'(i); x1l = 8'(i >> 8);
      #1;
      checks++;
      if (int'(d) != ((int'(x2) - int'(x1l)) & 255) || borrow != (x2 < x1l)) begin
        failures++;
        if (failures < 10) $display("x2=%0d x1l=%0d d=%0d b=%b", x2, x1l, d, borrow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
