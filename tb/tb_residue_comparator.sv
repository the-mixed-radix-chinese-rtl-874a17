// tb_residue_comparator: self-checking test of residue_comparator with both
// kernel generators (GEN_PARALLEL and GEN_CASCADE) at N = 8 and N = 3.
//
// N = 3 (moduli 7, 8, 9, range 504) is run for every pair (X, Y). At N = 8
// random pairs are mixed with pairs that share the A digit, or A and B, or are
// equal, so that every stage of the comparison decides some results. The
// expected outputs are X > Y and X = Y on the binary values.
module tb_residue_comparator;
  import rns_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] p1, q1;  logic [2:0] p2, p3, q2, q3;
  logic [8:0] x1, y1;  logic [7:0] x2, x3, y2, y3;
  logic pc_par, pe_par, pc_cas, pe_cas;
  logic c_par, e_par, c_cas, e_cas;

  residue_comparator #(.N(3), .GEN(GEN_PARALLEL)) dut3p (.x1(p1), .x2(p2), .x3(p3), .y1(q1), .y2(q2), .y3(q3), .cxy(pc_par), .exy(pe_par));
  residue_comparator #(.N(3), .GEN(GEN_CASCADE))  dut3c (.x1(p1), .x2(p2), .x3(p3), .y1(q1), .y2(q2), .y3(q3), .cxy(pc_cas), .exy(pe_cas));
  residue_comparator #(.N(8), .GEN(GEN_PARALLEL)) dut8p (.x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3), .cxy(c_par), .exy(e_par));
  residue_comparator #(.N(8), .GEN(GEN_CASCADE))  dut8c (.x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3), .cxy(c_cas), .exy(e_cas));

  localparam int M8 = 255 * 256 * 257;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, yv;
    for (int a = 0; a < 504; a++) begin
      for (int b = 0; b < 504; b++) begin
        p1 = 4'(a % 9); p2 = 3'(a % 8); p3 = 3'(a % 7);
        q1 = 4'(b % 9); q2 = 3'(b % 8); q3 = 3'(b % 7);
        #1;
        checks++;
        if (pc_par != (a > b) || pe_par != (a == b) || pc_cas != (a > b) || pe_cas != (a == b)) begin
          failures++;
          if (failures < 10) $display("N=3 X=%0d Y=%0d par=%b%b cas=%b%b", a, b, pc_par, pe_par, pc_cas, pe_cas);
        end
      end
    end
    for (int i = 0; i < 100000; i++) begin
      xv = int'($urandom % M8);
      case (i % 4)
        0: yv = int'($urandom % M8);
        1: yv = xv;
        2: yv = (xv / (256 * 257)) * (256 * 257) + int'($urandom % (256 * 257));  // same A
        default: yv = xv - xv % 257 + int'($urandom % 257);                      // same A, B
      endcase
      if (yv >= M8) yv = M8 - 1;
      x1 = 9'(xv % 257); x2 = 8'(xv % 256); x3 = 8'(xv % 255);
      y1 = 9'(yv % 257); y2 = 8'(yv % 256); y3 = 8'(yv % 255);
      #1;
      checks++;
      if (c_par != (xv > yv) || e_par != (xv == yv) || c_cas != (xv > yv) || e_cas != (xv == yv)) begin
        failures++;
        if (failures < 10) $display("N=8 X=%0d Y=%0d par=%b%b cas=%b%b", xv, yv, c_par, e_par, c_cas, e_cas);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
