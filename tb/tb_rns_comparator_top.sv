// tb_rns_comparator_top: end-to-end test of rns_comparator_top at its default
// parameters (N = 8, moduli 255, 256, 257).
//
// Operand pairs are drawn as binary values X, Y in [0, M), M = 255*256*257,
// and converted to residues here; the expected outputs are X > Y and X = Y on
// the binary values, independent of the design's kernel arithmetic. Pairs are
// chosen so that each comparison is decided by each kernel digit (A, B, x1),
// by equality, and so that operands take each of the three branches of the
// A_X formula (Z, Z-1 via the subtractor's borrow, Z' for x1 = 2^N). Both
// comparators (parallel and cascade generators) are checked on every pair and
// each mechanism's count must be non-zero.
module tb_rns_comparator_top;
  localparam int N    = 8;
  localparam int ITER = 200000;

  int checks = 0, failures = 0;

  typedef logic [255:0] wide_t;

  localparam wide_t P1 = (wide_t'(1) << N) + 1;   // 2^N+1
  localparam wide_t P2 = (wide_t'(1) << N);       // 2^N
  localparam wide_t P3 = (wide_t'(1) << N) - 1;   // 2^N-1
  localparam wide_t MR = P1 * P2 * P3;            // dynamic range

  logic [N:0]   x1, y1;
  logic [N-1:0] x2, x3, y2, y3;
  logic         c2_cxy, c2_exy, c3_cxy, c3_exy;

  // how often each mechanism of the comparator was exercised
  int n_zp = 0;        // an operand with x1 = 2^N (A from Z')
  int n_zm1 = 0;       // an operand with x2 < x1 (borrow, A from Z-1)
  int n_z = 0;         // an operand with x2 >= x1, x1 < 2^N (A from Z)
  int n_by_a = 0;      // result decided by the A digits
  int n_by_b = 0;      // decided by the B digits
  int n_by_x1 = 0;     // decided by x1
  int n_eq = 0;        // X = Y
  int n_gt = 0, n_lt = 0;

  function automatic wide_t rnd_wide();
    wide_t r;
    for (int k = 0; k < 8; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic classify(wide_t v);
    wide_t r1 = v % P1, r2 = v % P2;
    if (r1 == P2) n_zp++;
    else if (r2 < r1) n_zm1++;
    else n_z++;
  endtask

  task automatic apply_and_check(wide_t xv, wide_t yv);
    wide_t ax, ay, bx, by;
    logic  exp_gt, exp_eq;
    x1 = (N+1)'(xv % P1); x2 = N'(xv % P2); x3 = N'(xv % P3);
    y1 = (N+1)'(yv % P1); y2 = N'(yv % P2); y3 = N'(yv % P3);
    #1;
    exp_gt = (xv > yv);
    exp_eq = (xv == yv);
    checks++;
    if (c2_cxy != exp_gt || c2_exy != exp_eq || c3_cxy != exp_gt || c3_exy != exp_eq) begin
      failures++;
      if (failures < 10)
        $display("N=%0d X=%0d Y=%0d: C2 gt=%b eq=%b C3 gt=%b eq=%b expected gt=%b eq=%b",
                 N, xv, yv, c2_cxy, c2_exy, c3_cxy, c3_exy, exp_gt, exp_eq);
    end
    classify(xv);
    classify(yv);
    ax = xv / (P2 * P1); ay = yv / (P2 * P1);
    bx = (xv / P1) % P2; by = (yv / P1) % P2;
    if (exp_eq) n_eq++;
    else if (ax != ay) n_by_a++;
    else if (bx != by) n_by_b++;
    else n_by_x1++;
    if (exp_gt) n_gt++; else if (!exp_eq) n_lt++;
  endtask

  task automatic run_all();
    wide_t xv, yv, d;
    // corners of the range
    apply_and_check(0, 0);
    apply_and_check(MR - 1, 0);
    apply_and_check(0, MR - 1);
    apply_and_check(MR - 1, MR - 1);
    apply_and_check(P2, P2 + 1);
    for (int i = 0; i < ITER; i++) begin
      xv = rnd_wide() % MR;
      if (i % 5 == 1) xv = xv - (xv % P1) + P2;      // x1 = 2^N
      if (xv >= MR) xv = P2;
      case (i % 4)
        0: yv = rnd_wide() % MR;                      // independent operands
        1: yv = xv;                                   // equal
        2: begin                                      // same A, other B
          d  = (xv / P1) - ((xv / P1) % P2);          // 2^N * A
          yv = (d + rnd_wide() % P2) * P1 + xv % P1;
        end
        default: begin                                // same A and B, other x1
          yv = xv - (xv % P1) + rnd_wide() % P1;
        end
      endcase
      if (yv >= MR) yv = rnd_wide() % MR;
      if (i % 2 == 0) apply_and_check(xv, yv);
      else            apply_and_check(yv, xv);
    end
    // every mechanism must have happened
    checks++;
    if (n_zp == 0 || n_zm1 == 0 || n_z == 0 || n_by_a == 0 || n_by_b == 0 ||
        n_by_x1 == 0 || n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("N=%0d: a mechanism was never exercised", N);
    end
    $display("N=%0d: Z'=%0d Z-1=%0d Z=%0d byA=%0d byB=%0d byX1=%0d eq=%0d gt=%0d lt=%0d",
             N, n_zp, n_zm1, n_z, n_by_a, n_by_b, n_by_x1, n_eq, n_gt, n_lt);
  endtask

  rns_comparator_top dut (
    .x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3),
    .c2_cxy(c2_cxy), .c2_exy(c2_exy), .c3_cxy(c3_cxy), .c3_exy(c3_exy)
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
