// tb_phi_comparator_full: the comparator at its default word size n = 8
// (moduli 255, 256, 511; dynamic range 33,358,080).
//
// Compares every value X of the dynamic range with its successor X + 1 in
// both orders (which pins down p1 and p2 of every X), the ends of the
// range, pairs straddling every partition boundary, pairs straddling the section boundaries of a few partitions,
// and 1,500,000 random pairs of which a third share the partition and a
// third the section. Each result must be c_xy = (X > Y), e = (X == Y). The
// stage that decided each pair (p1, p2, x3 or equality) is counted, and a
// stage that never decided is a failure. One pair per time unit; a watchdog
// ends a hung run.
module tb_phi_comparator_full;
  import tb_phi_ref_pkg::*;

  localparam int N = phi_pkg::N_DEFAULT;
  localparam int RANDOM_PAIRS = 1_500_000;

  logic [N-1:0] x1, x2, y1, y2;
  logic [N:0]   x3, y3;
  logic         c_xy, e;

  int checks = 0, failures = 0;
  int by_p1 = 0, by_p2 = 0, by_x3 = 0, by_eq = 0;

  phi_comparator dut (
    .x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3), .c_xy(c_xy), .e(e)
  );

  task automatic check_pair(longint x, longint y);
    x1 = N'(res1(N, x)); x2 = N'(res2(N, x)); x3 = (N+1)'(res3(N, x));
    y1 = N'(res1(N, y)); y2 = N'(res2(N, y)); y3 = (N+1)'(res3(N, y));
    #1;
    checks++;
    if (part_p1(N, x) != part_p1(N, y))      by_p1++;
    else if (sect_p2(N, x) != sect_p2(N, y)) by_p2++;
    else if (x != y)                         by_x3++;
    else                                     by_eq++;
    if (c_xy != (x > y) || e != (x == y)) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d Y=%0d c_xy=%b e=%b", x, y, c_xy, e);
    end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint big_m, part, sect, x, y;
    big_m = range_m(N);
    part  = m2(N) * m3(N);
    sect  = m3(N);

    check_pair(0, 0);
    check_pair(0, big_m - 1);
    check_pair(big_m - 1, 0);
    check_pair(big_m - 1, big_m - 1);
    for (longint p = 1; p < m1(N); p++) begin
      check_pair(p * part - 1, p * part);
      check_pair(p * part, p * part - 1);
    end
    for (longint p = 0; p < m1(N); p += 50)
      for (longint q = 1; q < m2(N); q++) begin
        check_pair(p * part + q * sect - 1, p * part + q * sect);
        check_pair(p * part + q * sect, p * part + q * sect - 1);
      end

    for (longint v = 0; v + 1 < big_m; v++) begin
      check_pair(v, v + 1);
      check_pair(v + 1, v);
    end

    for (int k = 0; k < RANDOM_PAIRS; k++) begin
      x = rand_below(big_m);
      case (k % 3)
        0: y = rand_below(big_m);
        1: y = (x / part) * part + rand_below(part);
        default: y = (k % 30 == 2) ? x : (x / sect) * sect + rand_below(sect);
      endcase
      check_pair(x, y);
    end

    $display("decided by p1=%0d p2=%0d x3=%0d equal=%0d", by_p1, by_p2, by_x3, by_eq);
    if (by_p1 == 0) begin failures++; $display("FAIL: no pair decided by p1"); end
    if (by_p2 == 0) begin failures++; $display("FAIL: no pair decided by p2"); end
    if (by_x3 == 0) begin failures++; $display("FAIL: no pair decided by x3"); end
    if (by_eq == 0) begin failures++; $display("FAIL: no equal pair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
