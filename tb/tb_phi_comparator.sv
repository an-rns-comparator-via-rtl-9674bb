// tb_phi_comparator: end-to-end check of the RNS comparator at small word
// sizes.
//
// Integers X and Y are converted to residues and the comparator must return
// c_xy = (X > Y) and e = (X == Y). At n = 3 (dynamic range 840) every pair
// is compared; at n = 5 (dynamic range 63,984) random pairs are drawn, a
// third of them from the same partition and a third from the same section,
// so that each of the three comparator stages decides often. The testbench
// counts which stage decided each pair (partition number p1, section
// number p2, the residue x3, or equality) and fails if any of the four never
// happened. One pair per time unit; a watchdog ends a hung run.
module tb_phi_comparator;
  import tb_phi_ref_pkg::*;

  localparam int NS = 3;
  localparam int NM = 5;
  localparam int RANDOM_PAIRS = 300_000;

  logic [NS-1:0] s_x1, s_x2, s_y1, s_y2;
  logic [NS:0]   s_x3, s_y3;
  logic          s_c, s_e;
  logic [NM-1:0] m_x1, m_x2, m_y1, m_y2;
  logic [NM:0]   m_x3, m_y3;
  logic          m_c, m_e;

  int checks = 0, failures = 0;
  int by_p1 = 0, by_p2 = 0, by_x3 = 0, by_eq = 0;

  phi_comparator #(.N(NS)) dut_s (
    .x1(s_x1), .x2(s_x2), .x3(s_x3), .y1(s_y1), .y2(s_y2), .y3(s_y3), .c_xy(s_c), .e(s_e)
  );
  phi_comparator #(.N(NM)) dut_m (
    .x1(m_x1), .x2(m_x2), .x3(m_x3), .y1(m_y1), .y2(m_y2), .y3(m_y3), .c_xy(m_c), .e(m_e)
  );

  // classify a pair by the most significant DRP component that differs
  function automatic void classify(int n, longint x, longint y);
    if (part_p1(n, x) != part_p1(n, y))      by_p1++;
    else if (sect_p2(n, x) != sect_p2(n, y)) by_p2++;
    else if (x != y)                         by_x3++;
    else                                     by_eq++;
  endfunction

  task automatic check_small(longint x, longint y);
    s_x1 = NS'(res1(NS, x)); s_x2 = NS'(res2(NS, x)); s_x3 = (NS+1)'(res3(NS, x));
    s_y1 = NS'(res1(NS, y)); s_y2 = NS'(res2(NS, y)); s_y3 = (NS+1)'(res3(NS, y));
    #1;
    checks++;
    classify(NS, x, y);
    if (s_c != (x > y) || s_e != (x == y)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d X=%0d Y=%0d c=%b e=%b", NS, x, y, s_c, s_e);
    end
  endtask

  task automatic check_mid(longint x, longint y);
    m_x1 = NM'(res1(NM, x)); m_x2 = NM'(res2(NM, x)); m_x3 = (NM+1)'(res3(NM, x));
    m_y1 = NM'(res1(NM, y)); m_y2 = NM'(res2(NM, y)); m_y3 = (NM+1)'(res3(NM, y));
    #1;
    checks++;
    classify(NM, x, y);
    if (m_c != (x > y) || m_e != (x == y)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d X=%0d Y=%0d c=%b e=%b", NM, x, y, m_c, m_e);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, y, part, sect;
    for (longint i = 0; i < range_m(NS); i++)
      for (longint j = 0; j < range_m(NS); j++)
        check_small(i, j);

    part = m2(NM) * m3(NM);
    sect = m3(NM);
    for (int k = 0; k < RANDOM_PAIRS; k++) begin
      x = rand_below(range_m(NM));
      case (k % 3)
        0: y = rand_below(range_m(NM));
        1: y = (x / part) * part + rand_below(part);   // same partition
        default: y = (x / sect) * sect + rand_below(sect); // same section
      endcase
      check_mid(x, y);
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
