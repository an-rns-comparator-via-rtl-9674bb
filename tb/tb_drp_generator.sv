// tb_drp_generator: checks p1(X) and p2(X) against their definition.
//
// An integer X is converted to residues (x1, x2, x3) and the generator must
// return p1 = X div (m2 m3) and p2 = (X mod m2 m3) div m3. At n = 4 every X
// of the dynamic range (7,440 values) is tried; at n = 8 the ends of the
// range, both sides of every partition boundary and 300,000 random values.
// The number of results where the modulo 2^n-1 adder had to fold a sum of
// 2^n-1 or more (p1 computed from the wrapped branch) is reported.
// One vector per time unit; a watchdog ends a hung run.
module tb_drp_generator;
  import tb_phi_ref_pkg::*;

  localparam int NS = 4;
  localparam int NL = 8;
  localparam int RANDOM_VECTORS = 300_000;

  logic [NS-1:0] s_x1, s_x2, s_p1, s_p2;
  logic [NS:0]   s_x3;
  logic [NL-1:0] l_x1, l_x2, l_p1, l_p2;
  logic [NL:0]   l_x3;
  int checks = 0, failures = 0;

  drp_generator #(.N(NS)) dut_s (.x1(s_x1), .x2(s_x2), .x3(s_x3), .p1(s_p1), .p2(s_p2));
  drp_generator #(.N(NL)) dut_l (.x1(l_x1), .x2(l_x2), .x3(l_x3), .p1(l_p1), .p2(l_p2));

  task automatic check_small(longint x);
    s_x1 = NS'(res1(NS, x));
    s_x2 = NS'(res2(NS, x));
    s_x3 = (NS+1)'(res3(NS, x));
    #1;
    checks++;
    if (longint'(s_p1) != part_p1(NS, x) || longint'(s_p2) != sect_p2(NS, x)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d X=%0d p1=%0d/%0d p2=%0d/%0d", NS, x, s_p1, part_p1(NS, x), s_p2, sect_p2(NS, x));
    end
  endtask

  task automatic check_large(longint x);
    l_x1 = NL'(res1(NL, x));
    l_x2 = NL'(res2(NL, x));
    l_x3 = (NL+1)'(res3(NL, x));
    #1;
    checks++;
    if (longint'(l_p1) != part_p1(NL, x) || longint'(l_p2) != sect_p2(NL, x)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d X=%0d p1=%0d/%0d p2=%0d/%0d", NL, x, l_p1, part_p1(NL, x), l_p2, sect_p2(NL, x));
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
    longint big_m, part;
    for (longint x = 0; x < range_m(NS); x++) check_small(x);

    big_m = range_m(NL);
    part  = m2(NL) * m3(NL);
    check_large(0);
    check_large(big_m - 1);
    for (longint p = 1; p < m1(NL); p++) begin
      check_large(p * part - 1);
      check_large(p * part);
    end
    for (int k = 0; k < RANDOM_VECTORS; k++) check_large(rand_below(big_m));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
