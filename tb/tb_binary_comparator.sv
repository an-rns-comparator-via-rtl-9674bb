// tb_binary_comparator: exhaustive check of the magnitude comparator at
// W = 8 (the p1 and p2 stages) and W = 9 (the x3 stage): gt = (a > b),
// eq = (a == b). One vector per time unit; a watchdog ends a hung run.
module tb_binary_comparator;
  logic [7:0] a8, b8;
  logic [8:0] a9, b9;
  logic gt8, eq8, gt9, eq9;
  int checks = 0, failures = 0;

  binary_comparator #(.W(8)) dut8 (.a(a8), .b(b8), .gt(gt8), .eq(eq8));
  binary_comparator #(.W(9)) dut9 (.a(a9), .b(b9), .gt(gt9), .eq(eq9));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        a9 = 9'(i);
        b9 = 9'(j);
        #1;
        if (i < 256 && j < 256) begin
          checks++;
          if (gt8 != (i > j) || eq8 != (i == j)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 a=%0d b=%0d gt=%b eq=%b", i, j, gt8, eq8);
          end
        end
        checks++;
        if (gt9 != (i > j) || eq9 != (i == j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=9 a=%0d b=%0d gt=%b eq=%b", i, j, gt9, eq9);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
