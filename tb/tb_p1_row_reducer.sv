// tb_p1_row_reducer: exhaustive check of the first p1 compression stage at
// n = 8. For every canonical x1 (0..254) and x3 (0..510) the two rows must
// add, modulo 255, to x1 + (511 - 1 - x3) + 254, the sum of the three rows
// they replace. One vector per time unit; a watchdog ends a hung run.
module tb_p1_row_reducer;
  localparam int N  = 8;
  localparam int M1 = (1 << N) - 1;
  localparam int M3 = (1 << (N + 1)) - 1;

  logic [N-1:0] x1, sum_row, carry_row;
  logic [N:0]   x3;
  int checks = 0, failures = 0;
  int expv;

  p1_row_reducer #(.N(N)) dut (.x1(x1), .x3(x3), .sum_row(sum_row), .carry_row(carry_row));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < M1; i++) begin
      for (int j = 0; j < M3; j++) begin
        x1 = N'(i);
        x3 = (N+1)'(j);
        #1;
        checks++;
        // ~x3 over n+1 bits is M3 - x3; constant row is 2^n - 2
        expv = (i + (M3 - j) + (1 << N) - 2) % M1;
        if ((int'(sum_row) + int'(carry_row)) % M1 != expv) begin
          failures++;
          if (failures < 10) $display("FAIL x1=%0d x3=%0d s=%0d c=%0d", i, j, sum_row, carry_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
