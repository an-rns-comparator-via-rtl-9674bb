// tb_p2_adder: exhaustive check of the section-number adder at n = 8.
// For every x2 (0..255) and every canonical x3 (0..510), of which the adder
// sees the low 8 bits, w must equal (x3 - x2) mod 256.
// One vector per time unit; a watchdog ends a hung run.
module tb_p2_adder;
  localparam int N  = 8;
  localparam int M3 = (1 << (N + 1)) - 1;

  logic [N-1:0] x2, x3_lo, w;
  int checks = 0, failures = 0;
  int expv;

  p2_adder #(.N(N)) dut (.x2(x2), .x3_lo(x3_lo), .w(w));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < M3; j++) begin
        x2    = N'(i);
        x3_lo = N'(j);
        #1;
        checks++;
        expv = ((j - i) % (1 << N) + (1 << N)) % (1 << N);
        if (int'(w) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL x2=%0d x3=%0d w=%0d exp=%0d", i, j, w, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
