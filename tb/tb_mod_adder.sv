// tb_mod_adder: exhaustive check of the modulo 2^n - 1 adder at n = 8.
// Every pair (a, b) of 8-bit words, including the all-ones second code of
// zero, must give s = (a + b) mod 255, never the all-ones word.
// One vector per time unit; a watchdog ends a run that hangs.
module tb_mod_adder;
  localparam int N = 8;
  localparam int M = (1 << N) - 1;

  logic [N-1:0] a, b, s;
  int checks = 0, failures = 0;

  mod_adder #(.N(N)) dut (.a(a), .b(b), .s(s));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (int'(s) != (i + j) % M) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d exp=%0d", i, j, s, (i + j) % M);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
