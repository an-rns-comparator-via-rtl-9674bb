// tb_mod_csa: random check of the modulo 2^n - 1 carry-save adder at n = 8.
// For random rows a, b, d the two outputs must satisfy
// (s + c) mod 255 = (a + b + d) mod 255; rows with all bits set (every
// position produces a carry, including the wrapped one) are forced in
// regularly. One vector per time unit; a watchdog ends a hung run.
module tb_mod_csa;
  localparam int N = 8;
  localparam int M = (1 << N) - 1;
  localparam int VECTORS = 200_000;

  logic [N-1:0] a, b, d, s, c;
  int checks = 0, failures = 0;

  mod_csa #(.N(N)) dut (.a(a), .b(b), .d(d), .s(s), .c(c));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < VECTORS; k++) begin
      a = N'($urandom());
      b = N'($urandom());
      d = N'($urandom());
      if (k % 16 == 0) a = '1;
      if (k % 32 == 0) b = '1;
      #1;
      checks++;
      if ((int'(s) + int'(c)) % M != (int'(a) + int'(b) + int'(d)) % M) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d d=%0d s=%0d c=%0d", a, b, d, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
