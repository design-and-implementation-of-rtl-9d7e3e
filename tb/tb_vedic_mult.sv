// Exhaustive self-check of vedic_mult at its default 8 x 8 size: every one
// of the 65536 operand pairs, the product compared with the integer product.
// The multiplier is combinational, so the product is checked 1 ns after the
// operands change (zero clock cycles of latency).
module tb_vedic_mult;
  localparam int N = 8;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  vedic_mult dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
