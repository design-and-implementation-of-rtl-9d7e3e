// Exhaustive self-check of full_adder: all eight input triples, the outputs
// read as a 2-bit number must equal a + b + cin.
module tb_full_adder;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (int'({carry, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> carry=%0b sum=%0b", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
