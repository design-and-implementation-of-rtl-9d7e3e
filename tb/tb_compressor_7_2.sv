// Exhaustive self-check of compressor_7_2: all 1024 combinations of x[7:0],
// cin1 and cin2; {c2, c1, c0, s} must be the number of ones among the ten
// inputs.
module tb_compressor_7_2;
  logic [7:0] x;
  logic       cin1, cin2, s, c0, c1, c2;
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2), .s(s), .c0(c0), .c1(c1), .c2(c2));

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {cin2, cin1, x} = 10'(v);
      #1;
      checks++;
      if (int'({c2, c1, c0, s}) != $countones(v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%b cin1=%b cin2=%b -> %b", x, cin1, cin2, {c2, c1, c0, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
