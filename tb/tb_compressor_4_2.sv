// Exhaustive self-check of compressor_4_2: all 32 combinations of x[3:0] and
// cin; {cout, c, s} must be the number of ones among the five inputs.
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, s, c, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x(x), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      checks++;
      if (int'({cout, c, s}) != $countones({cin, x})) begin
        failures++;
        $display("FAIL x=%b cin=%b -> cout=%b c=%b s=%b", x, cin, cout, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
