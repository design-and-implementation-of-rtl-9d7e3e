// Self-check of comparator: random equal and unequal word pairs, with and
// without valid; exactly one of good/bad must be high when valid is high,
// matching whether the words are equal, and both low otherwise.
module tb_comparator;
  localparam int W = 16;
  logic [W-1:0] resp, expect_val;
  logic         valid, good, bad;
  int checks = 0, failures = 0;

  comparator dut (.resp(resp), .expect_val(expect_val), .valid(valid), .good(good), .bad(bad));

  task automatic check(input logic want_good, input logic want_bad);
    #1;
    checks++;
    if (good !== want_good || bad !== want_bad) begin
      failures++;
      $display("FAIL resp=%h exp=%h valid=%b -> good=%b bad=%b", resp, expect_val, valid, good, bad);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      resp  = W'($urandom);
      valid = $urandom_range(0, 3) != 0;
      case (i % 3)
        0:       expect_val = resp;
        1:       expect_val = resp ^ (W'(1) << $urandom_range(0, W - 1));  // one bit off
        default: expect_val = W'($urandom);
      endcase
      check(valid && (resp == expect_val), valid && (resp != expect_val));
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
