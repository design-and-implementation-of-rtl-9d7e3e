// Exhaustive self-check of ri_cell: a bit that keeps its value is copied,
// a bit that toggles is replaced by the random bit r.
module tb_ri_cell;
  logic t_cur, t_next, r, t_mid, want;
  int checks = 0, failures = 0;

  ri_cell dut (.t_cur(t_cur), .t_next(t_next), .r(r), .t_mid(t_mid));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {t_cur, t_next, r} = 3'(v);
      #1;
      if (t_cur ^ t_next) want = r;
      else                want = t_next;
      checks++;
      if (t_mid !== want) begin
        failures++;
        $display("FAIL cur=%b next=%b r=%b -> %b, want %b", t_cur, t_next, r, t_mid, want);
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
