// Self-check of lt_lfsr_fsm: after reset it is in step 1; with test_en high
// it walks 1, 2, 3, 4, 1, ... one step per clock; in every step sel1sel2 is
// 11, 10, 11, 01, and en1en2 announces the step being entered (10 before
// step 1, 01 before step 3, 00 otherwise); with test_en low it holds and
// enables nothing; init returns it to step 1. The expected table is written
// out here, independently of the package.
module tb_lt_lfsr_fsm;
  import lt_bist_pkg::*;
  logic  clk = 1'b0, rst_n, init, test_en;
  logic  en1, en2, sel1, sel2;
  step_t step;
  int    model_step;  // 1..4
  int checks = 0, failures = 0;
  logic [1:0] sel_tab [1:4] = '{2'b11, 2'b10, 2'b11, 2'b01};
  logic [1:0] en_tab  [1:4] = '{2'b10, 2'b00, 2'b01, 2'b00};

  lt_lfsr_fsm dut (.clk(clk), .rst_n(rst_n), .init(init), .test_en(test_en),
                   .en1(en1), .en2(en2), .sel1(sel1), .sel2(sel2), .step(step));

  always #5 clk = ~clk;

  function automatic int nxt(int s);
    return (s == 4) ? 1 : s + 1;
  endfunction

  task automatic check_now();
    logic [1:0] want_en;
    want_en = '0;
    if (init) want_en = 2'b00;
    else if (test_en) want_en = en_tab[nxt(model_step)];
    checks++;
    if (int'(step) + 1 != model_step || {sel1, sel2} !== sel_tab[model_step] ||
        {en1, en2} !== want_en) begin
      failures++;
      $display("FAIL t=%0t step=%0d want %0d sel=%b%b en=%b%b want en=%b",
               $time, int'(step) + 1, model_step, sel1, sel2, en1, en2, want_en);
    end
  endtask

  initial begin
    rst_n = 1'b0; init = 1'b0; test_en = 1'b0;
    model_step = 1;
    #12 rst_n = 1'b1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      test_en = ($urandom_range(0, 3) != 0);
      init    = ($urandom_range(0, 40) == 0);
      #1 check_now();
      @(posedge clk);
      if (init)         model_step = 1;
      else if (test_en) model_step = nxt(model_step);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
