// Self-check of prom (default 256 x 16): every word reads all ones before
// programming; programming clears exactly the bits given as 0; a second
// write can clear more bits but never set a cleared one; the read is
// asynchronous (valid in the cycle the address is applied). A shadow array
// in the testbench tracks the expected fuse state.
module tb_prom;
  localparam int DEPTH = 256, WIDTH = 16, AW = 8;
  logic             clk = 1'b0;
  logic             prog_en;
  logic [AW-1:0]    prog_addr, rd_addr;
  logic [WIDTH-1:0] prog_data, rd_data;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  prom dut (.clk(clk), .prog_en(prog_en), .prog_addr(prog_addr), .prog_data(prog_data),
            .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  task automatic check_word(input int addr);
    rd_addr = AW'(addr);
    #1;
    checks++;
    if (rd_data !== shadow[addr]) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d reads %h, want %h", addr, rd_data, shadow[addr]);
    end
  endtask

  task automatic burn(input int addr, input logic [WIDTH-1:0] data);
    @(negedge clk);
    prog_en   = 1'b1;
    prog_addr = AW'(addr);
    prog_data = data;
    @(negedge clk);
    prog_en   = 1'b0;
    shadow[addr] = shadow[addr] & data;
  endtask

  initial begin
    prog_en = 1'b0; prog_addr = '0; prog_data = '1; rd_addr = '0;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '1;
    // Unprogrammed: all ones.
    for (int i = 0; i < DEPTH; i++) check_word(i);
    // First programming pass: random words.
    for (int i = 0; i < DEPTH; i++) burn(i, WIDTH'($urandom));
    for (int i = 0; i < DEPTH; i++) check_word(i);
    // Attempt to restore fuses: writing all ones changes nothing.
    for (int i = 0; i < DEPTH; i += 7) burn(i, '1);
    // Second pass blows further fuses in some words.
    for (int i = 0; i < DEPTH; i += 3) burn(i, WIDTH'($urandom) | WIDTH'($urandom));
    for (int i = 0; i < DEPTH; i++) check_word(i);
    // A written word with prog_en low must not change.
    @(negedge clk);
    prog_addr = 8'd5; prog_data = '0;
    @(negedge clk);
    check_word(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
