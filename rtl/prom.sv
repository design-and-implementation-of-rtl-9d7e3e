// Programmable read-only memory (one-time programmable) holding the expected
// responses of the circuit under test.
//
// Every bit is a fuse and reads 1 while intact. Programming a word blows the
// fuses where prog_data has a 0, so those bits read 0 from then on; a blown
// fuse cannot be restored, so a later write can only turn further 1s into 0s
// (the stored word becomes old AND prog_data). This is the behaviour of a
// fuse PROM; the port set, the word-wide write and the sizes are this
// design's choices.
//
// Timing: a write takes effect on the rising clock edge with prog_en high;
// the read is asynchronous (rd_data follows rd_addr in the same cycle). The
// array starts all ones, the unprogrammed state; it has no reset, since a
// reset would undo blown fuses.
module prom #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             prog_en,
  input  logic [AW-1:0]    prog_addr,
  input  logic [WIDTH-1:0] prog_data,  // 0 blows the fuse of that bit
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] fuse [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) fuse[i] = '1;
  end

  always_ff @(posedge clk) begin
    if (prog_en) fuse[prog_addr] <= fuse[prog_addr] & prog_data;
  end

  assign rd_data = fuse[rd_addr];
endmodule
