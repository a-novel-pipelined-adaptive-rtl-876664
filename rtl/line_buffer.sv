// line_buffer: fixed-length delay line used as one of the two row memories
// of the register bank.
//
// Each time `en` is high the sample on `din` is written and the sample that
// was written DEPTH enables earlier appears on `dout`. It is a circular
// memory with one pointer: the word at the pointer is read (combinationally)
// and overwritten with `din`, then the pointer advances. The register bank
// uses DEPTH = image width - 5, because the five registers of a window row
// make up the rest of one image row of delay.
//
// Timing: `dout` is valid in the cycle `en` is high and shows the word
// leaving the line. The memory is not reset; words read before DEPTH
// writes have happened are stale and are replaced by border mirroring
// downstream. The single-pointer read-before-write memory is this design's
// choice; the source only says each buffer stores one image row.
module line_buffer #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1915
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  initial assert (DEPTH >= 1) else $error("line_buffer: DEPTH must be at least 1");
endmodule
