// delay_line: a line delay built as a circular buffer of DEPTH words. Each
// cycle with en high it stores din and presents on dout the word stored
// DEPTH enabled cycles earlier (one image line back when DEPTH is the line
// length). Used for the luma and chroma input lines and for the orientation
// lines. The source design uses delay lines instead of random-access pixel
// and angle memories; the circular-buffer form is this implementation's.
//
// Interface: dout is combinational from the current read/write position and
// is valid once DEPTH words have been written. The contents are not reset.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 181
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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  assign dout = mem[ptr];
endmodule
