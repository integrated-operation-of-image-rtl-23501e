// Line buffer: a pixel delay line of programmable length.
//
// Each shift writes din and presents on dout the value written len shifts
// earlier, so the block behaves as a len-stage shift register clocked by
// en. It is built as a circular buffer of DEPTH words with one pointer:
// the word at the pointer is read out (asynchronous read) and overwritten
// in the same cycle. In the convolver len = frame width - 3, the part of a
// line that does not sit in the window's word buffers. len may change
// between frames; the pointer wraps at the new length. Contents are not
// reset: the first len outputs after reset are whatever the memory held.
module line_buffer #(
  parameter int W     = 8,
  parameter int DEPTH = 317,
  parameter int LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [LW-1:0] len,   // 1..DEPTH
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);
  logic [W-1:0]  mem [DEPTH];
  logic [LW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ptr <= '0;
    else if (en) ptr <= (ptr >= len - 1'b1) ? '0 : ptr + 1'b1;
  end
endmodule
