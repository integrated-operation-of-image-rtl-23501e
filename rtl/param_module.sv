// Parameter module: the internal memory Mem[0..DEPTH-1] that holds the
// initialisation commands (sensor exposure, frame size, convolution
// coefficients, filter selection, ...).
//
// A simple dual-port memory: the data transfer unit writes a word when
// we is high; the initialisation unit reads with one cycle of latency
// (rdata shows Mem[raddr] of the previous cycle). The PC may rewrite words
// at any time; a change takes effect at the next initialisation. Depth and
// word width are this design's choices.
module param_module #(
  parameter int DEPTH  = 64,
  parameter int WORD_W = 24,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  // cleared at reset so that an unprogrammed list reads as "end of list"
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end
endmodule
