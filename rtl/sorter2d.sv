// 3x3 two-dimensional sorter (maximum, median and minimum of a window).
//
// The window reaches this block one column at a time: on every pixel the
// convolver presents its newest window column (the "sort bus", three
// pixels of the same image column in three consecutive lines) and pulses
// col_valid. Five triple-input sorters then work as follows:
//   1. one vertical sorter orders the new column; the result enters a
//      three-column buffer (the newest column plus two buffer stages), so
//      each column is sorted only once;
//   2. three horizontal sorters order the row of column maxima, the row of
//      column middles and the row of column minima;
//   3. one diagonal sorter orders the main diagonal: the smallest of the
//      maxima row, the middle of the middle row and the largest of the
//      minima row. Its middle output is the median of the nine pixels.
// The maximum is the largest of the maxima row and the minimum the smallest
// of the minima row (the corners of the second diagonal after the row and
// column sorts). Each step is registered: out_valid follows col_valid by
// three clock cycles and the outputs hold until the next column has gone
// through. Before three columns have entered, the outputs cover stale
// columns; the caller decides when a window is complete.
// The five-sorter arrangement (vertical with two column buffers, three
// horizontal, one diagonal) follows the published design; the register
// after each step is this design's choice.
module sorter2d #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         col_valid,
  input  logic [W-1:0] col [3],   // sort bus: one window column
  output logic         out_valid,
  output logic [W-1:0] max_o,
  output logic [W-1:0] mid_o,
  output logic [W-1:0] min_o
);
  // column buffer: [c][0]=column max, [c][1]=mid, [c][2]=min; c=0 newest
  logic [W-1:0] vs [3][3];
  logic [W-1:0] v_hi, v_md, v_lo;
  logic [W-1:0] h_hi [3], h_md [3], h_lo [3];
  logic [W-1:0] hr_hi [3], hr_md [3], hr_lo [3];
  logic [W-1:0] d_hi, d_md, d_lo;
  logic [1:0]   vpipe;

  tri_sorter #(.W(W)) u_vert (.a(col[0]), .b(col[1]), .c(col[2]),
                              .hi(v_hi), .md(v_md), .lo(v_lo));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 3; c++)
        for (int r = 0; r < 3; r++) vs[c][r] <= '0;
    end else if (col_valid) begin
      vs[0][0] <= v_hi; vs[0][1] <= v_md; vs[0][2] <= v_lo;
      vs[1] <= vs[0];
      vs[2] <= vs[1];
    end
  end

  // row r of the buffer is sorted across the three columns
  for (genvar r = 0; r < 3; r++) begin : g_horiz
    tri_sorter #(.W(W)) u_horiz (.a(vs[0][r]), .b(vs[1][r]), .c(vs[2][r]),
                                 .hi(h_hi[r]), .md(h_md[r]), .lo(h_lo[r]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++) begin
        hr_hi[r] <= '0; hr_md[r] <= '0; hr_lo[r] <= '0;
      end
    end else if (vpipe[0]) begin
      hr_hi <= h_hi; hr_md <= h_md; hr_lo <= h_lo;
    end
  end

  // main diagonal: smallest maximum, middle middle, largest minimum
  tri_sorter #(.W(W)) u_diag (.a(hr_lo[0]), .b(hr_md[1]), .c(hr_hi[2]),
                              .hi(d_hi), .md(d_md), .lo(d_lo));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0; out_valid <= 1'b0;
      max_o <= '0; mid_o <= '0; min_o <= '0;
    end else begin
      vpipe     <= {vpipe[0], col_valid};
      out_valid <= vpipe[1];
      if (vpipe[1]) begin
        max_o <= hr_hi[0];
        mid_o <= d_md;
        min_o <= hr_lo[2];
      end
    end
  end
endmodule
