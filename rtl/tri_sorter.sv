// Triple-input sorter.
//
// Sorts three unsigned values into hi >= md >= lo with three 2-input
// compare-exchange steps, as in a bubble sort of three elements: exchange
// (a,b), then (b,c), then (a,b) again. Purely combinational; the users of
// this block put registers around it. This is the building block of the
// 2-D sorter (five of them make one 3x3 sort). Building it from three
// 2-input bubble-sort steps follows the published design; the choice of
// largest-first outputs is the convention of its worked example.
module tri_sorter #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] hi,
  output logic [W-1:0] md,
  output logic [W-1:0] lo
);
  logic [W-1:0] a1, b1, b2, c2, a3, b3;

  always_comb begin
    // step 1: larger of (a,b) goes up
    a1 = (a >= b) ? a : b;
    b1 = (a >= b) ? b : a;
    // step 2: larger of (b1,c) goes up, smallest settles in the bottom
    b2 = (b1 >= c) ? b1 : c;
    c2 = (b1 >= c) ? c : b1;
    // step 3: order the top two
    a3 = (a1 >= b2) ? a1 : b2;
    b3 = (a1 >= b2) ? b2 : a1;
    hi = a3;
    md = b3;
    lo = c2;
  end
endmodule
