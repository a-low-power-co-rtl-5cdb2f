// div_by_n: divides a sum by the beat count of a window with shifts only.
//
// A 3-s window holds at most four beats, so n is 1..4: n = 1 passes x,
// n = 2 and n = 4 shift right by 1 and 2, and n = 3 uses the shift-add
// approximation x/3 ~ x>>2 + x>>4 + x>>5 (0.34375 x), as the article does.
// n = 0 (no usable beat) gives 0, this design's choice.  x is unsigned; the
// sums it receives (intervals, squares, ratios) are never negative.
// Combinational.
module div_by_n #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [2:0]   n,
  output logic [W-1:0] q
);
  always_comb begin
    unique case (n)
      3'd1:    q = x;
      3'd2:    q = x >> 1;
      3'd3:    q = (x >> 2) + (x >> 4) + (x >> 5);
      3'd4:    q = x >> 2;
      default: q = '0;
    endcase
  end
endmodule
