// priority_encoder: leading-one finder used by the approximate multiplier.
//
// Returns k, the position of the most significant 1 of x, so that
// x = 2^k (1 + f) with 0 <= f < 1 (Mitchell's characteristic).  nz is low when
// x is zero; k is then 0.  Purely combinational: a priority chain scanning
// from the LSB up, so the highest set bit wins.
module priority_encoder #(
  parameter int unsigned W  = 16,
  parameter int unsigned KW = $clog2(W)
) (
  input  logic [W-1:0]  x,
  output logic [KW-1:0] k,
  output logic          nz
);
  always_comb begin
    k  = '0;
    nz = 1'b0;
    for (int unsigned i = 0; i < W; i++) begin
      if (x[i]) begin
        k  = KW'(i);
        nz = 1'b1;
      end
    end
  end
endmodule
