// approx_multiplier: operand-decomposition approximate multiplier.
//
// Each magnitude is split at its leading one: a = 2^k1 + fa, b = 2^k2 + fb.
// Then exactly a*b = (a << k2) + (b << k1) - 2^(k1+k2) + fa*fb.  The first
// three terms are shifts; only the small residue product fa*fb is
// approximated, with Mitchell's logarithmic method: with fa = 2^k3 (1+x3) and
// fb = 2^k4 (1+x4),
//     fa*fb ~ 2^(k3+k4)   (1 + x3 + x4)   if x3 + x4 < 1
//     fa*fb ~ 2^(k3+k4+1) (x3 + x4)       otherwise,
// plus the mean Mitchell error 2^(k3+k4)/12 as a bias (0.083333 = 5461/65536
// in the 16-bit fraction used here).  The fractions x3, x4 are held with 16
// fraction bits; the bias is added before the final shift by k3+k4.
// The article gives the algorithm for unsigned operands; signed Q10.6
// operands are handled here in sign-magnitude form (this design's choice).
// Interface: a, b signed 16-bit; p signed 32-bit, the product in the same
// scale as a*b (Q20.12 for Q10.6 inputs).  Combinational.
module approx_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  localparam int unsigned KW   = $clog2(W);
  localparam int unsigned FW   = 16;                 // fraction bits of x3, x4
  localparam int unsigned BIAS = 5461;               // 2^16 / 12
  localparam int unsigned PW   = 2*W + FW + 2;       // wide enough for every term

  logic [W-1:0]  am, bm, fa, fb;
  logic [KW-1:0] k1, k2, k3, k4;
  logic          nz1, nz2, nz3, nz4;
  logic          neg;

  assign neg = a[W-1] ^ b[W-1];
  assign am  = a[W-1] ? W'(-a) : W'(a);
  assign bm  = b[W-1] ? W'(-b) : W'(b);

  priority_encoder #(.W(W)) u_pe_a (.x(am), .k(k1), .nz(nz1));
  priority_encoder #(.W(W)) u_pe_b (.x(bm), .k(k2), .nz(nz2));

  // Residues below the leading ones.
  assign fa = am - (W'(1) << k1);
  assign fb = bm - (W'(1) << k2);

  priority_encoder #(.W(W)) u_pe_fa (.x(fa), .k(k3), .nz(nz3));
  priority_encoder #(.W(W)) u_pe_fb (.x(fb), .k(k4), .nz(nz4));

  logic [PW-1:0] base, mitch, mag;
  logic [FW-1:0] x3, x4;
  logic [FW:0]   xs;
  logic [FW+2:0] mant;

  always_comb begin
    // Exact shift terms.
    base = (PW'(am) << k2) + (PW'(bm) << k1) - (PW'(1) << (32'(k1) + 32'(k2)));
    // Mitchell product of the residues, with the bias.
    x3 = FW'(({16'd0, fa} << (FW - 32'(k3))));
    x4 = FW'(({16'd0, fb} << (FW - 32'(k4))));
    xs = {1'b0, x3} + {1'b0, x4};
    if (!xs[FW]) mant = (FW+3)'(1 << FW) + (FW+3)'(xs) + (FW+3)'(BIAS);
    else         mant = ((FW+3)'(xs) << 1) + (FW+3)'(BIAS);
    mitch = (nz3 && nz4) ? ((PW'(mant) << (32'(k3) + 32'(k4))) >> FW) : '0;
    mag   = (nz1 && nz2) ? base + mitch : '0;
    p     = neg ? -$signed((2*W)'(mag)) : $signed((2*W)'(mag));
  end
endmodule
