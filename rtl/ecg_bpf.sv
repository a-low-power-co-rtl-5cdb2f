// ecg_bpf: 0.5-40 Hz band-pass filter for the 250 Hz ECG stream.
//
// The article fixes only the pass band.  This design uses the cheapest
// filter that meets it, a first-order high-pass followed by a first-order
// low-pass, both multiplier-free:
//   high-pass  h[n] = x[n] - x[n-1] + h[n-1] - h[n-1]/2^HP_SHIFT
//              (pole 1 - 2^-6; corner ~ fs/(2 pi 64) = 0.62 Hz)
//   low-pass   y[n] = y[n-1] + (h[n] - y[n-1]) * 5/8
//              (corner -ln(3/8) fs / (2 pi) = 39 Hz)
// One sample is taken when in_valid is high; the filtered sample appears on
// y with out_valid one clock later.  The filter state is 32-bit with 8
// fraction bits below the sample's LSB, so that truncation in the feedback
// leaves no DC residue; y saturates to 16 bits.  Reset clears the filter state.
module ecg_bpf
  import coap_pkg::*;
#(
  parameter int unsigned HP_SHIFT = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q_t   x,
  output q_t   y,
  output logic out_valid
);
  localparam int unsigned IW = 32;
  localparam int unsigned GF = 8;     // guard fraction bits of the filter state
  typedef logic signed [IW-1:0] acc_t;

  acc_t x_prev, hp, lp;
  acc_t hp_next, lp_diff, lp_next;

  always_comb begin
    hp_next = (acc_t'(x) <<< GF) - x_prev + hp - (hp >>> HP_SHIFT);
    lp_diff = hp_next - lp;
    lp_next = lp + (lp_diff >>> 1) + (lp_diff >>> 3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev    <= '0;
      hp        <= '0;
      lp        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_prev <= acc_t'(x) <<< GF;
        hp     <= hp_next;
        lp     <= lp_next;
        y      <= sat16(48'(lp_next >>> GF));
      end
    end
  end
endmodule
