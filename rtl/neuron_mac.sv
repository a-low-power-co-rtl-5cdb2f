// neuron_mac: the single multiply-accumulate unit shared by every neuron.
//
// Each clock with acc_en high adds x*w, formed by the approximate multiplier
// (Q10.6 x Q10.6 = Q20.12), to a 40-bit accumulator.  fin ends the neuron:
// the sum is brought back to Q10.6, the bias is added and the result goes
// through the ReLU multiplexer (negative -> 0) when relu_en is high, or
// unchanged for the output layer whose sigmoid is replaced by a comparator.
// The result is saturated to 16 bits (the article says the neuron output is
// limited to 16 bits; saturation rather than wrap-around is this design's
// choice).  clr empties the accumulator.  y and y_valid are registered: they
// appear one clock after fin.  fin may come with the last acc_en; that
// product is then included.
module neuron_mac
  import coap_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic acc_en,
  input  q_t   x,
  input  q_t   w,
  input  logic fin,
  input  q_t   bias,
  input  logic relu_en,
  output q_t   y,
  output logic y_valid
);
  typedef logic signed [39:0] acc_t;

  logic signed [31:0] prod;
  acc_t               acc, acc_next;
  logic signed [47:0] pre;

  approx_multiplier #(.W(DATA_W)) u_am (.a(x), .b(w), .p(prod));

  always_comb begin
    acc_next = acc + (acc_en ? acc_t'(prod) : acc_t'(0));
    pre      = 48'(acc_next >>> FRAC_W) + 48'(bias);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= fin;
      if (clr || fin) acc <= '0;
      else            acc <= acc_next;
      if (fin) y <= (relu_en && pre < 0) ? '0 : sat16(pre);
    end
  end
endmodule
