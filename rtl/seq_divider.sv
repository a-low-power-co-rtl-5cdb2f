// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Computes the per-beat iCEB ratio, where the article's figure shows a
// divider ("Div") between the two interval subtractions.  Its insides are
// this design's choice: the simplest sequential divider, W cycles per
// quotient.  Pulse start with dividend and divisor; done pulses W cycles
// later with quot valid (held until the next start).  A zero divisor gives an
// all-ones quotient.
module seq_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quot,
  output logic         busy,
  output logic         done
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  dvs;
  logic [W:0]    rem;
  logic [CW-1:0] cnt;
  logic [W:0]    trial;

  assign trial = {rem[W-1:0], quot[W-1]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvs  <= '0;
      rem  <= '0;
      quot <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvs  <= divisor;
        rem  <= '0;
        quot <= dividend;
        cnt  <= CW'(W);
        busy <= 1'b1;
      end else if (busy) begin
        // Shift the next dividend bit into the remainder and try a subtract.
        if (!trial[W]) begin
          rem  <= {1'b0, trial[W-1:0]};
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= {rem[W-1:0], quot[W-1]};
          quot <= {quot[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
