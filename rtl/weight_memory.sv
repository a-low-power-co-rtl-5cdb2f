// weight_memory: storage for the trained weights and biases of the network.
//
// 906 words of Q10.6: for every neuron of layers 1..4 in order, its weights
// (one per input of the layer) followed by its bias.  The trained values are
// not part of the hardware description, so the memory is written through a
// load port before use.  One write port and one read port; the read data is
// registered (one clock of latency), like a small SRAM.  The memory is not
// reset; it must be loaded before the first classification.
module weight_memory
  import coap_pkg::*;
#(
  parameter int unsigned DEPTH = WMEM_DEPTH,
  parameter int unsigned AW    = WADDR_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  q_t            wdata,
  input  logic [AW-1:0] raddr,
  output q_t            rdata
);
  q_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < AW'(DEPTH))) mem[waddr] <= wdata;
    rdata <= mem[(raddr < AW'(DEPTH)) ? raddr : '0];
  end
endmodule
