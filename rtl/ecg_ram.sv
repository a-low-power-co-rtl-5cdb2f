// ecg_ram: window buffer for the filtered ECG.
//
// Two banks of WIN_LEN 16-bit samples.  While one bank records the current
// 3-s window, the delineator searches the previous window in the other bank
// for its Q, S, P and T points; the banks swap at each window end.  The
// article names a single ECG RAM; the second bank is this design's choice,
// so the search never races the incoming samples.  Write and read addresses
// are (bank, index); the read data is registered (one clock of latency).
module ecg_ram
  import coap_pkg::*;
#(
  parameter int unsigned DEPTH = WIN_LEN,
  parameter int unsigned AW    = IDX_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  q_t            wdata,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output q_t            rdata
);
  q_t mem [2*DEPTH];

  logic [AW:0] wa, ra;
  always_comb begin
    wa = wbank ? (AW+1)'(DEPTH) + (AW+1)'(waddr) : (AW+1)'(waddr);
    ra = rbank ? (AW+1)'(DEPTH) + (AW+1)'(raddr) : (AW+1)'(raddr);
  end

  always_ff @(posedge clk) begin
    if (we && (waddr < AW'(DEPTH))) mem[wa] <= wdata;
    rdata <= mem[(raddr < AW'(DEPTH)) ? ra : '0];
  end
endmodule
