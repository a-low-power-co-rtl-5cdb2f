// coap_top: arrhythmia-prediction co-processor.
//
// Raw 16-bit ECG samples at 250 Hz enter on sample/sample_valid.  They are
// band-pass filtered (0.5-40 Hz), stored window by window (3 s, 750 samples)
// in the ECG RAM, and scanned on the fly for R peaks.  At each window end the
// main control unit has the Q, S, P and T peaks of every complete beat found
// in the stored window, the six descriptors computed from them, and the
// 6-32-16-8-2 network evaluated on the shared approximate-multiplier MAC.
// result_valid then pulses with arrhythmia/normal, the descriptors and the
// number of beats used.  The trained weights and biases are loaded through
// the wmem_* port (906 Q10.6 words, see weight_memory) while no window is
// being classified.  One clock domain; the article runs it at 12.5 kHz,
// at which a window's processing (at most about 2,000 clocks) ends well before the
// next window (37,500 clocks).  Debug outputs: peak_pulse on every accepted
// R peak, overrun when a window was skipped because the previous one was
// still being processed.  busy is high from a window end until its result;
// the weight memory should be written only while it is low.
module coap_top
  import coap_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_valid,
  input  q_t                 sample,
  input  logic               wmem_we,
  input  logic [WADDR_W-1:0] wmem_addr,
  input  q_t                 wmem_wdata,
  output logic               result_valid,
  output logic               arrhythmia,
  output logic               normal,
  output q_t                 descriptors [N_IN],
  output logic [CNT_W-1:0]   n_beats,
  output q_t                 out_nodes [N_L4],
  output logic               peak_pulse,
  output logic               overrun,
  output logic               busy
);
  // Filter
  q_t   f_sample;
  logic f_valid;
  ecg_bpf u_bpf (.clk, .rst_n, .in_valid(sample_valid), .x(sample), .y(f_sample), .out_valid(f_valid));

  // Control
  logic ram_we, wbank, rbank, win_end;
  idx_t widx;
  logic del_start, del_done, desc_start, desc_done, dnn_start, dnn_done;
  main_control_unit u_mcu (
    .clk, .rst_n, .in_valid(f_valid), .ram_we, .wbank, .widx, .rbank, .win_end,
    .del_start, .del_done, .desc_start, .desc_done, .dnn_start, .dnn_done,
    .result_valid, .overrun, .busy
  );

  // ECG RAM
  idx_t raddr;
  q_t   rdata;
  ecg_ram u_ram (.clk, .we(ram_we), .wbank, .waddr(widx), .wdata(f_sample),
                 .rbank, .raddr, .rdata);

  // R peaks on the stream
  idx_t             r_idx [MAX_BEATS];
  logic [CNT_W-1:0] r_cnt;
  r_peak_detector u_rpk (.clk, .rst_n, .in_valid(f_valid), .x(f_sample), .idx(widx),
                         .win_end, .r_idx, .r_cnt, .peak_pulse);

  // Q, S, P, T peaks from the stored window
  beat_t beats [MAX_BEATS];
  peak_delineator u_del (.clk, .rst_n, .start(del_start), .r_idx, .r_cnt, .raddr, .rdata,
                         .beats, .n_beats, .done(del_done));

  // Descriptors
  descriptor_processor u_desc (.clk, .rst_n, .start(desc_start), .beats, .n_beats,
                               .desc(descriptors), .done(desc_done));

  // Classifier and its weights
  logic [WADDR_W-1:0] w_raddr;
  q_t                 w_rdata;
  weight_memory u_wmem (.clk, .we(wmem_we), .waddr(wmem_addr), .wdata(wmem_wdata),
                        .raddr(w_raddr), .rdata(w_rdata));
  dnn_classifier u_dnn (.clk, .rst_n, .start(dnn_start), .in_vec(descriptors),
                        .w_raddr, .w_rdata, .node(out_nodes), .arrhythmia, .normal,
                        .done(dnn_done));
endmodule
