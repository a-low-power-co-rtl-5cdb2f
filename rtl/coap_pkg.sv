// coap_pkg: types and constants shared by the arrhythmia-prediction co-processor.
//
// Data words are 16-bit two's complement in Q10.6 (10 integer bits including
// sign, 6 fraction bits), the format the descriptors, weights and biases use.
// The ECG is sampled at 250 Hz and processed in 3-s windows of 750 samples,
// which hold at most four beats.  The classifier is a 6-32-16-8-2 network.
// The peak-search spans (in samples) are this design's own choice: they are
// physiological limits for the Q/S minima and P/T maxima around an R peak.
package coap_pkg;

  localparam int unsigned DATA_W    = 16;
  localparam int unsigned FRAC_W    = 6;
  localparam int unsigned FS_HZ     = 250;
  localparam int unsigned WIN_LEN   = 750;            // 3 s x 250 Hz
  localparam int unsigned IDX_W     = 10;             // sample index within a window
  localparam int unsigned MAX_BEATS = 4;
  localparam int unsigned CNT_W     = 3;              // 0..4 beats

  // Search spans around an R peak (samples at 250 Hz).
  localparam int unsigned Q_SPAN = 25;                // 100 ms before R
  localparam int unsigned S_SPAN = 25;                // 100 ms after R
  localparam int unsigned P_SPAN = 50;                // 200 ms before Q
  localparam int unsigned T_SPAN = 100;               // 400 ms after S

  // Network shape: inputs then the four layers.
  localparam int unsigned N_IN = 6;
  localparam int unsigned N_L1 = 32;
  localparam int unsigned N_L2 = 16;
  localparam int unsigned N_L3 = 8;
  localparam int unsigned N_L4 = 2;
  // Each neuron stores its weights followed by its bias.
  localparam int unsigned WMEM_DEPTH = N_L1*(N_IN+1) + N_L2*(N_L1+1) + N_L3*(N_L2+1) + N_L4*(N_L3+1);
  localparam int unsigned WADDR_W    = 10;

  typedef logic signed [DATA_W-1:0] q_t;              // Q10.6 word
  typedef logic        [IDX_W-1:0]  idx_t;

  // Fiducial points of one beat, as sample indices in the window.
  typedef struct packed {
    idx_t p;
    idx_t q;
    idx_t r;
    idx_t s;
    idx_t t;
  } beat_t;

  // Position of each descriptor in the DNN input vector.
  typedef enum logic [2:0] {
    D_QRS_M   = 3'd0,
    D_RT_M    = 3'd1,
    D_RT_VAR  = 3'd2,
    D_PS_M    = 3'd3,
    D_ICEB_M  = 3'd4,
    D_ICEB_VAR= 3'd5
  } desc_e;

  // Saturate a wide signed value to a Q10.6 word.
  function automatic q_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return q_t'(16'sh7fff);
    else if (v < -48'sd32768) return q_t'(16'sh8000);
    else                      return q_t'(v[15:0]);
  endfunction

endpackage
