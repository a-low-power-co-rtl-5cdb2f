// dnn_classifier: folded 6-32-16-8-2 neural network with one shared MAC.
//
// The DNN control unit steps through the four layers; inside a layer, the
// layer FSM runs one neuron after another on the single neuron_mac: it
// streams the neuron's weights from the weight memory, one per clock, with the
// matching input selected from the previous layer's output register, then
// reads the bias and finishes the neuron (bias add and ReLU).  Each layer's
// outputs are collected in a serial-in parallel-out register (the "Layer n
// Output" registers of the article's figure) that feeds the next layer.
// Layers 1-3 use ReLU; layer 4 has no activation and its two nodes go to the
// output comparator, which replaces the two sigmoids.
// Weight memory layout (shared with weight_memory): neuron by neuron, layer
// by layer, each neuron's weights in input order followed by its bias.
// Timing: pulse start with in_vec stable (it is captured).  A neuron with
// N inputs takes N + 3 clocks; the whole network 1,022 + 2 = 1,024 clocks.
// done pulses with arrhythmia/normal and the two output nodes valid; they
// hold until the next result.
module dnn_classifier
  import coap_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  q_t                 in_vec [N_IN],
  // weight memory read port (one clock read latency)
  output logic [WADDR_W-1:0] w_raddr,
  input  q_t                 w_rdata,
  // result
  output q_t                 node [N_L4],
  output logic               arrhythmia,
  output logic               normal,
  output logic               done
);
  typedef enum logic [1:0] {IDLE, ISSUE, WAITY} state_e;

  state_e               state;
  logic [1:0]           layer;
  logic [5:0]           j;           // neuron within the layer
  logic [5:0]           i;           // input index being read (N = bias)
  logic [WADDR_W-1:0]   ptr;
  logic                 rd_v;
  logic [5:0]           rd_i;

  q_t in_reg [N_IN];
  q_t l1 [N_L1];
  q_t l2 [N_L2];
  q_t l3 [N_L3];
  q_t l4 [N_L4];

  // Layer geometry.
  logic [5:0] n_in, n_out;
  always_comb begin
    unique case (layer)
      2'd0:    begin n_in = 6'(N_IN); n_out = 6'(N_L1); end
      2'd1:    begin n_in = 6'(N_L1); n_out = 6'(N_L2); end
      2'd2:    begin n_in = 6'(N_L2); n_out = 6'(N_L3); end
      default: begin n_in = 6'(N_L3); n_out = 6'(N_L4); end
    endcase
  end

  // Input multiplexer: the previous layer's output register.
  q_t x_sel;
  always_comb begin
    unique case (layer)
      2'd0:    x_sel = in_reg[rd_i < 6'(N_IN) ? rd_i[2:0] : 3'd0];
      2'd1:    x_sel = l1[rd_i[4:0]];
      2'd2:    x_sel = l2[rd_i[3:0]];
      default: x_sel = l3[rd_i[2:0]];
    endcase
  end

  logic mac_acc, mac_fin, y_valid;
  q_t   y;
  assign mac_acc = rd_v && (rd_i < n_in);
  assign mac_fin = rd_v && (rd_i == n_in);
  assign w_raddr = ptr;

  neuron_mac u_mac (
    .clk, .rst_n, .clr(start), .acc_en(mac_acc), .x(x_sel), .w(w_rdata),
    .fin(mac_fin), .bias(w_rdata), .relu_en(layer != 2'd3), .y, .y_valid
  );

  logic arr_c, nor_c;
  output_comparator u_cmp (.node0(l4[0]), .node1(l4[1]), .arrhythmia(arr_c), .normal(nor_c));

  logic fin_net;   // the last neuron's output has just been shifted in

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      layer      <= '0;
      j          <= '0;
      i          <= '0;
      ptr        <= '0;
      rd_v       <= 1'b0;
      rd_i       <= '0;
      fin_net    <= 1'b0;
      done       <= 1'b0;
      arrhythmia <= 1'b0;
      normal     <= 1'b0;
      for (int k = 0; k < int'(N_IN); k++) in_reg[k] <= '0;
      for (int k = 0; k < int'(N_L1); k++) l1[k] <= '0;
      for (int k = 0; k < int'(N_L2); k++) l2[k] <= '0;
      for (int k = 0; k < int'(N_L3); k++) l3[k] <= '0;
      for (int k = 0; k < int'(N_L4); k++) l4[k] <= '0;
    end else begin
      done    <= 1'b0;
      fin_net <= 1'b0;
      rd_v    <= (state == ISSUE);
      rd_i    <= i;
      if (fin_net) begin
        arrhythmia <= arr_c;
        normal     <= nor_c;
        done       <= 1'b1;
      end
      unique case (state)
        IDLE: if (start) begin
          in_reg <= in_vec;
          layer  <= '0;
          j      <= '0;
          i      <= '0;
          ptr    <= '0;
          state  <= ISSUE;
        end
        // Read the weights, then the bias, of neuron j.
        ISSUE: begin
          ptr <= ptr + 1'b1;
          if (i == n_in) state <= WAITY;
          else           i     <= i + 1'b1;
        end
        // The neuron's output: shift it into the layer's SIPO register.
        WAITY: if (y_valid) begin
          unique case (layer)
            2'd0: begin for (int k = 0; k < int'(N_L1)-1; k++) l1[k] <= l1[k+1]; l1[N_L1-1] <= y; end
            2'd1: begin for (int k = 0; k < int'(N_L2)-1; k++) l2[k] <= l2[k+1]; l2[N_L2-1] <= y; end
            2'd2: begin for (int k = 0; k < int'(N_L3)-1; k++) l3[k] <= l3[k+1]; l3[N_L3-1] <= y; end
            default: begin for (int k = 0; k < int'(N_L4)-1; k++) l4[k] <= l4[k+1]; l4[N_L4-1] <= y; end
          endcase
          i <= '0;
          if (j == n_out - 1'b1) begin
            j <= '0;
            if (layer == 2'd3) begin
              state   <= IDLE;
              fin_net <= 1'b1;
            end else begin
              layer <= layer + 1'b1;
              state <= ISSUE;
            end
          end else begin
            j     <= j + 1'b1;
            state <= ISSUE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign node = l4;
endmodule
