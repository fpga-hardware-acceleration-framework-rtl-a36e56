// nn_block: the neural-network inference engine of the intrusion detector.
//
// Records stream in as N_IN feature beats and leave as one class beat each.
// The datapath is a chain of four stages with valid/ready handshakes, so
// that consecutive records overlap (layer-level pipelining):
//   pre_process   collects the N_IN features of a record from the stream
//   hidden layer  N_HID ReLU neurons on LANES shared neuron units
//   output layer  N_OUT linear neurons (the class scores) on LANES units
//   post_process  argmax of the scores, output stream with tlast
// Each layer copies its input vector when it starts, so the stage before it
// can go on with the next record at once. In steady state one record leaves
// every OUT_GROUPS*OUT_BEATS + 5 cycles (25 at the default sizes), set by the
// output layer; a single record takes 45 cycles from its first input beat to
// its output beat, so a transfer of N records takes 45 + 25*(N-1) cycles when
// the input stream is kept full.
// Fixed-point formats: features Q0.16 unsigned; weights and biases W_W-bit
// integers from the quantization floor(2^n w/w_max); hidden activations are
// the hidden sums shifted right by HID_SHIFT and clamped to H_W unsigned
// bits (Q4.12 at the defaults); biases are scaled to the product scale of
// their layer (2^X_FRAC, 2^H_FRAC) before they are added.
// Parameters are written one at a time through the param_wr port: layer,
// neuron and input index, the input index equal to the fan-in selecting the
// bias. The stage split (pre-process, two layers with 8 neurons each,
// post-process, parameters in BlockRAM) follows the source design; formats,
// framing and handshakes are this design's choices.
module nn_block
  import ids_pkg::*;
#(
  parameter int unsigned P_N_IN   = N_IN,
  parameter int unsigned P_N_HID  = N_HID,
  parameter int unsigned P_N_OUT  = N_OUT,
  parameter int unsigned P_LANES  = LANES,
  parameter int unsigned P_K      = K_MUL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 param_wr_en,
  input  param_wr_t            param_wr,
  input  logic [31:0]          num_records,
  output logic [31:0]          rec_count,
  input  logic [AXIS_W-1:0]    s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  output logic [AXIS_W-1:0]    m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast
);
  logic                            f_valid, f_ready;
  logic [P_N_IN-1:0][X_W-1:0]      f_vec;
  logic                            h_valid, h_ready;
  logic [P_N_HID-1:0][H_W-1:0]     h_vec;
  logic                            o_valid, o_ready;
  logic [P_N_OUT-1:0][ACC_W-1:0]   o_vec;

  pre_process #(.N_IN(P_N_IN), .X_W(X_W), .AXIS_W(AXIS_W)) u_pre (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .out_valid(f_valid), .out_ready(f_ready), .out_vec(f_vec)
  );

  layer_engine #(
    .N_IN(P_N_IN), .N_NEU(P_N_HID), .LANES(P_LANES), .K(P_K), .X_W(X_W), .W_W(W_W),
    .ACC_W(ACC_W), .RELU(1'b1), .BIAS_SHIFT(X_FRAC), .OUT_SHIFT(HID_SHIFT), .OUT_W(H_W)
  ) u_hidden (
    .clk, .rst_n,
    .pw_en(param_wr_en && !param_wr.layer), .pw_neuron(param_wr.neuron),
    .pw_input(param_wr.input_idx), .pw_data(param_wr.data),
    .in_valid(f_valid), .in_ready(f_ready), .in_vec(f_vec),
    .out_valid(h_valid), .out_ready(h_ready), .out_vec(h_vec)
  );

  layer_engine #(
    .N_IN(P_N_HID), .N_NEU(P_N_OUT), .LANES(P_LANES), .K(P_K), .X_W(H_W), .W_W(W_W),
    .ACC_W(ACC_W), .RELU(1'b0), .BIAS_SHIFT(H_FRAC), .OUT_SHIFT(0), .OUT_W(ACC_W)
  ) u_output (
    .clk, .rst_n,
    .pw_en(param_wr_en && param_wr.layer), .pw_neuron(param_wr.neuron),
    .pw_input(param_wr.input_idx), .pw_data(param_wr.data),
    .in_valid(h_valid), .in_ready(h_ready), .in_vec(h_vec),
    .out_valid(o_valid), .out_ready(o_ready), .out_vec(o_vec)
  );

  post_process #(.N_OUT(P_N_OUT), .ACC_W(ACC_W), .AXIS_W(AXIS_W)) u_post (
    .clk, .rst_n,
    .in_valid(o_valid), .in_ready(o_ready), .scores(o_vec), .num_records,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast, .rec_count
  );
endmodule
