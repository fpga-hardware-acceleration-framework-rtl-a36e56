// ids_pkg: sizes, fixed-point formats and register map shared by the
// intrusion-detection NN accelerator.
//
// The network is the static-feature classifier: 5 input features (source IP,
// destination IP, source port, destination port, protocol), one hidden layer
// of 40 ReLU neurons and an output layer of 16 classes (benign plus 15 attack
// labels). Each layer is computed by 8 shared neuron units. Weights are
// quantized as floor(2^n * w_i / w_max) with n = 20, which needs n+1 = 21 bits
// in two's complement. The remaining formats (feature words, activation
// width, accumulator width, register map) are this design's own choices.
package ids_pkg;

  // Network shape
  localparam int unsigned N_IN    = 5;   // static features per record
  localparam int unsigned N_HID   = 40;  // hidden neurons
  localparam int unsigned N_OUT   = 16;  // output classes
  localparam int unsigned LANES   = 8;   // neuron units per layer
  localparam int unsigned K_MUL   = 4;   // multipliers per neuron unit

  // Fixed-point formats
  localparam int unsigned Q_BITS  = 20;          // n in the quantization formula
  localparam int unsigned W_W     = Q_BITS + 1;  // signed weight / bias width
  localparam int unsigned X_W     = 16;          // unsigned feature width, Q0.16
  localparam int unsigned X_FRAC  = 16;          // fraction bits of a feature
  localparam int unsigned H_W     = 16;          // unsigned hidden activation width
  localparam int unsigned H_FRAC  = 12;          // fraction bits of a hidden activation
  localparam int unsigned ACC_W   = 48;          // accumulator width (DSP48 P width)
  // Hidden requantization: accumulator scale 2^(X_FRAC+Q_BITS) -> 2^H_FRAC
  localparam int unsigned HID_SHIFT = X_FRAC + Q_BITS - H_FRAC;

  // Stream and bus widths
  localparam int unsigned AXIS_W  = 32;
  localparam int unsigned AXIL_AW = 8;
  localparam int unsigned AXIL_DW = 32;
  localparam int unsigned CLS_W   = $clog2(N_OUT);

  // Register map (byte offsets on the AXI-lite slave)
  typedef enum logic [AXIL_AW-1:0] {
    REG_CTRL       = 8'h00,  // bit0: soft reset of the NN datapath (level)
    REG_NUM_REC    = 8'h04,  // records per output transfer (tlast period), 0 = 1
    REG_PARAM_ADDR = 8'h08,  // [16] layer, [15:8] neuron, [7:0] input (= fan-in: bias)
    REG_PARAM_DATA = 8'h0C,  // write: store a quantized parameter at PARAM_ADDR
    REG_STATUS     = 8'h10,  // read: records classified since reset
    REG_INFO       = 8'h14   // read: {N_OUT[7:0], N_HID[7:0], N_IN[7:0], 8'h00}
  } reg_addr_e;

  // One parameter write, from the register block to the NN block
  typedef struct packed {
    logic             layer;   // 0: hidden layer, 1: output layer
    logic [7:0]       neuron;
    logic [7:0]       input_idx; // index == fan-in selects the bias
    logic [W_W-1:0]   data;
  } param_wr_t;

endpackage
