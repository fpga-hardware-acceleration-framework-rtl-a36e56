// layer_engine_chk: drives one layer_engine instance with random parameters
// and random input vectors, and compares every output vector with a
// reference computed here in plain integer arithmetic (dot product, bias
// times 2^BIAS_SHIFT, arithmetic shift, ReLU clamp). The output side is
// throttled at random to exercise backpressure, and the latency from input
// acceptance to out_valid is checked against GROUPS*BEATS + 4 cycles.
module layer_engine_chk #(
  parameter int unsigned N_IN       = 5,
  parameter int unsigned N_NEU      = 40,
  parameter bit          RELU       = 1'b1,
  parameter int unsigned BIAS_SHIFT = 16,
  parameter int unsigned OUT_SHIFT  = 24,
  parameter int unsigned OUT_W      = 16,
  parameter int unsigned VECTORS    = 20,
  parameter int unsigned SEED       = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   clamps_low,
  output int   clamps_high
);
  localparam int unsigned X_W = 16, W_W = 21, ACC_W = 48, LANES = 8, K = 4;
  localparam int unsigned BEATS  = (N_IN + K - 1) / K;
  localparam int unsigned GROUPS = (N_NEU + LANES - 1) / LANES;

  logic                        pw_en;
  logic [7:0]                  pw_neuron, pw_input;
  logic [W_W-1:0]              pw_data;
  logic                        in_valid, in_ready, out_valid, out_ready;
  logic [N_IN-1:0][X_W-1:0]    in_vec;
  logic [N_NEU-1:0][OUT_W-1:0] out_vec;

  layer_engine #(.N_IN(N_IN), .N_NEU(N_NEU), .RELU(RELU), .BIAS_SHIFT(BIAS_SHIFT),
                 .OUT_SHIFT(OUT_SHIFT), .OUT_W(OUT_W)) dut (.*);

  longint w [N_NEU][N_IN+1];
  longint x [N_IN];
  longint exp_out [N_NEU];
  int     t_accept, lat;
  int     cyc = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  function automatic longint sx(input longint v, input int bits);
    return (v << (64 - bits)) >>> (64 - bits);
  endfunction

  task automatic compute_ref();
    for (int n = 0; n < N_NEU; n++) begin
      longint s;
      s = w[n][N_IN] <<< BIAS_SHIFT;
      for (int i = 0; i < N_IN; i++) s += x[i] * w[n][i];
      s = s >>> OUT_SHIFT;
      if (RELU) begin
        if (s < 0) begin s = 0; clamps_low++; end
        else if (s > (longint'(1) << OUT_W) - 1) begin s = (longint'(1) << OUT_W) - 1; clamps_high++; end
      end else begin
        s = sx(s, OUT_W);
      end
      exp_out[n] = s;
    end
  endtask

  // random output backpressure
  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    done = 0; checks = 0; failures = 0; clamps_low = 0; clamps_high = 0;
    pw_en = 0; pw_neuron = 0; pw_input = 0; pw_data = 0; in_valid = 0; in_vec = '0;
    void'($urandom(SEED));
    @(posedge rst_n);
    // load parameters
    for (int n = 0; n < N_NEU; n++)
      for (int i = 0; i <= N_IN; i++) begin
        w[n][i] = sx(longint'($urandom()), W_W);
        @(negedge clk);
        pw_en = 1; pw_neuron = 8'(n); pw_input = 8'(i); pw_data = W_W'(w[n][i]);
      end
    @(negedge clk) pw_en = 0;
    for (int v = 0; v < VECTORS; v++) begin
      for (int i = 0; i < N_IN; i++) begin
        x[i] = longint'($urandom_range(0, 65535));
        if (v == 0) x[i] = 65535;
        in_vec[i] = X_W'(x[i]);
      end
      compute_ref();
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      t_accept = cyc;
      @(negedge clk) in_valid = 0;
      while (!out_valid) @(posedge clk);
      lat = cyc - t_accept;
      checks++;
      if (lat != int'(GROUPS * BEATS + 4)) begin
        failures++;
        $display("latency %0d, expected %0d", lat, GROUPS * BEATS + 4);
      end
      for (int n = 0; n < N_NEU; n++) begin
        checks++;
        if ((RELU ? longint'(out_vec[n]) : sx(longint'(out_vec[n]), OUT_W)) != exp_out[n]) begin
          failures++;
          if (failures < 10) $display("vec %0d neuron %0d: got %0d expected %0d", v, n, out_vec[n], exp_out[n]);
        end
      end
      while (!(out_valid && out_ready)) @(posedge clk);
      @(negedge clk);
    end
    done = 1;
  end
endmodule
