// layer_engine: one fully connected NN layer computed on shared neuron units.
//
// The layer has N_NEU neurons of fan-in N_IN. LANES neuron units work in
// parallel, each on one neuron of the current group of LANES neurons; the
// groups are processed one after another (resource sharing), so the N_NEU
// neurons take GROUPS = ceil(N_NEU/LANES) passes. Each neuron unit has K
// multipliers: per cycle (a "beat") it multiplies K inputs by K weights and
// adds each product into its own accumulator, so one neuron takes
// BEATS = ceil(N_IN/K) beats. After the last beat the K accumulators are summed,
// the bias (scaled by 2^BIAS_SHIFT to the product scale) is added, and the
// result goes through the activation: an arithmetic right shift by OUT_SHIFT,
// then, with RELU = 1, clamping to [0, 2^OUT_W - 1]; with RELU = 0 the shifted
// sum is passed on in OUT_W bits (the output layer, whose scores only feed an
// argmax, so softmax is not computed).
//
// Pipeline, one beat issued per cycle with no bubbles between groups:
//   issue  : parameter RAM read of row (group, beat)
//   mul    : K x LANES products registered (the MUL stage)
//   mac    : accumulators updated; on the group's last beat the sums are copied
//   act    : adder tree, bias, activation, write into the output vector
// Interface: in_valid/in_ready accepts one input vector, which is copied, so
// the producer is free at once. out_valid rises when all N_NEU outputs are
// written and stays until out_ready; a new vector is only accepted once the
// previous result has been taken. Latency from acceptance to out_valid is
// GROUPS*BEATS + 4 cycles.
// Parameters are loaded through the pw_* port: neuron index and input index,
// with input index N_IN selecting the neuron's bias.
// The 8 neuron units per layer, the ReLU hidden layer, the multiply and
// multiply-accumulate split and n-bit integer weights follow the source
// design; K = 4 multipliers per unit is read from its block diagram; the
// beat schedule, the formats and the handshakes are this design's choice.
module layer_engine #(
  parameter int unsigned N_IN       = 5,
  parameter int unsigned N_NEU      = 40,
  parameter int unsigned LANES      = 8,
  parameter int unsigned K          = 4,
  parameter int unsigned X_W        = 16,
  parameter int unsigned W_W        = 21,
  parameter int unsigned ACC_W      = 48,
  parameter bit          RELU       = 1'b1,
  parameter int unsigned BIAS_SHIFT = 16,
  parameter int unsigned OUT_SHIFT  = 24,
  parameter int unsigned OUT_W      = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // parameter load
  input  logic                       pw_en,
  input  logic [7:0]                 pw_neuron,
  input  logic [7:0]                 pw_input,
  input  logic [W_W-1:0]             pw_data,
  // input vector
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [N_IN-1:0][X_W-1:0]   in_vec,
  // output vector
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [N_NEU-1:0][OUT_W-1:0] out_vec
);

  localparam int unsigned BEATS  = (N_IN + K - 1) / K;
  localparam int unsigned GROUPS = (N_NEU + LANES - 1) / LANES;
  localparam int unsigned WROWS  = GROUPS * BEATS;
  localparam int unsigned PW     = X_W + 1 + W_W;
  localparam int unsigned RW     = (WROWS  > 1) ? $clog2(WROWS)  : 1;
  localparam int unsigned BRW    = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned BW     = (BEATS  > 1) ? $clog2(BEATS)  : 1;

  // ---------------------------------------------------------------- memories
  logic                               wram_we, bram_we;
  logic [RW-1:0]                      wram_wrow;
  logic [$clog2(LANES*K)-1:0]         wram_welem;
  logic [BRW-1:0]                     bram_wrow;
  logic [$clog2(LANES)-1:0]           bram_welem;
  logic                               rd_en;
  logic [RW-1:0]                      rd_row;
  logic [BRW-1:0]                     rd_brow;
  logic [LANES*K-1:0][W_W-1:0]        w_row;
  logic [LANES-1:0][W_W-1:0]          b_row;

  always_comb begin
    int unsigned grp, lane, beat, kk;
    grp  = 32'(pw_neuron) / LANES;
    lane = 32'(pw_neuron) % LANES;
    beat = 32'(pw_input) / K;
    kk   = 32'(pw_input) % K;
    bram_we    = pw_en && (32'(pw_neuron) < N_NEU) && (32'(pw_input) == N_IN);
    wram_we    = pw_en && (32'(pw_neuron) < N_NEU) && (32'(pw_input) <  N_IN);
    wram_wrow  = RW'(grp * BEATS + beat);
    wram_welem = $bits(wram_welem)'(lane * K + kk);
    bram_wrow  = BRW'(grp);
    bram_welem = $bits(bram_welem)'(lane);
  end

  param_ram #(.ROWS(WROWS), .ELEMS(LANES*K), .EW(W_W)) u_wram (
    .clk, .wr_en(wram_we), .wr_row(wram_wrow), .wr_elem(wram_welem), .wr_data(pw_data),
    .rd_en, .rd_row, .rd_data(w_row)
  );

  param_ram #(.ROWS(GROUPS), .ELEMS(LANES), .EW(W_W)) u_bram (
    .clk, .wr_en(bram_we), .wr_row(bram_wrow), .wr_elem(bram_welem), .wr_data(pw_data),
    .rd_en, .rd_row(rd_brow), .rd_data(b_row)
  );

  // ---------------------------------------------------------------- control
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e                 state;
  logic [GW-1:0]          grp;
  logic [BW-1:0]          beat;
  logic [N_IN-1:0][X_W-1:0] x_reg;
  logic                   accept;
  logic                   last_write;   // act stage writes the final group

  assign in_ready = (state == S_IDLE) && !out_valid;
  assign accept   = in_valid && in_ready;
  assign rd_en    = (state == S_RUN);
  assign rd_row   = RW'(32'(grp) * BEATS + 32'(beat));
  assign rd_brow  = BRW'(grp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      grp       <= '0;
      beat      <= '0;
      out_valid <= 1'b0;
      x_reg     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          x_reg <= in_vec;
          grp   <= '0;
          beat  <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (32'(beat) == BEATS - 1) begin
            beat <= '0;
            if (32'(grp) == GROUPS - 1) state <= S_DRAIN;
            else                         grp   <= grp + 1'b1;
          end else begin
            beat <= beat + 1'b1;
          end
        end
        S_DRAIN: if (last_write) begin
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- stage 1: RAM data ready
  logic            s1_v, s1_first, s1_last;
  logic [GW-1:0]   s1_grp;
  logic [BW-1:0]   s1_beat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_grp <= '0; s1_beat <= '0;
    end else begin
      s1_v     <= rd_en;
      s1_first <= (beat == '0);
      s1_last  <= (32'(beat) == BEATS - 1);
      s1_grp   <= grp;
      s1_beat  <= beat;
    end
  end

  // Inputs of the current beat; positions past the fan-in are zero.
  logic [K-1:0][X_W-1:0] x_beat;
  always_comb begin
    for (int k = 0; k < K; k++) begin
      int unsigned idx;
      idx = 32'(s1_beat) * K + k;
      x_beat[k] = (idx < N_IN) ? x_reg[idx] : '0;
    end
  end

  // ------------------------------------------------- stage 2: MUL registers
  logic                         s2_v, s2_first, s2_last;
  logic [GW-1:0]                s2_grp;
  logic signed [PW-1:0]         prod [LANES][K];
  logic signed [W_W-1:0]        s2_bias [LANES];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      for (int k = 0; k < K; k++)
        prod[l][k] <= $signed({1'b0, x_beat[k]}) * $signed(w_row[l*K + k]);
      s2_bias[l] <= $signed(b_row[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_first <= 1'b0; s2_last <= 1'b0; s2_grp <= '0;
    end else begin
      s2_v <= s1_v; s2_first <= s1_first; s2_last <= s1_last; s2_grp <= s1_grp;
    end
  end

  // ------------------------------------------------- stage 3: MAC registers
  logic signed [ACC_W-1:0]      acc [LANES][K];
  logic signed [ACC_W-1:0]      acc_nxt [LANES][K];
  logic signed [ACC_W-1:0]      fin [LANES][K];
  logic signed [W_W-1:0]        fin_bias [LANES];
  logic                         fin_v;
  logic [GW-1:0]                fin_grp;

  always_comb begin
    for (int l = 0; l < LANES; l++)
      for (int k = 0; k < K; k++)
        acc_nxt[l][k] = s2_first ? ACC_W'(prod[l][k]) : acc[l][k] + ACC_W'(prod[l][k]);
  end

  always_ff @(posedge clk) begin
    if (s2_v) begin
      acc <= acc_nxt;
      if (s2_last) begin
        fin      <= acc_nxt;
        fin_bias <= s2_bias;
        fin_grp  <= s2_grp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fin_v <= 1'b0;
    else        fin_v <= s2_v && s2_last;
  end

  // ------------------------------------------------- stage 4: sum, bias, act
  localparam logic signed [ACC_W-1:0] ACT_MAX = ACC_W'((64'(1) << OUT_W) - 1);
  logic        [OUT_W-1:0] act_val [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [ACC_W-1:0] sum, shifted;
      sum = ACC_W'(fin_bias[l]) <<< BIAS_SHIFT;
      for (int k = 0; k < K; k++) sum = sum + fin[l][k];
      shifted  = sum >>> OUT_SHIFT;
      if (RELU) begin
        if (shifted < 0)                                act_val[l] = '0;
        else if (shifted > ACT_MAX)                     act_val[l] = '1;
        else                                            act_val[l] = shifted[OUT_W-1:0];
      end else begin
        act_val[l] = shifted[OUT_W-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fin_v) begin
      for (int l = 0; l < LANES; l++) begin
        int unsigned n;
        n = 32'(fin_grp) * LANES + l;
        if (n < N_NEU) out_vec[n] <= act_val[l];
      end
    end
  end

  assign last_write = fin_v && (32'(fin_grp) == GROUPS - 1);

  // A result must not be overwritten before it has been taken.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
                                   out_valid |-> !fin_v);

endmodule
