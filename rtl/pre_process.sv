// pre_process: extracts the input features of one record from the AXI stream.
//
// A record arrives as N_IN consecutive stream beats, one feature per beat in
// tdata[X_W-1:0] (an unsigned Q0.X_W value: the min-max scaled feature). The
// beats are collected into a feature vector; when the N_IN-th beat has been
// taken, out_valid rises and the vector is held until out_ready. tready is low
// while a complete vector is waiting, which stalls the DMA stream. Framing is
// by beat count; tlast on the input is not needed and is ignored.
// Extracting neuron inputs from the input stream follows the source design;
// the one-feature-per-beat format is this design's choice.
module pre_process #(
  parameter int unsigned N_IN   = 5,
  parameter int unsigned X_W    = 16,
  parameter int unsigned AXIS_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [AXIS_W-1:0]         s_axis_tdata,
  input  logic                      s_axis_tvalid,
  output logic                      s_axis_tready,
  input  logic                      s_axis_tlast,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [N_IN-1:0][X_W-1:0]  out_vec
);
  localparam int unsigned CW = (N_IN > 1) ? $clog2(N_IN) : 1;
  logic [CW-1:0] idx;
  logic          unused_ok;

  assign s_axis_tready = !out_valid;
  assign unused_ok     = &{1'b0, s_axis_tlast, s_axis_tdata[AXIS_W-1:X_W]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      out_valid <= 1'b0;
      out_vec   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (s_axis_tvalid && s_axis_tready) begin
        out_vec[idx] <= s_axis_tdata[X_W-1:0];
        if (32'(idx) == N_IN - 1) begin
          idx       <= '0;
          out_valid <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
