// post_process: turns the output-layer scores into the output stream.
//
// The class of a record is the index of the largest of its N_OUT scores (the
// lowest index wins a tie); softmax is monotonic, so it does not change this
// choice and is not computed. The class goes out as one beat per record,
// zero-extended in tdata. tlast marks the last record of each transfer: it is
// set on every num_records-th beat (num_records = 0 acts as 1), so that the
// receiving DMA channel closes its buffer. rec_count counts all records sent.
// Interface: in_valid/in_ready takes a score vector; the output register is
// a single stage, so in_ready = !m_axis_tvalid || m_axis_tready, and the class
// is on the stream one cycle after the vector is taken.
// Producing the output stream and driving tlast follows the source design;
// the argmax, the beat format and the tlast rule are this design's choices.
module post_process #(
  parameter int unsigned N_OUT  = 16,
  parameter int unsigned ACC_W  = 48,
  parameter int unsigned AXIS_W = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [N_OUT-1:0][ACC_W-1:0]   scores,
  input  logic [31:0]                   num_records,
  output logic [AXIS_W-1:0]             m_axis_tdata,
  output logic                          m_axis_tvalid,
  input  logic                          m_axis_tready,
  output logic                          m_axis_tlast,
  output logic [31:0]                   rec_count
);
  localparam int unsigned CLS_W = (N_OUT > 1) ? $clog2(N_OUT) : 1;

  logic [CLS_W-1:0] best_idx;
  logic [31:0]      in_xfer;   // records sent in the current transfer
  logic [31:0]      period;

  always_comb begin
    logic signed [ACC_W-1:0] best;
    best     = $signed(scores[0]);
    best_idx = '0;
    for (int i = 1; i < N_OUT; i++) begin
      if ($signed(scores[i]) > best) begin
        best     = $signed(scores[i]);
        best_idx = CLS_W'(i);
      end
    end
  end

  assign period   = (num_records == 0) ? 32'd1 : num_records;
  assign in_ready = !m_axis_tvalid || m_axis_tready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
      in_xfer       <= '0;
      rec_count     <= '0;
    end else begin
      if (m_axis_tvalid && m_axis_tready) m_axis_tvalid <= 1'b0;
      if (in_valid && in_ready) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= AXIS_W'(best_idx);
        rec_count     <= rec_count + 1;
        if (in_xfer + 1 >= period) begin
          m_axis_tlast <= 1'b1;
          in_xfer      <= '0;
        end else begin
          m_axis_tlast <= 1'b0;
          in_xfer      <= in_xfer + 1;
        end
      end
    end
  end

  // AXI-stream rule: a beat offered is held until it is taken.
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
endmodule
