// ids_pl_top: programmable-logic part of the IoT intrusion-detection SoC.
//
// The processor extracts the static features of each network packet, groups
// records in memory and moves them with a DMA engine; this top holds the PL
// blocks that the DMA and the general-purpose port talk to:
//   ps_reset   synchronizes the PS reset, adds the software reset of the NN
//   axil_regs  32-bit AXI-lite register block (control, tlast period,
//              parameter loading, status)
//   nn_block   the 5-40-16 neural network between two AXI streams
// The DMA's memory-to-stream channel drives s_axis_* (N_IN feature beats per
// record) and its stream-to-memory channel takes m_axis_* (one class beat per
// record, tlast every NUM_REC records). All ports are synchronous to clk;
// ext_reset_n is the PS reset, active low, and may be asynchronous.
// The DMA, the AXI memory interconnects and the PS itself are outside this
// module; their connections are its ports. Some output bits are constant by
// design: the AXI-lite response codes (always OKAY) and m_axis_tdata above
// the 4-bit class number.
module ids_pl_top
  import ids_pkg::*;
(
  input  logic                 clk,
  input  logic                 ext_reset_n,
  // AXI-lite slave (general-purpose port)
  input  logic [AXIL_AW-1:0]   s_axil_awaddr,
  input  logic                 s_axil_awvalid,
  output logic                 s_axil_awready,
  input  logic [31:0]          s_axil_wdata,
  input  logic [3:0]           s_axil_wstrb,
  input  logic                 s_axil_wvalid,
  output logic                 s_axil_wready,
  output logic [1:0]           s_axil_bresp,
  output logic                 s_axil_bvalid,
  input  logic                 s_axil_bready,
  input  logic [AXIL_AW-1:0]   s_axil_araddr,
  input  logic                 s_axil_arvalid,
  output logic                 s_axil_arready,
  output logic [31:0]          s_axil_rdata,
  output logic [1:0]           s_axil_rresp,
  output logic                 s_axil_rvalid,
  input  logic                 s_axil_rready,
  // AXI stream from the DMA (MM2S)
  input  logic [AXIS_W-1:0]    s_axis_tdata,
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic                 s_axis_tlast,
  // AXI stream to the DMA (S2MM)
  output logic [AXIS_W-1:0]    m_axis_tdata,
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic                 m_axis_tlast
);
  logic        ic_rst_n, nn_rst_n, soft_reset;
  logic [31:0] num_records, rec_count;
  logic        param_wr_en;
  param_wr_t   param_wr;

  ps_reset u_rst (
    .clk, .ext_reset_n, .soft_reset,
    .interconnect_aresetn(ic_rst_n), .peripheral_aresetn(nn_rst_n)
  );

  axil_regs #(.AW(AXIL_AW)) u_regs (
    .clk, .rst_n(ic_rst_n),
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .soft_reset, .num_records, .param_wr_en, .param_wr, .rec_count
  );

  nn_block u_nn (
    .clk, .rst_n(nn_rst_n),
    .param_wr_en, .param_wr, .num_records, .rec_count,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );
endmodule
