// axil_regs: the PL register block on the 32-bit AXI-lite general-purpose port.
//
// Software on the processor sets the accelerator up through these registers
// (byte offsets, see ids_pkg::reg_addr_e):
//   0x00 CTRL        bit0 soft reset of the NN datapath (level, read/write)
//   0x04 NUM_REC     records per output transfer; tlast every NUM_REC records
//   0x08 PARAM_ADDR  [16] layer (0 hidden, 1 output), [15:8] neuron, [7:0] input;
//                    input = fan-in of the layer addresses the neuron's bias
//   0x0C PARAM_DATA  write: one quantized parameter (low W_W bits, two's
//                    complement) is stored at PARAM_ADDR; reads as 0
//   0x10 STATUS      read only: records classified since the NN reset
//   0x14 INFO        read only: {N_OUT, N_HID, N_IN, 8'h00}, one byte each
// Write and address channels are accepted independently; the write takes
// effect, and the response is raised, once both have arrived and no earlier
// response is pending. Reads answer one cycle after the address. Byte strobes
// apply to CTRL, NUM_REC and PARAM_ADDR; a PARAM_DATA write is taken whole.
// Every access answers OKAY; unmapped offsets read as zero.
// A 32-bit AXI-lite slave holding user-defined registers follows the source
// design; the register map is this design's choice.
module axil_regs
  import ids_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI-lite slave
  input  logic [AW-1:0]      s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [AW-1:0]      s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // to the PL blocks
  output logic               soft_reset,
  output logic [31:0]        num_records,
  output logic               param_wr_en,
  output param_wr_t          param_wr,
  input  logic [31:0]        rec_count
);
  logic [AW-1:0] aw_addr;
  logic          aw_held, w_held;
  logic [31:0]   w_data;
  logic [3:0]    w_strb;
  logic [31:0]   ctrl_q, param_addr_q;
  logic          do_write;

  assign s_axil_awready = !aw_held;
  assign s_axil_wready  = !w_held;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;
  assign do_write       = aw_held && w_held && !s_axil_bvalid;
  assign soft_reset     = ctrl_q[0];

  function automatic logic [31:0] apply_strb(input logic [31:0] old, input logic [31:0] nw,
                                             input logic [3:0] strb);
    for (int b = 0; b < 4; b++)
      if (strb[b]) old[b*8 +: 8] = nw[b*8 +: 8];
    return old;
  endfunction

  // write channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held       <= 1'b0;
      w_held        <= 1'b0;
      aw_addr       <= '0;
      w_data        <= '0;
      w_strb        <= '0;
      s_axil_bvalid <= 1'b0;
      ctrl_q        <= '0;
      num_records   <= 32'd1;
      param_addr_q  <= '0;
      param_wr_en   <= 1'b0;
      param_wr      <= '0;
    end else begin
      param_wr_en <= 1'b0;
      if (s_axil_awvalid && s_axil_awready) begin
        aw_held <= 1'b1;
        aw_addr <= s_axil_awaddr;
      end
      if (s_axil_wvalid && s_axil_wready) begin
        w_held <= 1'b1;
        w_data <= s_axil_wdata;
        w_strb <= s_axil_wstrb;
      end
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (do_write) begin
        aw_held       <= 1'b0;
        w_held        <= 1'b0;
        s_axil_bvalid <= 1'b1;
        unique case ({aw_addr[AW-1:2], 2'b00})
          AW'(REG_CTRL):       ctrl_q       <= apply_strb(ctrl_q, w_data, w_strb) & 32'h1;
          AW'(REG_NUM_REC):    num_records  <= apply_strb(num_records, w_data, w_strb);
          AW'(REG_PARAM_ADDR): param_addr_q <= apply_strb(param_addr_q, w_data, w_strb) & 32'h1_FFFF;
          AW'(REG_PARAM_DATA): begin
            param_wr_en          <= 1'b1;
            param_wr.layer       <= param_addr_q[16];
            param_wr.neuron      <= param_addr_q[15:8];
            param_wr.input_idx   <= param_addr_q[7:0];
            param_wr.data        <= w_data[W_W-1:0];
          end
          default: ;
        endcase
      end
    end
  end

  // read channel
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        unique case ({s_axil_araddr[AW-1:2], 2'b00})
          AW'(REG_CTRL):       s_axil_rdata <= ctrl_q;
          AW'(REG_NUM_REC):    s_axil_rdata <= num_records;
          AW'(REG_PARAM_ADDR): s_axil_rdata <= param_addr_q;
          AW'(REG_STATUS):     s_axil_rdata <= rec_count;
          AW'(REG_INFO):       s_axil_rdata <= {8'(N_OUT), 8'(N_HID), 8'(N_IN), 8'h00};
          default:             s_axil_rdata <= '0;
        endcase
      end
    end
  end

  // AXI-lite rules: responses are held until accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
endmodule
