// tb_dma_buffer_sizes: runs the transfer sizes of the buffer-size study on
// the full design at its default sizes: one transfer of 2^k records for
// k = 0..14, then one transfer of 22,544 records, all with one random model.
// The input stream is offered back to back and the output is always ready,
// as with a DMA that keeps up. Every class and every tlast is checked against
// nn_ref_pkg, and the cycles from the first input beat to the last output
// beat of each transfer must equal L1 + 25*(N-1), with L1 the latency of a
// single record. The time per transfer at 100 MHz is printed.
// It then classifies a trace of 398,000 records, as in the throughput study
// of a 398,000-packet capture, once for each buffer size of 1, 2, 4, 8, 16
// and 32 records per transfer; the trace streams without pauses, so its cycle
// count must be L1 + 25*(398,000-1) whatever the buffer size.
module tb_dma_buffer_sizes;
  import ids_pkg::*;
  import nn_ref_pkg::*;
  localparam int PERIOD = 25;
  logic clk = 0, ext_reset_n = 1;
  initial #1 ext_reset_n = 0;   // a falling edge, so the reset is applied at once
  always #5 clk = ~clk;

  logic [7:0]  s_axil_awaddr = 0, s_axil_araddr = 0;
  logic        s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = 0, s_axil_rdata;
  logic [3:0]  s_axil_wstrb = 4'hF;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready = 0;
  logic [31:0] s_axis_tdata = 0, m_axis_tdata;
  logic        s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic        m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;

  ids_pl_top dut (.*);

  hid_params_t wh;
  out_params_t wo;
  int exp_cls [$];
  int checks = 0, failures = 0, got = 0, in_xfer = 0, period = 1;
  int rz = 0, rs = 0, cyc = 0, first_in = -1, last_out = 0, lat1 = 0;
  int hist [N_OUT];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic axil_write(input logic [7:0] addr, input logic [31:0] data);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_awaddr = addr; s_axil_wvalid = 1; s_axil_wdata = data;
    while (s_axil_awvalid || s_axil_wvalid) begin
      logic aw_go, w_go;
      aw_go = s_axil_awvalid && s_axil_awready;
      w_go  = s_axil_wvalid && s_axil_wready;
      @(negedge clk);
      if (aw_go) s_axil_awvalid = 0;
      if (w_go)  s_axil_wvalid = 0;
    end
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk) s_axil_bready = 0;
  endtask

  always @(posedge clk) begin
    if (ext_reset_n && s_axis_tvalid && s_axis_tready && first_in < 0) first_in = cyc;
    if (ext_reset_n && m_axis_tvalid && m_axis_tready) begin
      int e;
      e = (exp_cls.size() > 0) ? exp_cls.pop_front() : -1;
      checks += 2;
      if (m_axis_tdata !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("record %0d: class %0d expected %0d", got, m_axis_tdata, e);
      end
      if (e >= 0) hist[e]++;
      in_xfer++;
      if (m_axis_tlast !== (in_xfer == period)) failures++;
      if (in_xfer == period) in_xfer = 0;
      last_out = cyc;
      got++;
    end
  end

  // Stream `total` records as transfers of `bsize` records each (tlast every
  // bsize records) without pauses, checking the total cycle count.
  task automatic trace(input int total, input int bsize);
    int target, cycles;
    axil_write(8'(REG_NUM_REC), 32'(bsize));
    period = bsize; first_in = -1; in_xfer = 0;
    target = got + total;
    for (int r = 0; r < total; r++) begin
      features_t x;
      for (int i = 0; i < N_IN; i++) x[i] = longint'($urandom_range(0, 65535));
      exp_cls.push_back(classify(wh, wo, x, rz, rs));
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        s_axis_tvalid = 1; s_axis_tdata = 32'(x[i]); s_axis_tlast = (r % bsize == bsize - 1) && (i == N_IN - 1);
        while (!s_axis_tready) @(negedge clk);
      end
      @(negedge clk) s_axis_tvalid = 0; s_axis_tlast = 0;
      while (got + 4 < target - (total - 1 - r)) @(negedge clk);
    end
    while (got < target) @(negedge clk);
    cycles = last_out - first_in + 1;
    checks++;
    if (cycles != lat1 + PERIOD * (total - 1)) begin
      failures++;
      $display("trace with buffers of %0d: %0d cycles, expected %0d", bsize, cycles, lat1 + PERIOD * (total - 1));
    end
    $display("trace of %0d records, %0d per transfer: cycles=%0d time at 100 MHz=%0.2f ms",
             total, bsize, cycles, cycles * 1.0e-5);
  endtask

  task automatic transfer(input int n);
    int target, cycles;
    axil_write(8'(REG_NUM_REC), 32'(n));
    period = n; first_in = -1;
    target = got + n;
    for (int r = 0; r < n; r++) begin
      features_t x;
      for (int i = 0; i < N_IN; i++) x[i] = longint'($urandom_range(0, 65535));
      exp_cls.push_back(classify(wh, wo, x, rz, rs));
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        s_axis_tvalid = 1; s_axis_tdata = 32'(x[i]); s_axis_tlast = (r == n - 1) && (i == N_IN - 1);
        while (!s_axis_tready) @(negedge clk);
      end
      // hold the stream only while records are owed, to keep the queue short
      @(negedge clk) s_axis_tvalid = 0; s_axis_tlast = 0;
      while (got + 4 < target - (n - 1 - r)) @(negedge clk);
    end
    while (got < target) @(negedge clk);
    cycles = last_out - first_in + 1;
    if (n == 1) lat1 = cycles;
    checks++;
    if (cycles != lat1 + PERIOD * (n - 1)) begin
      failures++;
      $display("N=%0d: %0d cycles, expected %0d", n, cycles, lat1 + PERIOD * (n - 1));
    end
    $display("records=%6d cycles=%8d time at 100 MHz=%0.3f ms", n, cycles, cycles * 1.0e-5);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    ext_reset_n = 1;
    repeat (5) @(posedge clk);
    random_model(wh, wo);
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i <= N_IN; i++) begin
        axil_write(8'(REG_PARAM_ADDR), {15'd0, 1'b0, 8'(j), 8'(i)});
        axil_write(8'(REG_PARAM_DATA), 32'(wh[j][i]));
      end
    for (int c = 0; c < N_OUT; c++)
      for (int j = 0; j <= N_HID; j++) begin
        axil_write(8'(REG_PARAM_ADDR), {15'd0, 1'b1, 8'(c), 8'(j)});
        axil_write(8'(REG_PARAM_DATA), 32'(wo[c][j]));
      end
    for (int k = 0; k <= 14; k++) transfer(1 << k);
    transfer(22544);
    // 398,000 records; 398,000 is a multiple of 16 but not of 32, so the
    // 32-record run ends with one transfer of 16.
    for (int b = 1; b <= 16; b *= 2) trace(398000, b);
    trace(397984, 32);
    trace(16, 16);
    checks++;
    if (rz == 0) failures++;
    for (int c = 0; c < N_OUT; c++) $write("%0d ", hist[c]);
    $display("<- records per class");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000000) @(posedge clk);
    $display("watchdog expired after %0d records", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
