// tb_ids_pl_top: end-to-end test of the PL design at its default sizes,
// acting as the processor (AXI-lite master) and as both DMA channels.
//   1. reads INFO, loads a random model (896 parameters) through PARAM_ADDR /
//      PARAM_DATA;
//   2. runs one transfer for each DMA buffer size 1, 2, 4, 8, 16 and 32 records,
//      setting NUM_REC to the buffer size, with random gaps and backpressure
//      on some transfers, and checks each class against nn_ref_pkg and that
//      tlast ends each transfer;
//   3. reads STATUS;
//   4. issues a soft reset with a record half sent and a result unread, and
//      checks that the datapath restarts clean and the model is kept;
//   5. loads a second model (one model runs at a time) and runs a transfer.
// Every mechanism (input stall, output backpressure, tlast, ReLU zeroing,
// soft reset, model reload) is counted and must have happened.
module tb_ids_pl_top;
  import ids_pkg::*;
  import nn_ref_pkg::*;
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
  int rz = 0, rs = 0, in_stalls = 0, out_stalls = 0, lasts = 0;
  int soft_resets = 0, model_loads = 0, transfers = 0, total_recs = 0;
  bit throttle = 0, hold_out = 0;

  // ---------------------------------------------------------------- AXI-lite
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

  task automatic axil_read(input logic [7:0] addr, output logic [31:0] data);
    @(negedge clk); s_axil_arvalid = 1; s_axil_araddr = addr;
    while (!s_axil_arready) @(negedge clk);
    @(negedge clk) s_axil_arvalid = 0; s_axil_rready = 1;
    while (!s_axil_rvalid) @(negedge clk);
    data = s_axil_rdata;
    @(negedge clk) s_axil_rready = 0;
  endtask

  task automatic load_model();
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
    model_loads++;
  endtask

  // ------------------------------------------------------------ MM2S side
  task automatic send_beat(input logic [31:0] d, input bit last, input bit gaps);
    if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
    s_axis_tvalid = 1; s_axis_tdata = d; s_axis_tlast = last;
    while (!s_axis_tready) begin in_stalls++; @(negedge clk); end
    @(negedge clk);
    s_axis_tvalid = 0; s_axis_tlast = 0;
  endtask

  task automatic send_records(input int n, input bit gaps);
    for (int r = 0; r < n; r++) begin
      features_t x;
      for (int i = 0; i < N_IN; i++) x[i] = longint'($urandom_range(0, 65535));
      exp_cls.push_back(classify(wh, wo, x, rz, rs));
      for (int i = 0; i < N_IN; i++) send_beat(32'(x[i]), (r == n - 1) && (i == N_IN - 1), gaps);
    end
  endtask

  task automatic transfer(input int n, input bit rand_flow);
    int target;
    axil_write(8'(REG_NUM_REC), 32'(n));
    period = n; throttle = rand_flow;
    target = got + n;
    send_records(n, rand_flow);
    while (got < target) @(negedge clk);
    transfers++; total_recs += n;
  endtask

  // ------------------------------------------------------------ S2MM side
  always @(posedge clk) begin
    m_axis_tready <= hold_out ? 1'b0 : throttle ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (ext_reset_n && m_axis_tvalid && !m_axis_tready) out_stalls++;
    if (ext_reset_n && m_axis_tvalid && m_axis_tready) begin
      int e;
      e = (exp_cls.size() > 0) ? exp_cls.pop_front() : -1;
      checks += 2;
      if (m_axis_tdata !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("record %0d: class %0d expected %0d", got, m_axis_tdata, e);
      end
      in_xfer++;
      if (m_axis_tlast !== (in_xfer == period)) begin
        failures++;
        if (failures < 10) $display("record %0d: tlast %0b", got, m_axis_tlast);
      end
      if (m_axis_tlast) lasts++;
      if (in_xfer == period) in_xfer = 0;
      got++;
    end
  end

  task automatic expect_eq(input string what, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("%s: got %0h expected %0h", what, g, e); end
  endtask

  initial begin
    logic [31:0] d;
    int sizes [6] = '{1, 2, 4, 8, 16, 32};
    repeat (5) @(posedge clk);
    ext_reset_n = 1;
    repeat (5) @(posedge clk);
    axil_read(8'(REG_INFO), d);
    expect_eq("INFO", d, {8'(N_OUT), 8'(N_HID), 8'(N_IN), 8'h00});
    load_model();
    foreach (sizes[k]) transfer(sizes[k], k % 2 == 1);
    transfer(32, 1);
    axil_read(8'(REG_STATUS), d);
    expect_eq("STATUS", d, 32'(total_recs));

    // soft reset with one result unread and a record half sent
    hold_out = 1;
    axil_write(8'(REG_NUM_REC), 32'd4); period = 4;
    send_records(1, 0);
    for (int i = 0; i < 2; i++) send_beat(32'h1111, 0, 0);
    repeat (60) @(negedge clk);
    checks++; if (!m_axis_tvalid) failures++;
    axil_write(8'(REG_CTRL), 32'h1);
    repeat (3) @(negedge clk);
    checks++; if (m_axis_tvalid) failures++;
    axil_write(8'(REG_CTRL), 32'h0);
    exp_cls.delete(); in_xfer = 0; soft_resets++;
    hold_out = 0;
    repeat (5) @(negedge clk);
    axil_read(8'(REG_STATUS), d);
    expect_eq("STATUS after soft reset", d, 0);
    transfer(4, 1);          // same model, clean framing after the reset

    // second model
    load_model();
    transfer(16, 1);
    axil_read(8'(REG_STATUS), d);
    expect_eq("STATUS end", d, 20);

    checks += 6;
    if (in_stalls == 0)    begin failures++; $display("no input stall"); end
    if (out_stalls == 0)   begin failures++; $display("no output backpressure"); end
    if (lasts != transfers) begin failures++; $display("tlast %0d for %0d transfers", lasts, transfers); end
    if (rz == 0)           begin failures++; $display("no ReLU zeroing"); end
    if (soft_resets == 0)  failures++;
    if (model_loads < 2)   failures++;
    $display("transfers=%0d records=%0d tlast=%0d input_stalls=%0d output_stalls=%0d relu_zero=%0d soft_resets=%0d model_loads=%0d",
             transfers, got, lasts, in_stalls, out_stalls, rz, soft_resets, model_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired after %0d records", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
