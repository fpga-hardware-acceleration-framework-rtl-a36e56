// tb_nn_block: loads a random quantized model into nn_block through its
// parameter port and classifies random records, comparing every output class
// with nn_ref_pkg. Phase 1 streams back to back with the output always ready
// and checks the steady-state rate of one record every 25 cycles. Phase 2
// adds random gaps on the input and random backpressure on the output.
// tlast is checked against the records-per-transfer setting in both phases.
module tb_nn_block;
  import ids_pkg::*;
  import nn_ref_pkg::*;
  localparam int REC1 = 40, REC2 = 120, PERIOD = 25;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        param_wr_en = 0;
  param_wr_t   param_wr = '0;
  logic [31:0] num_records = 8, rec_count;
  logic [31:0] s_axis_tdata = 0, m_axis_tdata;
  logic        s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic        m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;
  logic        throttle = 0;

  nn_block dut (.*);

  hid_params_t wh;
  out_params_t wo;
  int exp_cls [$];
  int checks = 0, failures = 0, got = 0, in_xfer = 0, rz = 0, rs = 0;
  int cyc = 0, last_out_cyc = 0, in_stalls = 0, out_stalls = 0;
  int sent = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic send_records(input int n, input bit gaps);
    for (int r = 0; r < n; r++) begin
      features_t x;
      for (int i = 0; i < N_IN; i++) x[i] = longint'($urandom_range(0, 65535));
      exp_cls.push_back(classify(wh, wo, x, rz, rs));
      for (int i = 0; i < N_IN; i++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk);
        s_axis_tvalid = 1; s_axis_tdata = 32'(x[i]); s_axis_tlast = (i == N_IN - 1);
        while (!s_axis_tready) begin in_stalls++; @(negedge clk); end
        @(negedge clk);
        s_axis_tvalid = 0;
      end
      sent++;
    end
  endtask

  always @(posedge clk) begin
    if (throttle) m_axis_tready <= ($urandom_range(0, 2) != 0);
    else          m_axis_tready <= 1'b1;
    if (rst_n && m_axis_tvalid && !m_axis_tready) out_stalls++;
    if (rst_n && m_axis_tvalid && m_axis_tready) begin
      int e;
      e = exp_cls.pop_front();
      checks += 2;
      if (m_axis_tdata !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("record %0d: class %0d expected %0d", got, m_axis_tdata, e);
      end
      in_xfer++;
      if (m_axis_tlast !== (in_xfer == int'(num_records))) begin
        failures++;
        if (failures < 10) $display("record %0d: tlast %0b", got, m_axis_tlast);
      end
      if (in_xfer == int'(num_records)) in_xfer = 0;
      // steady-state rate in phase 1
      if (!throttle && got >= 3 && got < REC1) begin
        checks++;
        if (cyc - last_out_cyc != PERIOD) begin
          failures++;
          $display("record %0d: %0d cycles after the previous one, expected %0d",
                   got, cyc - last_out_cyc, PERIOD);
        end
      end
      last_out_cyc = cyc;
      got++;
    end
  end

  initial begin
    random_model(wh, wo);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i <= N_IN; i++) begin
        @(negedge clk);
        param_wr_en = 1; param_wr = '{layer: 1'b0, neuron: 8'(j), input_idx: 8'(i), data: W_W'(wh[j][i])};
      end
    for (int c = 0; c < N_OUT; c++)
      for (int j = 0; j <= N_HID; j++) begin
        @(negedge clk);
        param_wr_en = 1; param_wr = '{layer: 1'b1, neuron: 8'(c), input_idx: 8'(j), data: W_W'(wo[c][j])};
      end
    @(negedge clk) param_wr_en = 0;
    send_records(REC1, 0);
    wait (got == REC1);
    @(negedge clk);
    num_records = 3; in_xfer = 0; throttle = 1;
    send_records(REC2, 1);
    wait (got == REC1 + REC2);
    repeat (2) @(posedge clk);
    checks += 3;
    if (rec_count != REC1 + REC2) failures++;
    if (in_stalls == 0) failures++;
    if (out_stalls == 0) failures++;
    $display("records=%0d input stalls=%0d output stalls=%0d relu zeros=%0d", got, in_stalls, out_stalls, rz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired after %0d records", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
