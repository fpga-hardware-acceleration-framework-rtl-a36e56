// tb_post_process: sends random score vectors (with forced ties and negative
// scores) to post_process under random output backpressure and checks the
// class of every beat against an argmax computed here, tlast on every
// num_records-th beat for several periods, and the record counter.
module tb_post_process;
  localparam int N_OUT = 16, ACC_W = 48, RECS = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                        in_valid = 0, in_ready;
  logic [N_OUT-1:0][ACC_W-1:0] scores = '0;
  logic [31:0]                 num_records = 0;
  logic [31:0]                 m_axis_tdata;
  logic                        m_axis_tvalid, m_axis_tready = 0, m_axis_tlast;
  logic [31:0]                 rec_count;
  int exp_cls [RECS];
  int checks = 0, failures = 0, got = 0, lasts = 0, stalls = 0, in_xfer = 0;

  post_process #(.N_OUT(N_OUT), .ACC_W(ACC_W), .AXIS_W(32)) dut (.*);

  function automatic int period_of(input int r);
    // the period changes every 100 records: 0 (acts as 1), 4, 7
    return (r < 100) ? 0 : (r < 200) ? 4 : 7;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < RECS; r++) begin
      longint best; int bi;
      @(negedge clk);
      num_records = period_of(r);
      for (int i = 0; i < N_OUT; i++) begin
        longint v;
        v = (longint'($urandom()) << 16) ^ longint'($urandom());
        v = (v << 16) >>> 16;               // signed 48-bit value
        if (r % 5 == 0) v = v % 8;          // small values give ties
        scores[i] = ACC_W'(v);
        if (i == 0 || v > best) begin best = v; bi = i; end
      end
      exp_cls[r] = bi;
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      m_axis_tready <= ($urandom_range(0, 2) != 0);
      if (m_axis_tvalid && !m_axis_tready) stalls++;
      if (m_axis_tvalid && m_axis_tready) begin
        int p;
        p = period_of(got); if (p == 0) p = 1;
        checks += 2;
        if (m_axis_tdata !== 32'(exp_cls[got])) begin
          failures++;
          if (failures < 10) $display("rec %0d: class %0d expected %0d", got, m_axis_tdata, exp_cls[got]);
        end
        // the tlast counter restarts when the period changes
        if (got == 100 || got == 200) in_xfer = 0;
        in_xfer++;
        if (m_axis_tlast !== (in_xfer >= p)) begin
          failures++;
          if (failures < 10) $display("rec %0d: tlast %0b", got, m_axis_tlast);
        end
        if (in_xfer >= p) begin in_xfer = 0; lasts++; end
        got++;
      end
    end
  end

  initial begin
    wait (got == RECS);
    @(posedge clk);
    checks += 2;
    if (rec_count != RECS) failures++;
    if (stalls == 0) failures++;
    $display("tlast beats=%0d output stalls=%0d", lasts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
