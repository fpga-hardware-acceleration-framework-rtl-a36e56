// tb_pre_process: streams random records, with random gaps in tvalid and
// random delays in taking the vectors, and checks that every feature vector
// holds the right features in order, that tready drops while a vector waits
// and that the upper tdata bits are ignored.
module tb_pre_process;
  localparam int N_IN = 5, X_W = 16, RECS = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0]             s_axis_tdata = 0;
  logic                    s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic                    out_valid, out_ready = 0;
  logic [N_IN-1:0][X_W-1:0] out_vec;
  logic [X_W-1:0]          feat [RECS][N_IN];
  int checks = 0, failures = 0, stalls = 0, got = 0;

  pre_process #(.N_IN(N_IN), .X_W(X_W), .AXIS_W(32)) dut (.*);

  initial begin
    foreach (feat[r, i]) feat[r][i] = X_W'($urandom());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < RECS; r++)
      for (int i = 0; i < N_IN; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin s_axis_tvalid = 0; @(negedge clk); end
        s_axis_tvalid = 1;
        s_axis_tdata  = {16'($urandom()), feat[r][i]};
        s_axis_tlast  = (i == N_IN - 1);
        @(posedge clk);
        while (!s_axis_tready) begin stalls++; @(posedge clk); end
      end
    @(negedge clk) s_axis_tvalid = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      out_ready <= ($urandom_range(0, 2) == 0);
      if (out_valid && out_ready) begin
        for (int i = 0; i < N_IN; i++) begin
          checks++;
          if (out_vec[i] !== feat[got][i]) begin
            failures++;
            if (failures < 10) $display("rec %0d feature %0d: got %h expected %h", got, i, out_vec[i], feat[got][i]);
          end
        end
        got++;
      end
      if (out_valid) begin
        checks++;
        if (s_axis_tready) failures++;
      end
    end
  end

  initial begin
    wait (got == RECS);
    checks++;
    if (stalls == 0) failures++;
    $display("input stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
