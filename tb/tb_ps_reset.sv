// tb_ps_reset: checks that the PS reset reaches both outputs at once
// (asynchronously), that release waits SYNC_STAGES clock edges for the
// interconnect reset and one more for the peripheral reset, and that the
// soft reset holds only the peripheral reset.
module tb_ps_reset;
  logic clk = 0, ext_reset_n = 0, soft_reset = 0;
  logic interconnect_aresetn, peripheral_aresetn;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ps_reset #(.SYNC_STAGES(3)) dut (.*);

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0b expected %0b", what, got, exp); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    expect_eq("held ic", interconnect_aresetn, 0);
    expect_eq("held pr", peripheral_aresetn, 0);
    for (int round = 0; round < 3; round++) begin
      #2 ext_reset_n = 1;          // release between edges
      for (int e = 1; e <= 4; e++) begin
        @(posedge clk); #1;
        expect_eq("ic release", interconnect_aresetn, e >= 3);
        expect_eq("pr release", peripheral_aresetn, e >= 4);
      end
      repeat (2) @(posedge clk);
      // soft reset: only the peripheral reset follows, one edge later
      @(negedge clk) soft_reset = 1;
      @(posedge clk); #1;
      expect_eq("soft pr", peripheral_aresetn, 0);
      expect_eq("soft ic", interconnect_aresetn, 1);
      @(negedge clk) soft_reset = 0;
      @(posedge clk); #1;
      expect_eq("soft pr release", peripheral_aresetn, 1);
      // asynchronous assertion, without a clock edge
      @(negedge clk); #2 ext_reset_n = 0; #1;
      expect_eq("async ic", interconnect_aresetn, 0);
      expect_eq("async pr", peripheral_aresetn, 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
