// tb_param_ram: writes every element of a param_ram with random values in a
// random order, then reads all rows back (with reads interleaved with
// further writes) and compares each element with a shadow copy.
module tb_param_ram;
  localparam int ROWS = 10, ELEMS = 32, EW = 21;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                     wr_en = 0, rd_en = 0;
  logic [$clog2(ROWS)-1:0]  wr_row = 0, rd_row = 0;
  logic [$clog2(ELEMS)-1:0] wr_elem = 0;
  logic [EW-1:0]            wr_data = 0;
  logic [ELEMS-1:0][EW-1:0] rd_data;
  logic [EW-1:0]            shadow [ROWS][ELEMS];
  int checks = 0, failures = 0;

  param_ram #(.ROWS(ROWS), .ELEMS(ELEMS), .EW(EW)) dut (.*);

  task automatic check_row(input int r);
    @(negedge clk); rd_en = 1; rd_row = r[$clog2(ROWS)-1:0];
    @(negedge clk); rd_en = 0;
    for (int e = 0; e < ELEMS; e++) begin
      checks++;
      if (rd_data[e] !== shadow[r][e]) begin
        failures++;
        if (failures < 10) $display("row %0d elem %0d: got %h expected %h", r, e, rd_data[e], shadow[r][e]);
      end
    end
  endtask

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < ROWS; r++)
        for (int e = 0; e < ELEMS; e++) begin
          @(negedge clk);
          wr_en = 1; wr_row = r[$clog2(ROWS)-1:0]; wr_elem = e[$clog2(ELEMS)-1:0];
          wr_data = EW'($urandom()); shadow[r][e] = wr_data;
        end
      @(negedge clk) wr_en = 0;
      for (int r = ROWS - 1; r >= 0; r--) check_row(r);
      // single-element updates must leave the rest of the row alone
      for (int n = 0; n < 20; n++) begin
        int r, e;
        r = $urandom_range(0, ROWS - 1); e = $urandom_range(0, ELEMS - 1);
        @(negedge clk);
        wr_en = 1; wr_row = r[$clog2(ROWS)-1:0]; wr_elem = e[$clog2(ELEMS)-1:0];
        wr_data = EW'($urandom()); shadow[r][e] = wr_data;
        @(negedge clk) wr_en = 0;
        check_row(r);
      end
    end
    // read data is held while rd_en is low
    check_row(3);
    repeat (3) @(negedge clk);
    for (int e = 0; e < ELEMS; e++) begin
      checks++;
      if (rd_data[e] !== shadow[3][e]) failures++;
    end
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
