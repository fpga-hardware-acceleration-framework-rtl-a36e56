// tb_axil_regs: AXI-lite accesses to the register block, with the address
// and data channels offered in different orders and with delayed response
// acceptance. Checks read-back of CTRL/NUM_REC/PARAM_ADDR (with byte
// strobes), the soft reset output, the read-only STATUS and INFO registers,
// and that each PARAM_DATA write produces exactly one parameter write pulse
// carrying the address fields and the data.
module tb_axil_regs;
  import ids_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  s_axil_awaddr = 0, s_axil_araddr = 0;
  logic        s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = 0, s_axil_rdata;
  logic [3:0]  s_axil_wstrb = 0;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready = 0;
  logic        soft_reset, param_wr_en;
  logic [31:0] num_records, rec_count = 32'h1234_5678;
  param_wr_t   param_wr;
  int checks = 0, failures = 0, pulses = 0;
  param_wr_t   last_pw;

  axil_regs #(.AW(8)) dut (.*);

  always @(posedge clk) if (param_wr_en) begin pulses++; last_pw = param_wr; end

  // Handshakes are decided at the falling edge: a valid/ready pair seen high
  // there completes on the next rising edge.
  task automatic axil_write(input logic [7:0] addr, input logic [31:0] data,
                            input logic [3:0] strb = 4'hF);
    int order, delay;
    order = $urandom_range(0, 2);     // 0: together, 1: address first, 2: data first
    delay = $urandom_range(1, 3);
    @(negedge clk);
    if (order != 2) begin s_axil_awvalid = 1; s_axil_awaddr = addr; end
    if (order != 1) begin s_axil_wvalid = 1; s_axil_wdata = data; s_axil_wstrb = strb; end
    while (s_axil_awvalid || s_axil_wvalid || delay > 0) begin
      logic aw_go, w_go;
      aw_go = s_axil_awvalid && s_axil_awready;
      w_go  = s_axil_wvalid && s_axil_wready;
      @(negedge clk);
      if (aw_go) s_axil_awvalid = 0;
      if (w_go)  s_axil_wvalid = 0;
      if (delay > 0) begin
        delay--;
        if (delay == 0) begin
          if (order == 1) begin s_axil_wvalid = 1; s_axil_wdata = data; s_axil_wstrb = strb; end
          if (order == 2) begin s_axil_awvalid = 1; s_axil_awaddr = addr; end
        end
      end
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    checks++; if (s_axil_bresp != 2'b00) failures++;
    @(negedge clk) s_axil_bready = 0;
  endtask

  task automatic axil_read(input logic [7:0] addr, output logic [31:0] data);
    @(negedge clk); s_axil_arvalid = 1; s_axil_araddr = addr;
    while (!s_axil_arready) @(negedge clk);
    @(negedge clk) s_axil_arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_axil_rready = 1;
    while (!s_axil_rvalid) @(negedge clk);
    data = s_axil_rdata;
    @(negedge clk) s_axil_rready = 0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    axil_read(8'h04, d); expect_eq("NUM_REC reset", d, 1);
    axil_read(8'h00, d); expect_eq("CTRL reset", d, 0);
    axil_write(8'h04, 32'd22544);
    axil_read(8'h04, d); expect_eq("NUM_REC", d, 32'd22544);
    expect_eq("num_records out", num_records, 32'd22544);
    axil_write(8'h04, 32'hAABB_CC20, 4'b0001);
    axil_read(8'h04, d); expect_eq("NUM_REC strobe", d, 32'h0000_5820);
    axil_write(8'h00, 32'h1);
    expect_eq("soft_reset on", 32'(soft_reset), 1);
    axil_read(8'h00, d); expect_eq("CTRL", d, 1);
    axil_write(8'h00, 32'h0);
    expect_eq("soft_reset off", 32'(soft_reset), 0);
    axil_read(8'h10, d); expect_eq("STATUS", d, 32'h1234_5678);
    axil_read(8'h14, d); expect_eq("INFO", d, {8'(N_OUT), 8'(N_HID), 8'(N_IN), 8'h00});
    axil_read(8'h3C, d); expect_eq("unmapped", d, 0);
    for (int n = 0; n < 40; n++) begin
      logic [31:0] a, v;
      int n_before;
      a = {15'd0, 1'($urandom()), 8'($urandom_range(0, 39)), 8'($urandom_range(0, 40))};
      v = $urandom();
      axil_write(8'h08, a);
      axil_read(8'h08, d); expect_eq("PARAM_ADDR", d, a);
      n_before = pulses;
      axil_write(8'h0C, v);
      @(negedge clk);
      expect_eq("pulses", pulses - n_before, 1);
      expect_eq("pw layer",  32'(last_pw.layer), 32'(a[16]));
      expect_eq("pw neuron", 32'(last_pw.neuron), 32'(a[15:8]));
      expect_eq("pw input",  32'(last_pw.input_idx), 32'(a[7:0]));
      expect_eq("pw data",   32'(last_pw.data), 32'(v[W_W-1:0]));
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
