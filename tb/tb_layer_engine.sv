// tb_layer_engine: self-checking test of layer_engine in three shapes:
// the hidden layer (5 inputs, 40 ReLU neurons), the output layer (40 inputs,
// 16 raw scores) and a hidden layer with a small output shift so that the
// upper ReLU clamp (saturation) is reached.
module tb_layer_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2, lo0, lo1, lo2, hi0, hi1, hi2;
  int checks, failures;

  layer_engine_chk #(.N_IN(5), .N_NEU(40), .RELU(1), .BIAS_SHIFT(16), .OUT_SHIFT(24),
                     .OUT_W(16), .SEED(11)) u_hid (
    .clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .clamps_low(lo0), .clamps_high(hi0));
  layer_engine_chk #(.N_IN(40), .N_NEU(16), .RELU(0), .BIAS_SHIFT(12), .OUT_SHIFT(0),
                     .OUT_W(48), .SEED(22)) u_out (
    .clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .clamps_low(lo1), .clamps_high(hi1));
  layer_engine_chk #(.N_IN(5), .N_NEU(40), .RELU(1), .BIAS_SHIFT(16), .OUT_SHIFT(18),
                     .OUT_W(16), .SEED(33)) u_sat (
    .clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .clamps_low(lo2), .clamps_high(hi2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2 + 2;
    failures = f0 + f1 + f2;
    // both ReLU clamps must have been exercised
    if (lo0 + lo2 == 0) failures++;
    if (hi2 == 0) failures++;
    $display("relu zero clamps=%0d saturations=%0d", lo0 + lo2, hi2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
