// tb_conv: check of one 16-tap symmetric convolution.
//
// The reference folds the window first, (data[k] + data[15-k]) * gauss[k],
// sums the eight terms and divides by 8, which is independent of the
// sixteen-product structure inside the block. Directed cases place a single
// bright pixel at every tap position (each tap must see the right
// coefficient), use the all-255 worst case (largest 17-bit result), and
// a few hundred random windows and kernels follow.
module tb_conv;
  import plazer_pkg::*;
  logic   clk = 1'b0;
  pixel_t data  [16];
  coef_t  gauss [8];
  logic [16:0] cv;
  int checks = 0, failures = 0;

  conv dut (.data(data), .gauss(gauss), .convvalue(cv));

  always #5 clk = ~clk;

  function automatic int unsigned ref_conv();
    int unsigned acc = 0;
    for (int k = 0; k < 8; k++)
      acc += (int'(data[k]) + int'(data[15-k])) * int'(gauss[k]);
    return acc >> 3;
  endfunction

  task automatic check(string what);
    #1;
    checks++;
    if (32'(cv) !== ref_conv()) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, cv, ref_conv());
    end
  endtask

  initial begin
    // Distinct coefficients so that a wrong tap pairing is visible.
    for (int k = 0; k < 8; k++) gauss[k] = 8'(3 + 29 * k);
    for (int p = 0; p < 16; p++) begin
      foreach (data[t]) data[t] = (t == p) ? 8'd255 : 8'd0;
      check("single pixel");
    end
    foreach (data[t]) data[t] = 8'd255;
    foreach (gauss[k]) gauss[k] = 8'd255;
    check("all max");
    for (int n = 0; n < 500; n++) begin
      foreach (data[t]) data[t] = 8'($urandom);
      foreach (gauss[k]) gauss[k] = 8'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
