// tb_p_add: check of the 16-input parallel adder.
//
// Applies all-zero, all-maximum (the largest sum, which needs the full 20
// bits), one-hot and random operand sets, and compares the result with a
// running total kept in 32 bits by the testbench.
module tb_p_add;
  logic        clk = 1'b0;
  logic [15:0] d [16];
  logic [19:0] s;
  int checks = 0, failures = 0;

  p_add #(.N(16), .IN_W(16), .OUT_W(20)) dut (.data(d), .result(s));

  always #5 clk = ~clk;

  task automatic check(string what);
    int unsigned ref_sum = 0;
    for (int k = 0; k < 16; k++) ref_sum += 32'(d[k]);
    #1;
    checks++;
    if (32'(s) !== ref_sum) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, s, ref_sum);
    end
  endtask

  initial begin
    foreach (d[k]) d[k] = '0;
    check("zeros");
    foreach (d[k]) d[k] = 16'hFFFF;
    check("all max");
    for (int h = 0; h < 16; h++) begin
      foreach (d[k]) d[k] = (k == h) ? 16'(1000 + h) : '0;
      check("one hot");
    end
    for (int n = 0; n < 2000; n++) begin
      foreach (d[k]) d[k] = 16'($urandom);
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
