// tb_mult: exhaustive check of the 8x8 unsigned multiplier.
//
// Every one of the 65536 operand pairs is applied and the product compared
// with one built by shift-and-add in the testbench. A watchdog ends the run
// with a failure if it has not finished after a fixed number of cycles.
module tb_mult;
  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  mult #(.A_W(8), .B_W(8)) dut (.dataa(a), .datab(b), .result(p));

  always #5 clk = ~clk;

  function automatic logic [15:0] shift_add(logic [7:0] x, logic [7:0] y);
    logic [15:0] acc = '0;
    for (int k = 0; k < 8; k++) if (y[k]) acc += 16'(x) << k;
    return acc;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== shift_add(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
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
