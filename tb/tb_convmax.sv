// tb_convmax: check of the 32-way max-convolution over a 48-byte window.
//
// A reference model in the testbench convolves the window at every position
// directly from Eq. "C_i = sum_k gauss[k]*(w[i+k] + w[i+15-k]) >> 3", then
// scans for the first strict maximum and clamps it to 16 bits. Directed
// cases: a single bright pixel walked over every data position (the peak
// must follow it), a flat window (all positions tie: position 0 must win),
// two equal peaks (the left one wins), the maximum at position 0, and an
// all-255 window with an all-255 kernel (value clamped to 0xFFFF).
// Random windows follow. Each directed mechanism is counted and must occur.
module tb_convmax;
  import plazer_pkg::*;
  logic    clk = 1'b0;
  pixel_t  win   [48];
  coef_t   gauss [8];
  conv_t   val   [32];
  maxval_t maxval;
  pos_t    maxpos;
  int checks = 0, failures = 0;
  int n_tie = 0, n_clamp = 0, n_pos0 = 0;

  convmax dut (.indata(win), .gauss(gauss), .val(val),
               .maxval(maxval), .maxpos(maxpos));

  always #5 clk = ~clk;

  function automatic int unsigned ref_c(int i);
    int unsigned acc = 0;
    for (int k = 0; k < 8; k++)
      acc += (int'(win[i+k]) + int'(win[i+15-k])) * int'(gauss[k]);
    return acc >> 3;
  endfunction

  task automatic check(string what);
    int unsigned best = 0, bv;
    int bp = 0;
    int ties = 0;
    best = ref_c(0);
    for (int i = 1; i < 32; i++) begin
      if (ref_c(i) > best) begin best = ref_c(i); bp = i; end
    end
    for (int i = 0; i < 32; i++) if (ref_c(i) == best) ties++;
    bv = (best > 65535) ? 65535 : best;
    #1;
    checks++;
    if (32'(maxval) !== bv || int'(maxpos) != bp) begin
      failures++;
      $display("FAIL %s: got %0d@%0d expected %0d@%0d", what, maxval, maxpos, bv, bp);
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (32'(val[i]) !== ref_c(i)) begin
        failures++;
        $display("FAIL %s: val[%0d]=%0d expected %0d", what, i, val[i], ref_c(i));
      end
    end
    if (ties > 1) n_tie++;
    if (best > 65535) n_clamp++;
    if (bp == 0) n_pos0++;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) gauss[k] = 8'(1 + 30 * k);
    // Single bright pixel at every data position 0..31 (window byte 8+p).
    for (int p = 0; p < 32; p++) begin
      foreach (win[b]) win[b] = 8'd10;
      win[8+p] = 8'd250;
      check("walking peak");
    end
    foreach (win[b]) win[b] = 8'd77;
    check("flat window");
    foreach (win[b]) win[b] = 8'd0;
    win[8+5] = 8'd200; win[8+20] = 8'd200;
    check("two equal peaks");
    foreach (win[b]) win[b] = 8'd0;
    win[7] = 8'd255; win[8] = 8'd255;
    check("peak at position 0");
    foreach (win[b]) win[b] = 8'd255;
    foreach (gauss[k]) gauss[k] = 8'd255;
    check("clamped");
    for (int n = 0; n < 300; n++) begin
      foreach (win[b]) win[b] = 8'($urandom);
      foreach (gauss[k]) gauss[k] = 8'($urandom_range(0, 160));
      check("random");
    end
    $display("mechanisms: ties=%0d clamp=%0d pos0=%0d", n_tie, n_clamp, n_pos0);
    if (n_tie == 0)   begin failures++; $display("FAIL no tie exercised"); end
    if (n_clamp == 0) begin failures++; $display("FAIL no clamp exercised"); end
    if (n_pos0 == 0)  begin failures++; $display("FAIL position 0 never won"); end
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
