// tb_process_device: end-to-end test of the max-convolution co-processor
// through its Avalon-MM slave port, with every parameter at its default.
//
// The testbench plays the host. It keeps its own byte image of the 56
// host-written bytes and its own max-convolution model, written directly from
// the defining sum C_i = (sum_k g[k]*(w[i+k] + w[i+15-k])) >> 3 with a
// first-strict-maximum scan, and compares every result word with it.
//
// Sequence:
//   1. reset, then every word reads 0 and ready rises one clock later;
//   2. the bring-up pattern: kernel taps 0 and 7 = 255, one pixel at byte 5;
//   3. result timing: a read sampled on the edge after the last write still
//      sees the old result, a read one cycle later sees the new one;
//   4. byte-enable writes, writes to the read-only result word, reads beyond
//      the map, a flat window (tie), a saturated window (clamp);
//   5. one full 640 x 480 frame of a synthetic laser-line image: a Gaussian
//      kernel (sigma 3, scaled to 8 bits), each row sent as 20 windows of
//      8 + 32 + 8 bytes with zero padding at the row ends, the row maximum
//      taken over the 20 results; each row's peak column is compared with the
//      model and with the column where the line was drawn;
//   6. reset in the middle of operation clears window, kernel and result.
// Each of these mechanisms is counted and must have happened at least once.
module tb_process_device;
  import plazer_pkg::*;

  localparam int ROWS = 480;
  localparam int COLS = 640;

  logic        clk = 1'b0;
  logic        reset, write, read, waitrequest;
  logic [10:0] address;
  logic [3:0]  byteenable;
  logic [31:0] writedata, readdata;

  int checks = 0, failures = 0;
  int n_partial = 0, n_ro_write = 0, n_oor_read = 0, n_tie = 0, n_clamp = 0;
  int n_stale = 0, n_fresh = 0, n_reset_clear = 0, n_rows = 0, n_segments = 0;
  int cycles = 0;

  logic [7:0] model [56];   // host-written bytes as the host sees them
  logic [7:0] row [COLS];
  logic [7:0] gk [8];

  process_device dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---- bus tasks: drive after the falling edge, Avalon samples on the rise
  task automatic idle();
    @(negedge clk);
    write = 1'b0; read = 1'b0; byteenable = 4'h0; writedata = '0; address = '0;
  endtask

  task automatic wr(int word, logic [31:0] data, logic [3:0] be = 4'hF);
    @(negedge clk);
    write = 1'b1; read = 1'b0; address = 11'(word);
    byteenable = be; writedata = data;
    if (word < 14)
      for (int l = 0; l < 4; l++) if (be[l]) model[4*word+l] = data[8*l +: 8];
  endtask

  task automatic rd(int word, output logic [31:0] data);
    @(negedge clk);
    write = 1'b0; read = 1'b1; address = 11'(word); byteenable = 4'hF;
    #1 data = readdata;   // what the slave presents at the next rising edge
    if (waitrequest) begin failures++; $display("FAIL waitrequest asserted"); end
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- reference model of the result word
  function automatic int unsigned ref_c(int i);
    int unsigned acc = 0;
    for (int k = 0; k < 8; k++)
      acc += (int'(model[i+k]) + int'(model[i+15-k])) * int'(model[48+k]);
    return acc >> 3;
  endfunction

  function automatic logic [31:0] ref_result(output int unsigned best, output int pos,
                                             output bit tie);
    int cnt = 0;
    best = ref_c(0); pos = 0;
    for (int i = 1; i < 32; i++) if (ref_c(i) > best) begin best = ref_c(i); pos = i; end
    for (int i = 0; i < 32; i++) if (ref_c(i) == best) cnt++;
    tie = (cnt > 1);
    return {8'd1, 8'(pos), (best > 65535) ? 16'hFFFF : 16'(best)};
  endfunction

  task automatic check_result(string what, output logic [31:0] got);
    int unsigned best; int pos; bit tie;
    logic [31:0] exp = ref_result(best, pos, tie);
    rd(14, got);
    expect_eq(what, got, exp);
    if (tie) n_tie++;
    if (best > 65535) n_clamp++;
  endtask

  task automatic write_window(const ref logic [7:0] w [48]);
    for (int word = 0; word < 12; word++)
      wr(word, {w[4*word+3], w[4*word+2], w[4*word+1], w[4*word]});
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1; write = 1'b0; read = 1'b0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    foreach (model[b]) model[b] = '0;
  endtask

  initial begin
    logic [31:0] d, prev_res;
    logic [7:0]  w [48];
    int unsigned best; int pos; bit tie;

    write = 1'b0; read = 1'b0; address = '0; byteenable = '0; writedata = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    // 1. reset state: result word is zero while reset is held
    rd(14, d);
    expect_eq("result during reset", d, 32'h0);
    do_reset();
    for (int word = 0; word < 14; word++) begin
      rd(word, d);
      expect_eq("word after reset", d, 32'h0);
    end
    rd(14, d);
    expect_eq("ready after reset", d, 32'h0100_0000);

    // 2. bring-up pattern
    wr(12, 32'h0000_00FF);
    wr(13, 32'hFF00_0000);
    wr(1, 32'h0000_FF00);   // byte 5 = 0xFF (lane 1 of word 1)
    idle(); idle();
    check_result("bring-up pattern", d);
    for (int word = 0; word < 14; word++) begin
      rd(word, d);
      expect_eq("readback", d, {model[4*word+3], model[4*word+2],
                                model[4*word+1], model[4*word]});
    end

    // 3. result timing, cycle by cycle
    for (int k = 0; k < 8; k++) gk[k] = 8'(20 * k + 10);
    for (int k = 0; k < 2; k++)
      wr(12 + k, {gk[4*k+3], gk[4*k+2], gk[4*k+1], gk[4*k]});
    for (int n = 0; n < 4; n++) begin
      logic [31:0] exp_new;
      // settle a background window, then change only the last word
      foreach (w[b]) w[b] = 8'($urandom_range(0, 60));
      write_window(w);
      idle(); idle();
      rd(14, prev_res);
      w[44 + n] = 8'd250;
      wr(11, {w[47], w[46], w[45], w[44]});
      exp_new = ref_result(best, pos, tie);
      rd(14, d);   // sampled on the edge right after the last write
      expect_eq("stale result one cycle after write", d, prev_res);
      if (d == prev_res && d != exp_new) n_stale++;
      rd(14, d);   // one cycle later
      expect_eq("fresh result two cycles after write", d, exp_new);
      if (d == exp_new) n_fresh++;
    end

    // 4. byte enables
    wr(3, 32'hAABB_CCDD);
    wr(3, 32'h1122_3344, 4'b0101);
    rd(3, d);
    expect_eq("byte-enable write", d, 32'hAA22_CC44);
    if (d == 32'hAA22_CC44) n_partial++;
    // write to the result word is ignored
    idle(); idle();
    rd(14, prev_res);
    wr(14, 32'hDEAD_BEEF);
    idle(); idle();
    rd(14, d);
    expect_eq("write to result word ignored", d, prev_res);
    if (d == prev_res) n_ro_write++;
    // reads past the map
    for (int word = 15; word < 20; word++) begin
      rd(word, d);
      expect_eq("read beyond map", d, 32'h0);
      if (d == 0) n_oor_read++;
    end
    // flat window: every position ties, position 0 must win
    foreach (w[b]) w[b] = 8'd90;
    write_window(w);
    idle(); idle();
    check_result("flat window", d);
    // saturated window and kernel: value clamped to 0xFFFF
    for (int k = 0; k < 2; k++) wr(12 + k, 32'hFFFF_FFFF);
    foreach (w[b]) w[b] = 8'd255;
    write_window(w);
    idle(); idle();
    check_result("clamped", d);

    // 5. one full frame with the Gaussian kernel, sigma 3, scaled by 255
    for (int k = 0; k < 8; k++) begin
      automatic real x = real'(8 - k);
      gk[k] = 8'($rtoi($exp(-(x * x) / 9.0) / $sqrt(2.0 * 3.14159265358979 * 9.0) * 255.0));
    end
    for (int k = 0; k < 2; k++)
      wr(12 + k, {gk[4*k+3], gk[4*k+2], gk[4*k+1], gk[4*k]});
    for (int r = 0; r < ROWS; r++) begin
      automatic int line_col = 20 + int'($urandom_range(0, COLS - 41));
      automatic int row_best = -1, row_pos = -1;
      automatic int row_best_ref = -1, row_pos_ref = -1;
      for (int c = 0; c < COLS; c++) begin
        automatic real dx = real'(c - line_col);
        automatic int v = int'($urandom_range(0, 40))
                + $rtoi(200.0 * $exp(-(dx * dx) / (2.0 * 2.0 * 2.0)));
        row[c] = (v > 255) ? 8'd255 : 8'(v);
      end
      for (int s = 0; s < COLS / 32; s++) begin
        automatic int j = 32 * s;
        for (int b = 0; b < 48; b++) begin
          automatic int c = j - 8 + b;
          w[b] = (c < 0 || c >= COLS) ? 8'd0 : row[c];
        end
        write_window(w);
        idle();
        check_result("frame segment", d);
        n_segments++;
        if (int'(d[15:0]) > row_best) begin
          row_best = int'(d[15:0]); row_pos = j + int'(d[23:16]);
        end
        void'(ref_result(best, pos, tie));
        if (int'(best) > row_best_ref) begin
          row_best_ref = int'(best); row_pos_ref = j + pos;
        end
      end
      expect_eq("row peak column", 32'(row_pos), 32'(row_pos_ref));
      checks++;
      if (row_pos < line_col - 1 || row_pos > line_col + 2) begin
        failures++;
        $display("FAIL row %0d: peak at %0d, line drawn at %0d", r, row_pos, line_col);
      end
      n_rows++;
    end

    // 6. reset in the middle of operation
    foreach (w[b]) w[b] = 8'($urandom);
    write_window(w);
    do_reset();
    begin
      automatic int nz = 0;
      for (int word = 0; word < 14; word++) begin
        rd(word, d);
        expect_eq("cleared by reset", d, 32'h0);
        if (d != 0) nz++;
      end
      if (nz == 0) n_reset_clear++;
    end

    $display("cycles=%0d rows=%0d segments=%0d", cycles, n_rows, n_segments);
    $display("mechanisms: partial=%0d ro_write=%0d oor_read=%0d tie=%0d clamp=%0d stale=%0d fresh=%0d reset_clear=%0d",
             n_partial, n_ro_write, n_oor_read, n_tie, n_clamp, n_stale, n_fresh, n_reset_clear);
    if (n_partial == 0)     begin failures++; $display("FAIL no byte-enable write"); end
    if (n_ro_write == 0)    begin failures++; $display("FAIL no ignored result-word write"); end
    if (n_oor_read == 0)    begin failures++; $display("FAIL no read beyond map"); end
    if (n_tie == 0)         begin failures++; $display("FAIL no tie"); end
    if (n_clamp == 0)       begin failures++; $display("FAIL no clamp"); end
    if (n_stale == 0)       begin failures++; $display("FAIL no stale read"); end
    if (n_fresh == 0)       begin failures++; $display("FAIL no fresh read"); end
    if (n_reset_clear == 0) begin failures++; $display("FAIL no reset clear"); end
    if (n_rows != ROWS)     begin failures++; $display("FAIL frame incomplete"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
