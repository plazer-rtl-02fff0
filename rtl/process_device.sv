// process_device: the max-convolution co-processor as an Avalon-MM slave.
//
// To the host the device is a 60-byte memory of fifteen 32-bit words on a
// word-addressed Avalon-MM slave port. Words 0..11 hold the 48-byte pixel
// window (8 left fill, 32 data, 8 right fill), words 12..13 the outer half of
// the 16-tap kernel (outermost tap at byte 48), and word 14 the read-only
// result: max value in bits 15:0, its position 0..31 in bits 23:16 and a
// ready flag in bit 24. The bytes are stored little-endian within a word, so
// byte n of the map is byte lane n%4 of word n/4.
//
// The whole window and kernel feed convmax directly, so the max-convolution
// is recomputed combinationally every cycle and registered into the result
// word on every clock edge. There is no start command and no busy signal:
// the host writes the kernel once, then for each segment writes the fill and
// data words and reads word 14. A write accepted on one clock edge shows in
// the result word after the next edge, so a read issued in the bus cycle
// right after the last write already returns the new result.
//
// Interface timing: waitrequest is never asserted; a write takes effect at
// the clock edge where write is high, honouring byteenable; readdata is a
// combinational function of address (read latency 0). Writes to word 14 and
// above are ignored, reads above word 14 return 0. reset is synchronous and
// active high and clears the window, the kernel and the result word
// (ready = 0); ready goes to 1 one clock after reset is released.
//
// Following the design: the 60-byte memory map, host-only writes to the first
// 56 bytes, hardware-only writes to the last 4, a new result every cycle and
// no wait states. This implementation's choices: word addressing, the clearing
// reset, clamping of the max value to 16 bits and ignoring writes to the
// result word.
module process_device
  import plazer_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              write,
  input  logic              read,
  input  logic [ADDR_W-1:0] address,
  input  logic [3:0]        byteenable,
  input  logic [31:0]       writedata,
  output logic [31:0]       readdata,
  output logic              waitrequest
);

  localparam int unsigned HOST_WORDS = RESULT_WORD;  // words 0..13

  // Host-written bytes: window followed by the half kernel.
  logic [7:0]   mem [RESULT_OFS];
  result_word_t result_q;

  pixel_t  window [WIN];
  coef_t   kernel [HALF_TAPS];
  conv_t   convval [SEG];
  maxval_t maxval;
  pos_t    maxpos;

  for (genvar b = 0; b < WIN; b++) begin : g_win
    assign window[b] = mem[b];
  end
  for (genvar k = 0; k < HALF_TAPS; k++) begin : g_ker
    assign kernel[k] = mem[KERNEL_OFS + k];
  end

  convmax #(.NSEG(SEG), .NTAPS(TAPS)) u_convmax (
    .indata(window), .gauss(kernel), .val(convval),
    .maxval(maxval), .maxpos(maxpos));

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int b = 0; b < RESULT_OFS; b++) mem[b] <= '0;
    end else if (write && address < ADDR_W'(HOST_WORDS)) begin
      for (int l = 0; l < 4; l++)
        if (byteenable[l]) mem[4*address + l] <= writedata[8*l +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (reset) result_q <= '0;
    else       result_q <= '{ready: 8'd1, maxpos: maxpos, maxval: maxval};
  end

  always_comb begin
    readdata = '0;
    if (address < ADDR_W'(HOST_WORDS)) begin
      for (int l = 0; l < 4; l++) readdata[8*l +: 8] = mem[4*address + l];
    end else if (address == ADDR_W'(RESULT_WORD)) begin
      readdata = result_q;
    end
  end

  assign waitrequest = 1'b0;

  // Avalon-MM: a master never issues a read and a write in the same cycle.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (reset)
                                   !(read && write));

endmodule
