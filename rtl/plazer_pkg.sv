// plazer_pkg: sizes, types and the memory map shared by the max-convolution
// co-processor.
//
// The co-processor looks at one 48-byte window of a grayscale image row at a
// time: 8 bytes of left fill, 32 bytes of data and 8 bytes of right fill. A
// 16-tap symmetric kernel is given by its outer half (8 bytes, outermost tap
// first). For each of the 32 data positions the window is convolved with the
// kernel, and the largest result and its position are returned.
//
// Byte map of the 60-byte slave (byte offsets, little-endian inside a word):
//   0..7    left fill          8..39  data          40..47  right fill
//   48..55  half kernel        56..57 max value     58      max position
//   59      ready flag (bit 0)
// Bytes 0..55 are written only by the host; word 14 (bytes 56..59) only by
// the hardware. Window, kernel and result sizes follow the design; the
// saturation of the max value to 16 bits is this implementation's choice.
package plazer_pkg;

  localparam int unsigned PIX_W      = 8;   // grayscale pixel width
  localparam int unsigned COEF_W     = 8;   // kernel coefficient width
  localparam int unsigned TAPS       = 16;  // convolution length
  localparam int unsigned HALF_TAPS  = TAPS / 2;
  localparam int unsigned SEG        = 32;  // data bytes per transaction
  localparam int unsigned FILL       = 8;   // fill bytes on each side
  localparam int unsigned WIN        = FILL + SEG + FILL;  // 48
  localparam int unsigned MEM_BYTES  = 60;
  localparam int unsigned MEM_WORDS  = MEM_BYTES / 4;      // 15
  localparam int unsigned KERNEL_OFS = WIN;                // byte 48
  localparam int unsigned RESULT_OFS = KERNEL_OFS + HALF_TAPS;  // byte 56
  localparam int unsigned RESULT_WORD = RESULT_OFS / 4;    // word 14
  localparam int unsigned PROD_W     = PIX_W + COEF_W;     // 16
  localparam int unsigned SUM_W      = 20;  // 16-way adder result width
  localparam int unsigned CONV_SHIFT = 3;   // sum is divided by 8
  localparam int unsigned CONV_W     = SUM_W - CONV_SHIFT; // 17
  localparam int unsigned MAXVAL_W   = 16;  // reported max value width
  localparam int unsigned POS_W      = 8;   // reported max position width
  localparam int unsigned ADDR_W     = 11;  // Avalon word address width

  typedef logic [PIX_W-1:0]    pixel_t;
  typedef logic [COEF_W-1:0]   coef_t;
  typedef logic [CONV_W-1:0]   conv_t;
  typedef logic [MAXVAL_W-1:0] maxval_t;
  typedef logic [POS_W-1:0]    pos_t;

  // Contents of the read-only result word.
  typedef struct packed {
    logic [7:0] ready;   // byte 59: bit 0 set once a result has been stored
    pos_t       maxpos;  // byte 58
    maxval_t    maxval;  // bytes 57:56
  } result_word_t;

endpackage
