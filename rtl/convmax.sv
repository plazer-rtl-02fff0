// convmax: max-convolution over one buffered window.
//
// The window holds NSEG data bytes with HALF = NTAPS/2 fill bytes on each
// side (8 + 32 + 8 = 48 bytes by default). Convolver i (i = 0..NSEG-1) sees
// indata[i .. i+NTAPS-1], so its output belongs to data byte i, the byte at
// window offset HALF+i lying just right of its centre. All NSEG convolvers
// run in parallel, and a chain of NSEG-1 comparators walks their outputs in
// order of i, keeping the running maximum and its index:
//
//   best(0) = val[0] at 0;   best(i) = val[i] at i  if val[i] > best(i-1)
//
// so the first (leftmost) of several equal maxima wins. Everything is
// combinational: maxval and maxpos are valid in the cycle the inputs change.
// maxval is the 17-bit convolution value clamped to 16 bits; the comparison
// itself uses all 17 bits. All the convolved values are also brought out on
// val.
//
// Following the design: 32 parallel convolutions on a 48-byte window, a
// comparator chain, 16-bit max value and 8-bit position. This
// implementation's choices: position 0 takes part in the comparison, ties go
// to the lower position, and a value above 16 bits is clamped to 0xFFFF.
module convmax
  import plazer_pkg::*;
#(
  parameter int unsigned NSEG  = SEG,
  parameter int unsigned NTAPS = TAPS,
  localparam int unsigned HALF = NTAPS / 2,
  localparam int unsigned NWIN = NSEG + NTAPS,
  localparam int unsigned CW   = PROD_W + $clog2(NTAPS) - CONV_SHIFT
) (
  input  pixel_t        indata [NWIN],
  input  coef_t         gauss  [HALF],
  output logic [CW-1:0] val    [NSEG],
  output maxval_t       maxval,
  output pos_t          maxpos
);

  logic [CW-1:0] best_val [NSEG];
  pos_t          best_pos [NSEG];

  for (genvar i = 0; i < NSEG; i++) begin : g_conv
    pixel_t tap_data [NTAPS];
    for (genvar t = 0; t < NTAPS; t++) begin : g_tap
      assign tap_data[t] = indata[i+t];
    end
    conv #(.NTAPS(NTAPS)) u_conv (
      .data(tap_data), .gauss(gauss), .convvalue(val[i]));
  end

  // Comparator chain, one comparator per position after the first.
  assign best_val[0] = val[0];
  assign best_pos[0] = '0;
  for (genvar i = 1; i < NSEG; i++) begin : g_cmp
    assign best_val[i] = (val[i] > best_val[i-1]) ? val[i] : best_val[i-1];
    assign best_pos[i] = (val[i] > best_val[i-1]) ? POS_W'(i) : best_pos[i-1];
  end

  assign maxval = (best_val[NSEG-1] > CW'({MAXVAL_W{1'b1}}))
                  ? {MAXVAL_W{1'b1}} : MAXVAL_W'(best_val[NSEG-1]);
  assign maxpos = best_pos[NSEG-1];

endmodule
