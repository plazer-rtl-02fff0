// conv: one symmetric FIR tap set, evaluated in a single combinational pass.
//
// The kernel is symmetric, so only its outer half is supplied: gauss[0] is the
// outermost tap and gauss[TAPS/2-1] the one next to the centre. Tap k of the
// half kernel multiplies both data[k] and data[TAPS-1-k]:
//
//   sum       = sum_{k<TAPS/2} gauss[k] * (data[k] + data[TAPS-1-k])
//               (formed as TAPS separate products and one TAPS-way adder)
//   convvalue = sum >> SHIFT
//
// With 8-bit pixels and coefficients the sixteen 16-bit products add up in
// 20 bits, and dropping the 3 low bits leaves a 17-bit result. No clock, no
// state: the result follows the inputs within the cycle. Tap count, widths,
// the mirrored tap order and the divide-by-8 follow the design; nothing here
// is a local choice beyond making the sizes parameters.
module conv
  import plazer_pkg::*;
#(
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned SHIFT = CONV_SHIFT,
  localparam int unsigned HALF = NTAPS / 2,
  localparam int unsigned SW   = PROD_W + $clog2(NTAPS),
  localparam int unsigned OW   = SW - SHIFT
) (
  input  pixel_t        data  [NTAPS],
  input  coef_t         gauss [HALF],
  output logic [OW-1:0] convvalue
);

  logic [PROD_W-1:0] marr [NTAPS];
  logic [SW-1:0]     sum;

  for (genvar k = 0; k < HALF; k++) begin : g_tap
    mult #(.A_W(PIX_W), .B_W(COEF_W)) u_lo (
      .dataa(data[k]), .datab(gauss[k]), .result(marr[k]));
    mult #(.A_W(PIX_W), .B_W(COEF_W)) u_hi (
      .dataa(data[NTAPS-1-k]), .datab(gauss[k]), .result(marr[NTAPS-1-k]));
  end

  p_add #(.N(NTAPS), .IN_W(PROD_W), .OUT_W(SW)) u_add (
    .data(marr), .result(sum));

  assign convvalue = sum[SW-1:SHIFT];

endmodule
