// mult: unsigned multiplier, one pixel by one kernel coefficient.
//
// Purely combinational: result = dataa * datab, full width (8 x 8 -> 16 bits
// by default), no rounding and no registers. The co-processor uses sixteen of
// these per convolution; on an FPGA they map to dedicated multiplier blocks.
// Widths follow the design; writing it as a plain '*' is this
// implementation's choice.
module mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic [A_W-1:0]     dataa,
  input  logic [B_W-1:0]     datab,
  output logic [A_W+B_W-1:0] result
);

  always_comb result = (A_W + B_W)'(dataa) * (A_W + B_W)'(datab);

endmodule
