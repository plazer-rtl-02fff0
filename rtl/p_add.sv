// p_add: unsigned parallel adder of N operands.
//
// Combinational sum of N inputs of IN_W bits (by default sixteen 16-bit
// products into a 20-bit result, which is wide enough for any sum of sixteen
// 16-bit values). Inputs arrive as an unpacked array. Operand count and widths
// follow the design; the adder tree is left to synthesis.
module p_add #(
  parameter int unsigned N     = 16,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 20
) (
  input  logic [IN_W-1:0]  data [N],
  output logic [OUT_W-1:0] result
);

  always_comb begin
    result = '0;
    for (int k = 0; k < N; k++) result = result + OUT_W'(data[k]);
  end

endmodule
