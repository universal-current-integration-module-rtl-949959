// 3-bit adder of the integration core.
//
// Adds a new ADC code to the low bits of the running total; the carry out
// advances the counter stage above. Written as a ripple of full-adder cells
// (sum = a^b^c, carry = majority), matching the "3-b FA" of the original
// block diagram; the width is a parameter.
//
// Interface: a, b [W-1:0] in; sum [W-1:0] and carry out. Combinational.
module cim_fa3 #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         carry
);

  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1]   = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign carry = c[W];

endmodule
