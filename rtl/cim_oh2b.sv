// One-hot to binary code conversion (binary representation encoder, OH2B).
//
// One-hot bit k (VR between reference k and k+1) becomes the code k+1, so
// codes 1..7 stand for VR at or above 1/250..7/250 of the reference span;
// no bit set gives 0. That numbering follows the conversion example of the
// original chip (VR = 0.07 V with 0.02 V steps gives 011). Each output bit is
// the OR of the one-hot bits whose code has that bit set.
//
// Interface: onehot[2**CODE_W-2:0] in, code[CODE_W-1:0] out. Combinational.
module cim_oh2b #(
  parameter int unsigned CODE_W = 3
) (
  input  logic [(2**CODE_W)-2:0] onehot,
  output logic [CODE_W-1:0]      code
);

  // The comparator bank gives a thermometer code, so at most one cell of
  // the one-hot encoder can fire.
  always_comb begin
    assert ((onehot & (onehot - 1'b1)) == '0)
      else $error("cim_oh2b: more than one one-hot bit set: %b", onehot);
  end

  always_comb begin
    code = '0;
    for (int k = 0; k < (2**CODE_W) - 1; k++) begin
      for (int b = 0; b < CODE_W; b++) begin
        if ((((k + 1) >> b) & 1) != 0)
          code[b] = code[b] | onehot[k];
      end
    end
  end

endmodule
