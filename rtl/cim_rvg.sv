// Reference voltage generator -- BEHAVIOURAL MODEL (analog, not synthesizable).
//
// A resistor ladder between VR1 (top) and VR2 (bottom) cut into LEVELS equal
// steps. Only the lowest N_REF taps are brought out, VOT[k] at (k+1)/LEVELS of
// the span, so with VR1 = 5 V and VR2 = 0 V the taps are 0.02, 0.04 ... 0.16 V.
// The 250 steps and the eight taps follow the original chip; the ladder is
// modelled as ideal (no resistor mismatch, no loading).
//
// Interface: real-valued vr1, vr2 in; vot[N_REF] out. No clock; the outputs
// follow the inputs with zero delay.
module cim_rvg #(
  parameter int unsigned LEVELS = 250,
  parameter int unsigned N_REF  = 8
) (
  input  real vr1,
  input  real vr2,
  output real vot [N_REF]
);

  always_comb begin
    for (int k = 0; k < N_REF; k++)
      vot[k] = vr2 + (vr1 - vr2) * real'(k + 1) / real'(LEVELS);
  end

endmodule
