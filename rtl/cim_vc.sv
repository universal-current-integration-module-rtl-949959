// Voltage comparator bank -- BEHAVIOURAL MODEL (analog, not synthesizable).
//
// Eight comparators put the sense voltage VR against the references VOT0..7
// and together form a thermometer code. Polarity follows the conversion
// example of the original chip: a comparator output is 1 when its
// reference lies above VR, so for VR = 0.07 V and 0.02 V steps the code is
// vc = 8'b1111_1000 (vc[0] is the lowest reference). The comparators are
// ideal: no offset, no hysteresis, no delay.
//
// Interface: real vr and vot[N_REF] in; logic vc[N_REF-1:0] out. No clock.
module cim_vc #(
  parameter int unsigned N_REF = 8
) (
  input  real              vr,
  input  real              vot [N_REF],
  output logic [N_REF-1:0] vc
);

  always_comb begin
    for (int k = 0; k < N_REF; k++)
      vc[k] = (vot[k] > vr);
  end

endmodule
