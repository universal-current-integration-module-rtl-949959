// Analog module of the CIM -- BEHAVIOURAL MODEL (analog, not synthesizable).
//
// Groups the reference voltage generator (a 250-step divider between VR1
// and VR2 whose lowest eight taps are used) and the eight comparators that
// turn the sense-resistor voltage VR into a thermometer code. This split of
// the chip into an analog and a digital module follows the original design
// hierarchy.
//
// Interface: real vr, vr1, vr2 in; vc[7:0] out, vc[k] = 1 when the k-th
// reference, (k+1)/250 of VR1-VR2 above VR2, lies above VR. No clock.
module cim_analog #(
  parameter int unsigned LEVELS = 250
) (
  input  real                      vr,
  input  real                      vr1,
  input  real                      vr2,
  output logic [cim_pkg::N_REF-1:0] vc
);

  real vot [cim_pkg::N_REF];

  cim_rvg #(.LEVELS(LEVELS), .N_REF(cim_pkg::N_REF)) u_rvg (
    .vr1(vr1), .vr2(vr2), .vot(vot)
  );

  cim_vc #(.N_REF(cim_pkg::N_REF)) u_vc (
    .vr(vr), .vot(vot), .vc(vc)
  );

endmodule
