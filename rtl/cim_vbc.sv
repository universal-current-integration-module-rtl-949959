// Voltage bound checker (VBC).
//
// Flags a sense voltage outside the range the eight references cover.
// OVERVOLTbar goes low when VR is above every reference (no comparator
// reports a reference above VR); UNDERVOLT goes high when VR is below every
// reference (all comparators report their reference above VR). The pin
// meanings follow the original pin table. Each flag is written as a
// reduction over all eight comparator outputs rather than a look at a single
// end comparator, so it stays correct for any thermometer code.
//
// Interface: vc[N_REF-1:0] in (vc[k] = 1 when reference k is above VR);
// overvolt_n and undervolt out. Purely combinational.
module cim_vbc #(
  parameter int unsigned N_REF = 8
) (
  input  logic [N_REF-1:0] vc,
  output logic             overvolt_n,
  output logic             undervolt
);

  assign overvolt_n = |vc;
  assign undervolt  = &vc;

endmodule
