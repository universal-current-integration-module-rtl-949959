// One-hot encoding circuit (OHE).
//
// Finds the edge of the comparator thermometer code. Output bit k is set
// when reference k lies below VR and reference k+1 lies above it, i.e. VR
// sits between VOT[k] and VOT[k+1]. There are N_REF-1 such cells, one per
// pair of neighbouring comparators, as on the original chip; a VR below
// VOT0 or above the top reference sets no bit (the bound checker reports
// those cases).
//
// Interface: vc[N_REF-1:0] in (vc[k] = 1 when reference k is above VR);
// onehot[N_REF-2:0] out. Purely combinational.
module cim_ohe #(
  parameter int unsigned N_REF = 8
) (
  input  logic [N_REF-1:0] vc,
  output logic [N_REF-2:0] onehot
);

  always_comb begin
    for (int k = 0; k < N_REF - 1; k++)
      onehot[k] = ~vc[k] & vc[k+1];
  end

endmodule
