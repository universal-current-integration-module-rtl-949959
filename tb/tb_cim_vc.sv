// Testbench for cim_vc: references at 0.02 V steps, VR swept from below
// the lowest to above the highest; each comparator must report 1 exactly
// when its reference is above VR.
module tb_cim_vc;
  int checks = 0, failures = 0;
  real vr;
  real vot [8];
  logic [7:0] vc;

  cim_vc dut (.vr(vr), .vot(vot), .vc(vc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_vc;
    for (int k = 0; k < 8; k++) vot[k] = 0.02 * (k + 1);
    for (int i = 0; i <= 90; i++) begin
      vr = 0.001 + 0.002 * i;  // 0.001 .. 0.181, never exactly on a tap
      #1;
      // count of references strictly below VR gives the thermometer edge
      exp_vc = '1;
      for (int k = 0; k < 8; k++)
        if (vr > 0.02 * (k + 1)) exp_vc[k] = 1'b0;
      checks++;
      if (vc !== exp_vc) begin
        failures++;
        $display("FAIL vr=%f vc=%b expected %b", vr, vc, exp_vc);
      end
    end
    // conversion example: 0.07 V
    vr = 0.07; #1;
    checks++; if (vc !== 8'b1111_1000) begin failures++; $display("FAIL 0.07 V: %b", vc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
