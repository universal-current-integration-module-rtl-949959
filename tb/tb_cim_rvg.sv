// Testbench for cim_rvg: checks every tap against (k+1)/LEVELS of the
// VR1-VR2 span for several supply settings, including the 5 V / 0 V case
// whose taps are 0.02 V apart.
module tb_cim_rvg;
  int checks = 0, failures = 0;
  real vr1, vr2;
  real vot [8];

  cim_rvg dut (.vr1(vr1), .vr2(vr2), .vot(vot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_taps(input real top, input real bot);
    real exp_v, err;
    vr1 = top; vr2 = bot;
    #1;
    for (int k = 0; k < 8; k++) begin
      exp_v = bot + (top - bot) * (k + 1) / 250.0;
      err = vot[k] - exp_v;
      if (err < 0) err = -err;
      checks++;
      if (err > 1e-9) begin
        failures++;
        $display("FAIL tap %0d: got %f expected %f", k, vot[k], exp_v);
      end
    end
  endtask

  initial begin
    check_taps(5.0, 0.0);
    // spot values: 0.02 V and 0.16 V
    checks++; if (vot[0] < 0.0199 || vot[0] > 0.0201) failures++;
    checks++; if (vot[7] < 0.1599 || vot[7] > 0.1601) failures++;
    check_taps(3.3, 0.0);
    check_taps(5.0, 1.0);
    check_taps(2.5, -2.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
