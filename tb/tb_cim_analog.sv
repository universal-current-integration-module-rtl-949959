// Testbench for cim_analog: real VR1/VR2/VR in, thermometer code out.
// Expected codes are worked out from the voltages directly.
module tb_cim_analog;
  int checks = 0, failures = 0;
  real vr, vr1, vr2;
  logic [7:0] vc;

  cim_analog dut (.vr(vr), .vr1(vr1), .vr2(vr2), .vc(vc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real v, input logic [7:0] exp_vc);
    vr = v; #1;
    checks++;
    if (vc !== exp_vc) begin
      failures++;
      $display("FAIL vr=%f vr1=%f vr2=%f vc=%b expected %b", v, vr1, vr2, vc, exp_vc);
    end
  endtask

  initial begin
    vr1 = 5.0; vr2 = 0.0;
    check(0.07,  8'b1111_1000);   // conversion example
    check(0.046, 8'b1111_1100);   // 0.04 < VR < 0.06
    check(0.073, 8'b1111_1000);
    check(0.01,  8'b1111_1111);   // under range
    check(0.2,   8'b0000_0000);   // over range
    check(0.155, 8'b1000_0000);
    // other span: VR1 = 2.5 V, VR2 = 0 V -> 0.01 V steps
    vr1 = 2.5;
    check(0.035, 8'b1111_1000);
    check(0.085, 8'b0000_0000);
    // offset span: VR2 = 1 V, VR1 = 6 V -> taps at 1.02 .. 1.16 V
    vr1 = 6.0; vr2 = 1.0;
    check(1.11, 8'b1110_0000);
    check(0.5,  8'b1111_1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
