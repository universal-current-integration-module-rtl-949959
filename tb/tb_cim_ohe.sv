// Testbench for cim_ohe: each thermometer code must light exactly the cell
// between the last reference below VR and the first one above it.
module tb_cim_ohe;
  int checks = 0, failures = 0;
  logic [7:0] vc;
  logic [6:0] oh;

  cim_ohe dut (.vc(vc), .onehot(oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp_oh;
    // n references below VR: vc = 1 above position n
    for (int n = 0; n <= 8; n++) begin
      vc = 8'hFF << n;
      #1;
      exp_oh = (n >= 1 && n <= 7) ? 7'(1 << (n - 1)) : 7'b0;
      checks++;
      if (oh !== exp_oh) begin
        failures++;
        $display("FAIL n=%0d vc=%b oh=%b expected %b", n, vc, oh, exp_oh);
      end
    end
    // conversion example (0.07 V): VC column 0,0,0,1,1,1,1,1 -> third cell
    vc = 8'b1111_1000; #1;
    checks++; if (oh !== 7'b000_0100) begin failures++; $display("FAIL example oh=%b", oh); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
