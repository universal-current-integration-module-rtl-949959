// Testbench for cim_oh2b: one-hot bit k must give code k+1, no bit code 0.
module tb_cim_oh2b;
  int checks = 0, failures = 0;
  logic [6:0] oh;
  logic [2:0] code;

  cim_oh2b dut (.onehot(oh), .code(code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh = '0; #1;
    checks++; if (code !== 3'd0) begin failures++; $display("FAIL zero -> %0d", code); end
    for (int k = 0; k < 7; k++) begin
      oh = 7'(1 << k); #1;
      checks++;
      if (code !== 3'(k + 1)) begin
        failures++;
        $display("FAIL onehot=%b code=%0d expected %0d", oh, code, k + 1);
      end
    end
    // conversion example: third cell -> 011
    oh = 7'b000_0100; #1;
    checks++; if (code !== 3'b011) begin failures++; $display("FAIL example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
