// Testbench for cim_fa3: all 64 operand pairs against integer addition.
module tb_cim_fa3;
  int checks = 0, failures = 0;
  logic [2:0] a, b, s;
  logic c;

  cim_fa3 dut (.a(a), .b(b), .sum(s), .carry(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j); #1;
        checks++;
        if ({c, s} !== 4'(i + j)) begin
          failures++;
          $display("FAIL %0d+%0d = %0d carry %b", i, j, s, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
