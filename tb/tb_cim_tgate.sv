// Testbench for cim_tgate: random 32-bit totals, every byte select.
module tb_cim_tgate;
  import cim_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] acc;
  byte_sel_e sel;
  logic [7:0] data;

  cim_tgate dut (.acc(acc), .sel(sel), .data(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      acc = $urandom;
      for (int s = 0; s < 4; s++) begin
        sel = byte_sel_e'(s); #1;
        checks++;
        if (data !== 8'(acc >> (8 * s))) begin
          failures++;
          $display("FAIL acc=%h sel=%0d data=%h", acc, s, data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
