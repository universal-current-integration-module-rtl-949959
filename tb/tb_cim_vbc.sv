// Testbench for cim_vbc: all nine thermometer codes of eight comparators,
// then random non-thermometer patterns, against the pin definitions
// (OVERVOLTbar = 0 only when VR is above every reference, UNDERVOLT = 1 only
// when VR is below every reference).
module tb_cim_vbc;
  int checks = 0, failures = 0;
  logic [7:0] vc;
  logic ov_n, uv;

  cim_vbc dut (.vc(vc), .overvolt_n(ov_n), .undervolt(uv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] v, input logic e_ov_n, input logic e_uv);
    vc = v; #1;
    checks++;
    if (ov_n !== e_ov_n || uv !== e_uv) begin
      failures++;
      $display("FAIL vc=%b ov_n=%b uv=%b expected %b %b", v, ov_n, uv, e_ov_n, e_uv);
    end
  endtask

  initial begin
    // n = number of references below VR
    for (int n = 0; n <= 8; n++)
      check(8'hFF << n, (n != 8), (n == 0));
    for (int i = 0; i < 200; i++) begin
      logic [7:0] r;
      r = 8'($urandom);
      check(r, (r != 8'h00), (r == 8'hFF));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
