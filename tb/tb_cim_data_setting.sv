// Testbench for cim_data_setting: for the three slices the CIM uses (bits
// 2..0, 15..3, 31..16), every byte select and random bytes, the mask and
// data must place PD exactly on the bits of the chosen byte that fall in
// the slice, and nothing while CIN is low.
module tb_cim_data_setting;
  import cim_pkg::*;
  int checks = 0, failures = 0;
  logic cin;
  byte_sel_e sel;
  logic [7:0] pd;
  logic [12:0] ld_m, d_m;
  logic [2:0]  ld_l, d_l;
  logic [15:0] ld_h, d_h;

  cim_data_setting                          dut_mid  (.cin(cin), .sel(sel), .pd(pd), .load(ld_m), .load_data(d_m));
  cim_data_setting #(.OFFSET(0),  .WIDTH(3))  dut_low  (.cin(cin), .sel(sel), .pd(pd), .load(ld_l), .load_data(d_l));
  cim_data_setting #(.OFFSET(16), .WIDTH(16)) dut_high (.cin(cin), .sel(sel), .pd(pd), .load(ld_h), .load_data(d_h));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] mask32, data32, got_mask, got_data;
    for (int i = 0; i < 400; i++) begin
      cin = ($urandom % 4) != 0;
      sel = byte_sel_e'($urandom % 4);
      pd  = 8'($urandom);
      #1;
      mask32 = cin ? (32'hFF << (8 * int'(sel))) : 32'h0;
      data32 = {4{pd}};
      got_mask = {ld_h, ld_m, ld_l};
      got_data = ({d_h, d_m, d_l} & got_mask);
      checks++;
      if (got_mask !== mask32 || got_data !== (data32 & mask32)) begin
        failures++;
        $display("FAIL cin=%b sel=%0d pd=%h mask=%h exp %h data=%h exp %h",
                 cin, sel, pd, got_mask, mask32, got_data, data32 & mask32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
