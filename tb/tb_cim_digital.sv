// Testbench for cim_digital: comparator thermometer codes in, the 32-bit
// total and DATA bytes out, against a plain integer model: every clock the
// total grows by the code sampled one clock earlier, except while CIN is
// high, when the selected byte is replaced by PD. Exercises carries into
// the 13-bit and 16-bit counters, the 32-bit wrap, all preset and readout
// byte selects and both bound flags, and counts each.
module tb_cim_digital;
  import cim_pkg::*;
  int checks = 0, failures = 0;
  int n_mid = 0, n_high = 0, n_wrap = 0, n_preset[4] = '{0,0,0,0}, n_over = 0, n_under = 0;
  logic clk = 0, rst_n = 0, cin = 0;
  logic [7:0] vc = 8'hFF, pd = 0, data;
  byte_sel_e wsel = BYTE0, rsel = BYTE0;
  logic ov_n, uv;
  logic [31:0] acc;

  cim_digital dut (.vc(vc), .clk(clk), .rst_n(rst_n), .cin(cin), .wsel(wsel), .pd(pd),
                   .rsel(rsel), .data(data), .overvolt_n(ov_n), .undervolt(uv), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m_total;
  logic [2:0]  m_sample;

  // n = number of references below VR (0..8)
  function automatic logic [7:0] thermo(int n);
    return 8'hFF << n;
  endfunction
  function automatic logic [2:0] code_of(int n);
    return (n >= 1 && n <= 7) ? 3'(n) : 3'd0;
  endfunction

  int cur_n = 0;

  task automatic step();
    logic [32:0] s;
    @(posedge clk);
    if (cin) begin
      m_total[8*int'(wsel) +: 8] = pd;
      n_preset[int'(wsel)]++;
    end else begin
      s = {1'b0, m_total} + 33'(m_sample);
      if ((s[15:3] == 13'h0) && (m_total[15:3] == 13'h1FFF)) n_high++;
      if (s[32]) n_wrap++;
      if (s[3] != m_total[3] && s[2:0] < m_total[2:0]) n_mid++;
      m_total = s[31:0];
    end
    m_sample = code_of(cur_n);
    @(negedge clk);
    checks++;
    if (acc !== m_total) begin failures++; $display("FAIL total %h expected %h", acc, m_total); end
    checks++;
    if (ov_n !== (cur_n != 8) || uv !== (cur_n == 0)) begin
      failures++; $display("FAIL flags n=%0d ov_n=%b uv=%b", cur_n, ov_n, uv);
    end
    if (!ov_n) n_over++;
    if (uv) n_under++;
  endtask

  task automatic set_n(int n);
    cur_n = n; vc = thermo(n);
  endtask

  task automatic preset(logic [31:0] v);
    cin = 1;
    for (int b = 0; b < 4; b++) begin
      wsel = byte_sel_e'(b); pd = v[8*b +: 8];
      step();
    end
    cin = 0;
  endtask

  task automatic readback();
    for (int b = 0; b < 4; b++) begin
      rsel = byte_sel_e'(b); #1;
      checks++;
      if (data !== m_total[8*b +: 8]) begin
        failures++; $display("FAIL DATA byte %0d = %h expected %h", b, data, m_total[8*b +: 8]);
      end
    end
  endtask

  initial begin
    m_total = 0; m_sample = 0;
    set_n(0);
    #12 rst_n = 1;
    @(negedge clk);
    preset(32'h0000_0000);
    // steady code 3 (0.07 V in the conversion example)
    set_n(3);
    repeat (50) step();
    readback();
    // random levels, including out of range both ways
    for (int i = 0; i < 3000; i++) begin
      set_n($urandom % 9);
      step();
      if ((i % 97) == 0) readback();
    end
    // cross into the 16-bit counter and wrap the whole total
    preset(32'h0000_FFF0);
    set_n(7);
    repeat (10) step();
    readback();
    preset(32'hFFFF_FFF0);
    repeat (10) step();
    readback();
    // a single preset byte in the middle of a run
    cin = 1; wsel = BYTE2; pd = 8'hA5; step(); cin = 0;
    repeat (5) step();
    readback();
    foreach (n_preset[b]) begin
      checks++; if (n_preset[b] == 0) begin failures++; $display("FAIL byte %0d never preset", b); end
    end
    checks++; if (n_mid == 0)   begin failures++; $display("FAIL no carry into the 13-bit counter"); end
    checks++; if (n_high == 0)  begin failures++; $display("FAIL no carry into the 16-bit counter"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("FAIL no wrap"); end
    checks++; if (n_over == 0)  begin failures++; $display("FAIL no over-range"); end
    checks++; if (n_under == 0) begin failures++; $display("FAIL no under-range"); end
    $display("events: mid=%0d high=%0d wrap=%0d over=%0d under=%0d", n_mid, n_high, n_wrap, n_over, n_under);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
