// End-to-end testbench for cim_chip at its default size (250-step divider,
// 32-bit total). Drives real voltages with VR1 = 5 V and VR2 = 0 V, so the
// references are 0.02 .. 0.16 V, and checks the total read back byte by
// byte over DATA against a model that converts each VR to a code with
// floor(VR / 0.02 V) (0 outside 0.02 .. 0.16 V) and adds it every clock,
// one clock after sampling. Covers:
//   * the 0.07 V conversion example (code 3) and the 0.046 V / 0.073 V
//     measured examples (codes 2 and 3),
//   * one point inside every code range 1..7,
//   * over- and under-range flags,
//   * host preset of every byte, readout of every byte,
//   * carries into the 13-bit and the 16-bit counter and the 32-bit wrap,
// and counts how often each happened; a mechanism that never happened is a
// failure.
module tb_cim_chip;
  int checks = 0, failures = 0;
  int n_mid = 0, n_high = 0, n_wrap = 0, n_over = 0, n_under = 0, n_read = 0;
  int n_preset[4] = '{0, 0, 0, 0};
  int n_code[8] = '{0, 0, 0, 0, 0, 0, 0, 0};

  real vr = 0.0, vr1 = 5.0, vr2 = 0.0;
  logic clk = 0, rst_n = 0, cin = 0;
  logic dcrhdien = 0, dcrldien = 0, dcrhdoen = 0, dcrldoen = 0;
  logic [7:0] pd = 0, data;
  logic ov_n, uv;

  cim_chip dut (
    .vr(vr), .vr1(vr1), .vr2(vr2), .clk(clk), .rst_n(rst_n), .cin(cin),
    .dcrhdien(dcrhdien), .dcrldien(dcrldien), .pd(pd),
    .dcrhdoen(dcrhdoen), .dcrldoen(dcrldoen),
    .data(data), .overvolt_n(ov_n), .undervolt(uv)
  );

  always #50 clk = ~clk;  // 10 MHz, the fastest clock the original chip ran at

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] m_total;
  logic [2:0]  m_sample;

  function automatic int refs_below(real v);
    int n = 0;
    for (int k = 1; k <= 8; k++)
      if (v > 0.02 * k) n++;
    return n;
  endfunction

  function automatic logic [2:0] code_of(real v);
    int n = refs_below(v);
    return (n >= 1 && n <= 7) ? 3'(n) : 3'd0;
  endfunction

  task automatic step();
    logic [32:0] s;
    @(posedge clk);
    if (cin) begin
      m_total[8 * int'({dcrhdien, dcrldien}) +: 8] = pd;
      n_preset[int'({dcrhdien, dcrldien})]++;
    end else begin
      s = {1'b0, m_total} + 33'(m_sample);
      if (s[32]) n_wrap++;
      if (s[16] != m_total[16] && !s[32]) n_high++;
      if (s[3] != m_total[3]) n_mid++;
      m_total = s[31:0];
    end
    m_sample = code_of(vr);
    n_code[code_of(vr)]++;
    @(negedge clk);
    checks++;
    if (ov_n !== (refs_below(vr) != 8) || uv !== (refs_below(vr) == 0)) begin
      failures++;
      $display("FAIL flags vr=%f ov_n=%b uv=%b", vr, ov_n, uv);
    end
    if (!ov_n) n_over++;
    if (uv) n_under++;
  endtask

  task automatic read_total(output logic [31:0] v);
    for (int b = 0; b < 4; b++) begin
      {dcrhdoen, dcrldoen} = 2'(b);
      #1;
      v[8 * b +: 8] = data;
    end
    n_read++;
  endtask

  task automatic check_total(string what);
    logic [31:0] v;
    read_total(v);
    checks++;
    if (v !== m_total) begin
      failures++;
      $display("FAIL %s: total %h expected %h", what, v, m_total);
    end
  endtask

  task automatic preset(logic [31:0] v);
    cin = 1;
    for (int b = 0; b < 4; b++) begin
      {dcrhdien, dcrldien} = 2'(b);
      pd = v[8 * b +: 8];
      step();
    end
    cin = 0;
  endtask

  task automatic run(real v, int cycles, string what);
    vr = v;
    repeat (cycles) step();
    check_total(what);
  endtask

  initial begin
    logic [31:0] t_start, t_end;
    m_total = 0; m_sample = 0;
    #120 rst_n = 1;
    @(negedge clk);
    preset(32'h0);
    check_total("preset zero");

    // conversion example: VR = 0.07 V -> code 3 per clock
    vr = 0.07;
    step();                       // first sample taken
    read_total(t_start);
    repeat (100) step();
    read_total(t_end);
    checks++;
    if (t_end - t_start !== 32'd300) begin
      failures++;
      $display("FAIL 0.07 V: grew by %0d in 100 clocks, expected 300", t_end - t_start);
    end
    check_total("0.07 V");

    // measured examples
    run(0.046, 64, "0.046 V");
    run(0.073, 64, "0.073 V");

    // one point inside every code range (0.03, 0.05, ..., 0.15 V)
    for (int c = 1; c <= 7; c++)
      run(0.01 + 0.02 * c, 20, "code sweep");

    // out of range both ways: nothing added, flags set
    run(0.30, 20, "over range");
    run(0.005, 20, "under range");

    // into the 16-bit counter, then the 32-bit wrap
    preset(32'h0000_FFC0);
    run(0.15, 20, "carry into 16-bit counter");
    preset(32'hFFFF_FFC0);
    run(0.15, 20, "32-bit wrap");

    // random voltages with occasional single-byte presets
    for (int i = 0; i < 2000; i++) begin
      vr = 0.0001 + 0.2 * real'($urandom % 1000) / 1000.0;  // never exactly on a tap
      if (($urandom % 50) == 0) begin
        cin = 1;
        {dcrhdien, dcrldien} = 2'($urandom);
        pd = 8'($urandom);
        step();
        cin = 0;
      end else begin
        step();
      end
      if ((i % 50) == 0) check_total("random");
    end
    check_total("end");

    foreach (n_preset[b]) begin
      checks++; if (n_preset[b] == 0) begin failures++; $display("FAIL byte %0d never preset", b); end
    end
    for (int c = 1; c <= 7; c++) begin
      checks++; if (n_code[c] == 0) begin failures++; $display("FAIL code %0d never converted", c); end
    end
    checks++; if (n_mid == 0)   begin failures++; $display("FAIL no carry into the 13-bit counter"); end
    checks++; if (n_high == 0)  begin failures++; $display("FAIL no carry into the 16-bit counter"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("FAIL no 32-bit wrap"); end
    checks++; if (n_over == 0)  begin failures++; $display("FAIL no over-range"); end
    checks++; if (n_under == 0) begin failures++; $display("FAIL no under-range"); end
    checks++; if (n_read == 0)  begin failures++; $display("FAIL nothing read"); end
    $display("events: carry13=%0d carry16=%0d wrap=%0d over=%0d under=%0d reads=%0d presets=%0d/%0d/%0d/%0d",
             n_mid, n_high, n_wrap, n_over, n_under, n_read,
             n_preset[0], n_preset[1], n_preset[2], n_preset[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
