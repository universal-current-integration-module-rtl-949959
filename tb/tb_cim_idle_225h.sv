// Workload testbench: 225 hours of handset standby sampled once per second,
// i.e. 810,000 clocks of cim_chip at its default size. The sense voltage
// mostly sits in the lowest code range (standby current) with a short burst
// in the top range every 600 samples (a call or a network page). The total
// is read over DATA every 100,000 samples and at the end and compared with
// an integer model; it must never wrap and must end at the model's value.
module tb_cim_idle_225h;
  localparam int SAMPLES = 225 * 3600;
  int checks = 0, failures = 0, bursts = 0;
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

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_total;   // wide model: any wrap of the 32-bit total shows up
  int     m_sample;

  task automatic check_total();
    logic [31:0] v;
    for (int b = 0; b < 4; b++) begin
      {dcrhdoen, dcrldoen} = 2'(b);
      #1;
      v[8 * b +: 8] = data;
    end
    checks++;
    if (longint'(v) !== m_total) begin
      failures++;
      $display("FAIL total %0d expected %0d", v, m_total);
    end
  endtask

  initial begin
    int code;
    m_total = 0; m_sample = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < SAMPLES; i++) begin
      // standby: 0.03 V (code 1); burst: 0.15 V (code 7) for 10 samples
      if ((i % 600) < 10) begin vr = 0.15; code = 7; end
      else                begin vr = 0.03; code = 1; end
      if ((i % 600) == 0) bursts++;
      @(posedge clk);
      m_total += m_sample;
      m_sample = code;
      @(negedge clk);
      if ((i % 100000) == 0) check_total();
    end
    // let the last sample reach the total
    vr = 0.01;
    @(posedge clk); m_total += m_sample; m_sample = 0;
    @(negedge clk);
    check_total();
    checks++;
    if (m_total >= 64'h1_0000_0000) begin failures++; $display("FAIL model exceeds 32 bits"); end
    checks++;
    if (bursts == 0) begin failures++; $display("FAIL no burst"); end
    $display("225 h: %0d samples, total %0d counts, %0d bursts", SAMPLES, m_total, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
