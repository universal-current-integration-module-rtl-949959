// Testbench for cim_integrator: random ADC codes, holds and partial loads
// against a cycle model of "sample register -> 3-bit add -> low register".
// Also checks the latency: a code presented before edge n appears in the
// low bits after edge n+1 and not before.
module tb_cim_integrator;
  int checks = 0, failures = 0, carries = 0;
  logic clk = 0, rst_n = 0, hold = 0;
  logic [2:0] code = 0, load = 0, load_data = 0;
  logic [2:0] acc;
  logic carry;

  cim_integrator dut (.clk(clk), .rst_n(rst_n), .hold(hold), .code(code),
                      .load(load), .load_data(load_data), .acc(acc), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] m_sample, m_acc;
  logic       m_carry;

  task automatic step();
    #1;  // let the new inputs settle
    // expected combinational carry before the edge
    m_carry = ((4'(m_sample) + 4'(m_acc)) > 4'd7) && !hold;
    checks++;
    if (carry !== m_carry) begin failures++; $display("FAIL carry %b exp %b", carry, m_carry); end
    if (carry) carries++;
    @(posedge clk);
    if (hold) m_acc = (m_acc & ~load) | (load_data & load);
    else      m_acc = 3'(m_sample + m_acc);
    m_sample = code;
    @(negedge clk);
    checks++;
    if (acc !== m_acc) begin failures++; $display("FAIL acc %0d exp %0d", acc, m_acc); end
  endtask

  initial begin
    m_sample = 0; m_acc = 0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (acc !== 0) begin failures++; $display("FAIL reset"); end
    // latency: one code of 5, then zeros
    code = 3'd5; step();           // edge 1 samples 5
    code = 3'd0;
    checks++; if (acc !== 3'd0) begin failures++; $display("FAIL latency: too early"); end
    step();                        // edge 2 adds it
    checks++; if (acc !== 3'd5) begin failures++; $display("FAIL latency: acc=%0d", acc); end
    // random stream with occasional host loads
    for (int i = 0; i < 2000; i++) begin
      code = 3'($urandom);
      hold = ($urandom % 10) == 0;
      load = 3'($urandom);
      load_data = 3'($urandom);
      step();
    end
    hold = 0;
    checks++; if (carries == 0) begin failures++; $display("FAIL no carry seen"); end
    $display("carries seen: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
