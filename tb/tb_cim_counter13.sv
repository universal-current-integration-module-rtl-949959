// Testbench for cim_counter at WIDTH=13: counting, enable, per-bit load
// (which takes priority over counting), carry at all ones and wrap to zero,
// checked against an integer model every clock.
module tb_cim_counter13;
  localparam int W = 13;
  int checks = 0, failures = 0, carries = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] load = '0, load_data = '0, q;
  logic carry;

  cim_counter #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load),
                                .load_data(load_data), .q(q), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] m_q;

  task automatic step();
    #1;  // let the new inputs settle
    checks++;
    if (carry !== (en && (m_q == '1))) begin failures++; $display("FAIL carry q=%h", m_q); end
    if (carry) carries++;
    @(posedge clk);
    if (en) m_q = m_q + 1'b1;
    m_q = (m_q & ~load) | (load_data & load);
    @(negedge clk);
    checks++;
    if (q !== m_q) begin failures++; $display("FAIL q=%h expected %h", q, m_q); end
  endtask

  initial begin
    m_q = '0;
    #12 rst_n = 1;
    @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    en = 1;
    repeat (20) step();
    // preset to just below the top and run over the wrap
    load = '1; load_data = W'((1 << W) - 3); en = 0; step();
    load = '0; en = 1;
    repeat (5) step();
    checks++; if (q !== W'(2)) begin failures++; $display("FAIL wrap q=%h", q); end
    // random enables and partial loads
    for (int i = 0; i < 3000; i++) begin
      en = $urandom % 2;
      if (($urandom % 8) == 0) begin
        load = W'($urandom); load_data = W'($urandom);
      end else begin
        load = '0;
      end
      step();
    end
    checks++; if (carries == 0) begin failures++; $display("FAIL no carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
