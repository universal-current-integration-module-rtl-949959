// Presettable up counter (the 13-bit and 16-bit counters of the CIM).
//
// Counts up by one on each clock where `en` is high; `carry` is high when
// it is enabled and full, and enables the next counter, so a 13-bit and a
// 16-bit instance chained behind the 3-bit adder form bits 31..3 of the
// integration total. The host presets it bit by bit: where `load` is set
// the bit takes `load_data` instead (load wins over counting). The widths
// follow the original chip; the synchronous enable in place of a gated
// counter clock, and the synchronous per-bit load in place of asynchronous
// preset/clear pins, are this design's choices. rst_n clears it.
//
// Interface: clk, rst_n, en, load[WIDTH-1:0], load_data[WIDTH-1:0] in;
// q[WIDTH-1:0] and carry out (carry combinational).
module cim_counter #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] load,
  input  logic [WIDTH-1:0] load_data,
  output logic [WIDTH-1:0] q,
  output logic             carry
);

  logic [WIDTH-1:0] next;

  always_comb begin
    next = en ? q + 1'b1 : q;
    next = (next & ~load) | (load_data & load);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= next;
  end

  assign carry = en & (&q);

endmodule
