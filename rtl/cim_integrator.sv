// Integration core: two 3-bit registers around a 3-bit adder.
//
// Every clock the first register samples the ADC code and the second
// register takes the sum of the previous sample and its own value, so it
// holds bits 2..0 of the running total; the adder's carry is the count
// enable of the 13-bit counter holding bits 15..3. A code sampled at edge n
// is therefore in the total after edge n+1. The two registers and the adder
// follow the original block diagram. This design's own choices: the carry
// is a synchronous enable (the chip clocked the counter with it), `hold`
// (the host preset enable) freezes the total for that clock, the host can
// load any of the low bits through `load`/`load_data`, and rst_n clears both
// registers asynchronously.
//
// Interface: clk, rst_n, hold, code[W-1:0], load[W-1:0], load_data[W-1:0] in;
// acc[W-1:0] and carry out. carry is combinational from the registers and
// is forced low while hold is high.
module cim_integrator #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold,
  input  logic [W-1:0] code,
  input  logic [W-1:0] load,
  input  logic [W-1:0] load_data,
  output logic [W-1:0] acc,
  output logic         carry
);

  logic [W-1:0] sample_q;
  logic [W-1:0] sum;
  logic         fa_carry;

  cim_fa3 #(.W(W)) u_fa (
    .a(sample_q), .b(acc), .sum(sum), .carry(fa_carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample_q <= '0;
    else        sample_q <= code;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (hold) acc <= (acc & ~load) | (load_data & load);
    else           acc <= sum;
  end

  assign carry = fa_carry & ~hold;

endmodule
