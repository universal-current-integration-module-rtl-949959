// Data setting: host preset decoder for one slice of the 32-bit total.
//
// While CIN is high the host puts a byte on PD and chooses with
// {DCRHDIEN, DCRLDIEN} which byte of the total it replaces: 00 bits 7..0,
// 01 bits 15..8, 10 bits 23..16, 11 bits 31..24 (the original pin coding).
// This block serves the slice [OFFSET+WIDTH-1 : OFFSET] of the total and
// gives, for every bit of that slice, whether it is written and with what
// value. The CIM uses three of them: bits 2..0 (adder stage), 15..3 (13-bit
// counter) and 31..16 (16-bit counter). Which pin is the high select bit is
// this design's reading.
//
// Interface: cin, sel (byte_sel_e), pd[7:0] in; load[WIDTH-1:0] and
// load_data[WIDTH-1:0] out. Combinational.
module cim_data_setting #(
  parameter int unsigned OFFSET = 3,
  parameter int unsigned WIDTH  = 13
) (
  input  logic                cin,
  input  cim_pkg::byte_sel_e  sel,
  input  logic [7:0]          pd,
  output logic [WIDTH-1:0]    load,
  output logic [WIDTH-1:0]    load_data
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      // Bit i of the slice is bit OFFSET+i of the total: byte (OFFSET+i)/8.
      load[i]      = cin && (((OFFSET + i) / 8) == int'(sel));
      load_data[i] = pd[(OFFSET + i) % 8];
    end
  end

endmodule
