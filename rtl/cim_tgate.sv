// Transmission gate (output byte selector).
//
// Puts one byte of the 32-bit integration total on DATA0..7, chosen by
// {DCRHDOEN, DCRLDOEN}: 00 bits 7..0, 01 bits 15..8, 10 bits 23..16, 11 bits
// 31..24 (the original pin coding). The chip built this from two cascaded
// transmission-gate stages; here it is one 4:1 byte multiplexer.
//
// Interface: acc[ACC_W-1:0], sel (byte_sel_e) in; data[7:0] out.
// Combinational.
module cim_tgate #(
  parameter int unsigned ACC_W = 32
) (
  input  logic [ACC_W-1:0]   acc,
  input  cim_pkg::byte_sel_e sel,
  output logic [7:0]         data
);

  logic [31:0] word;

  always_comb begin
    word = 32'(acc);
    unique case (sel)
      cim_pkg::BYTE0: data = word[7:0];
      cim_pkg::BYTE1: data = word[15:8];
      cim_pkg::BYTE2: data = word[23:16];
      cim_pkg::BYTE3: data = word[31:24];
      default:        data = word[7:0];
    endcase
  end

endmodule
