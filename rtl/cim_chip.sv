// Current integration module (CIM) -- top cell.
//
// A battery gauge front end for a handset: the charge or discharge current
// flows through an external resistor r, and the voltage VR across it is
// converted every clock into a 3-bit code by a small flash converter (eight
// references at 1/250..8/250 of VR1-VR2) and added into a 32-bit total. The
// total is thus the time integral of the current, in units of one clock
// times one code step. A host reads the total one byte at a time
// (DCRHDOEN/DCRLDOEN select, DATA0..7) and can preset it one byte at a time
// (CIN high, DCRHDIEN/DCRLDIEN select, PD0..7). OVERVOLTbar and UNDERVOLT
// report a VR outside the converter's range.
//
// The top follows the original hierarchy: an analog module (behavioural
// model, real-valued ports) and a digital module. Power pins and pads are
// not modelled. rst_n (asynchronous clear) is an addition of this design.
//
// Timing: one sample and one addition per rising CLK edge; a code sampled
// at edge n is in the total after edge n+1. A preset byte is written at the
// rising edge while CIN is high. DATA follows the select pins
// combinationally.
module cim_chip #(
  parameter int unsigned LEVELS = 250
) (
  input  real        vr,
  input  real        vr1,
  input  real        vr2,
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cin,
  input  logic       dcrhdien,
  input  logic       dcrldien,
  input  logic [7:0] pd,
  input  logic       dcrhdoen,
  input  logic       dcrldoen,
  output logic [7:0] data,
  output logic       overvolt_n,
  output logic       undervolt
);

  logic [cim_pkg::N_REF-1:0] vc;
  logic [cim_pkg::ACC_W-1:0] acc;

  cim_analog #(.LEVELS(LEVELS)) u_analog (
    .vr(vr), .vr1(vr1), .vr2(vr2), .vc(vc)
  );

  cim_digital #(.TOTAL_W(cim_pkg::ACC_W)) u_digital (
    .vc(vc), .clk(clk), .rst_n(rst_n), .cin(cin),
    .wsel(cim_pkg::byte_sel_e'({dcrhdien, dcrldien})), .pd(pd),
    .rsel(cim_pkg::byte_sel_e'({dcrhdoen, dcrldoen})),
    .data(data), .overvolt_n(overvolt_n), .undervolt(undervolt), .acc(acc)
  );

  // The full total is also visible one byte at a time on DATA; the
  // parallel copy is only for observation inside the digital module.
  logic [cim_pkg::ACC_W-1:0] unused_acc;
  assign unused_acc = acc;

endmodule
