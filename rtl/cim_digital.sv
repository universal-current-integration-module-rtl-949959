// Digital module of the CIM.
//
// Takes the eight comparator outputs and does everything else of the chip:
//   * bound checker -> OVERVOLTbar / UNDERVOLT,
//   * one-hot encoder and binary encoder -> 3-bit ADC code (0..7),
//   * integration core (sample register, 3-bit adder, low-bit register)
//     -> bits 2..0 of the total and a carry,
//   * 13-bit counter (bits 15..3) enabled by that carry, 16-bit counter
//     (bits 31..16) enabled by the 13-bit counter's carry,
//   * three data-setting decoders for the host's byte-wise preset,
//   * the output byte selector onto DATA0..7.
// The total grows every clock by the code sampled one clock before, so
// after n clocks of constant code c it has grown by about n*c. While CIN is
// high the host writes PD into the byte chosen by {DCRHDIEN, DCRLDIEN} at
// the next rising clock and integration pauses for that clock. DATA shows
// the byte chosen by {DCRHDOEN, DCRLDOEN} of the registered total,
// combinationally. The structure follows the original block diagram; the
// single clock with carry enables, the synchronous preset and the
// asynchronous clear rst_n are this design's choices.
//
// Interface: see the port list; acc is the whole 32-bit total, brought out
// for observation.
module cim_digital
  import cim_pkg::*;
#(
  parameter int unsigned TOTAL_W = 32
) (
  input  logic [N_REF-1:0] vc,
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cin,
  input  byte_sel_e        wsel,
  input  logic [7:0]       pd,
  input  byte_sel_e        rsel,
  output logic [7:0]       data,
  output logic             overvolt_n,
  output logic             undervolt,
  output logic [TOTAL_W-1:0] acc
);

  logic [N_REF-2:0]  onehot;
  logic [CODE_W-1:0] code;
  logic [LOW_W-1:0]  low_q, low_ld, low_ld_d;
  logic [MID_W-1:0]  mid_q, mid_ld, mid_ld_d;
  logic [HIGH_W-1:0] high_q, high_ld, high_ld_d;
  logic              low_carry, mid_carry, high_carry;

  cim_vbc  #(.N_REF(N_REF))   u_vbc  (.vc(vc), .overvolt_n(overvolt_n), .undervolt(undervolt));
  cim_ohe  #(.N_REF(N_REF))   u_ohe  (.vc(vc), .onehot(onehot));
  cim_oh2b #(.CODE_W(CODE_W)) u_oh2b (.onehot(onehot), .code(code));

  cim_data_setting #(.OFFSET(0),        .WIDTH(LOW_W))  u_set_low  (.cin(cin), .sel(wsel), .pd(pd), .load(low_ld),  .load_data(low_ld_d));
  cim_data_setting #(.OFFSET(MID_LSB),  .WIDTH(MID_W))  u_set_mid  (.cin(cin), .sel(wsel), .pd(pd), .load(mid_ld),  .load_data(mid_ld_d));
  cim_data_setting #(.OFFSET(HIGH_LSB), .WIDTH(HIGH_W)) u_set_high (.cin(cin), .sel(wsel), .pd(pd), .load(high_ld), .load_data(high_ld_d));

  cim_integrator #(.W(LOW_W)) u_int (
    .clk(clk), .rst_n(rst_n), .hold(cin), .code(code),
    .load(low_ld), .load_data(low_ld_d), .acc(low_q), .carry(low_carry)
  );

  cim_counter #(.WIDTH(MID_W)) u_cnt13 (
    .clk(clk), .rst_n(rst_n), .en(low_carry),
    .load(mid_ld), .load_data(mid_ld_d), .q(mid_q), .carry(mid_carry)
  );

  cim_counter #(.WIDTH(HIGH_W)) u_cnt16 (
    .clk(clk), .rst_n(rst_n), .en(mid_carry),
    .load(high_ld), .load_data(high_ld_d), .q(high_q), .carry(high_carry)
  );

  logic [TOTAL_W-1:0] total;
  assign total = TOTAL_W'({high_q, mid_q, low_q});
  assign acc   = total;

  cim_tgate #(.ACC_W(TOTAL_W)) u_tgate (.acc(total), .sel(rsel), .data(data));

  // high_carry marks a wrap of the whole 32-bit total; the chip has no pin
  // for it, so it is left unused here.
  logic unused_wrap;
  assign unused_wrap = high_carry;

endmodule
