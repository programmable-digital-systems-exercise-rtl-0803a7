// bcd_top: the three binary-to-BCD converters side by side.
//
// The design offers one conversion (32-bit unsigned binary to ten packed
// BCD digits) in three hardware forms, each with its own ports, sharing
// only the clock and the asynchronous active-high reset:
//   s_*  bin_to_bcd_simple - combinational divide/modulo per digit, strobe
//                            passed through, result in the same cycle;
//   a_*  bin_to_bcd, OUT_REG   - serial shift chain, result copied into an
//                            output register, STB/ACK on both sides;
//   b_*  bin_to_bcd, OUT_STALL - serial shift chain frozen by a clock enable
//                            until the result is acknowledged.
// See bin_to_bcd for handshake rules and latencies (BIN_W+1 clocks for
// a_*, BIN_W clocks for b_*). Putting the three forms in one top, so that
// they can be compared on the same inputs, is this design's arrangement.
module bcd_top
  import bcd_pkg::*;
#(
  parameter int unsigned BIN_W  = DEF_BIN_W,
  parameter int unsigned DIGITS = DEF_DIGITS
) (
  input  logic                CLK,
  input  logic                RST,

  // combinational converter
  input  logic [BIN_W-1:0]    s_i_dat,
  input  logic                s_i_stb,
  output logic [4*DIGITS-1:0] s_o_dat,
  output logic                s_o_stb,

  // serial converter, output register (variant a)
  input  logic [BIN_W-1:0]    a_i_dat,
  input  logic                a_i_stb,
  output logic                a_i_ack,
  output logic [4*DIGITS-1:0] a_o_dat,
  output logic                a_o_stb,
  input  logic                a_o_ack,

  // serial converter, stalled chain (variant b)
  input  logic [BIN_W-1:0]    b_i_dat,
  input  logic                b_i_stb,
  output logic                b_i_ack,
  output logic [4*DIGITS-1:0] b_o_dat,
  output logic                b_o_stb,
  input  logic                b_o_ack
);

  bin_to_bcd_simple #(.BIN_W(BIN_W), .DIGITS(DIGITS)) u_simple (
    .CLK(CLK), .RST(RST),
    .I_DAT(s_i_dat), .I_STB(s_i_stb),
    .O_DAT(s_o_dat), .O_STB(s_o_stb)
  );

  bin_to_bcd #(.BIN_W(BIN_W), .DIGITS(DIGITS), .MODE(OUT_REG)) u_serial_reg (
    .CLK(CLK), .RST(RST),
    .I_DAT(a_i_dat), .I_STB(a_i_stb), .I_ACK(a_i_ack),
    .O_DAT(a_o_dat), .O_STB(a_o_stb), .O_ACK(a_o_ack)
  );

  bin_to_bcd #(.BIN_W(BIN_W), .DIGITS(DIGITS), .MODE(OUT_STALL)) u_serial_stall (
    .CLK(CLK), .RST(RST),
    .I_DAT(b_i_dat), .I_STB(b_i_stb), .I_ACK(b_i_ack),
    .O_DAT(b_o_dat), .O_STB(b_o_stb), .O_ACK(b_o_ack)
  );

endmodule
