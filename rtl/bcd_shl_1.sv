// bcd_shl_1: one decimal digit of a serial binary-to-BCD shift chain.
//
// The chain converts a binary number that is shifted in MSB first. Every
// enabled clock each digit computes   DAT' = (2*DAT + ADD1) mod 10   and
// passes the decimal carry of that doubling, OVERFLOW = (DAT >= 5), to the
// ADD1 input of the next more significant digit. This is the "shift and
// add 3" (double dabble) algorithm written as a direct next-state table:
//   DAT 0..4 -> {DAT,     ADD1}   no carry
//   DAT 5..9 -> {DAT - 5, ADD1}   carry out
//   DAT 10..15 (never reached from a cleared digit) -> 4'b111x, carry out,
//   the error code of the original table.
//
// OVERFLOW is combinational from the current digit, so the next digit sees
// the carry in the same clock in which this digit wraps. A registered
// carry, as in the first version of the exercise, arrives one clock late
// and corrupts the result; this design takes the corrected form. CLEAR
// empties the digit at the start of each conversion (synchronous, takes
// priority over ENABLE); ENABLE freezes the digit, which the stalling
// output variant of bin_to_bcd uses. RST is an asynchronous active-high
// reset, as in the exercise.
//
// Interface: CLK, RST, CLEAR, ENABLE, ADD1 in; DAT (4 bits), OVERFLOW out.
// Timing: DAT is registered, one clock per shifted bit; OVERFLOW depends
// only on DAT (no path from ADD1), so a chain of digits has no ripple path.
module bcd_shl_1
  import bcd_pkg::*;
(
  input  logic       CLK,
  input  logic       RST,
  input  logic       CLEAR,
  input  logic       ENABLE,
  input  logic       ADD1,
  output bcd_digit_t DAT,
  output logic       OVERFLOW
);

  bcd_digit_t dat_next;

  always_comb begin
    unique case (DAT)
      4'd0, 4'd1, 4'd2, 4'd3, 4'd4: dat_next = {DAT[2:0], ADD1};
      4'd5, 4'd6, 4'd7, 4'd8, 4'd9: dat_next = {3'(DAT - 4'd5), ADD1};
      default:                      dat_next = {3'd7, ADD1};
    endcase
  end

  assign OVERFLOW = (DAT >= 4'd5);

  always_ff @(posedge CLK or posedge RST) begin
    if (RST)         DAT <= '0;
    else if (CLEAR)  DAT <= '0;
    else if (ENABLE) DAT <= dat_next;
  end

endmodule
