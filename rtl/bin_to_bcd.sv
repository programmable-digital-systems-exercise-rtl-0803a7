// bin_to_bcd: sequential binary-to-BCD converter with STB/ACK handshakes.
//
// A BIN_W-bit unsigned number is accepted on the input handshake and
// converted into DIGITS packed BCD digits (digit 0 in O_DAT[3:0]). The
// conversion is serial: a shift register 'bin' presents the number MSB
// first to a chain of bcd_shl_1 digit cells, each of which doubles its
// digit and adds the bit coming from below (the cell below's carry, or the
// binary MSB for digit 0). After BIN_W shifts the chain holds the decimal
// value. A one-hot token 'bst' (BIN_W+1 bits) travels alongside and marks
// the clock in which the result is complete. Digit cells are cleared when a
// number is accepted, so every conversion starts from zero.
//
// Handshakes (both sides): a word moves on a clock edge where STB and ACK
// are both high. I_ACK = I_STB && ready; 'ready' is set by reset and by a
// completed output transfer, and cleared by an accepted input, so one
// number is in flight at a time. O_STB stays high and O_DAT stable until
// O_ACK is seen.
//
// MODE selects how the result is held while the consumer waits:
//   OUT_REG   (variant a, default): when the token reaches bst[BIN_W] the
//             digits are copied into an O_DAT/O_STB register. Latency from
//             the accepting edge to O_STB high: BIN_W+1 clocks.
//   OUT_STALL (variant b): O_STB is bst[BIN_W] and O_DAT the digit chain
//             itself; the shared enable en = !O_STB || O_ACK freezes the
//             shift register, the token and all digits until the result is
//             taken. Latency: BIN_W clocks.
// The exercise writes the variant-b enable as "~O_STB || ready"; with that
// form O_STB stays high for one clock after the acknowledge and a consumer
// that holds O_ACK high takes the word twice, so this design advances the
// chain on the acknowledge itself. The cell-level fixes (combinational
// carry, clear on new data) follow the exercise's hints; parameters,
// assertions and the generate loop are this design's own.
//
// Throughput: one number per BIN_W+3 clocks (OUT_REG) or BIN_W+2 clocks
// (OUT_STALL) with an always-ready consumer. RST is asynchronous, active
// high.
module bin_to_bcd
  import bcd_pkg::*;
#(
  parameter int unsigned BIN_W  = bcd_pkg::DEF_BIN_W,
  parameter int unsigned DIGITS = bcd_pkg::DEF_DIGITS,
  parameter out_mode_e   MODE   = OUT_REG
) (
  input  logic                  CLK,
  input  logic                  RST,

  input  logic [BIN_W-1:0]      I_DAT,
  input  logic                  I_STB,
  output logic                  I_ACK,

  output logic [4*DIGITS-1:0]   O_DAT,
  output logic                  O_STB,
  input  logic                  O_ACK
);

  if (DIGITS < min_digits(BIN_W)) begin : g_size_check
    $error("bin_to_bcd: DIGITS=%0d cannot hold a %0d-bit number", DIGITS, BIN_W);
  end

  logic [BIN_W-1:0]  bin;    // binary number, shifted out MSB first
  logic [BIN_W:0]    bst;    // one-hot progress token
  logic              ready;  // no number in flight
  logic              load;   // input transfer this clock
  logic              en;     // chain advances this clock
  logic [DIGITS-1:0] ovr;    // decimal carry out of each digit
  logic [DIGITS-1:0] add1;   // bit shifted into each digit
  logic [4*DIGITS-1:0] digits;

  assign I_ACK = I_STB && ready;
  assign load  = I_ACK;

  always_ff @(posedge CLK or posedge RST) begin
    if (RST)                 ready <= 1'b1;
    else if (O_ACK && O_STB) ready <= 1'b1;
    else if (load)           ready <= 1'b0;
  end

  always_ff @(posedge CLK or posedge RST) begin
    if (RST) begin
      bin <= '0;
      bst <= '0;
    end else if (load) begin
      bin <= I_DAT;
      bst <= (BIN_W+1)'(1);
    end else if (en) begin
      bin <= bin << 1;
      bst <= bst << 1;
    end
  end

  // Digit 0 takes the binary MSB, every other digit the carry from below.
  assign add1 = {ovr[DIGITS-2:0], bin[BIN_W-1]};

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    bcd_shl_1 u_digit (
      .CLK      (CLK),
      .RST      (RST),
      .CLEAR    (load),
      .ENABLE   (en),
      .ADD1     (add1[d]),
      .DAT      (digits[4*d +: 4]),
      .OVERFLOW (ovr[d])
    );
  end

  if (MODE == OUT_REG) begin : g_out_reg
    // Variant a: result register, chain never stalls.
    assign en = 1'b1;

    always_ff @(posedge CLK or posedge RST) begin
      if (RST) begin
        O_STB <= 1'b0;
        O_DAT <= '0;
      end else if (bst[BIN_W]) begin
        O_STB <= 1'b1;
        O_DAT <= digits;
      end else if (O_ACK) begin
        O_STB <= 1'b0;
      end
    end
  end else begin : g_out_stall
    // Variant b: the chain holds its result until it is acknowledged.
    assign O_STB = bst[BIN_W];
    assign O_DAT = digits;
    assign en    = !O_STB || O_ACK;
  end

  // The top digit's carry is only set by values that do not fit, which the
  // size check above excludes.
  logic unused_ovr;
  assign unused_ovr = ovr[DIGITS-1];

  // Handshake rules.
  a_out_hold : assert property (@(posedge CLK) disable iff (RST)
    O_STB && !O_ACK |=> O_STB && $stable(O_DAT))
    else $error("bin_to_bcd: O_STB/O_DAT changed before O_ACK");
  a_one_in_flight : assert property (@(posedge CLK) disable iff (RST)
    I_ACK |-> ready && !O_STB)
    else $error("bin_to_bcd: input accepted while a result is pending");

endmodule
