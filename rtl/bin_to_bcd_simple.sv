// bin_to_bcd_simple: combinational binary-to-BCD converter.
//
// Each decimal digit k of the BIN_W-bit unsigned input is computed as
// (I_DAT / 10^k) mod 10 and placed in O_DAT[4k+3:4k]; the strobe is passed
// straight through (O_STB = I_STB), so the result is valid in the same
// cycle as the input. This is the reference formulation the serial
// converter (bin_to_bcd) is compared against: functionally exact, but it
// costs one constant divider and one modulo-10 unit per digit, a large and
// slow block of logic with no pipelining and no handshake.
//
// CLK and RST are kept so that this converter has the same port list as
// the serial one; they drive nothing. Divisors are held in 64 bits, so
// BIN_W may be at most 64. Parameters and the 64-bit arithmetic are this
// design's choices; the per-digit formula follows the exercise.
module bin_to_bcd_simple #(
  parameter int unsigned BIN_W  = bcd_pkg::DEF_BIN_W,
  parameter int unsigned DIGITS = bcd_pkg::DEF_DIGITS
) (
  input  logic                CLK,
  input  logic                RST,

  input  logic [BIN_W-1:0]    I_DAT,
  input  logic                I_STB,

  output logic [4*DIGITS-1:0] O_DAT,
  output logic                O_STB
);

  if (BIN_W > 64) begin : g_size_check
    $error("bin_to_bcd_simple: BIN_W=%0d exceeds 64", BIN_W);
  end

  function automatic longint unsigned pow10(int unsigned k);
    longint unsigned p = 1;
    for (int unsigned i = 0; i < k; i++) p = p * 10;
    return p;
  endfunction

  logic [63:0] value;
  assign value = 64'(I_DAT);

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    localparam longint unsigned DIV = pow10(d);
    assign O_DAT[4*d +: 4] = 4'((value / DIV) % 64'd10);
  end

  assign O_STB = I_STB;

  logic unused_clk_rst;
  assign unused_clk_rst = CLK ^ RST;

endmodule
