// tb_bin_to_bcd_simple: self-checking test of the combinational converter.
//
// Applies the edge cases 0, 8, 16, 127, powers of ten and their
// neighbours and the largest 32-bit value, then 5000 random numbers, and
// compares O_DAT with a reference that peels decimal digits off by
// repeated division by ten. O_STB must follow I_STB in the same cycle.
module tb_bin_to_bcd_simple;

  logic        clk = 1'b0;
  logic        rst = 1'b0;
  logic [31:0] i_dat;
  logic        i_stb;
  logic [39:0] o_dat;
  logic        o_stb;

  int checks = 0;
  int failures = 0;

  bin_to_bcd_simple dut (
    .CLK(clk), .RST(rst),
    .I_DAT(i_dat), .I_STB(i_stb),
    .O_DAT(o_dat), .O_STB(o_stb)
  );

  always #5 clk = ~clk;

  function automatic logic [39:0] ref_bcd(logic [31:0] v);
    logic [39:0] r = '0;
    longint unsigned x = longint'(v);
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  task automatic apply(input logic [31:0] v, input logic stb);
    i_dat = v;
    i_stb = stb;
    #1;
    checks++;
    if (o_dat !== ref_bcd(v) || o_stb !== stb) begin
      failures++;
      if (failures < 10) $display("FAIL %0d -> %h, expected %h", v, o_dat, ref_bcd(v));
    end
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] fixed [14] = '{0, 8, 16, 127, 1, 9, 10, 99, 100,
                                           1000000000, 999999999, 32'hFFFF_FFFF,
                                           32'h8000_0000, 1234567890};
    foreach (fixed[k]) apply(fixed[k], 1'b1);
    for (int i = 0; i < 5000; i++) apply($urandom, 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
