// tb_bcd_shl_1: self-checking test of one BCD digit cell.
//
// Drives random ADD1, ENABLE and CLEAR for a few thousand clocks and keeps
// its own model of the digit as an integer: on an enabled clock the model
// becomes (2*d + ADD1) mod 10, on CLEAR it becomes 0. Every clock it
// checks DAT against the model and OVERFLOW against (2*d + ADD1 >= 10),
// i.e. the carry that doubling the current digit produces. It also checks
// that OVERFLOW is combinational: it must equal the carry of the digit on
// display in the same cycle, not of the previous one.
module tb_bcd_shl_1;

  logic       clk = 1'b0;
  logic       rst;
  logic       clear, enable, add1;
  logic [3:0] dat;
  logic       ovf;

  int checks = 0;
  int failures = 0;
  int model;
  int n_carry = 0;

  bcd_shl_1 dut (
    .CLK(clk), .RST(rst), .CLEAR(clear), .ENABLE(enable),
    .ADD1(add1), .DAT(dat), .OVERFLOW(ovf)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: dat=%0d ovf=%0d model=%0d", what, dat, ovf, model);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // async reset: make sure RST sees a rising edge
    rst = 1'b0; clear = 1'b0; enable = 1'b0; add1 = 1'b0;
    model = 0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(dat == 4'd0, "reset value");
    for (int i = 0; i < 5000; i++) begin
      // inputs change away from the clock edge
      clear  = ($urandom_range(0, 15) == 0);
      enable = ($urandom_range(0, 3) != 0);
      add1   = $urandom_range(0, 1);
      #1;
      check(dat == 4'(model), "digit value");
      check(ovf == (model >= 5), "combinational carry");
      if (ovf) n_carry++;
      @(posedge clk);
      if (clear)       model = 0;
      else if (enable) model = (2 * model + int'(add1)) % 10;
      #1;
    end
    check(n_carry > 100, "carry exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
