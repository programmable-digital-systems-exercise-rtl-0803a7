// tb_bin_to_bcd: self-checking test of the serial converter in both output
// modes. Two harnesses (see bin_to_bcd_harness) run side by side at the
// default 32-bit / ten-digit size, one with the output register (OUT_REG)
// and one with the stalled chain (OUT_STALL), each converting 200 numbers
// under random input gaps and random output back-pressure. The test also
// requires that input waits, output stalls and transfers with O_ACK held
// high each happened at least once per mode.
module tb_bin_to_bcd;
  import bcd_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #5 clk = ~clk;

  int   ck_a, fl_a, w_a, s_a, h_a;
  int   ck_b, fl_b, w_b, s_b, h_b;
  logic done_a, done_b;
  int   checks, failures;

  bin_to_bcd_harness #(.MODE(OUT_REG), .NUM(200), .SEED(11)) h_reg (
    .clk, .rst, .checks(ck_a), .failures(fl_a), .done(done_a),
    .n_in_wait(w_a), .n_out_stall(s_a), .n_ack_held(h_a));

  bin_to_bcd_harness #(.MODE(OUT_STALL), .NUM(200), .SEED(23)) h_stall (
    .clk, .rst, .checks(ck_b), .failures(fl_b), .done(done_b),
    .n_in_wait(w_b), .n_out_stall(s_b), .n_ack_held(h_b));

  task automatic finish(input int extra_fail, input int extra_checks);
    checks   = ck_a + ck_b + extra_checks;
    failures = fl_a + fl_b + extra_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    finish(1, 0);
  end

  initial begin
    int f = 0;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done_a && done_b);
    repeat (5) @(posedge clk);
    $display("OUT_REG  : input waits %0d, output stalls %0d, ack-held transfers %0d", w_a, s_a, h_a);
    $display("OUT_STALL: input waits %0d, output stalls %0d, ack-held transfers %0d", w_b, s_b, h_b);
    if (w_a == 0 || s_a == 0 || h_a == 0) begin f++; $display("FAIL OUT_REG mechanism not exercised"); end
    if (w_b == 0 || s_b == 0 || h_b == 0) begin f++; $display("FAIL OUT_STALL mechanism not exercised"); end
    finish(f, 2);
  end

endmodule
