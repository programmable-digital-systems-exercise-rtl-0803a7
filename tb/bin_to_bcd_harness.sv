// bin_to_bcd_harness: drives and checks one bin_to_bcd instance.
//
// A producer offers NUM numbers on the input handshake: first a fixed list
// of edge cases (0, 8, 16, 127, powers of ten and their neighbours, the
// largest BIN_W-bit value), then random ones. It inserts random idle gaps
// and keeps I_DAT stable until I_ACK. A consumer acknowledges results with
// a random O_ACK, sometimes holding it low for many clocks and sometimes
// high permanently, so that both back-pressure and back-to-back transfers
// happen. Each accepted number is queued; each output transfer is compared
// with the queued number converted to BCD by repeated division by ten.
// The harness also checks:
//   - latency: O_STB rises BIN_W+1 clocks (OUT_REG) or BIN_W clocks
//     (OUT_STALL) after the edge that accepted the number;
//   - O_DAT is stable and O_STB stays high while O_ACK is low;
//   - no input is accepted while a number is in flight.
// Mechanism counters (input waits, output stalls, back-to-back transfers)
// are exported so that the enclosing testbench can require each of them.
module bin_to_bcd_harness
  import bcd_pkg::*;
#(
  parameter int unsigned BIN_W  = DEF_BIN_W,
  parameter int unsigned DIGITS = DEF_DIGITS,
  parameter out_mode_e   MODE   = OUT_REG,
  parameter int unsigned NUM    = 200,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done,
  output int   n_in_wait,     // clocks with I_STB high and I_ACK low
  output int   n_out_stall,   // clocks with O_STB high and O_ACK low
  output int   n_ack_held     // transfers taken with O_ACK already high
);

  localparam int unsigned LAT = (MODE == OUT_REG) ? BIN_W + 1 : BIN_W;

  logic [BIN_W-1:0]    i_dat;
  logic                i_stb, i_ack;
  logic [4*DIGITS-1:0] o_dat;
  logic                o_stb, o_ack;

  bin_to_bcd #(.BIN_W(BIN_W), .DIGITS(DIGITS), .MODE(MODE)) dut (
    .CLK(clk), .RST(rst),
    .I_DAT(i_dat), .I_STB(i_stb), .I_ACK(i_ack),
    .O_DAT(o_dat), .O_STB(o_stb), .O_ACK(o_ack)
  );

  function automatic logic [4*DIGITS-1:0] ref_bcd(logic [BIN_W-1:0] v);
    logic [4*DIGITS-1:0] r = '0;
    longint unsigned x = longint'(v);
    for (int d = 0; d < int'(DIGITS); d++) begin
      r[4*d +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  function automatic logic [BIN_W-1:0] pick(int unsigned k);
    longint unsigned maxv = (longint'(1) << BIN_W) - 1;
    longint unsigned fixed [14] = '{0, 8, 16, 127, 1, 9, 10, 99, 100,
                                     1000000000, 999999999, 4294967295,
                                     2147483648, 1234567890};
    if (k < 14) return BIN_W'(fixed[k] > maxv ? maxv - k : fixed[k]);
    return BIN_W'({$urandom, $urandom});
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [mode %s] %s at t=%0t", MODE.name(), what, $time);
    end
  endtask

  int unsigned      cyc;
  int unsigned      sent, received;
  logic [BIN_W-1:0] exp_q [$];
  int unsigned      acc_cyc;
  logic             prev_stb, prev_stall;
  logic [4*DIGITS-1:0] prev_dat;
  int               ack_mode;      // 0 random, 1 always high, 2 long waits

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    n_in_wait = 0; n_out_stall = 0; n_ack_held = 0;
    void'($urandom(SEED));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cyc <= 0; sent <= 0; received <= 0;
      i_stb <= 1'b0; i_dat <= '0; o_ack <= 1'b0;
      prev_stb <= 1'b0; prev_stall <= 1'b0; prev_dat <= '0;
      ack_mode <= 0; acc_cyc <= 0;
    end else begin
      cyc <= cyc + 1;

      // ---------------- input side ----------------
      if (i_stb && !i_ack) n_in_wait <= n_in_wait + 1;
      if (i_ack) begin
        check(exp_q.size() == 0, "input accepted while busy");
        exp_q.push_back(i_dat);
        acc_cyc <= cyc;
        sent <= sent + 1;
      end
      if ((!i_stb || i_ack) && !done) begin
        if (sent + (i_ack ? 1 : 0) < NUM && $urandom_range(0, 3) != 0) begin
          i_stb <= 1'b1;
          i_dat <= pick(sent + (i_ack ? 1 : 0));
        end else begin
          i_stb <= 1'b0;
          i_dat <= BIN_W'($urandom);   // garbage while idle
        end
      end

      // ---------------- output side ----------------
      if (o_stb && !prev_stb) begin
        check(cyc - acc_cyc == LAT + 1, $sformatf("latency %0d, expected %0d", cyc - acc_cyc - 1, LAT));
      end
      if (prev_stall) begin
        check(o_stb, "O_STB dropped without O_ACK");
        check(o_dat == prev_dat, "O_DAT changed without O_ACK");
      end
      if (o_stb && !o_ack) n_out_stall <= n_out_stall + 1;
      if (o_stb && o_ack) begin
        if (!prev_stb) n_ack_held <= n_ack_held + 1;
        if (exp_q.size() == 0) begin
          check(1'b0, "output without input");
        end else begin
          logic [BIN_W-1:0] v;
          v = exp_q.pop_front();
          check(o_dat == ref_bcd(v), $sformatf("value %0d gave %h, expected %h", v, o_dat, ref_bcd(v)));
        end
        received <= received + 1;
        if (received + 1 == NUM) done <= 1'b1;
      end
      prev_stb   <= o_stb && !o_ack ? 1'b1 : (o_stb && o_ack ? 1'b0 : o_stb);
      prev_stall <= o_stb && !o_ack;
      prev_dat   <= o_dat;

      // consumer behaviour changes every 16 numbers
      ack_mode <= (received / 16) % 3;
      case (ack_mode)
        1:       o_ack <= 1'b1;
        2:       o_ack <= ($urandom_range(0, 15) == 0);
        default: o_ack <= $urandom_range(0, 1);
      endcase
    end
  end

endmodule
