// tb_bcd_top: end-to-end test of bcd_top at its default size (32-bit
// binary in, ten BCD digits out), no parameters overridden.
//
// One number stream (edge cases first, then random values) is fed to all
// three converters. The combinational converter is checked in the cycle
// the number is applied. Each serial converter (output-register variant
// "a", stalled-chain variant "b") gets its own producer, which keeps the
// number on I_DAT until I_ACK, and its own consumer, whose O_ACK pattern
// alternates between random, permanently high and mostly low. Every output
// transfer is compared with a reference conversion (repeated division by
// ten) of the number that was accepted, and the latency from the accepting
// edge to O_STB is checked: 33 clocks for "a", 32 for "b".
//
// Mechanisms that must each occur at least once per serial variant:
// an input held waiting (I_STB without I_ACK), an output stall (O_STB
// without O_ACK, which in variant b freezes the digit chain), and a result
// taken in the first cycle it is offered.
module tb_bcd_top;
  import bcd_pkg::*;

  localparam int unsigned NUM = 300;
  localparam int unsigned LAT [2] = '{33, 32};

  logic clk = 1'b0;
  logic rst = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] s_i_dat;
  logic        s_i_stb;
  logic [39:0] s_o_dat;
  logic        s_o_stb;

  logic [31:0] i_dat [2];
  logic        i_stb [2];
  logic        i_ack [2];
  logic [39:0] o_dat [2];
  logic        o_stb [2];
  logic        o_ack [2];

  bcd_top dut (
    .CLK(clk), .RST(rst),
    .s_i_dat(s_i_dat), .s_i_stb(s_i_stb), .s_o_dat(s_o_dat), .s_o_stb(s_o_stb),
    .a_i_dat(i_dat[0]), .a_i_stb(i_stb[0]), .a_i_ack(i_ack[0]),
    .a_o_dat(o_dat[0]), .a_o_stb(o_stb[0]), .a_o_ack(o_ack[0]),
    .b_i_dat(i_dat[1]), .b_i_stb(i_stb[1]), .b_i_ack(i_ack[1]),
    .b_o_dat(o_dat[1]), .b_o_stb(o_stb[1]), .b_o_ack(o_ack[1])
  );

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic logic [39:0] ref_bcd(logic [31:0] v);
    logic [39:0] r = '0;
    longint unsigned x = longint'(v);
    for (int d = 0; d < 10; d++) begin
      r[4*d +: 4] = 4'(x % 10);
      x = x / 10;
    end
    return r;
  endfunction

  // The k-th number of the stream: fixed edge cases, then random.
  logic [31:0] stream [NUM];
  initial begin
    automatic logic [31:0] fixed [14] = '{8, 16, 127, 0, 1, 9, 10, 99, 100,
                                           1000000000, 999999999, 32'hFFFF_FFFF,
                                           32'h8000_0000, 1234567890};
    for (int k = 0; k < int'(NUM); k++) stream[k] = (k < 14) ? fixed[k] : $urandom;
  end

  // Combinational converter: one number per clock, random strobe.
  int unsigned s_idx;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_idx <= 0; s_i_dat <= '0; s_i_stb <= 1'b0;
    end else begin
      check(s_o_dat == ref_bcd(s_i_dat), $sformatf("simple: %0d gave %h", s_i_dat, s_o_dat));
      check(s_o_stb == s_i_stb, "simple: strobe not passed through");
      s_i_dat <= stream[s_idx % NUM];
      s_i_stb <= 1'($urandom_range(0, 1));
      s_idx   <= s_idx + 1;
    end
  end

  // Serial converters.
  int unsigned cyc;
  int unsigned sent [2], received [2], acc_cyc [2];
  logic [31:0] pending [2];
  logic        busy [2];
  logic        prev_stall [2], prev_stb [2];
  logic [39:0] prev_dat [2];
  int          n_in_wait [2], n_out_stall [2], n_first_cycle [2];
  logic        done [2];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cyc <= 0;
      for (int v = 0; v < 2; v++) begin
        sent[v] <= 0; received[v] <= 0; acc_cyc[v] <= 0; busy[v] <= 1'b0;
        pending[v] <= '0; prev_stall[v] <= 1'b0; prev_stb[v] <= 1'b0; prev_dat[v] <= '0;
        n_in_wait[v] <= 0; n_out_stall[v] <= 0; n_first_cycle[v] <= 0; done[v] <= 1'b0;
        i_dat[v] <= '0; i_stb[v] <= 1'b0; o_ack[v] <= 1'b0;
      end
    end else begin
      cyc <= cyc + 1;
      for (int v = 0; v < 2; v++) begin
        automatic int unsigned nxt = sent[v] + (i_ack[v] ? 1 : 0);
        // input side
        if (i_stb[v] && !i_ack[v]) n_in_wait[v] <= n_in_wait[v] + 1;
        if (i_ack[v]) begin
          check(!busy[v], $sformatf("variant %0d accepted while busy", v));
          pending[v] <= i_dat[v];
          busy[v]    <= 1'b1;
          acc_cyc[v] <= cyc;
          sent[v]    <= nxt;
        end
        if (!i_stb[v] || i_ack[v]) begin
          i_stb[v] <= (nxt < NUM) && ($urandom_range(0, 2) != 0);
          i_dat[v] <= (nxt < NUM) ? stream[nxt] : '0;
        end
        // output side
        if (o_stb[v] && !prev_stb[v])
          check(cyc - acc_cyc[v] - 1 == LAT[v],
                $sformatf("variant %0d latency %0d", v, cyc - acc_cyc[v] - 1));
        if (prev_stall[v]) begin
          check(o_stb[v], $sformatf("variant %0d dropped O_STB", v));
          check(o_dat[v] == prev_dat[v], $sformatf("variant %0d changed O_DAT", v));
        end
        if (o_stb[v] && !o_ack[v]) n_out_stall[v] <= n_out_stall[v] + 1;
        if (o_stb[v] && o_ack[v]) begin
          if (!prev_stb[v]) n_first_cycle[v] <= n_first_cycle[v] + 1;
          check(busy[v], $sformatf("variant %0d output without input", v));
          check(o_dat[v] == ref_bcd(pending[v]),
                $sformatf("variant %0d: %0d gave %h, expected %h", v, pending[v], o_dat[v], ref_bcd(pending[v])));
          busy[v] <= 1'b0;
          received[v] <= received[v] + 1;
          if (received[v] + 1 == NUM) done[v] <= 1'b1;
        end
        prev_stb[v]   <= o_stb[v] && !o_ack[v];
        prev_stall[v] <= o_stb[v] && !o_ack[v];
        prev_dat[v]   <= o_dat[v];
        case ((received[v] / 20) % 3)
          1:       o_ack[v] <= 1'b1;
          2:       o_ack[v] <= ($urandom_range(0, 7) == 0);
          default: o_ack[v] <= 1'($urandom_range(0, 1));
        endcase
      end
    end
  end

  task automatic report_and_finish(input int extra);
    failures += extra;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report_and_finish(1);
  end

  initial begin
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done[0] && done[1]);
    repeat (3) @(posedge clk);
    for (int v = 0; v < 2; v++) begin
      $display("variant %s: %0d converted, input waits %0d, output stalls %0d, taken in first cycle %0d",
               v == 0 ? "a (OUT_REG)" : "b (OUT_STALL)", received[v],
               n_in_wait[v], n_out_stall[v], n_first_cycle[v]);
      check(n_in_wait[v] > 0,     $sformatf("variant %0d: no input wait", v));
      check(n_out_stall[v] > 0,   $sformatf("variant %0d: no output stall", v));
      check(n_first_cycle[v] > 0, $sformatf("variant %0d: no first-cycle transfer", v));
    end
    $display("combinational converter: %0d numbers", s_idx);
    report_and_finish(0);
  end

endmodule
