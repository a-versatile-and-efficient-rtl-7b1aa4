`timescale 1ps/1fs
// Test of the frequency-adaptive clock chain.
//
// At input clocks of 11, 1 and 0.1 GHz and with the phase control at 0 and
// at 180 degrees, after reset, the test checks on every rising edge of
// ck_out that:
//  - ck_out equals ck_in XOR ctrl_180,
//  - {CK/16, CK/8, CK/4, CK/2} has advanced by exactly one, i.e. each
//    divided clock has period 2^(k+1) input cycles, 50 % duty cycle, and
//    every child clock changes when its parent falls (aligned edges),
// and, on every change of any divided clock, that it happens at a rising
// edge of ck_out (retimed to CK_IN, not to the ripple dividers).
//
// A second instance with a 20 ps skew unit shows what the fine-retiming
// edge is for: at 11 GHz the cells delay CK/2..CK/16 by 20, 40, 60 and
// 80 ps. With the 0-degree edge (91 ps later) all are settled and the
// clocks count. With the 180-degree edge (45.5 ps later) CK/8 and CK/16
// are sampled one cycle late: the test checks that exactly these two lag,
// by exactly one cycle.
module adaptive_clock_chain_tb;

  logic       ck_in = 1'b0;
  logic       rst_n = 1'b0;
  logic       ctrl_180 = 1'b0;
  logic       ck_out;
  logic [3:0] ck_div;

  adaptive_clock_chain dut (
    .ck_in    (ck_in),
    .rst_n    (rst_n),
    .ctrl_180 (ctrl_180),
    .ck_out   (ck_out),
    .ck_div   (ck_div)
  );

  logic [3:0] ck_div_slow;
  logic       ck_out_slow;

  adaptive_clock_chain #(.DT_PS(20)) dut_slow (
    .ck_in    (ck_in),
    .rst_n    (rst_n),
    .ctrl_180 (ctrl_180),
    .ck_out   (ck_out_slow),
    .ck_div   (ck_div_slow)
  );

  int checks = 0;
  int failures = 0;

  realtime period = 91.0;
  always #(period / 2.0) ck_in = ~ck_in;

  bit      run = 1'b0;
  int      n_seen = 0;
  logic [3:0] prev;
  realtime t_rise = 0.0;

  always @(posedge ck_out) t_rise = $realtime;

  always @(ck_div) begin
    if (run) begin
      checks++;
      if ($realtime > t_rise + 0.01) begin
        failures++;
        if (failures < 10) $display("FAIL divided clock changed %0.2f ps after ck_out rise",
                                    $realtime - t_rise);
      end
    end
  end

  always @(posedge ck_out) begin
    #(period / 4.0);
    if (run) begin
      checks++;
      if (ck_out !== (ck_in ^ ctrl_180)) begin
        failures++;
        $display("FAIL ck_out is not ck_in xor ctrl_180");
      end
      if (n_seen > 0) begin
        checks++;
        if (ck_div !== 4'(prev + 4'd1)) begin
          failures++;
          if (failures < 10) $display("FAIL divided clocks %b after %b", ck_div, prev);
        end
      end
      prev = ck_div;
      if (period < 100.0) slow_q.push_back(ck_div_slow);
      n_seen++;
    end
  end

  logic [3:0] slow_q[$];

  // Checks the second instance: 0 degrees counts, 180 degrees lags CK/8
  // and CK/16 by one cycle: observed(n) = {u(n-1)[3:2], u(n)[1:0]}.
  task automatic check_slow(int c);
    int not_counting;
    not_counting = 0;
    for (int n = 1; n + 1 < slow_q.size(); n++) begin
      logic [3:0] u_prev, u_now;
      if (slow_q[n] != 4'(slow_q[n-1] + 4'd1)) not_counting++;
      if (c == 1) begin
        u_prev = {slow_q[n][3:2], slow_q[n-1][1:0]};
        u_now  = {slow_q[n+1][3:2], slow_q[n][1:0]};
        checks++;
        if (u_now != 4'(u_prev + 4'd1)) begin
          failures++;
          if (failures < 10) $display("FAIL 180-degree sampling is not a one-cycle lag of CK/8, CK/16");
        end
      end
    end
    checks++;
    if (c == 0 && not_counting != 0) begin
      failures++;
      $display("FAIL 0-degree sampling with 20 ps cells does not count (%0d)", not_counting);
    end
    if (c == 1 && not_counting == 0) begin
      failures++;
      $display("FAIL 180-degree sampling with 20 ps cells shows no lag");
    end
    slow_q.delete();
  endtask

  realtime periods[3] = '{91.0, 1000.0, 10000.0};

  initial begin
    for (int f = 0; f < 3; f++)
      for (int c = 0; c < 2; c++) begin
        run = 1'b0;
        rst_n = 1'b0;
        period = periods[f];
        ctrl_180 = c[0];
        repeat (4) @(posedge ck_in);
        #(period / 4.0);
        rst_n = 1'b1;
        repeat (8) @(posedge ck_in);
        n_seen = 0;
        run = 1'b1;
        repeat (100) @(posedge ck_in);
        run = 1'b0;
        if (f == 0) check_slow(c);
        checks++;
        if (n_seen < 95) begin
          failures++;
          $display("FAIL only %0d ck_out cycles", n_seen);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e8);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
