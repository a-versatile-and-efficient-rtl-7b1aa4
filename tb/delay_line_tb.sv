`timescale 1ps/1fs
// Test of the programmable delay line model.
//
// For each code 0..3 the input toggles at random intervals of 41..150 ps,
// many of them shorter than the whole delay, so that several changes are in
// flight at once (each is longer than one 40 ps cell). The test keeps its own list of (due time, value) and
// checks that every output change comes exactly code * 40 ps after the
// input change it repeats, with the same value, and that none is lost.
module delay_line_tb;

  localparam int unsigned STEP = 40;

  logic       a = 1'b0;
  logic [1:0] code = 2'd0;
  logic       y;

  delay_line #(.BITS(2), .STEP_PS(STEP)) dut (.a(a), .code(code), .y(y));

  int checks = 0;
  int failures = 0;

  realtime exp_t[$];
  logic    exp_v[$];

  bit started = 1'b0;

  always @(y) if (started) begin
    checks++;
    if (exp_t.size() == 0) begin
      failures++;
      $display("FAIL unexpected output change at %0t", $realtime);
    end else begin
      realtime et;
      logic    ev;
      et = exp_t.pop_front();
      ev = exp_v.pop_front();
      if (y !== ev || $realtime < et - 0.01 || $realtime > et + 0.01) begin
        failures++;
        if (failures < 10)
          $display("FAIL y=%b at %0.2f ps, expected %b at %0.2f ps", y, $realtime, ev, et);
      end
    end
  end

  initial begin
    #400;
    started = 1'b1;
    for (int c = 0; c < 4; c++) begin
      code = c[1:0];
      for (int i = 0; i < 200; i++) begin
        #(41 + $urandom_range(0, 109));
        a = ~a;
        exp_t.push_back($realtime + real'(c * STEP));
        exp_v.push_back(a);
      end
      #(200);
      checks++;
      if (exp_t.size() != 0) begin
        failures++;
        $display("FAIL code %0d: %0d output changes missing", c, exp_t.size());
        exp_t.delete();
        exp_v.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e6);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
