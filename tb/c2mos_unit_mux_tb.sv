`timescale 1ps/1fs
// Test of the C2MOS unit multiplexer.
//
// Random pairs (d1, d2) are applied on every falling clock edge. In the
// middle of the following low phase q must be ~d1 of the current pair, and
// in the middle of the following high phase ~d2 of the same pair: two bits
// per clock period, d1 first. d1 and d2 are changed again a quarter period
// after the rising edge to show that the flip-flop holds d2.
module c2mos_unit_mux_tb;

  localparam realtime T = 182.0;

  logic ck = 1'b0;
  logic d1 = 1'b0, d2 = 1'b0;
  logic q;

  c2mos_unit_mux dut (.ck(ck), .d1(d1), .d2(d2), .q(q));

  int checks = 0;
  int failures = 0;

  always #(T / 2.0) ck = ~ck;

  initial begin
    logic p1, p2;
    @(negedge ck);
    for (int i = 0; i < 500; i++) begin
      p1 = 1'($urandom);
      p2 = 1'($urandom);
      d1 = p1;
      d2 = p2;
      #(T / 4.0);
      checks++;
      if (q !== ~p1) begin
        failures++;
        if (failures < 10) $display("FAIL low phase: q=%b, d1=%b", q, p1);
      end
      @(posedge ck);
      #(T / 8.0);
      // disturb the inputs: the captured d2 must stay on q
      d1 = 1'($urandom);
      d2 = ~p2;
      #(T / 8.0);
      checks++;
      if (q !== ~p2) begin
        failures++;
        if (failures < 10) $display("FAIL high phase: q=%b, d2=%b", q, p2);
      end
      @(negedge ck);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e7);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
