`timescale 1ps/1fs
// Test of the CMOS-to-CML converter latch.
//
// The data input changes at random times. While ck is low qp must follow d;
// while ck is high qp must hold the value d had at the rising edge. qn must
// always be the complement of qp.
module cmos_to_cml_tb;

  localparam realtime T = 91.0;

  logic ck = 1'b0;
  logic d = 1'b0;
  logic qp, qn;

  cmos_to_cml dut (.ck(ck), .d(d), .qp(qp), .qn(qn));

  int checks = 0;
  int failures = 0;

  always #(T / 2.0) ck = ~ck;

  logic d_at_rise = 1'b0;
  always @(posedge ck) d_at_rise = d;

  initial begin
    #(T);
    for (int i = 0; i < 2000; i++) begin
      @(ck);
      // up to three data changes per clock phase, never on a clock edge
      for (int k = 0; k < 3; k++) begin
        realtime w;
        w = 0.25 + real'($urandom_range(1, 12));
        #(w);
        if ($urandom_range(0, 1) == 1) d = ~d;
        #0.5;
        checks++;
        if (qp !== (ck ? d_at_rise : d) || qn !== ~qp) begin
          failures++;
          if (failures < 10) $display("FAIL ck=%b d=%b qp=%b qn=%b", ck, d, qp, qn);
        end
      end
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
