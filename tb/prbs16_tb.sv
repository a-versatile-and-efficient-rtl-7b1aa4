`timescale 1ps/1fs
// Test of the 16-bit parallel pseudo-random source.
//
// For each pattern the test resets the source and compares 300 words, bit
// by bit, with the sequence o[t] = o[t-n] ^ o[t-m] (n, m = 7,6 / 15,14 /
// 23,18 / 31,28) started from a history of ones, word bit 0 first. It also
// checks one word per clock, and that switching from PRBS31 to PRBS7
// without a reset still yields a non-zero PRBS7 stream.
module prbs16_tb;
  import cml_tx_pkg::*;

  localparam int NW = 300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  prbs_sel_e   sel = PRBS7;
  logic [15:0] dout;

  prbs16 dut (.clk(clk), .rst_n(rst_n), .sel(sel), .dout(dout));

  always #500 clk = ~clk;

  int checks = 0;
  int failures = 0;

  bit hist[NW * 16 + 31];

  task automatic make_ref(int n, int m);
    for (int i = 0; i < 31; i++) hist[i] = 1'b1;
    for (int t = 31; t < NW * 16 + 31; t++) hist[t] = hist[t-n] ^ hist[t-m];
  endtask

  int taps_n[4] = '{7, 15, 23, 31};
  int taps_m[4] = '{6, 14, 18, 28};

  initial begin
    for (int s = 0; s < 4; s++) begin
      rst_n = 1'b0;
      sel = prbs_sel_e'(s);
      make_ref(taps_n[s], taps_m[s]);
      @(negedge clk);
      rst_n = 1'b1;
      for (int w = 0; w < NW; w++) begin
        @(posedge clk);
        #1;
        for (int b = 0; b < 16; b++) begin
          checks++;
          if (dout[b] !== hist[31 + w*16 + b]) begin
            failures++;
            if (failures < 10) $display("FAIL sel %0d word %0d bit %0d", s, w, b);
          end
        end
      end
    end

    // pattern switch without reset
    begin
      bit stream[$];
      int ones;
      sel = PRBS31;
      repeat (50) @(posedge clk);
      sel = PRBS7;
      for (int w = 0; w < 40; w++) begin
        @(posedge clk);
        #1;
        for (int b = 0; b < 16; b++) stream.push_back(dout[b]);
      end
      ones = 0;
      for (int t = 32; t < stream.size(); t++) begin
        checks++;
        if (stream[t] != (stream[t-7] ^ stream[t-6])) failures++;
        ones += int'(stream[t]);
      end
      checks++;
      if (ones == 0) begin
        failures++;
        $display("FAIL PRBS7 stuck at zero after switch");
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
