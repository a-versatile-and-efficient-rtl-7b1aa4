`timescale 1ps/1fs
// Test of the 16:1 C2MOS multiplexer tree.
//
// The test builds ideal aligned clocks from a counter on a 91 ps base
// clock: ck_div[k] is bit k of the count, so CK/2^(k+1) changes when its
// parent falls, as the clock chain delivers them. A random 16-bit word is
// applied on every falling edge of CK/16. The serial output is sampled in
// the middle of every base-clock bit (falling base-clock edge). The stream
// must be the words in order, bit 0 of each word first, at one bit per base
// clock period. Bit 0 of a word must appear in the base-clock period in
// which the word is applied (latency 0: all clocks are low then, so it
// passes the open D1 paths of all four levels); every bit is checked at
// that latency. If the stream is wrong, the test also searches for a
// latency at which it would match and reports it.
module c2mos_mux_tree_tb;

  localparam realtime T = 91.0;
  localparam int NWORDS = 200;

  logic        ck = 1'b0;
  logic [3:0]  cnt = 4'd0;
  logic [15:0] d = 16'd0;
  logic        q;

  c2mos_mux_tree dut (.d(d), .ck_div(cnt), .q(q));

  int checks = 0;
  int failures = 0;

  always #(T / 2.0) ck = ~ck;
  always @(posedge ck) cnt <= cnt + 4'd1;

  // words and the base-clock cycle at which each was applied
  logic [15:0] words[$];
  int          cyc = 0;
  int          word_cyc[$];
  bit          rx[$];
  int          rx_cyc[$];

  always @(posedge ck) cyc++;

  always @(negedge cnt[3]) begin
    logic [15:0] w;
    w = 16'($urandom);
    d <= w;
    words.push_back(w);
    word_cyc.push_back(cyc);
  end

  always @(negedge ck) begin
    rx.push_back(q);
    rx_cyc.push_back(cyc);
  end

  initial begin
    int lat;
    wait (words.size() == NWORDS);
    repeat (64) @(posedge ck);
    // expected bit for the sample taken in cycle c with latency L:
    // stream index s = c - word_cyc[0] - L, word s/16, bit s%16
    lat = -1;
    for (int L = 0; L < 80 && lat < 0; L++) begin
      bit ok;
      ok = 1'b1;
      for (int i = 0; i < rx.size() && ok; i++) begin
        int s;
        s = rx_cyc[i] - word_cyc[0] - L;
        if (s >= 16 && s < (NWORDS - 1) * 16)
          if (rx[i] != words[s/16][s%16]) ok = 1'b0;
      end
      if (ok) lat = L;
    end
    checks++;
    if (lat != 0) begin
      failures++;
      if (lat < 0) $display("FAIL stream matches the words at no latency");
      else         $display("FAIL stream matches at latency %0d, expected 0", lat);
    end
    for (int i = 0; i < rx.size(); i++) begin
      int s;
      s = rx_cyc[i] - word_cyc[0];
      if (s >= 16 && s < (NWORDS - 1) * 16) begin
        checks++;
        if (rx[i] != words[s/16][s%16]) failures++;
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
