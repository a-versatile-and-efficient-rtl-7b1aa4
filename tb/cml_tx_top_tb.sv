`timescale 1ps/1fs
// End-to-end test of the transmitter at its default parameters.
//
// For every combination of input clock (10.99 GHz and 0.1 GHz, the two ends
// of the range), clock-chain phase (0/180), pattern (PRBS7/15/23/31) and
// data delay code (0..3) the test resets the transmitter, captures data_p on
// every rising edge of the forwarded clock fclk_p, and compares the stream
// with a pattern computed here from the recurrence o[t] = o[t-n] ^ o[t-m]
// with an all-ones history. It also checks:
//  - one bit per input clock period (the stream is captured per fclk_p
//    cycle and must match bit for bit),
//  - the position of each data edge after the rising fclk_p edge: half a
//    period when the delayed data arrives in the converter's hold phase,
//    the delay itself (modulo the period) when it arrives while the latch
//    is open,
//  - the same pipeline latency for every configuration with delay code 0,
//  - complementary outputs.
// Every configuration option and both converter behaviours (retimed at the
// falling edge, passed through while open) must occur at least once.
module cml_tx_top_tb;
  import cml_tx_pkg::*;

  localparam int NBITS = 400;  // captured bits per configuration
  localparam int SKIP  = 48;   // bits ignored after reset (pipeline fill)
  localparam int NCMP  = NBITS - SKIP;
  localparam int SEQ_N = 700;

  logic       lo_in = 1'b0;
  logic       rst_n = 1'b0;
  logic       clk_cfg_180 = 1'b0;
  logic [1:0] prbs_sel = 2'd0;
  logic [1:0] dly_cfg = 2'd0;
  logic       data_p, data_n, fclk_p, fclk_n;

  cml_tx_top dut (
    .lo_in       (lo_in),
    .rst_n       (rst_n),
    .prbs_sel    (prbs_sel),
    .dly_cfg     (dly_cfg),
    .clk_cfg_180 (clk_cfg_180),
    .data_p      (data_p),
    .data_n      (data_n),
    .fclk_p      (fclk_p),
    .fclk_n      (fclk_n)
  );

  int checks = 0;
  int failures = 0;

  realtime period = 91.0;
  always #(period / 2.0) lo_in = ~lo_in;

  // ---------------------------------------------------------------- capture
  bit      capture_en = 1'b0;
  bit      rx[$];
  realtime t_rise = 0.0;
  realtime exp_off = 0.0;
  int      edge_checks = 0, edge_fail = 0;

  always @(posedge fclk_p) begin
    t_rise = $realtime;
    if (capture_en) rx.push_back(data_p);
  end

  always @(data_p) begin
    if (capture_en && rx.size() > 4) begin
      realtime off;
      off = $realtime - t_rise;
      edge_checks++;
      if (off < exp_off - 0.01 || off > exp_off + 0.01) begin
        edge_fail++;
        if (edge_fail < 5)
          $display("FAIL data edge at %0.2f ps after fclk rise, expected %0.2f (T=%0.1f code=%0d)",
                   off, exp_off, period, dly_cfg);
      end
    end
  end

  always @(posedge lo_in) begin
    #(period / 4.0);
    if (rst_n) begin
      checks++;
      if (data_n !== ~data_p || fclk_n !== ~fclk_p) begin
        failures++;
        if (failures < 5) $display("FAIL outputs not complementary at %0t", $realtime);
      end
    end
  end

  // ------------------------------------------------------------- reference
  bit seq[SEQ_N];

  function automatic void make_seq(int sel);
    int n, m;
    bit hist[SEQ_N + 31];
    case (sel)
      0: begin n = 7;  m = 6;  end
      1: begin n = 15; m = 14; end
      2: begin n = 23; m = 18; end
      default: begin n = 31; m = 28; end
    endcase
    for (int i = 0; i < 31; i++) hist[i] = 1'b1;
    for (int t = 31; t < SEQ_N + 31; t++) begin
      hist[t] = hist[t-n] ^ hist[t-m];
      seq[t-31] = hist[t];
    end
  endfunction

  // ------------------------------------------------------------ scenarios
  int seen_sel[4], seen_code[4], seen_ctrl[2], seen_freq[2];
  int seen_retime = 0, seen_pass = 0;
  int lat_code0 = -1;

  task automatic run_cfg(int fi, realtime t, int ctrl, int sel, int code);
    int off_found;
    realtime dly, phi;
    rst_n = 1'b0;
    capture_en = 1'b0;
    period = t;
    clk_cfg_180 = ctrl[0];
    prbs_sel = sel[1:0];
    dly_cfg = code[1:0];
    make_seq(sel);
    dly = real'(code) * real'(DLY_STEP_PS);
    phi = dly - t * $floor(dly / t);
    if (phi < t / 2.0) begin
      exp_off = t / 2.0;
      if (code > 0) seen_retime++;
    end else begin
      exp_off = phi;
      seen_pass++;
    end
    repeat (6) @(posedge lo_in);
    #(t / 4.0);
    rst_n = 1'b1;
    rx.delete();
    edge_checks = 0;
    edge_fail = 0;
    capture_en = 1'b1;
    repeat (NBITS) @(posedge fclk_p);
    #(t / 8.0);
    capture_en = 1'b0;

    // find where the pattern starts in the captured stream
    off_found = -1;
    for (int o = 0; o < SEQ_N - NCMP && off_found < 0; o++) begin
      bit ok;
      ok = 1'b1;
      for (int i = 0; i < NCMP && ok; i++)
        if (rx[SKIP+i] != seq[o+i]) ok = 1'b0;
      if (ok) off_found = o;
    end
    checks++;
    if (off_found < 0) begin
      failures++;
      $display("FAIL T=%0.1f ctrl=%0d sel=%0d code=%0d: stream does not match the pattern",
               t, ctrl, sel, code);
    end else begin
      seen_sel[sel]++;
      seen_code[code]++;
      seen_ctrl[ctrl]++;
      seen_freq[fi]++;
      if (code == 0 && sel != 0) begin
        checks++;
        if (lat_code0 < 0) lat_code0 = SKIP - off_found;
        else if (lat_code0 != SKIP - off_found) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", SKIP - off_found, lat_code0);
        end
      end
    end
    checks += edge_checks;
    failures += edge_fail;
    checks++;
    if (edge_checks < NBITS / 8) begin
      failures++;
      $display("FAIL too few data edges (%0d)", edge_checks);
    end
  endtask

  realtime periods[2] = '{91.0, 10000.0};

  initial begin
    for (int fi = 0; fi < 2; fi++)
      for (int ctrl = 0; ctrl < 2; ctrl++)
        for (int sel = 0; sel < 4; sel++)
          for (int code = 0; code < 4; code++)
            run_cfg(fi, periods[fi], ctrl, sel, code);

    $display("latency from reset release, code 0: %0d bits", lat_code0);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (seen_sel[i] == 0)  begin failures++; $display("FAIL pattern %0d never ran", i); end
      if (seen_code[i] == 0) begin failures++; $display("FAIL delay code %0d never ran", i); end
    end
    for (int i = 0; i < 2; i++) begin
      checks += 2;
      if (seen_ctrl[i] == 0) begin failures++; $display("FAIL phase setting %0d never ran", i); end
      if (seen_freq[i] == 0) begin failures++; $display("FAIL frequency %0d never ran", i); end
    end
    checks += 2;
    if (seen_retime == 0) begin failures++; $display("FAIL converter never retimed delayed data"); end
    if (seen_pass == 0)   begin failures++; $display("FAIL converter never passed data while open"); end
    $display("mechanisms: retimed=%0d passed=%0d", seen_retime, seen_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the 64 configurations need about 131 us of simulated time
  initial begin
    #(4.0e8);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
