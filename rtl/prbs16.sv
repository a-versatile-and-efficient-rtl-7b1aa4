`timescale 1ps/1fs
// Pseudo-random bit stream source feeding the 16:1 multiplexer tree.
//
// A 31-bit Fibonacci shift register that runs one of four standard
// patterns (PRBS7, PRBS15, PRBS23 or PRBS31, see cml_tx_pkg) and advances W
// steps per clock, so that each clock delivers the next W bits of the serial
// pattern as one parallel word: dout[0] is the earliest bit, the one the
// tree sends first.
//
// Timing: one word per rising edge of clk, which in the transmitter is the
// complementary CK/16 so that the word changes on the falling edge of CK/16,
// where the first tree level expects it. dout is registered; after reset
// the shift register holds all ones and dout is zero. The first word after
// reset holds pattern bits 0..W-1.
//
// The source gives only "16-b PRBS" with a 2-bit select; the patterns, the
// seed, the bit order and the reset are this design's choices.
module prbs16
  import cml_tx_pkg::*;
#(
  parameter int unsigned W = MUX_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  prbs_sel_e    sel,     // pattern select
  output logic [W-1:0] dout     // next W pattern bits, dout[0] first
);

  logic [PRBS_STATE_W-1:0] state_q;
  logic [PRBS_STATE_W-1:0] state_d;
  logic [W-1:0]            word_d;

  // Advance the shift register W steps, collecting the output bits
  always_comb begin
    logic fb;
    state_d = state_q;
    word_d  = '0;
    for (int i = 0; i < int'(W); i++) begin
      fb        = prbs_feedback(state_d, sel);
      word_d[i] = fb;
      state_d   = {state_d[PRBS_STATE_W-2:0], fb};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '1;
      dout    <= '0;
    end else begin
      state_q <= state_d;
      dout    <= word_d;
    end
  end

endmodule
