`timescale 1ps/1fs
// 16:1 C2MOS multiplexer tree: serializes a parallel word into a full-rate
// bit stream.
//
// A binary tree of log2(N_IN) levels of C2MOS unit multiplexers (16:8, 8:4,
// 4:2, 2:1 for N_IN = 16). Level s halves the width and is clocked by
// CK/2^(L-s), L being the number of levels, so the first level runs on the
// slowest clock and the last on CK/2. Unit j of a level takes inputs j and
// j + width/2, which makes the stream leave in index order: d[0] first,
// d[N_IN-1] last.
//
// Timing: ck_div[k] is CK/2^(k+1), all aligned so that a child clock changes
// on the falling edge of its parent (as the clock chain provides). The word
// d must change on the falling edge of the slowest clock, where all clocks
// fall together. The output q changes on every edge of ck_div[0], i.e. once
// per CK period (full rate). Bit 0 reaches q in the CK period in which the
// word is applied, through the D1 inputs, which are open during the low
// phases; the D2 flip-flops hold the later halves until their turn, so a
// new word can follow every 16 CK periods without a gap. Gate delays are
// not modelled. Each unit inverts, so q carries the data inverted when L is
// odd and true when L is even (true for the 16:1 tree).
//
// The level structure and clocks follow the published tree; the pairing
// of inputs in each unit is this design's choice.
module c2mos_mux_tree #(
  parameter int unsigned N_IN = cml_tx_pkg::MUX_WIDTH,
  localparam int unsigned L   = $clog2(N_IN)
) (
  input  logic [N_IN-1:0] d,       // parallel word, d[0] sent first
  input  logic [L-1:0]    ck_div,  // ck_div[k] = CK/2^(k+1)
  output logic            q        // full-rate serial data
);

  for (genvar s = 0; s < L; s++) begin : g_lvl
    localparam int unsigned W_IN  = N_IN >> s;
    localparam int unsigned W_OUT = W_IN / 2;
    logic [W_IN-1:0]  din;
    logic [W_OUT-1:0] dout;

    if (s == 0) begin : g_first
      assign din = d;
    end else begin : g_next
      assign din = g_lvl[s-1].dout;
    end

    for (genvar j = 0; j < W_OUT; j++) begin : g_unit
      c2mos_unit_mux u_mux (
        .ck (ck_div[L-1-s]),
        .d1 (din[j]),
        .d2 (din[j+W_OUT]),
        .q  (dout[j])
      );
    end
  end

  assign q = g_lvl[L-1].dout[0];

endmodule
