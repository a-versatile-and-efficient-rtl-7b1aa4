`timescale 1ps/1fs
// Frequency-adaptive clock chain: generates the aligned divided clocks
// CK/2, CK/4, CK/8 and CK/16 for the multiplexer tree from one full-rate
// input clock, for any input frequency.
//
// How it works (structure as published):
//  1. A ripple chain of divide-by-two flip-flops: stage k toggles on the
//     rising edge of its parent (CK_IN for k = 0, the stage k-1 output
//     otherwise). Each stage adds delay, so the raw outputs drift apart.
//  2. Coarse self-retiming: a flip-flop clocked by the same parent clock
//     samples each child clock. The child is thereby re-aligned to its own
//     parent edge, so the skew left between neighbours is small and fixed.
//  3. Fixed delay cells dt, 2dt, 3dt, 4dt compensate that remaining skew.
//  4. Fine final retiming: one bank of flip-flops clocked by CK_OUT, which
//     is CK_IN passed through an XOR gate. The XOR control shifts the
//     sampling edge by 0 or 180 degrees; this is the only frequency-dependent
//     timing in the chain.
// CK_OUT also clocks the CMOS-to-CML converters and feeds the forwarded-
// clock path.
//
// Timing: after reset, ck_div[k] = CK/2^(k+1) changes only on rising edges
// of ck_out, and {ck_div[N_DIV-1], .., ck_div[0]} counts up by one every
// ck_out cycle: a child clock changes on the falling edge of its parent.
// Delays of the gates themselves are not modelled; only the dt cells are.
//
// Own choices: the delay unit DT_PS (5 ps) is not given; an active-low
// asynchronous reset clears dividers and retimers (none is described); the
// coarse flip-flops are clocked by the raw parent clock, the mini-buffers
// being treated as part of the flip-flop.
module adaptive_clock_chain #(
  parameter int unsigned N_DIV = cml_tx_pkg::N_DIV,
  parameter int unsigned DT_PS = cml_tx_pkg::DT_PS
) (
  input  logic             ck_in,     // full-rate clock (after the transformer)
  input  logic             rst_n,     // asynchronous, active low
  input  logic             ctrl_180,  // 1: fine retiming on the inverted clock
  output logic             ck_out,    // CK_OUT: full-rate clock for converters
  output logic [N_DIV-1:0] ck_div     // ck_div[k] = CK/2^(k+1), aligned
);

  localparam int unsigned CODE_W = $clog2(N_DIV + 1);

  logic [N_DIV-1:0] parent;      // parent[k] clocks divider/retimer k
  logic [N_DIV-1:0] coarse_q;    // coarse self-retimed clocks
  logic [N_DIV-1:0] coarse_dly;  // after the k*dt skew cells

  assign parent[0] = ck_in;

  for (genvar k = 0; k < N_DIV; k++) begin : g_stage
    logic div_ff;     // divide-by-two flip-flop
    logic coarse_ff;  // coarse self-retiming flip-flop

    // Divide-by-two
    always_ff @(posedge parent[k] or negedge rst_n) begin
      if (!rst_n) div_ff <= 1'b0;
      else        div_ff <= ~div_ff;
    end

    // Coarse self-retimer: child sampled by its own parent edge
    always_ff @(posedge parent[k] or negedge rst_n) begin
      if (!rst_n) coarse_ff <= 1'b0;
      else        coarse_ff <= div_ff;
    end

    if (k < N_DIV - 1) begin : g_child
      assign parent[k+1] = div_ff;  // raw output clocks the next stage
    end
    assign coarse_q[k] = coarse_ff;

    // Skew compensation cell of (k+1)*dt
    delay_line #(
      .BITS    (CODE_W),
      .STEP_PS (DT_PS)
    ) u_dt (
      .a    (coarse_q[k]),
      .code (CODE_W'(k + 1)),
      .y    (coarse_dly[k])
    );
  end

  // Controlled XOR: 0/180-degree phase of the fine retiming clock
  assign ck_out = ck_in ^ ctrl_180;

  // Fine final retiming
  always_ff @(posedge ck_out or negedge rst_n) begin
    if (!rst_n) ck_div <= '0;
    else        ck_div <= coarse_dly;
  end

endmodule
