`timescale 1ps/1fs
// Wideband CML wireline transmitter, 0.1 to 11 Gb/s (logic view).
//
// One full-rate clock (the transformer output, 0.1 to 11 GHz) drives the
// whole transmitter:
//   adaptive_clock_chain  CK_OUT and the aligned CK/2 .. CK/16
//   prbs16                16-bit pattern words on the complementary CK/16
//   c2mos_mux_tree        16:1 serializer, one bit per CK period
//   delay_line            2-bit data delay (0/40/80/120 ps) for converter
//                         timing margin
//   cmos_to_cml (x2)      data converter retimed by CK_OUT, and a matching
//                         converter carrying CK_OUT as the forwarded clock
// The converter outputs are the inputs of the two CML output-driver chains,
// which are analog and not part of this model; they are brought out as the
// complementary pairs data_p/n and fclk_p/n.
//
// Configuration: prbs_sel chooses the pattern, dly_cfg the data delay
// code, clk_cfg_180 the 0/180-degree phase of the clock chain's fine
// retiming. Timing: one bit per lo_in cycle. The delayed data reaches the
// converter some time after a rising CK_OUT edge; if that is within the
// high phase, the converter releases it on the falling edge, so fclk_p
// rises in the middle of each bit; if it arrives later it passes the open
// latch at once. About 18 bits leave before the first pattern bit after
// reset at delay code 0. The reset, the pattern set, the 5 ps dt unit and
// the way the forwarded clock passes its converter are this design's
// choices; the block structure and the sizes follow the published design.
module cml_tx_top
  import cml_tx_pkg::*;
#(
  parameter int unsigned DT_STEP_PS  = DT_PS,
  parameter int unsigned DLY_STEP    = DLY_STEP_PS
) (
  input  logic                lo_in,        // full-rate clock input
  input  logic                rst_n,        // asynchronous, active low
  input  logic [1:0]          prbs_sel,     // 2-b pattern select
  input  logic [DLY_BITS-1:0] dly_cfg,      // 2-b data delay code
  input  logic                clk_cfg_180,  // 1-b clock chain phase control
  output logic                data_p,       // to data CML driver chain
  output logic                data_n,
  output logic                fclk_p,       // to forwarded-clock CML driver chain
  output logic                fclk_n
);

  logic                 ck;
  logic [N_DIV-1:0]     ck_div;
  logic                 ck16_n;
  logic [MUX_WIDTH-1:0] word;
  logic                 mux_q;
  logic                 mux_q_dly;

  adaptive_clock_chain #(
    .N_DIV (N_DIV),
    .DT_PS (DT_STEP_PS)
  ) u_clk (
    .ck_in    (lo_in),
    .rst_n    (rst_n),
    .ctrl_180 (clk_cfg_180),
    .ck_out   (ck),
    .ck_div   (ck_div)
  );

  // Complementary CK/16 for the pattern source
  assign ck16_n = ~ck_div[N_DIV-1];

  prbs16 #(
    .W (MUX_WIDTH)
  ) u_prbs (
    .clk   (ck16_n),
    .rst_n (rst_n),
    .sel   (prbs_sel_e'(prbs_sel)),
    .dout  (word)
  );

  c2mos_mux_tree #(
    .N_IN (MUX_WIDTH)
  ) u_mux (
    .d      (word),
    .ck_div (ck_div),
    .q      (mux_q)
  );

  delay_line #(
    .BITS    (DLY_BITS),
    .STEP_PS (DLY_STEP)
  ) u_dly (
    .a    (mux_q),
    .code (dly_cfg),
    .y    (mux_q_dly)
  );

  cmos_to_cml u_c2c_data (
    .ck (ck),
    .d  (mux_q_dly),
    .qp (data_p),
    .qn (data_n)
  );

  cmos_to_cml u_c2c_clk (
    .ck (1'b0),
    .d  (ck),
    .qp (fclk_p),
    .qn (fclk_n)
  );

endmodule
