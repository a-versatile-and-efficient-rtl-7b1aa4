`timescale 1ps/1fs
// Behavioural model of a digitally programmable delay line (analog circuit).
//
// A chain of 2^BITS - 1 identical cells, each delaying by STEP_PS
// picoseconds; code selects the tap, so the output repeats the input after
// code * STEP_PS. The transmitter uses it in two places: the fixed
// skew-compensation cells of the clock chain (dt, 2dt, 3dt, 4dt, code tied
// to 1..4) and the 2-bit data delay line in front of the CMOS-to-CML
// converter (120 ps full scale, so 40 ps per step). The real cells are
// inverter/capacitor stages; only their delay is modelled. Each cell is an
// inertial delay: pulses shorter than STEP_PS are filtered, as in a real
// gate, and pulses longer than one step pass the whole chain. Synthesis
// ignores the delays, which leaves a multiplexer of equal taps: the model is
// meant for simulation.
//
// Ports: a (input), code (delay in steps), y (delayed output).
module delay_line #(
  parameter int unsigned BITS    = 2,
  parameter int unsigned STEP_PS = 40
) (
  input  logic            a,
  input  logic [BITS-1:0] code,
  output logic            y
);

  localparam int unsigned N_TAP = 2 ** BITS;

  logic [N_TAP-1:0] tap;

  assign tap[0] = a;

  for (genvar i = 1; i < N_TAP; i++) begin : g_cell
    assign #(STEP_PS) tap[i] = tap[i-1];
  end

  assign y = tap[code];

endmodule
