`timescale 1ps/1fs
// C2MOS unit multiplexer (2:1 clocked-inverter multiplexer).
//
// Two clocked inverters share the output node and are enabled on opposite
// clock phases. While ck is low the D1 inverter drives Q; while ck is high
// the D2 inverter drives Q, fed by a flip-flop (two clocked latches) that
// captured D2 on the rising edge. The flip-flop holds D2 while the inputs
// may already be changing, which makes every unit a pipeline stage: the
// tree can be made deep without lowering its speed.
//
// Timing: the inputs must change on the falling edge of ck (they come from
// a stage clocked at half this rate). In each ck period Q then shows ~D1
// during the low phase and ~D2 during the following high phase, i.e. two
// bits per clock period, D1 first. Every path holds an odd number of
// inverting clocked stages, so Q is the inverse of the data.
//
// Modelled at gate level as published, with the clocked inverter pair
// written as a clock-selected multiplexer. No reset, as in the circuit: the
// flip-flop holds whatever it last captured.
module c2mos_unit_mux (
  input  logic ck,   // stage clock
  input  logic d1,   // first bit of the pair
  input  logic d2,   // second bit of the pair
  output logic q     // inverted, double-rate output
);

  logic d2_ff;

  // Flip-flop of the D2 path (master and slave clocked latches)
  always_ff @(posedge ck) d2_ff <= d2;

  // Clocked inverters on opposite phases, sharing the output node
  assign q = ck ? ~d2_ff : ~d1;

endmodule
