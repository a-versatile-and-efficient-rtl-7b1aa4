`timescale 1ps/1fs
// Shared types and constants of the CML wireline transmitter.
//
// The transmitter serializes 16-bit words through a four-level 2:1 tree, so
// the clock chain produces four divided clocks, CK/2 .. CK/16. The pattern
// generator offers four standard pseudo-random patterns, selected by a 2-bit
// code; which four patterns is a choice of this design (the source only
// specifies a 2-bit select). Delay steps are in picoseconds.
package cml_tx_pkg;

  // Width of the parallel word entering the multiplexer tree (16:1 tree).
  localparam int unsigned MUX_WIDTH = 16;
  // Number of divide-by-two stages: CK/2, CK/4, CK/8, CK/16.
  localparam int unsigned N_DIV = 4;
  // Data delay line in front of the CMOS-to-CML converter: 2 bits, 120 ps
  // full scale, so 40 ps per step.
  localparam int unsigned DLY_BITS = 2;
  localparam int unsigned DLY_STEP_PS = 40;
  // Unit skew-compensation delay of the clock chain (not specified; chosen).
  localparam int unsigned DT_PS = 5;

  // Pattern select of the pseudo-random bit source.
  typedef enum logic [1:0] {
    PRBS7  = 2'd0,   // x^7  + x^6  + 1
    PRBS15 = 2'd1,   // x^15 + x^14 + 1
    PRBS23 = 2'd2,   // x^23 + x^18 + 1
    PRBS31 = 2'd3    // x^31 + x^28 + 1
  } prbs_sel_e;

  // Length of the shift register that holds the longest pattern.
  localparam int unsigned PRBS_STATE_W = 31;

  // One step of a Fibonacci LFSR for the selected pattern: returns the new
  // bit, which is shifted in at bit 0 and is also the next output bit. A
  // state whose active bits are all zero (only reachable after switching
  // patterns) is restarted by feeding back a one.
  function automatic logic prbs_feedback(input logic [PRBS_STATE_W-1:0] s,
                                         input prbs_sel_e sel);
    logic fb;
    logic zero;
    case (sel)
      PRBS7:   begin fb = s[6]  ^ s[5];  zero = (s[6:0]  == '0); end
      PRBS15:  begin fb = s[14] ^ s[13]; zero = (s[14:0] == '0); end
      PRBS23:  begin fb = s[22] ^ s[17]; zero = (s[22:0] == '0); end
      default: begin fb = s[30] ^ s[27]; zero = (s[30:0] == '0); end
    endcase
    return fb | zero;
  endfunction

endpackage
