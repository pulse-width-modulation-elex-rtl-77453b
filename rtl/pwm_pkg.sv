// pwm_pkg: types and constants shared by the 7-segment PWM display design.
//
// The design shows one decimal digit on a common-anode 7-segment display and
// pulse-width modulates the common anode so that every digit looks equally
// bright. Two tables live here, both indexed by the digit 0..9:
//   * SEGS_LIT    - how many of the seven segments the digit lights. This is
//                   the "segments lit per digit" table that sets the PWM duty
//                   cycle (2/7 for '1' up to 7/7 for '8').
//   * SEG_PATTERN - which segments the digit lights, as {g,f,e,d,c,b,a},
//                   1 = segment on (the conventional glyphs: '6' with its top
//                   bar, '7' as a-b-c, '9' with its bottom bar, which gives
//                   exactly the counts of SEGS_LIT).
// The segment counts follow the published table; the glyph shapes are the
// usual ones and are this design's choice.
package pwm_pkg;

  // Number of PWM time slots per period: one per segment.
  localparam int unsigned PWM_SLOTS = 7;

  typedef logic [3:0] digit_t;       // BCD digit 0..9
  typedef logic [2:0] segcount_t;    // 0..7 segments lit
  typedef logic [2:0] slot_t;        // PWM slot counter 0..6

  // One bit per segment, bit 0 = a ... bit 6 = g.
  typedef struct packed {
    logic g, f, e, d, c, b, a;
  } segs_t;

  localparam segcount_t SEGS_LIT [10] = '{
    3'd6, 3'd2, 3'd5, 3'd5, 3'd4, 3'd5, 3'd6, 3'd3, 3'd7, 3'd6
  };

  //                                          gfedcba
  localparam segs_t SEG_PATTERN [10] = '{
    7'b0111111,  // 0
    7'b0000110,  // 1
    7'b1011011,  // 2
    7'b1001111,  // 3
    7'b1100110,  // 4
    7'b1101101,  // 5
    7'b1111101,  // 6
    7'b0000111,  // 7
    7'b1111111,  // 8
    7'b1101111   // 9
  };

endpackage
