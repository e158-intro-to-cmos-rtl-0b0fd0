// Shared types and constants of the alarm clock.
//
// Every time digit (seconds, minute ones, minute tens, hour) is held in a 6-bit binary counter,
// as in the original chip, and the terminal counts below decide when a digit wraps. The hour
// counts 0..11 and is shown as 12, 1, ..., 11; a separate a.m./p.m. bit completes the 12-hour
// time. Seven-segment patterns are 7 bits, bit 6 = segment a down to bit 0 = segment g, with a
// 1 lighting the segment. The control bundle from the clock controller to the datapath is
// gathered into ctrl_t, and the counter values fed back to the controller into counts_t.
package alarmclock_pkg;

  localparam int unsigned DIGIT_W = 6;   // width of every time counter
  localparam int unsigned SEG_W   = 7;   // segments a..g

  typedef logic [DIGIT_W-1:0] digit_t;
  typedef logic [SEG_W-1:0]   seg_t;

  // Terminal counts: the value after which a digit wraps to zero.
  localparam digit_t MAX_SEC      = digit_t'(59);
  localparam digit_t MAX_MIN_ONES = digit_t'(9);
  localparam digit_t MAX_MIN_TENS = digit_t'(5);
  localparam digit_t MAX_HR       = digit_t'(11);

  // Enable and reset of one counter. Reset wins over enable.
  typedef struct packed {
    logic en;
    logic rst;
  } cnt_ctrl_t;

  // Everything the clock controller drives into the datapath.
  typedef struct packed {
    cnt_ctrl_t sec;
    cnt_ctrl_t min_ones;
    cnt_ctrl_t min_tens;
    cnt_ctrl_t hr;
    cnt_ctrl_t alarm_min_ones;
    cnt_ctrl_t alarm_min_tens;
    cnt_ctrl_t alarm_hr;
    logic      curr_ampm_en;    // toggle the clock a.m./p.m. flop
    logic      alarm_ampm_en;   // toggle the alarm a.m./p.m. flop
  } ctrl_t;

  // Counter values the controller needs to find terminal counts.
  typedef struct packed {
    digit_t curr_sec;
    digit_t curr_min_ones;
    digit_t curr_min_tens;
    digit_t curr_hr;
    digit_t alarm_min_ones;
    digit_t alarm_min_tens;
    digit_t alarm_hr;
  } counts_t;

  // Individual segments, bit 6 = a ... bit 0 = g.
  localparam seg_t SEG_A = 7'b1000000;
  localparam seg_t SEG_B = 7'b0100000;
  localparam seg_t SEG_C = 7'b0010000;
  localparam seg_t SEG_D = 7'b0001000;
  localparam seg_t SEG_E = 7'b0000100;
  localparam seg_t SEG_F = 7'b0000010;
  localparam seg_t SEG_G = 7'b0000001;
  localparam seg_t SEG_BLANK = '0;

  // Segments of a decimal digit; anything above 9 is blank.
  function automatic seg_t digit_segments(input digit_t d);
    unique case (d)
      digit_t'(0): return SEG_A | SEG_B | SEG_C | SEG_D | SEG_E | SEG_F;
      digit_t'(1): return SEG_B | SEG_C;
      digit_t'(2): return SEG_A | SEG_B | SEG_D | SEG_E | SEG_G;
      digit_t'(3): return SEG_A | SEG_B | SEG_C | SEG_D | SEG_G;
      digit_t'(4): return SEG_B | SEG_C | SEG_F | SEG_G;
      digit_t'(5): return SEG_A | SEG_C | SEG_D | SEG_F | SEG_G;
      digit_t'(6): return SEG_A | SEG_C | SEG_D | SEG_E | SEG_F | SEG_G;
      digit_t'(7): return SEG_A | SEG_B | SEG_C;
      digit_t'(8): return SEG_A | SEG_B | SEG_C | SEG_D | SEG_E | SEG_F | SEG_G;
      digit_t'(9): return SEG_A | SEG_B | SEG_C | SEG_D | SEG_F | SEG_G;
      default:     return SEG_BLANK;
    endcase
  endfunction

endpackage
