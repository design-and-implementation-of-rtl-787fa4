// fhss_pkg: constants and types shared by the frequency-hopping spreader.
//
// Every frequency in the design is set by a 32-bit DDFS frequency code
// L = 2^32 * F / F_CLK with F_CLK = 50 MHz, so one code step is 0.0116 Hz.
// The eight hop frequencies F1..F8 are 100 kHz .. 800 kHz in 100 kHz steps;
// their codes are k * 8589935 (k = 1..8), the 100 kHz code rounded and then
// multiplied, as the design's frequency table does. The 2FSK deviation of
// 10 kHz has code 858993. The data square wave (4 Hz) and the slow (1 Hz)
// and fast (16 Hz) hop clocks use codes 344, 86 and 1374.
//
// The hopping algorithms of the three users are stored as frequency
// numbers 1..8 per hop slot T1..T8 and turned into code tables by
// user_hop_table(). They are the design's own tables; the slot-to-frequency
// mapping, not the per-slot codes, is what defines each user.
package fhss_pkg;

  localparam int unsigned PHASE_W     = 32;          // phase accumulator width n
  localparam int unsigned F_CLK_HZ    = 50_000_000;  // system clock
  localparam int unsigned NUM_USERS   = 3;
  localparam int unsigned NUM_FREQS   = 8;
  localparam int unsigned HOP_ADDR_W  = 3;           // log2(NUM_FREQS)
  localparam int unsigned SAMPLE_W    = 8;           // DAC width

  typedef logic [PHASE_W-1:0]    fcode_t;    // DDFS frequency code L
  typedef logic [HOP_ADDR_W-1:0] hop_addr_t; // hop slot number (ROM address)
  typedef logic [SAMPLE_W-1:0]   sample_t;   // offset-binary DAC sample

  // One user's hopping algorithm memory contents: 8 codes, slot 0 in [0].
  typedef fcode_t [NUM_FREQS-1:0] hop_table_t;

  // Hopping type.
  typedef enum logic {HOP_SLOW = 1'b0, HOP_FAST = 1'b1} hop_mode_e;

  // Frequency codes.
  localparam fcode_t L_100K   = 32'd8589935;  // code of 100 kHz (F1)
  localparam fcode_t L_DF     = 32'd858993;   // 2FSK deviation, 10 kHz
  localparam fcode_t L_DATA   = 32'd344;      // data square wave, 4 Hz
  localparam fcode_t L_H_SLOW = 32'd86;       // slow hop clock, 1 Hz
  localparam fcode_t L_H_FAST = 32'd1374;     // fast hop clock, 16 Hz

  // Code of hop frequency Fk (k = 1..8), i.e. k * 100 kHz.
  function automatic fcode_t freq_code(int unsigned k);
    return fcode_t'(k * L_100K);
  endfunction

  // Frequency number (1..8) used by user u (0..2) in hop slot s (0..7).
  function automatic int unsigned user_freq(int unsigned u, int unsigned s);
    int unsigned f;
    case (u)
      0: case (s) 0: f = 5; 1: f = 1; 2: f = 8; 3: f = 4;
                  4: f = 6; 5: f = 2; 6: f = 3; default: f = 7; endcase
      1: case (s) 0: f = 2; 1: f = 4; 2: f = 7; 3: f = 1;
                  4: f = 3; 5: f = 8; 6: f = 6; default: f = 5; endcase
      default:
         case (s) 0: f = 7; 1: f = 2; 2: f = 5; 3: f = 8;
                  4: f = 1; 5: f = 6; 6: f = 2; default: f = 4; endcase
    endcase
    return f;
  endfunction

  // Hopping algorithm memory contents of user u.
  function automatic hop_table_t user_hop_table(int unsigned u);
    hop_table_t t;
    for (int unsigned s = 0; s < NUM_FREQS; s++)
      t[s] = freq_code(user_freq(u, s));
    return t;
  endfunction

endpackage
