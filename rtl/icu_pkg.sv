// icu_pkg: types and constants shared by the interface controller blocks.
//
// The gyro heading is a 12-bit unsigned angle: code 0 is 0 degrees and the
// 4096 codes span one full turn, so one LSB is 360/4096 = 0.087890625 degree
// (both numbers are the ones the design is specified with). The BIM timing
// fields are 4-bit tick counts, again as specified; the width of the pulse
// repetition field is this design's own choice (8 bits).
package icu_pkg;

  // Gyro angle word
  localparam int unsigned GYRO_W    = 12;
  localparam int unsigned GYRO_CODES = 1 << GYRO_W;  // 4096 codes per full turn
  typedef logic [GYRO_W-1:0] gyro_t;

  // Polarity selection: low selects positive correction, high negative
  typedef enum logic {
    CORR_POS = 1'b0,
    CORR_NEG = 1'b1
  } corr_sel_e;

  // Blanking interface timing fields, counted in clock-generator ticks
  localparam int unsigned TIME_W = 4;   // PW of PT, delay and PW of MTP
  localparam int unsigned PRI_W  = 8;   // low time of PT (own choice)
  typedef logic [TIME_W-1:0] time4_t;
  typedef logic [PRI_W-1:0]  pri_t;

  // Number of receiver bands that get a blanking cover pulse
  localparam int unsigned N_BANDS = 3;

endpackage
