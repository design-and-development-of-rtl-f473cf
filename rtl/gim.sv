// gim: gyro interface module.
//
// Corrects the 12-bit gyro heading received from the platform with a 12-bit
// gyro offset. Both words go to a positive-correction block (input + offset)
// and a negative-correction block (input - offset), each of which folds its
// result back into 0..360 degrees; the polarity selection pin picks which
// result drives the corrected gyro data: low selects the positive and high
// the negative correction. The valid bit follows the selected block and is
// high whenever the corrected heading is in range and the module is not in
// reset. Combinational from input to output, with an active-high reset that
// forces the output to zero. The structure follows the specification; the
// reset polarity and the output select are this design's own choices.
module gim
  import icu_pkg::*;
(
  input  logic      rst,          // active-high reset
  input  gyro_t     gyro_in,      // gyro input from the platform
  input  gyro_t     gyro_off,     // gyro offset
  input  corr_sel_e polarity,     // CORR_POS (0) or CORR_NEG (1)
  output gyro_t     gyro_corr,    // corrected gyro data
  output logic      gyro_valid    // corrected data in range
);

  gyro_t pos_data, neg_data;
  logic  pos_valid, neg_valid;

  pos_corr u_pos (
    .rst      (rst),
    .sel      (polarity == CORR_POS),
    .gyro_in  (gyro_in),
    .gyro_off (gyro_off),
    .gyro_corr(pos_data),
    .valid    (pos_valid)
  );

  neg_corr u_neg (
    .rst      (rst),
    .sel      (polarity == CORR_NEG),
    .gyro_in  (gyro_in),
    .gyro_off (gyro_off),
    .gyro_corr(neg_data),
    .valid    (neg_valid)
  );

  // Only the selected block drives non-zero values
  assign gyro_corr  = pos_data | neg_data;
  assign gyro_valid = pos_valid | neg_valid;

endmodule
