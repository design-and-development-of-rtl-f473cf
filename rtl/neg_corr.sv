// neg_corr: negative gyro correction.
//
// Subtracts the 12-bit gyro offset from the 12-bit gyro input and folds the
// result back into one full turn: a difference below zero has one full turn
// (0x1000) added, so 3 deg (0x020) - 5 deg (0x038) gives 0xFE8 (358 deg).
// Purely combinational, as the block is drawn without a clock. The polarity
// selection reaches the block as sel: while rst is high or sel is low the
// corrected output is held at zero and valid is low, so that the outputs of
// the two correction blocks can be merged onto one bus. Otherwise valid is
// high, because the fold always brings the angle into the 0..360 degree
// range. Which operand is subtracted from which, and the zero output when
// idle, are this design's own choices.
module neg_corr
  import icu_pkg::*;
(
  input  logic  rst,        // active-high reset
  input  logic  sel,        // polarity selects this correction
  input  gyro_t gyro_in,    // measured heading
  input  gyro_t gyro_off,   // offset to subtract
  output gyro_t gyro_corr,  // corrected heading
  output logic  valid       // corrected heading is in range
);

  // Signed 14-bit difference: range -4095 .. +4095
  logic signed [GYRO_W+1:0] diff;

  always_comb begin
    diff = $signed({2'b00, gyro_in}) - $signed({2'b00, gyro_off});
    if (diff < 0)
      diff = diff + (GYRO_W+2)'(GYRO_CODES);
    if (rst || !sel) begin
      gyro_corr = '0;
      valid     = 1'b0;
    end else begin
      gyro_corr = diff[GYRO_W-1:0];
      valid     = (diff >= 0) && (diff < (GYRO_W+2)'(GYRO_CODES));
    end
  end

endmodule
