// pos_corr: positive gyro correction.
//
// Adds the 12-bit gyro offset to the 12-bit gyro input and folds the result
// back into one full turn: a 13-bit sum of 0x1000 or more has 0x1000 taken
// off, so 358 deg (0xFE8) + 5 deg (0x038) = 0x1020 gives 0x020 (about 3 deg).
// Purely combinational, as the block is drawn without a clock. The polarity
// selection reaches the block as sel: while rst is high or sel is low the
// corrected output is held at zero and valid is low, so that the outputs of
// the two correction blocks can be merged onto one bus. Otherwise valid is
// high, because the fold always brings the angle into the 0..360 degree
// range. The zero output when idle is this design's own choice.
module pos_corr
  import icu_pkg::*;
(
  input  logic  rst,        // active-high reset
  input  logic  sel,        // polarity selects this correction
  input  gyro_t gyro_in,    // measured heading
  input  gyro_t gyro_off,   // offset to add
  output gyro_t gyro_corr,  // corrected heading
  output logic  valid       // corrected heading is in range
);

  logic [GYRO_W:0] sum;

  always_comb begin
    sum = {1'b0, gyro_in} + {1'b0, gyro_off};
    // One full turn is GYRO_CODES; the sum is below two full turns
    if (sum >= (GYRO_W+1)'(GYRO_CODES))
      sum = sum - (GYRO_W+1)'(GYRO_CODES);
    if (rst || !sel) begin
      gyro_corr = '0;
      valid     = 1'b0;
    end else begin
      gyro_corr = sum[GYRO_W-1:0];
      valid     = (sum < (GYRO_W+1)'(GYRO_CODES));
    end
  end

endmodule
