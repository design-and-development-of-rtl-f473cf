// icu_top: interface controller unit of an ESM receiver.
//
// Places the two interfaces the controller offers side by side: the
// blanking interface module (BIM), which derives the band-wise blanking
// cover pulses BCP1..BCP3 from the on-board radar's trigger timing, and the
// gyro interface module (GIM), which corrects the platform gyro heading by a
// gyro offset, positively or negatively as the polarity selection says. The
// two share only reset; their outputs are independent. The port list is the
// one of the integrated module as specified (clock, enable, reset, gyro
// offset, gyro input, polarity selection in; BCP1..BCP3 and corrected gyro
// data out), plus the gyro valid bit and the PT and MTP observation outputs.
// The GIM path is combinational; the BIM outputs change on clock edges.
module icu_top
  import icu_pkg::*;
#(
  parameter int unsigned                    CLK_DIV   = 4,
  parameter time4_t                         PT_PW     = 4'd4,
  parameter pri_t                           PT_PRI    = 8'd40,
  parameter time4_t                         MTP_DELAY = 4'd4,
  parameter time4_t                         MTP_PW    = 4'd6,
  parameter logic [N_BANDS-1:0][TIME_W-1:0] BCP_ADV   = {4'd3, 4'd2, 4'd1},
  parameter logic [N_BANDS-1:0][TIME_W-1:0] BCP_DELTA = {4'd3, 4'd2, 4'd1}
) (
  input  logic  clk,
  input  logic  rst,          // synchronous for BIM, active high
  input  logic  en,           // enable of the radar trigger train
  input  gyro_t gyro_in,      // gyro input
  input  gyro_t gyro_off,     // gyro offset
  input  logic  polarity,     // 0: positive, 1: negative correction
  output logic  bcp1,
  output logic  bcp2,
  output logic  bcp3,
  output logic  pt,
  output logic  mtp,
  output gyro_t gyro_corr,    // corrected gyro data
  output logic  gyro_valid
);

  bim #(
    .CLK_DIV  (CLK_DIV),
    .PT_PW    (PT_PW),
    .PT_PRI   (PT_PRI),
    .MTP_DELAY(MTP_DELAY),
    .MTP_PW   (MTP_PW),
    .BCP_ADV  (BCP_ADV),
    .BCP_DELTA(BCP_DELTA)
  ) u_bim (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .bcp1(bcp1),
    .bcp2(bcp2),
    .bcp3(bcp3),
    .pt  (pt),
    .mtp (mtp)
  );

  gim u_gim (
    .rst       (rst),
    .gyro_in   (gyro_in),
    .gyro_off  (gyro_off),
    .polarity  (corr_sel_e'(polarity)),
    .gyro_corr (gyro_corr),
    .gyro_valid(gyro_valid)
  );

endmodule
