// bim: blanking interface module.
//
// Turns the on-board radar's trigger timing into the three band-wise
// blanking cover pulses BCP1..BCP3 that shut off the ESM receiver while the
// radar transmits. Inside are the MTP module (clock generator, pre-trigger
// generator and main transmission pulse generator, all with fixed timing
// parameters) and the BCP module, which opens each band's cover a few ticks
// before the transmission and closes it a few ticks after. All timing is in
// ticks of the clock generator, CLK_DIV clocks each. With the defaults one
// radar period is 44 ticks: PT high 4, then MTP 4 ticks after the PT fall,
// 6 ticks wide, and covers of band 1/2/3 opening 1/2/3 ticks early and
// closing 1/2/3 ticks late.
//
// Clock, reset and the three BCPs are the ports of the specification; the
// enable input is taken from the integrated module's input list, and PT and
// MTP are brought out so that the radar timing can be observed. Reset is
// synchronous and active high by this design's own choice. An assertion
// checks that the transmission never overlaps the pre-trigger.
module bim
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
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic en,      // enable of the radar trigger train
  output logic bcp1,    // blanking cover pulse, band 1
  output logic bcp2,    // blanking cover pulse, band 2
  output logic bcp3,    // blanking cover pulse, band 3
  output logic pt,      // pre-trigger (observation)
  output logic mtp      // main transmission pulse (observation)
);

  logic               tick;
  logic [N_BANDS-1:0] bcp;

  mtp_module #(
    .CLK_DIV  (CLK_DIV),
    .PT_PW    (PT_PW),
    .PT_PRI   (PT_PRI),
    .MTP_DELAY(MTP_DELAY),
    .MTP_PW   (MTP_PW)
  ) u_mtp_module (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .tick(tick),
    .pt  (pt),
    .mtp (mtp)
  );

  bcp_gen #(
    .MTP_DELAY(MTP_DELAY),
    .MTP_PW   (MTP_PW),
    .BCP_ADV  (BCP_ADV),
    .BCP_DELTA(BCP_DELTA)
  ) u_bcp_gen (
    .clk (clk),
    .rst (rst),
    .tick(tick),
    .pt  (pt),
    .mtp (mtp),
    .bcp (bcp)
  );

  assign bcp1 = bcp[0];
  assign bcp2 = bcp[1];
  assign bcp3 = bcp[2];

  a_no_overlap: assert property (@(posedge clk) disable iff (rst) !(pt && mtp))
    else $error("bim: MTP overlaps the pre-trigger");

endmodule
