// mtp_module: radar trigger side of the blanking interface.
//
// Groups the three blocks that model the on-board radar's triggers: the
// free-running clock generator makes the timing tick, the PT generator makes
// the pre-trigger train (PT_PW ticks high, PT_PRI ticks low) while enable is
// high, and the MTP generator makes one main transmission pulse MTP_DELAY
// ticks after every PT trailing edge, MTP_PW ticks wide. The grouping follows
// the specification; the tick is brought out so that the blanking cover
// pulse logic counts on the same time base.
module mtp_module
  import icu_pkg::*;
#(
  parameter int unsigned CLK_DIV   = 4,      // clocks per tick
  parameter time4_t      PT_PW     = 4'd4,   // PT high time, ticks
  parameter pri_t        PT_PRI    = 8'd40,  // PT low time, ticks
  parameter time4_t      MTP_DELAY = 4'd4,   // PT fall to MTP rise, ticks
  parameter time4_t      MTP_PW    = 4'd6    // MTP high time, ticks
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic en,      // enable of the PT train
  output logic tick,    // timing tick
  output logic pt,      // pre-trigger
  output logic mtp      // main transmission pulse
);

  clk_gen #(.CLK_DIV(CLK_DIV)) u_clk_gen (
    .clk (clk),
    .rst (rst),
    .tick(tick)
  );

  pt_gen #(.PT_PW(PT_PW), .PT_PRI(PT_PRI)) u_pt_gen (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .tick(tick),
    .pt  (pt)
  );

  mtp_gen #(.MTP_DELAY(MTP_DELAY), .MTP_PW(MTP_PW)) u_mtp_gen (
    .clk (clk),
    .rst (rst),
    .tick(tick),
    .pt  (pt),
    .mtp (mtp)
  );

endmodule
