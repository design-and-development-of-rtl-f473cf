// bcp_gen: band-wise blanking cover pulse generator.
//
// Makes one blanking cover pulse (BCP) per receiver band. A BCP is high while
// the ESM receiver of that band must be shut off to protect it from the
// on-board radar's transmission: it opens BCP_ADV[b] ticks (the advance
// delay) before the main transmission pulse starts and closes BCP_DELTA[b]
// ticks (the delta delay) after it ends. The pre-trigger is what makes the
// advance possible: the generator counts ticks from the PT trailing edge, on
// the same time base and with the same MTP_DELAY and MTP_PW as the MTP
// generator, and opens each band's window at a fixed count. Each BCP is the
// composite of its window and the MTP itself, so a band is never left open
// while MTP is high.
//
// The specification gives the purpose of the pulses, that there is one per
// band, and names advance and delta delays among the radar parameters; the
// window arithmetic, the 4-bit width of the advance and delta counts, their
// default values and the use of one counter for all bands are this design's
// own. BCP_ADV[b] must be below MTP_DELAY, because the trailing edge is first
// seen one tick after it happens. Outputs change only on tick edges.
module bcp_gen
  import icu_pkg::*;
#(
  parameter time4_t                         MTP_DELAY = 4'd4,   // as in mtp_gen
  parameter time4_t                         MTP_PW    = 4'd6,   // as in mtp_gen
  parameter logic [N_BANDS-1:0][TIME_W-1:0] BCP_ADV   = {4'd3, 4'd2, 4'd1}, // band 2..0
  parameter logic [N_BANDS-1:0][TIME_W-1:0] BCP_DELTA = {4'd3, 4'd2, 4'd1}  // band 2..0
) (
  input  logic               clk,
  input  logic               rst,    // synchronous, active high
  input  logic               tick,   // timing tick from clk_gen
  input  logic               pt,     // pre-trigger
  input  logic               mtp,    // main transmission pulse
  output logic [N_BANDS-1:0] bcp     // blanking cover pulse per band
);

  // Largest count any window reaches: delay + width + longest delta
  function automatic int unsigned max_delta();
    int unsigned m = 0;
    for (int b = 0; b < N_BANDS; b++)
      if (int'(BCP_DELTA[b]) > m) m = int'(BCP_DELTA[b]);
    return m;
  endfunction

  localparam int unsigned T_END = int'(MTP_DELAY) + int'(MTP_PW) + max_delta();
  localparam int unsigned TW    = $clog2(T_END + 1);

  logic          pt_s;      // PT as read on the previous tick
  logic          active;    // counting since a PT trailing edge
  logic [TW-1:0] t;         // ticks since the PT trailing edge

  always_ff @(posedge clk) begin
    if (rst) begin
      pt_s   <= 1'b0;
      active <= 1'b0;
      t      <= '0;
    end else if (tick) begin
      pt_s <= pt;
      if (pt_s && !pt) begin
        // The fall is first read one tick after it happened
        active <= 1'b1;
        t      <= TW'(1);
      end else if (active) begin
        if (t == TW'(T_END - 1)) begin
          active <= 1'b0;
          t      <= '0;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

  // Window of band b: ticks [MTP_DELAY - ADV, MTP_DELAY + MTP_PW + DELTA)
  always_comb begin
    for (int b = 0; b < N_BANDS; b++) begin
      bcp[b] = mtp ||
               (active &&
                (t >= TW'(int'(MTP_DELAY) - int'(BCP_ADV[b]))) &&
                (t <  TW'(int'(MTP_DELAY) + int'(MTP_PW) + int'(BCP_DELTA[b]))));
    end
  end

  initial begin
    for (int b = 0; b < N_BANDS; b++)
      assert (BCP_ADV[b] < MTP_DELAY)
        else $error("bcp_gen: BCP_ADV of each band must be below MTP_DELAY");
  end

endmodule
