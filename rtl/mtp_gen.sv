// mtp_gen: main transmission pulse (MTP) generator.
//
// Watches the pre-trigger and, on its trailing edge, plays out one main
// transmission pulse: MTP stays low for MTP_DELAY ticks counted from the tick
// edge on which PT fell, then is high for MTP_PW ticks, and the generator
// waits for the next trailing edge. Both counts are 4-bit fixed parameters as
// specified; their default values are this design's own.
//
// How it works: PT is sampled on every tick. The tick that first reads PT low
// after a high reading is one tick after the fall, so the delay counter
// starts at one there, and a delay of one goes straight to the pulse. The
// pulse therefore starts exactly MTP_DELAY ticks after PT fell, which is why
// MTP_DELAY must be at least 1. MTP changes only on tick edges.
module mtp_gen
  import icu_pkg::*;
#(
  parameter time4_t MTP_DELAY = 4'd4,  // low time after PT falls, in ticks (>= 1)
  parameter time4_t MTP_PW    = 4'd6   // high time of MTP, in ticks (>= 1)
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic tick,    // timing tick from clk_gen
  input  logic pt,      // pre-trigger
  output logic mtp      // main transmission pulse
);

  typedef enum logic [1:0] {
    MTP_IDLE,   // waiting for the PT trailing edge
    MTP_WAIT,   // delay period, MTP low
    MTP_HIGH    // transmission period, MTP high
  } mtp_state_e;

  mtp_state_e   state;
  time4_t       cnt;
  logic         pt_s;      // PT as read on the previous tick
  logic         pt_fall;

  assign pt_fall = pt_s && !pt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= MTP_IDLE;
      cnt   <= '0;
      pt_s  <= 1'b0;
    end else if (tick) begin
      pt_s <= pt;
      unique case (state)
        MTP_IDLE: begin
          if (pt_fall) begin
            cnt   <= (MTP_DELAY <= 4'd1) ? 4'd0 : 4'd1;
            state <= (MTP_DELAY <= 4'd1) ? MTP_HIGH : MTP_WAIT;
          end
        end
        MTP_WAIT: begin
          if (cnt == MTP_DELAY - 4'd1) begin
            cnt   <= '0;
            state <= MTP_HIGH;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        MTP_HIGH: begin
          if (cnt == MTP_PW - 4'd1) begin
            cnt   <= '0;
            state <= MTP_IDLE;
          end else begin
            cnt <= cnt + 4'd1;
          end
        end
        default: state <= MTP_IDLE;
      endcase
    end
  end

  assign mtp = (state == MTP_HIGH);

  initial assert (MTP_DELAY >= 1 && MTP_PW >= 1)
    else $error("mtp_gen: MTP_DELAY and MTP_PW must be at least 1");

endmodule
