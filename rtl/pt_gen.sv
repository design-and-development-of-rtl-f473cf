// pt_gen: pre-trigger (PT) generator.
//
// Produces the radar pre-trigger as a fixed pulse train: PT is high for PT_PW
// ticks and then low for PT_PRI ticks, over and over, for as long as enable
// is high. The widths are fixed parameters, PT_PW a 4-bit count as specified;
// PT_PRI is the low time, 8 bits wide by this design's own choice. When
// enable goes low PT drops at once and the train restarts from the beginning
// of a high phase at the first tick after enable returns; that restart
// behaviour and the default numbers are this design's own.
//
// Timing: PT changes only on a clock edge that samples tick high, so each
// phase lasts an exact number of ticks. PT rises on the first tick edge after
// enable is seen high, stays high PT_PW*CLK_DIV clocks and low
// PT_PRI*CLK_DIV clocks. A pulse cut short by enable falls on the clock
// edge that samples enable low, which need not be a tick edge, and still
// counts as a trailing edge for the MTP generator.
module pt_gen
  import icu_pkg::*;
#(
  parameter time4_t PT_PW  = 4'd4,   // high time of PT in ticks, at least 1
  parameter pri_t   PT_PRI = 8'd40   // low time of PT in ticks, at least 1
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic en,      // enable of the pulse train
  input  logic tick,    // timing tick from clk_gen
  output logic pt       // pre-trigger
);

  localparam int unsigned PERIOD = int'(PT_PW) + int'(PT_PRI);
  localparam int unsigned PW_W   = $clog2(PERIOD + 1);

  logic            run;       // train has started
  logic [PW_W-1:0] phase;     // tick count within one period

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      run   <= 1'b0;
      phase <= '0;
    end else if (tick) begin
      if (!run) begin
        run   <= 1'b1;
        phase <= '0;
      end else if (phase == PW_W'(PERIOD - 1)) begin
        phase <= '0;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  assign pt = run && (phase < PW_W'(PT_PW));

  initial assert (PT_PW >= 1 && PT_PRI >= 1)
    else $error("pt_gen: PT_PW and PT_PRI must be at least 1");

endmodule
