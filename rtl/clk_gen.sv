// clk_gen: free-running clock generator of the blanking interface.
//
// Divides the board clock into a timing tick: tick is high for one clock in
// every CLK_DIV clocks, and all pulse widths and delays of the blanking
// interface are counted in these ticks. It runs freely from the end of reset;
// the first tick comes CLK_DIV clocks after reset is released (a single clock
// when CLK_DIV is 1, for which tick is high on every clock). The block is
// named in the specification only; building it as a clock-enable divider
// rather than a derived clock, and the divide ratio, are this design's own
// choices.
module clk_gen #(
  parameter int unsigned CLK_DIV = 4   // clocks per tick, at least 1
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  output logic tick    // one-clock pulse every CLK_DIV clocks
);

  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [CW-1:0] div_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      tick    <= 1'b0;
    end else if (div_cnt == CW'(CLK_DIV - 1)) begin
      div_cnt <= '0;
      tick    <= 1'b1;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      tick    <= 1'b0;
    end
  end

  initial assert (CLK_DIV >= 1) else $error("clk_gen: CLK_DIV must be at least 1");

endmodule
