// tb_clk_gen: self-checking testbench of the clock generator.
//
// Runs two instances, the default divide ratio (4) and a ratio of 3, and
// checks that each tick is exactly one clock long, that consecutive ticks
// are exactly CLK_DIV clocks apart, that the first tick comes CLK_DIV clocks
// after reset is released, and that reset stops the ticks.
module tb_clk_gen;
  logic clk = 1'b0, rst;
  logic tick4, tick3;
  int   checks = 0, failures = 0;
  int   cyc = 0, last4 = -1, last3 = -1, n4 = 0, n3 = 0;

  clk_gen               dut4 (.clk(clk), .rst(rst), .tick(tick4));
  clk_gen #(.CLK_DIV(3)) dut3 (.clk(clk), .rst(rst), .tick(tick3));

  always #5 clk = ~clk;

  // cyc counts clock edges since reset was released
  always @(posedge clk) begin
    automatic logic rst_seen = rst;   // reset as the DUT samples it
    #1;
    if (!rst_seen) begin
      cyc++;
      if (tick4) begin
        checks++;
        if ((last4 < 0 && cyc != 4) || (last4 >= 0 && cyc - last4 != 4)) begin
          failures++; $display("FAIL tick4 at %0d (last %0d)", cyc, last4);
        end
        last4 = cyc; n4++;
      end
      if (tick3) begin
        checks++;
        if ((last3 < 0 && cyc != 3) || (last3 >= 0 && cyc - last3 != 3)) begin
          failures++; $display("FAIL tick3 at %0d (last %0d)", cyc, last3);
        end
        last3 = cyc; n3++;
      end
    end else begin
      checks++;
      if (tick4 || tick3) begin failures++; $display("FAIL tick during reset"); end
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (120) @(posedge clk);
    #2;
    checks++;
    if (n4 < 25 || n3 < 35) begin failures++; $display("FAIL too few ticks %0d %0d", n4, n3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
