// tb_pt_gen: self-checking testbench of the pre-trigger generator.
//
// Runs the generator with PT_PW = 3, PT_PRI = 7 on a tick the bench makes
// every 3 clocks, and checks in clocks: PT rises on the first tick edge after
// enable, every high phase lasts 3 ticks and every low phase 7 ticks, PT
// drops on the clock after enable falls and stays low while enable is low,
// and reset holds PT low. A second instance with the default parameters
// (4 high, 40 low) runs on the same tick and is checked the same way.
module tb_pt_gen;
  localparam int DIV = 3;

  logic clk = 1'b0, rst, en, tick;
  logic pt_a, pt_b;
  int   checks = 0, failures = 0;
  int   cyc = 0, div_cnt = 0;
  int   rise_a = -1, fall_a = -1, rise_b = -1, fall_b = -1;
  int   n_rise_a = 0, n_rise_b = 0;
  logic pt_a_q = 1'b0, pt_b_q = 1'b0;
  logic expect_start = 1'b1;

  pt_gen #(.PT_PW(4'd3), .PT_PRI(8'd7)) dut_a (.clk(clk), .rst(rst), .en(en), .tick(tick), .pt(pt_a));
  pt_gen                                dut_b (.clk(clk), .rst(rst), .en(en), .tick(tick), .pt(pt_b));

  always #5 clk = ~clk;

  // Bench-side tick, one clock in DIV
  always @(posedge clk) begin
    div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
    tick    <= (div_cnt == DIV - 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Sample just after each edge; the *_q copies hold the values before it
  always @(posedge clk) begin
    automatic logic tick_seen = tick;
    automatic logic en_seen   = en;
    automatic logic rst_seen  = rst;
    #1;
    cyc++;
    if (rst_seen) check(!pt_a && !pt_b, "PT low in reset");
    if (!en_seen && !rst_seen) check(!pt_a && !pt_b, "PT low while disabled");
    // Instance A
    if (pt_a && !pt_a_q) begin
      check(tick_seen, "A rises on a tick edge");
      if (fall_a >= 0) check(cyc - fall_a == 7 * DIV, "A low phase is 7 ticks");
      rise_a = cyc; n_rise_a++;
    end
    if (!pt_a && pt_a_q) begin
      if (en_seen) check(cyc - rise_a == 3 * DIV, "A high phase is 3 ticks");
      fall_a = en_seen ? cyc : -1;
    end
    // Instance B
    if (pt_b && !pt_b_q) begin
      if (fall_b >= 0) check(cyc - fall_b == 40 * DIV, "B low phase is 40 ticks");
      rise_b = cyc; n_rise_b++;
    end
    if (!pt_b && pt_b_q) begin
      if (en_seen) check(cyc - rise_b == 4 * DIV, "B high phase is 4 ticks");
      fall_b = en_seen ? cyc : -1;
    end
    // The first tick edge with enable high must start the train
    if (!en_seen || rst_seen) expect_start = 1'b1;
    else if (expect_start && tick_seen) begin
      check(pt_a && pt_b, "train starts on first enabled tick");
      expect_start = 1'b0;
    end
    pt_a_q = pt_a; pt_b_q = pt_b;
  end

  initial begin
    rst = 1'b1; en = 1'b0; tick = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    en <= 1'b1;
    repeat (400) @(posedge clk);
    en <= 1'b0;                    // stop in the middle of a period
    repeat (20) @(posedge clk);
    en <= 1'b1;
    repeat (700) @(posedge clk);
    check(n_rise_a >= 30 && n_rise_b >= 6, "enough pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
