// tb_mtp_gen: self-checking testbench of the main transmission pulse generator.
//
// The bench makes a tick every 2 clocks and a pre-trigger on that tick grid
// (3 ticks high, 15 low). Two generators watch it: one with the default
// timing (delay 4, width 6) and one with delay 1, width 2. For every PT
// trailing edge the bench checks, in clocks, that MTP rises exactly
// delay*2 clocks after PT fell, stays high exactly width*2 clocks, and that
// there is exactly one MTP per PT pulse. Reset must hold MTP low.
module tb_mtp_gen;
  localparam int DIV = 2;

  logic clk = 1'b0, rst, tick, pt;
  logic mtp_a, mtp_b;
  int   checks = 0, failures = 0;
  int   cyc = 0, div_cnt = 0, k = 0;
  int   pt_fall = -1, rise_a = -1, rise_b = -1, n_a = 0, n_b = 0, n_pt = 0;
  logic pt_q = 1'b0, a_q = 1'b0, b_q = 1'b0;

  mtp_gen                                      dut_a (.clk(clk), .rst(rst), .tick(tick), .pt(pt), .mtp(mtp_a));
  mtp_gen #(.MTP_DELAY(4'd1), .MTP_PW(4'd2))   dut_b (.clk(clk), .rst(rst), .tick(tick), .pt(pt), .mtp(mtp_b));

  always #5 clk = ~clk;

  // Bench tick and pre-trigger: PT high for ticks 0..2 of every 18
  always @(posedge clk) begin
    if (rst) begin
      div_cnt <= 0; tick <= 1'b0; pt <= 1'b0; k <= 0;
    end else begin
      div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
      tick    <= (div_cnt == DIV - 1);
      if (tick) begin
        k  <= (k == 17) ? 0 : k + 1;
        pt <= (k < 3);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    automatic logic rst_seen = rst;
    #1;
    cyc++;
    if (rst_seen) check(!mtp_a && !mtp_b, "MTP low in reset");
    if (!pt && pt_q) begin pt_fall = cyc; n_pt++; end
    if (mtp_a && !a_q) begin
      check(cyc - pt_fall == 4 * DIV, "A delay 4 ticks"); rise_a = cyc; n_a++;
    end
    if (!mtp_a && a_q) check(cyc - rise_a == 6 * DIV, "A width 6 ticks");
    if (mtp_b && !b_q) begin
      check(cyc - pt_fall == 1 * DIV, "B delay 1 tick"); rise_b = cyc; n_b++;
    end
    if (!mtp_b && b_q) check(cyc - rise_b == 2 * DIV, "B width 2 ticks");
    check(!(pt && (mtp_a || mtp_b)), "MTP never overlaps PT");
    pt_q = pt; a_q = mtp_a; b_q = mtp_b;
  end

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (18 * DIV * 12 + 5) @(posedge clk);
    check(n_pt >= 10 && n_a >= n_pt - 1 && n_a <= n_pt && n_b == n_pt, "one MTP per PT");
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
