// tb_mtp_module: self-checking testbench of the radar trigger group.
//
// Runs the clock generator, PT generator and MTP generator together at their
// default settings (tick every 4 clocks, PT 4 ticks high and 40 low, MTP 4
// ticks after the PT fall and 6 ticks wide) and checks every edge in clocks
// against those numbers, the tick spacing, and that enable stops the train.
module tb_mtp_module;
  localparam int DIV = 4, PW = 4, PRI = 40, DLY = 4, MPW = 6;

  logic clk = 1'b0, rst, en, tick, pt, mtp;
  int   checks = 0, failures = 0;
  int   cyc = 0, last_tick = -1, pt_rise = -1, pt_fall = -1, mtp_rise = -1;
  int   n_pt = 0, n_mtp = 0;
  logic pt_q = 1'b0, mtp_q = 1'b0;

  mtp_module dut (.clk(clk), .rst(rst), .en(en), .tick(tick), .pt(pt), .mtp(mtp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    automatic logic en_seen = en;
    #1;
    cyc++;
    if (tick) begin
      if (last_tick >= 0) check(cyc - last_tick == DIV, "tick spacing");
      last_tick = cyc;
    end
    if (pt && !pt_q) begin
      if (pt_fall >= 0) check(cyc - pt_fall == PRI * DIV, "PT low time");
      pt_rise = cyc; n_pt++;
    end
    if (!pt && pt_q) begin
      if (en_seen) check(cyc - pt_rise == PW * DIV, "PT high time");
      pt_fall = en_seen ? cyc : -1;
    end
    if (mtp && !mtp_q) begin
      check(pt_fall >= 0 && cyc - pt_fall == DLY * DIV, "MTP delay");
      mtp_rise = cyc; n_mtp++;
    end
    if (!mtp && mtp_q) check(cyc - mtp_rise == MPW * DIV, "MTP width");
    if (!en_seen) begin check(!pt, "PT low while disabled"); pt_fall = -1; end
    pt_q = pt; mtp_q = mtp;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    en <= 1'b1;
    repeat ((PW + PRI) * DIV * 5) @(posedge clk);
    en <= 1'b0;
    repeat (300) @(posedge clk);
    en <= 1'b1;
    repeat ((PW + PRI) * DIV * 3) @(posedge clk);
    check(n_pt >= 7 && n_mtp >= 7, "enough pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
