// tb_icu_top: end-to-end testbench of the interface controller unit.
//
// Runs the top with every parameter at its default. The blanking side runs
// freely while the bench changes the gyro input, offset and polarity every
// few clocks. Checks, in clocks: PT 4 ticks high and 40 low (tick = 4
// clocks), MTP 4 ticks after each PT fall and 6 wide, band 1/2/3 covers
// opening 1/2/3 ticks before the MTP and closing 1/2/3 ticks after it; and
// the corrected gyro data against (input +/- offset) mod 4096 with valid
// high. Enable is dropped once in the middle of a PT pulse and raised again,
// and reset is applied once more mid-run. Every mechanism is counted:
// positive and negative correction, wrap past 360 and below 0 degrees, PT,
// MTP, each band's cover, the enable stop and the reset; one that never
// happened counts as a failure.
module tb_icu_top;
  import icu_pkg::*;
  localparam int DIV = 4, PW = 4, PRI = 40, DLY = 4, MPW = 6;
  localparam int ADV[3]   = '{1, 2, 3};
  localparam int DELTA[3] = '{1, 2, 3};

  logic       clk = 1'b0, rst, en, polarity;
  gyro_t      gyro_in, gyro_off, gyro_corr;
  logic       gyro_valid;
  logic       bcp1, bcp2, bcp3, pt, mtp;
  logic [2:0] bcp, bcp_q = '0;
  int         checks = 0, failures = 0;
  int         cyc = 0, pt_rise = -1, pt_fall = -1, mtp_ref = -1, mtp_rise = -1, mtp_fall = -1;
  int         bcp_rise[3] = '{-1, -1, -1};
  logic       pt_q = 1'b0, mtp_q = 1'b0, cut = 1'b0;
  // Mechanism counters
  int         n_pos = 0, n_neg = 0, n_wrap_hi = 0, n_wrap_lo = 0, n_reset = 0;
  int         n_pt = 0, n_mtp = 0, n_stop = 0;
  int         n_bcp[3] = '{0, 0, 0};

  icu_top dut (
    .clk(clk), .rst(rst), .en(en), .gyro_in(gyro_in), .gyro_off(gyro_off),
    .polarity(polarity), .bcp1(bcp1), .bcp2(bcp2), .bcp3(bcp3), .pt(pt), .mtp(mtp),
    .gyro_corr(gyro_corr), .gyro_valid(gyro_valid)
  );

  assign bcp = {bcp3, bcp2, bcp1};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // Blanking side: edge timing
  always @(posedge clk) begin
    automatic logic en_seen  = en;
    automatic logic rst_seen = rst;
    #1;
    cyc++;
    if (rst_seen) begin
      check(!pt && !mtp && bcp == '0, "blanking outputs low in reset");
      pt_fall = -1; mtp_ref = -1; mtp_rise = -1; mtp_fall = -1;
      bcp_rise = '{-1, -1, -1};
    end else begin
      if (pt && !pt_q) begin
        if (pt_fall >= 0) check(cyc - pt_fall == PRI * DIV, "PT low time");
        pt_rise = cyc; n_pt++;
      end
      if (!pt && pt_q) begin
        if (en_seen) check(cyc - pt_rise == PW * DIV, "PT high time");
        else n_stop++;
        pt_fall = en_seen ? cyc : -1;
        mtp_ref = cyc;
        cut     = !en_seen;
      end
      if (mtp && !mtp_q) begin
        // A pre-trigger cut short by enable falls between ticks; the delay
        // then counts from the next tick that reads it low
        if (cut) check(mtp_ref >= 0 && cyc - mtp_ref > (DLY - 1) * DIV && cyc - mtp_ref <= DLY * DIV,
                       "MTP delay after a cut pre-trigger");
        else     check(mtp_ref >= 0 && cyc - mtp_ref == DLY * DIV, "MTP delay");
        for (int b = 0; b < 3; b++)
          check(bcp_rise[b] > mtp_rise && cyc - bcp_rise[b] == ADV[b] * DIV,
                $sformatf("band %0d advance", b + 1));
        mtp_rise = cyc; n_mtp++;
      end
      if (!mtp && mtp_q) begin
        check(cyc - mtp_rise == MPW * DIV, "MTP width");
        mtp_fall = cyc;
      end
      for (int b = 0; b < 3; b++) begin
        if (bcp[b] && !bcp_q[b]) begin bcp_rise[b] = cyc; n_bcp[b]++; end
        if (!bcp[b] && bcp_q[b])
          check(mtp_fall > bcp_rise[b] && cyc - mtp_fall == DELTA[b] * DIV,
                $sformatf("band %0d delta", b + 1));
      end
      if (mtp) check(bcp == 3'b111, "all bands covered during MTP");
      if (!en_seen) check(!pt, "PT low while disabled");
      if (!en_seen) pt_fall = -1;
    end
    pt_q = pt; mtp_q = mtp; bcp_q = bcp;
  end

  // Gyro side: new operands every 3 clocks, checked against the reference
  task automatic gyro_step();
    int a, b, exp;
    a = int'($urandom_range(0, 4095));
    b = int'($urandom_range(0, 4095));
    // Keep some operands near the wrap points
    if ($urandom_range(0, 3) == 0) begin
      a = int'($urandom_range(4000, 4095));
      b = int'($urandom_range(0, 200));
    end
    gyro_in  = gyro_t'(a);
    gyro_off = gyro_t'(b);
    polarity = 1'($urandom_range(0, 1));
    #1;
    if (rst) begin
      check(gyro_corr == '0 && !gyro_valid, "gyro output cleared in reset");
      return;
    end
    if (polarity) begin
      exp = (a - b + 4096) % 4096;
      n_neg++;
      if (a < b) n_wrap_lo++;
    end else begin
      exp = (a + b) % 4096;
      n_pos++;
      if (a + b >= 4096) n_wrap_hi++;
    end
    check(int'(gyro_corr) == exp && gyro_valid, "corrected gyro data");
  endtask

  initial begin
    gyro_in = '0; gyro_off = '0; polarity = 1'b0;
    forever begin
      @(negedge clk);
      gyro_step();
      repeat (2) @(negedge clk);
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    en <= 1'b1;
    repeat ((PW + PRI) * DIV * 4) @(posedge clk);
    // Drop enable in the middle of a PT pulse, then restart the train
    wait (pt == 1'b1);
    repeat (DIV) @(posedge clk);
    en <= 1'b0;
    repeat (100) @(posedge clk);
    en <= 1'b1;
    repeat ((PW + PRI) * DIV * 3) @(posedge clk);
    // Reset once more in the middle of operation
    rst <= 1'b1; n_reset++;
    repeat (6) @(posedge clk);
    rst <= 1'b0;
    repeat ((PW + PRI) * DIV * 3) @(posedge clk);
    check(n_pos > 0,     "positive correction happened");
    check(n_neg > 0,     "negative correction happened");
    check(n_wrap_hi > 0, "wrap past 360 degrees happened");
    check(n_wrap_lo > 0, "wrap below 0 degrees happened");
    check(n_pt >= 9,     "PT pulses happened");
    check(n_mtp >= 9,    "MTP pulses happened");
    check(n_stop > 0,    "enable stop happened");
    check(n_reset > 0,   "reset happened");
    for (int b = 0; b < 3; b++)
      check(n_bcp[b] == n_mtp, $sformatf("band %0d covered every MTP", b + 1));
    $display("mechanisms: pos=%0d neg=%0d wrap_hi=%0d wrap_lo=%0d pt=%0d mtp=%0d bcp=%0d/%0d/%0d stop=%0d reset=%0d",
             n_pos, n_neg, n_wrap_hi, n_wrap_lo, n_pt, n_mtp, n_bcp[0], n_bcp[1], n_bcp[2], n_stop, n_reset);
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
