// tb_bim: self-checking testbench of the blanking interface module.
//
// Runs the module with a timing different from its defaults (tick every 2
// clocks, PT 3 high / 30 low, MTP 5 ticks after the PT fall and 4 wide,
// advances 4/2/1 and deltas 2/3/6 ticks for bands 1/2/3) and checks every
// edge in clocks: PT high and low times, MTP delay and width, each band's
// cover opening advance ticks before the MTP and closing delta ticks after
// it, one cover per band per radar period, and nothing while disabled or in
// reset.
module tb_bim;
  localparam int DIV = 2, PW = 3, PRI = 30, DLY = 5, MPW = 4;
  localparam int ADV[3]   = '{4, 2, 1};
  localparam int DELTA[3] = '{2, 3, 6};

  logic       clk = 1'b0, rst, en;
  logic       bcp1, bcp2, bcp3, pt, mtp;
  logic [2:0] bcp, bcp_q = '0;
  int         checks = 0, failures = 0;
  int         cyc = 0, pt_rise = -1, pt_fall = -1, mtp_rise = -1, mtp_fall = -1;
  int         bcp_rise[3] = '{-1, -1, -1};
  int         n_bcp[3] = '{0, 0, 0};
  int         n_pt = 0, n_mtp = 0;
  logic       pt_q = 1'b0, mtp_q = 1'b0;

  bim #(
    .CLK_DIV(2), .PT_PW(4'd3), .PT_PRI(8'd30), .MTP_DELAY(4'd5), .MTP_PW(4'd4),
    .BCP_ADV({4'd1, 4'd2, 4'd4}), .BCP_DELTA({4'd6, 4'd3, 4'd2})
  ) dut (.clk(clk), .rst(rst), .en(en), .bcp1(bcp1), .bcp2(bcp2), .bcp3(bcp3), .pt(pt), .mtp(mtp));

  assign bcp = {bcp3, bcp2, bcp1};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) begin
    automatic logic en_seen  = en;
    automatic logic rst_seen = rst;
    #1;
    cyc++;
    if (rst_seen) check(!pt && !mtp && bcp == '0, "all low in reset");
    if (pt && !pt_q) begin
      if (pt_fall >= 0) check(cyc - pt_fall == PRI * DIV, "PT low time");
      pt_rise = cyc; n_pt++;
    end
    if (!pt && pt_q) begin
      check(cyc - pt_rise == PW * DIV, "PT high time");
      pt_fall = cyc;
    end
    if (mtp && !mtp_q) begin
      check(cyc - pt_fall == DLY * DIV, "MTP delay");
      for (int b = 0; b < 3; b++)
        check(bcp_rise[b] >= 0 && mtp_rise < bcp_rise[b] && cyc - bcp_rise[b] == ADV[b] * DIV,
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
    if (mtp) check(bcp == 3'b111, "covered during MTP");
    if (!en_seen) pt_fall = -1;
    pt_q = pt; mtp_q = mtp; bcp_q = bcp;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    check(!pt && bcp == '0, "nothing while disabled");
    en <= 1'b1;
    repeat ((PW + PRI) * DIV * 8) @(posedge clk);
    for (int b = 0; b < 3; b++) check(n_bcp[b] == n_mtp, "one cover per band per period");
    check(n_pt >= 7 && n_mtp >= 7, "enough periods");
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
