// tb_bcp_gen: self-checking testbench of the blanking cover pulse generator.
//
// The bench makes a tick every 3 clocks and, on that grid, a radar timing of
// its own: PT high 2 ticks in every 22, MTP from 5 to 8 ticks after each PT
// fall. The generator is set to match (MTP_DELAY 5, MTP_PW 3) with advances
// 1/2/4 and deltas 1/5/2 ticks for bands 1/2/3. For each band the bench
// checks that the cover rises (5 - advance) ticks and falls (8 + delta)
// ticks after the PT fall, i.e. opens before and closes after the MTP. At the
// end the bench sends a lone MTP with no pre-trigger and checks that every
// band follows it (the composite part of the pulse). Reset holds all low.
module tb_bcp_gen;
  localparam int DIV = 3;
  localparam int ADV[3]   = '{1, 2, 4};
  localparam int DELTA[3] = '{1, 5, 2};

  logic       clk = 1'b0, rst, tick, pt, mtp;
  logic       lone;
  logic [2:0] bcp, bcp_q = '0;
  int         checks = 0, failures = 0;
  int         cyc = 0, div_cnt = 0, k = 0, pt_fall = -1;
  int         n_rise[3] = '{0, 0, 0};
  int         n_lone = 0;
  logic       pt_q = 1'b0;

  bcp_gen #(
    .MTP_DELAY(4'd5), .MTP_PW(4'd3),
    .BCP_ADV  ({4'd4, 4'd2, 4'd1}),
    .BCP_DELTA({4'd2, 4'd5, 4'd1})
  ) dut (.clk(clk), .rst(rst), .tick(tick), .pt(pt), .mtp(mtp), .bcp(bcp));

  always #5 clk = ~clk;

  // Bench radar timing on the tick grid
  always @(posedge clk) begin
    if (rst) begin
      div_cnt <= 0; tick <= 1'b0; pt <= 1'b0; mtp <= 1'b0; k <= 0;
    end else begin
      div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
      tick    <= (div_cnt == DIV - 1);
      if (tick) begin
        k   <= (k == 21) ? 0 : k + 1;
        pt  <= !lone && (k < 2);
        mtp <= lone ? (k >= 10 && k < 12) : (k >= 6 && k < 9);
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
    if (rst_seen) check(bcp == '0, "BCP low in reset");
    if (!pt && pt_q) pt_fall = cyc;
    if (!lone && !rst_seen) begin
      for (int b = 0; b < 3; b++) begin
        if (bcp[b] && !bcp_q[b]) begin
          check(cyc - pt_fall == (5 - ADV[b]) * DIV, $sformatf("band %0d opens early", b + 1));
          n_rise[b]++;
        end
        if (!bcp[b] && bcp_q[b])
          check(cyc - pt_fall == (8 + DELTA[b]) * DIV, $sformatf("band %0d closes late", b + 1));
      end
    end
    if (mtp) check(bcp == 3'b111, "all bands covered during MTP");
    if (lone) check(bcp == {3{mtp}}, "lone MTP passes to every band");
    if (lone && mtp) n_lone++;
    pt_q = pt; bcp_q = bcp;
  end

  initial begin
    rst = 1'b1; lone = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (22 * DIV * 10) @(posedge clk);
    // Let the last window finish, then send MTPs with no pre-trigger
    wait (k == 20);
    @(posedge clk);
    lone <= 1'b1;
    repeat (22 * DIV * 2) @(posedge clk);
    for (int b = 0; b < 3; b++) check(n_rise[b] >= 9, "enough covers");
    check(n_lone > 0, "lone MTP was sent");
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
