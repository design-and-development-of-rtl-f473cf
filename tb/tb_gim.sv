// tb_gim: self-checking testbench of the gyro interface module.
//
// Drives random gyro inputs and offsets with both polarity settings and
// compares the corrected heading with (input + offset) mod 4096 for polarity
// low and (input - offset) mod 4096 for polarity high, worked out here. Also
// runs the specification's example (0xFE8 + 0x038 = 0x020) and checks that
// reset forces zero output and a low valid bit in both polarities.
module tb_gim;
  import icu_pkg::*;

  logic      rst;
  gyro_t     gyro_in, gyro_off, gyro_corr;
  corr_sel_e polarity;
  logic      gyro_valid;
  int        checks = 0, failures = 0;
  int        n_pos = 0, n_neg = 0;

  gim dut (.rst(rst), .gyro_in(gyro_in), .gyro_off(gyro_off), .polarity(polarity),
           .gyro_corr(gyro_corr), .gyro_valid(gyro_valid));

  task automatic apply(input int a, input int b, input logic neg);
    int exp;
    gyro_in  = gyro_t'(a);
    gyro_off = gyro_t'(b);
    polarity = neg ? CORR_NEG : CORR_POS;
    #1;
    exp = neg ? (a - b + 4096) % 4096 : (a + b) % 4096;
    if (neg) n_neg++; else n_pos++;
    checks++;
    if (int'(gyro_corr) != exp || gyro_valid !== 1'b1) begin
      failures++;
      $display("FAIL pol=%b %h,%h: got %h valid %b, want %h", neg, a, b, gyro_corr, gyro_valid, exp);
    end
  endtask

  initial begin
    rst = 1'b1; gyro_in = 12'h555; gyro_off = 12'h0F0;
    for (int p = 0; p < 2; p++) begin
      polarity = corr_sel_e'(p[0]);
      #1;
      checks++;
      if (gyro_corr !== '0 || gyro_valid !== 1'b0) begin
        failures++; $display("FAIL reset pol=%0d", p);
      end
    end
    rst = 1'b0;
    apply('hFE8, 'h038, 1'b0);
    checks++;
    if (gyro_corr !== 12'h020) begin failures++; $display("FAIL example"); end
    apply('h020, 'h038, 1'b1);
    checks++;
    if (gyro_corr !== 12'hFE8) begin failures++; $display("FAIL reverse example"); end
    repeat (4000)
      apply(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)), 1'($urandom_range(0, 1)));
    checks++;
    if (n_pos < 100 || n_neg < 100) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
