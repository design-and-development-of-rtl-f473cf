// tb_neg_corr: self-checking testbench of the negative gyro correction.
//
// Applies the reverse of the specification's worked example (3 deg - 5 deg,
// codes 0x020 - 0x038, must give 0xFE8), the corner cases around the wrap
// and a few thousand random pairs, and compares with (input - offset) mod 4096
// computed here in integer arithmetic. Also checks that reset, or the block
// not being selected, forces the output to zero and clears valid.
module tb_neg_corr;
  import icu_pkg::*;

  logic  rst, sel;
  gyro_t gyro_in, gyro_off, gyro_corr;
  logic  valid;
  int    checks = 0, failures = 0;

  neg_corr dut (.rst(rst), .sel(sel), .gyro_in(gyro_in), .gyro_off(gyro_off),
                .gyro_corr(gyro_corr), .valid(valid));

  task automatic apply(input int a, input int b);
    int exp;
    gyro_in  = gyro_t'(a);
    gyro_off = gyro_t'(b);
    #1;
    exp = (a - b + 4096) % 4096;
    checks++;
    if (int'(gyro_corr) != exp || valid !== 1'b1) begin
      failures++;
      $display("FAIL neg %h - %h: got %h valid %b, want %h", a, b, gyro_corr, valid, exp);
    end
  endtask

  initial begin
    rst = 1'b0; sel = 1'b0; gyro_in = 12'hABC; gyro_off = 12'h123;
    #1;
    checks++;
    if (gyro_corr !== '0 || valid !== 1'b0) begin
      failures++; $display("FAIL not selected: got %h valid %b", gyro_corr, valid);
    end
    rst = 1'b1; sel = 1'b1;
    #1;
    checks++;
    if (gyro_corr !== '0 || valid !== 1'b0) begin
      failures++; $display("FAIL reset: got %h valid %b", gyro_corr, valid);
    end
    rst = 1'b0;
    apply('h020, 'h038);        // reverse of the worked example: 0xFE8
    checks++;
    if (gyro_corr !== 12'hFE8) begin failures++; $display("FAIL example"); end
    apply(0, 0);
    apply(0, 1);
    apply('hFFF, 'hFFF);
    apply('h800, 'h800);
    apply('h7FF, 'h800);
    repeat (4000) apply(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)));
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
