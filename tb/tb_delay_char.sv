// Testbench for delay_char: runs the launch/sample/capture circuit at
// several clock periods and configurations and checks that err stays 0
// when the period exceeds the CUT delay and is 1 on every cycle when the
// CUT delay lies between one and two periods. The CUT delay is recomputed
// here as 10 * (1.248 ns + 11 ps * cfg / 31).
module tb_delay_char;
  timeunit 1fs;
  timeprecision 1fs;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [4:0] cfg;
  logic       err;
  longint     half_fs = 10_000_000;
  int checks = 0, failures = 0;

  delay_char dut (.clk, .rst_n, .cfg, .err);

  always #(half_fs) clk = ~clk;

  function automatic longint cut_fs(int c);
    return 10 * (64'd1_248_000 + (64'd11_000 * c) / 31);
  endfunction

  task automatic run(int c, longint period_fs);
    int errs;
    bit expect_err;
    expect_err = cut_fs(c) > period_fs;
    rst_n = 1'b0;
    cfg = 5'(c);
    half_fs = period_fs / 2;
    repeat (4) @(posedge clk);
    #(1000);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);  // warm-up
    errs = 0;
    for (int k = 0; k < 40; k++) begin
      @(posedge clk);
      #(1000);
      if (err) errs++;
    end
    checks++;
    if (errs != (expect_err ? 40 : 0)) begin
      failures++;
      $display("FAIL cfg=%0d period=%0d fs: %0d errors, expected %0d", c, period_fs, errs,
               expect_err ? 40 : 0);
    end
  endtask

  initial begin
    #(64'd100_000_000_000);  // watchdog: 100 us
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    cfg = '0;
    run(0, 14_000_000);   // 12.48 ns chain at 14 ns: passes
    run(0, 12_000_000);   // at 12 ns: fails every cycle
    run(31, 12_540_000);  // 12.59 ns chain at 12.54 ns: fails
    run(0, 12_540_000);   // 12.48 ns chain at 12.54 ns: passes
    for (int k = 0; k < 8; k++)
      run(int'($urandom_range(0, 31)), 64'(12_400_000 + 50_000 * int'($urandom_range(0, 6))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
