// LUT delay measurement sweep: for each of the 32 configurations of the
// 10-LUT chain, searches the measurement clock period at which the
// timing error catcher's error probability switches from 0 to 1 (bisection
// down to 20 fs) and derives the per-LUT delay as that period / 10. The
// result must match the LUT delay model (1.248 ns + 11 ps * cfg / 31)
// within 5 fs per LUT, and the largest measured difference, between
// 00000 and 11111, must be 11 ps. Windows of 200 pulses keep it short.
module tb_delay_sweep;
  timeunit 1fs;
  timeprecision 1fs;

  localparam int PULSES = 200;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0] cfg = '0;
  logic err, busy, done;
  logic [$clog2(PULSES+1)-1:0] err_count;
  longint half_fs = 7_000_000;
  longint per_lut [32];
  int checks = 0, failures = 0;

  delay_char u_dc (.clk, .rst_n, .cfg, .err);
  timing_error_catcher #(.PULSES(PULSES)) u_tec (.clk, .rst_n, .start, .err, .busy, .done,
                                                 .err_count);

  always #(half_fs) clk = ~clk;

  // Error probability (in pulses) at one clock period.
  task automatic window(longint period_fs, output int count);
    half_fs = period_fs / 2;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1000;
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    #1000;
    start = 1'b1;
    @(posedge clk);
    #1000;
    start = 1'b0;
    while (!done) @(posedge clk);
    #1000;
    count = int'(err_count);
  endtask

  initial begin
    #(64'd5_000_000_000_000);  // watchdog: 5 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      longint lo, hi, mid, model;
      int n;
      cfg = 5'(c);
      lo = 12_000_000;  // fails here
      hi = 13_000_000;  // passes here
      window(lo, n);
      checks++;
      if (n != PULSES) begin
        failures++;
        $display("FAIL cfg=%0d: %0d errors at %0d fs", c, n, lo);
      end
      window(hi, n);
      checks++;
      if (n != 0) begin
        failures++;
        $display("FAIL cfg=%0d: %0d errors at %0d fs", c, n, hi);
      end
      while (hi - lo > 20) begin
        mid = (lo + hi) / 2;
        window(mid, n);
        if (n == 0) hi = mid;
        else lo = mid;
      end
      per_lut[c] = hi / 10;
      model = 64'd1_248_000 + (64'd11_000 * c) / 31;
      checks++;
      if (per_lut[c] - model > 5 || model - per_lut[c] > 5) begin
        failures++;
        $display("FAIL cfg=%0d: measured %0d fs per LUT, model %0d", c, per_lut[c], model);
      end
    end
    $display("per-LUT delay 00000: %0d fs, 11111: %0d fs", per_lut[0], per_lut[31]);
    checks++;
    if ((per_lut[31] - per_lut[0] + 500) / 1000 != 11) begin
      failures++;
      $display("FAIL largest difference %0d fs", per_lut[31] - per_lut[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
