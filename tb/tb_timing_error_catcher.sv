// Testbench for timing_error_catcher: feeds random error patterns of
// various densities, counts the errors inside the PULSES-cycle window
// itself and checks the reported count, that errors outside the window are
// ignored, and that done comes exactly PULSES edges after the start edge.
module tb_timing_error_catcher;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int PULSES = 10_000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, err = 1'b0;
  logic busy, done;
  logic [$clog2(PULSES+1)-1:0] err_count;
  int checks = 0, failures = 0;

  timing_error_catcher dut (.clk, .rst_n, .start, .err, .busy, .done, .err_count);

  always #5 clk = ~clk;

  initial begin
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 5; run++) begin
      int pct, expected, edges;
      pct = (run == 0) ? 0 : (run == 4) ? 100 : int'($urandom_range(1, 99));
      err <= 1'b1;  // errors before the window must not count
      repeat (3) @(posedge clk);
      start <= 1'b1;
      err   <= ($urandom_range(0, 99) < pct);
      @(posedge clk);  // start edge
      start <= 1'b0;
      expected = 0;
      edges = 0;
      while (1) begin
        bit e;
        e = ($urandom_range(0, 99) < pct);
        if (edges < PULSES && e) expected++;  // sampled by edge edges+1
        err <= e;
        @(posedge clk);
        edges++;
        #1;
        if (done) break;
      end
      checks++;
      if (edges != PULSES) begin
        failures++;
        $display("FAIL done after %0d edges, expected %0d", edges, PULSES);
      end
      checks++;
      if (int'(err_count) != expected) begin
        failures++;
        $display("FAIL pct=%0d count=%0d expected %0d", pct, err_count, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
