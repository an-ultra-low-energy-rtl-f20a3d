// Testbench for pdl_lut: for every configuration, launches a rising and a
// falling edge on the signal input and checks the output is the inverse
// and arrives exactly after the delay expected from the LUT delay model
// (1.248 ns + 11 ps * cfg / 31, in fs, recomputed here).
module tb_pdl_lut;
  timeunit 1fs;
  timeprecision 1fs;

  logic [5:0] a;
  logic       o;
  int checks = 0, failures = 0;

  pdl_lut dut (.a, .o);

  function automatic longint expected_fs(int cfg);
    return 64'd1_248_000 + (64'd11_000 * cfg) / 31;
  endfunction

  task automatic edge_test(int cfg, bit val);
    time t0, t1;
    a = {val, 5'(cfg)};
    t0 = $time;
    @(o);
    t1 = $time;
    checks++;
    if (o !== ~val || (t1 - t0) != time'(expected_fs(cfg))) begin
      failures++;
      $display("FAIL cfg=%0d val=%0b o=%0b delay=%0d fs expected %0d", cfg, val, o, t1 - t0,
               expected_fs(cfg));
    end
    #(2_000_000);
  endtask

  initial begin
    #(1_000_000_000);  // watchdog: 1 us
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 6'b100000;
    #(3_000_000);  // settle: o = 0
    for (int cfg = 0; cfg < 32; cfg++) begin
      a = {1'b1, 5'(cfg)};
      #(2_000_000);
      edge_test(cfg, 1'b0);
      edge_test(cfg, 1'b1);
    end
    // Largest difference between two configurations is 11 ps.
    checks++;
    if (expected_fs(31) - expected_fs(0) != 11_000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
