// Testbench for matched_puf: applies random challenges and random PDL
// configurations and checks the response against an independent race
// model that tracks the absolute arrival times of both paths segment by
// segment (swapping the two paths where a challenge bit is 1) and lets the
// arbiter report 1 when the lower path arrives first. Also checks the
// one-cycle evaluation latency and that unused PDL slots add nothing.
module tb_matched_puf;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int N = 64, NP = 64, SEED = 1;  // the model's defaults

  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  logic [N+NP-1:0] challenge;
  pdl_cfg_t pdl_cfg [NP];
  logic response, valid;
  delay_t t_diff_fs;
  int checks = 0, failures = 0;

  matched_puf dut (.clk, .rst_n, .eval, .challenge, .pdl_cfg, .response, .valid, .t_diff_fs);

  always #5 clk = ~clk;

  function automatic longint lut_fs(int c);
    return 64'd1_248_000 + (64'd11_000 * c) / 31;
  endfunction

  // Absolute-time race: returns lower-first and the margin upper - lower.
  function automatic longint race(logic [N+NP-1:0] c);
    longint up, lo, t;
    up = 0;
    lo = 0;
    for (int i = 0; i < N + NP; i++) begin
      if (i < N) begin
        up += seg_delay_fs(SEED, i, 1'b0);
        lo += seg_delay_fs(SEED, i, 1'b1);
      end else begin
        up += longint'(pdl_cfg[i-N].luts) * lut_fs(int'(pdl_cfg[i-N].cu));
        lo += longint'(pdl_cfg[i-N].luts) * lut_fs(int'(pdl_cfg[i-N].cl));
      end
      if (c[i]) begin
        t = up;
        up = lo;
        lo = t;
      end
    end
    return up - lo;
  endfunction

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    ones = 0;
    challenge = '0;
    for (int s = 0; s < NP; s++) pdl_cfg[s] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 2000; k++) begin
      longint margin;
      if (k % 100 == 0)
        for (int s = 0; s < NP; s++)
          pdl_cfg[s] = (k == 0) ? '0 :
                       '{cu: 5'($urandom), cl: 5'($urandom), luts: 3'($urandom_range(0, 4))};
      challenge = {$urandom, $urandom, $urandom, $urandom};
      margin = race(challenge);
      eval <= 1'b1;
      @(posedge clk);
      eval <= 1'b0;
      #1;
      checks++;
      if (!valid || response != (margin > 0) || longint'(t_diff_fs) != margin) begin
        failures++;
        $display("FAIL k=%0d valid=%0b resp=%0b t=%0d expected %0d", k, valid, response,
                 t_diff_fs, margin);
      end
      if (response) ones++;
      @(posedge clk);
      #1;
      checks++;
      if (valid) begin
        failures++;
        $display("FAIL valid without eval");
      end
    end
    // both responses must occur
    checks++;
    if (ones < 400 || ones > 1600) begin
      failures++;
      $display("FAIL biased responses: %0d ones of 2000", ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
