// Testbench for match_config: gives random own and partner delay
// differences (within +/-20 ps, with some equal segments) and checks the
// template (per-segment maximum), which segments get a PDL slot and in
// which order, each slot's configuration against an exhaustive search done
// here (same tie order: lowest cu, then cl, then LUT count), the slot
// count and the latency N + 1024 * slots. A second instance with only 4
// slots must report overflow and fill exactly 4 slots.
module tb_match_config;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int N = 64, NP = 64, NP_SMALL = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  delay_t own_d [N], partner_d [N];
  logic busy, done, overflow;
  delay_t templ_d [N];
  logic [NP-1:0] slot_valid;
  logic [$clog2(N)-1:0] slot_map [NP];
  pdl_cfg_t slot_cfg [NP];
  logic [$clog2(NP+1)-1:0] n_slots;

  logic busy_s, done_s, overflow_s;
  delay_t templ_s [N];
  logic [NP_SMALL-1:0] valid_s;
  logic [$clog2(N)-1:0] map_s [NP_SMALL];
  pdl_cfg_t cfg_s [NP_SMALL];
  logic [$clog2(NP_SMALL+1)-1:0] n_s;

  int checks = 0, failures = 0;

  match_config dut (.clk, .rst_n, .start, .own_d, .partner_d, .busy, .done, .overflow,
                    .templ_d, .slot_valid, .slot_map, .slot_cfg, .n_slots);

  match_config #(.N(N), .NP(NP_SMALL)) dut_small (
    .clk, .rst_n, .start, .own_d, .partner_d, .busy(busy_s), .done(done_s),
    .overflow(overflow_s), .templ_d(templ_s), .slot_valid(valid_s), .slot_map(map_s),
    .slot_cfg(cfg_s), .n_slots(n_s));

  always #5 clk = ~clk;

  function automatic longint lut_fs(int c);
    return 64'd1_248_000 + (64'd11_000 * c) / 31;
  endfunction

  function automatic pdl_cfg_t best_cfg(longint target);
    longint best_e, e;
    pdl_cfg_t b;
    best_e = 64'h7fff_ffff_ffff_ffff;
    b = '0;
    for (int cu = 0; cu < 32; cu++)
      for (int cl = 0; cl < 32; cl++)
        for (int m = 1; m <= 4; m++) begin
          e = m * (lut_fs(cu) - lut_fs(cl)) - target;
          if (e < 0) e = -e;
          if (e < best_e) begin
            best_e = e;
            b = '{cu: 5'(cu), cl: 5'(cl), luts: 3'(m)};
          end
        end
    return b;
  endfunction

  initial begin
    #(50_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 3; run++) begin
      int j, cycles, bad;
      int exp_map [$];
      exp_map.delete();
      for (int i = 0; i < N; i++) begin
        own_d[i]     = delay_t'(int'($urandom_range(0, 40_000)) - 20_000);
        partner_d[i] = ($urandom_range(0, 7) == 0) ? own_d[i]
                       : delay_t'(int'($urandom_range(0, 40_000)) - 20_000);
        if (own_d[i] < partner_d[i]) exp_map.push_back(i);
      end
      j = exp_map.size();
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);  // start edge
      #1;
      start = 1'b0;
      cycles = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        cycles++;
      end
      checks++;
      if (cycles != N + 1024 * j) begin
        failures++;
        $display("FAIL run %0d: done after %0d cycles, expected %0d", run, cycles, N + 1024 * j);
      end
      bad = 0;
      for (int i = 0; i < N; i++)
        if (templ_d[i] != ((own_d[i] > partner_d[i]) ? own_d[i] : partner_d[i])) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL run %0d: %0d template entries wrong", run, bad);
      end
      checks++;
      if (int'(n_slots) != j || overflow) begin
        failures++;
        $display("FAIL run %0d: n_slots=%0d expected %0d overflow=%0b", run, n_slots, j, overflow);
      end
      for (int s = 0; s < NP; s++) begin
        checks++;
        if (s < j) begin
          pdl_cfg_t e;
          e = best_cfg(longint'(partner_d[exp_map[s]]) - longint'(own_d[exp_map[s]]));
          if (!slot_valid[s] || int'(slot_map[s]) != exp_map[s] || slot_cfg[s] != e) begin
            failures++;
            $display("FAIL run %0d slot %0d: valid=%0b map=%0d cfg=%p expected map=%0d cfg=%p",
                     run, s, slot_valid[s], slot_map[s], slot_cfg[s], exp_map[s], e);
          end
        end else if (slot_valid[s] || slot_cfg[s].luts != 0) begin
          failures++;
          $display("FAIL run %0d slot %0d should be unused", run, s);
        end
      end
      // the 4-slot instance
      while (busy_s) @(posedge clk);
      #1;
      checks++;
      if (overflow_s != (j > NP_SMALL) || int'(n_s) != ((j > NP_SMALL) ? NP_SMALL : j)) begin
        failures++;
        $display("FAIL run %0d small: overflow=%0b n=%0d", run, overflow_s, n_s);
      end
      for (int s = 0; s < NP_SMALL && s < j; s++) begin
        checks++;
        if (int'(map_s[s]) != exp_map[s]) begin
          failures++;
          $display("FAIL run %0d small slot %0d map=%0d expected %0d", run, s, map_s[s],
                   exp_map[s]);
        end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
