// End-to-end test of puf_match_platform with several parties.
//   A (seed 1) and B (seed 2) match their PUFs to each other.
//   C (seed 3) is an outsider and is never matched.
//   D (seed 4, only 8 PDL slots) matches to A and runs out of slots.
// The test configures A, B and D, then runs the matching-accuracy test
// (same template challenges to A, B and C), message transfer from A to B
// (and to the outsider C), authentication of B and of C by A, and delay
// measurements on A's characterization circuit on both sides of the
// timing limit. Each mechanism is counted, and one that never happened
// counts as a failure: PDL slots at both parties, LUT-count boosting in a
// PDL slot, slot overflow, reassigned challenges that differ from a plain
// zero extension, accepted and rejected authentication, decryption by the
// matched party, timing errors and error-free measurement windows.
module tb_puf_match_platform;
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 64;
  localparam int NPD = 8;      // D's slots
  localparam int PULSES = 200; // shorter measurement windows
  localparam int P = 4;        // parties A, B, C, D

  logic clk = 1'b0, rst_n = 1'b0;
  logic meas_clk = 1'b0, meas_rst_n = 1'b0, meas_start = 1'b0;
  logic [4:0] meas_cfg = '0;
  longint meas_half = 7000;

  logic   cfg_start [P];
  delay_t own_d [P][N], partner_d [P][N], templ_d [P][N];
  logic   cfg_busy [P], cfg_done [P], cfg_overflow [P];
  logic [$clog2(N+1)-1:0] n_slots [P];
  logic   op_start [P], msg_in [P], op_busy [P], out_valid [P], out_bit [P], auth_ok [P];
  op_t    op [P];
  logic [N-1:0] c_in [P], c_out [P];
  delay_t t_diff [P];
  logic   meas_busy [P], meas_done [P];
  logic [$clog2(PULSES+1)-1:0] meas_err_count [P];
  logic [$clog2(NPD+1)-1:0] n_slots_d;

  int checks = 0, failures = 0;
  int cnt_slots_a = 0, cnt_slots_b = 0, cnt_boost = 0, cnt_overflow = 0, cnt_reassign = 0;
  int cnt_auth_ok = 0, cnt_auth_reject = 0, cnt_decrypt_ok = 0, cnt_timing_err = 0;
  int cnt_timing_clean = 0;

  always #5000 clk = ~clk;
  always #(meas_half) meas_clk = ~meas_clk;

  for (genvar p = 0; p < 3; p++) begin : g_party
    puf_match_platform #(.SEED(p + 1), .RNG_SEED(64'h1234_5678_9ABC_DEF1 + 64'(p)),
                         .PULSES(PULSES)) u (
      .clk, .rst_n, .cfg_start(cfg_start[p]), .own_d(own_d[p]), .partner_d(partner_d[p]),
      .cfg_busy(cfg_busy[p]), .cfg_done(cfg_done[p]), .cfg_overflow(cfg_overflow[p]),
      .n_slots(n_slots[p]), .templ_d(templ_d[p]), .op_start(op_start[p]), .op(op[p]),
      .msg_in(msg_in[p]), .c_in(c_in[p]), .op_busy(op_busy[p]), .out_valid(out_valid[p]),
      .out_bit(out_bit[p]), .c_out(c_out[p]), .auth_ok(auth_ok[p]),
      .puf_t_diff_fs(t_diff[p]), .meas_clk, .meas_rst_n, .meas_cfg, .meas_start,
      .meas_busy(meas_busy[p]), .meas_done(meas_done[p]),
      .meas_err_count(meas_err_count[p]));
  end

  puf_match_platform #(.NP(NPD), .SEED(4), .PULSES(PULSES)) u_d (
    .clk, .rst_n, .cfg_start(cfg_start[3]), .own_d(own_d[3]), .partner_d(partner_d[3]),
    .cfg_busy(cfg_busy[3]), .cfg_done(cfg_done[3]), .cfg_overflow(cfg_overflow[3]),
    .n_slots(n_slots_d), .templ_d(templ_d[3]), .op_start(op_start[3]), .op(op[3]),
    .msg_in(msg_in[3]), .c_in(c_in[3]), .op_busy(op_busy[3]), .out_valid(out_valid[3]),
    .out_bit(out_bit[3]), .c_out(c_out[3]), .auth_ok(auth_ok[3]),
    .puf_t_diff_fs(t_diff[3]), .meas_clk, .meas_rst_n, .meas_cfg, .meas_start,
    .meas_busy(meas_busy[3]), .meas_done(meas_done[3]), .meas_err_count(meas_err_count[3]));

  // reassigned challenges that are not just the template challenge
  always @(posedge clk)
    if (rst_n && g_party[0].u.puf_eval && g_party[0].u.c_ext[2*N-1:N] != '0) cnt_reassign++;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Start one operation on several parties at once and wait for all.
  task automatic run_ops(bit [P-1:0] who, op_t o [P], bit m [P], logic [N-1:0] c [P]);
    @(negedge clk);
    for (int p = 0; p < P; p++) begin
      op[p] = o[p];
      msg_in[p] = m[p];
      c_in[p] = c[p];
      op_start[p] = who[p];
    end
    @(negedge clk);
    for (int p = 0; p < P; p++) op_start[p] = 1'b0;
    for (int p = 0; p < P; p++) if (who[p]) while (!out_valid[p]) @(negedge clk);
  endtask

  task automatic measure(longint period_ps);
    meas_half = period_ps / 2;
    meas_rst_n = 1'b0;
    repeat (3) @(posedge meas_clk);
    meas_rst_n = 1'b1;
    repeat (5) @(posedge meas_clk);
    #1;
    meas_start = 1'b1;
    @(posedge meas_clk);
    #1;
    meas_start = 1'b0;
    while (!meas_done[0]) @(posedge meas_clk);
    #1;
  endtask

  initial begin
    #(64'd20_000_000_000);  // watchdog: 20 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint d [P][MAXN], ea [MAXN], eb [MAXN];
    int sa, sb, ties, agree_ab, agree_ac;
    op_t o [P];
    bit m [P];
    logic [N-1:0] c [P];

    for (int p = 0; p < P; p++) begin
      cfg_start[p] = 1'b0;
      op_start[p] = 1'b0;
      op[p] = OP_ENCRYPT;
      msg_in[p] = 1'b0;
      c_in[p] = '0;
      for (int i = 0; i < N; i++) d[p][i] = seg_diff_fs(p + 1, i);
    end
    // exchanged delay information: A<->B, D->A
    for (int i = 0; i < N; i++) begin
      own_d[0][i] = delay_t'(d[0][i]); partner_d[0][i] = delay_t'(d[1][i]);
      own_d[1][i] = delay_t'(d[1][i]); partner_d[1][i] = delay_t'(d[0][i]);
      own_d[2][i] = delay_t'(d[2][i]); partner_d[2][i] = delay_t'(d[2][i]);
      own_d[3][i] = delay_t'(d[3][i]); partner_d[3][i] = delay_t'(d[0][i]);
    end
    effective(d[0], d[1], N, ea, sa);
    effective(d[1], d[0], N, eb, sb);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- matching: A, B, D configure concurrently
    @(negedge clk);
    cfg_start[0] = 1'b1; cfg_start[1] = 1'b1; cfg_start[3] = 1'b1;
    @(negedge clk);
    cfg_start[0] = 1'b0; cfg_start[1] = 1'b0; cfg_start[3] = 1'b0;
    while (cfg_busy[0] || cfg_busy[1] || cfg_busy[3]) @(negedge clk);
    ties = 0;
    for (int i = 0; i < N; i++) if (d[0][i] == d[1][i]) ties++;
    cnt_slots_a = int'(n_slots[0]);
    cnt_slots_b = int'(n_slots[1]);
    check($sformatf("slots A=%0d B=%0d ties=%0d", n_slots[0], n_slots[1], ties),
          int'(n_slots[0]) == sa && int'(n_slots[1]) == sb && sa + sb + ties == N);
    for (int i = 0; i < N; i++) check("A and B share the template", templ_d[0][i] == templ_d[1][i]);
    for (int s = 0; s < N; s++) if (g_party[0].u.slot_cfg[s].luts > 1) cnt_boost++;
    for (int s = 0; s < N; s++) if (g_party[1].u.slot_cfg[s].luts > 1) cnt_boost++;
    if (cfg_overflow[3]) cnt_overflow++;
    check("D overflows with 8 slots", cfg_overflow[3] && int'(n_slots_d) == NPD);
    check("C was not configured", int'(n_slots[2]) == 0);

    // ---- matching accuracy: same template challenges to A, B, C
    agree_ab = 0;
    agree_ac = 0;
    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] ct;
      ct = {$urandom, $urandom};
      for (int p = 0; p < P; p++) begin
        o[p] = OP_AUTH_ANSWER;
        m[p] = 1'b0;
        c[p] = ct;
      end
      run_ops(4'b0111, o, m, c);
      check("A equals its reference model", out_bit[0] == respond(ea, N, ct));
      check("B equals its reference model", out_bit[1] == respond(eb, N, ct));
      if (out_bit[0] == out_bit[1]) agree_ab++;
      if (out_bit[0] == out_bit[2]) agree_ac++;
    end
    $display("matching accuracy A-B %0d / 1000, A-outsider %0d / 1000", agree_ab, agree_ac);
    check("matching accuracy at least 95 %", agree_ab >= 950);
    check("outsider near chance", agree_ac > 350 && agree_ac < 650);

    // ---- multi-party message: A encrypts, B and C decrypt
    for (int k = 0; k < 100; k++) begin
      bit msg, r;
      logic [N-1:0] cc;
      msg = 1'($urandom);
      o[0] = OP_ENCRYPT; m[0] = msg; c[0] = '0;
      run_ops(4'b0001, o, m, c);
      r = out_bit[0];
      cc = c_out[0];
      o[1] = OP_DECRYPT; m[1] = r; c[1] = cc;
      o[2] = OP_DECRYPT; m[2] = r; c[2] = cc;
      run_ops(4'b0110, o, m, c);
      check("B's plaintext follows its reference model", out_bit[1] == (r ^ respond(eb, N, cc)));
      if (out_bit[1] == msg) cnt_decrypt_ok++;
    end
    check($sformatf("B decrypted %0d of 100", cnt_decrypt_ok), cnt_decrypt_ok >= 90);

    // ---- authentication of B and of the outsider C by A
    for (int k = 0; k < 100; k++) begin
      logic [N-1:0] cc;
      int who;
      who = (k % 2 == 0) ? 1 : 2;
      o[0] = OP_AUTH_ISSUE; m[0] = 1'b0; c[0] = '0;
      run_ops(4'b0001, o, m, c);
      cc = c_out[0];
      o[who] = OP_AUTH_ANSWER; m[who] = 1'b0; c[who] = cc;
      run_ops(4'(1 << who), o, m, c);
      o[0] = OP_AUTH_CHECK; m[0] = out_bit[who]; c[0] = '0;
      run_ops(4'b0001, o, m, c);
      check("auth_ok follows the two responses",
            auth_ok[0] == (respond(ea, N, cc) == m[0]));
      if (auth_ok[0]) cnt_auth_ok++;
      else cnt_auth_reject++;
    end

    // ---- delay characterization on A: 12.48 ns chain
    meas_cfg = 5'd0;
    measure(13_000);
    check("no errors at 13 ns", meas_err_count[0] == 0);
    if (meas_err_count[0] == 0) cnt_timing_clean++;
    measure(12_000);
    check("errors on every pulse at 12 ns", int'(meas_err_count[0]) == PULSES);
    if (meas_err_count[0] != 0) cnt_timing_err++;
    meas_cfg = 5'd31;  // 12.59 ns chain fails at 12.54 ns, 00000 passes
    measure(12_540);
    check("cfg 11111 fails at 12.54 ns", int'(meas_err_count[0]) == PULSES);
    meas_cfg = 5'd0;
    measure(12_540);
    check("cfg 00000 passes at 12.54 ns", meas_err_count[0] == 0);

    $display("mechanisms: slotsA=%0d slotsB=%0d boost=%0d overflow=%0d reassign=%0d",
             cnt_slots_a, cnt_slots_b, cnt_boost, cnt_overflow, cnt_reassign);
    $display("            decrypt_ok=%0d auth_ok=%0d auth_reject=%0d timing_err=%0d clean=%0d",
             cnt_decrypt_ok, cnt_auth_ok, cnt_auth_reject, cnt_timing_err, cnt_timing_clean);
    check("PDL slots at A", cnt_slots_a > 0);
    check("PDL slots at B", cnt_slots_b > 0);
    check("LUT-count boosting used", cnt_boost > 0);
    check("slot overflow seen", cnt_overflow > 0);
    check("challenge reassignment used", cnt_reassign > 0);
    check("message decrypted", cnt_decrypt_ok > 0);
    check("authentication accepted", cnt_auth_ok > 0);
    check("authentication rejected", cnt_auth_reject > 0);
    check("timing errors caught", cnt_timing_err > 0);
    check("clean measurement", cnt_timing_clean > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
