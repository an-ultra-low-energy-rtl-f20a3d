// Three-party matching and broadcast on puf_match_platform. Each party is
// given, as partner_d, the per-segment maximum of the other two parties'
// differences, so all three reach the same template (the maximum over all
// three). Checks: identical templates, every party's responses against
// its own reference model, pairwise matching accuracy of at least 95 %, a
// message broadcast by party 0 and recovered by both others, and then
// re-matching party 0 to party 1 only (pairwise use of the same PDLs),
// after which the template must equal max(d0, d1).
module tb_multi_party;
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 64;
  localparam int P = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic   cfg_start [P];
  delay_t own_d [P][N], partner_d [P][N], templ_d [P][N];
  logic   cfg_busy [P], cfg_done [P], cfg_overflow [P];
  logic [$clog2(N+1)-1:0] n_slots [P];
  logic   op_start [P], msg_in [P], op_busy [P], out_valid [P], out_bit [P], auth_ok [P];
  op_t    op [P];
  logic [N-1:0] c_in [P], c_out [P];
  delay_t t_diff [P];
  logic   meas_busy [P], meas_done [P];
  logic [13:0] meas_err_count [P];

  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  for (genvar p = 0; p < P; p++) begin : g_party
    puf_match_platform #(.SEED(10 + p), .RNG_SEED(64'h0F0F_1234_5555_AAA1 + 64'(p))) u (
      .clk, .rst_n, .cfg_start(cfg_start[p]), .own_d(own_d[p]), .partner_d(partner_d[p]),
      .cfg_busy(cfg_busy[p]), .cfg_done(cfg_done[p]), .cfg_overflow(cfg_overflow[p]),
      .n_slots(n_slots[p]), .templ_d(templ_d[p]), .op_start(op_start[p]), .op(op[p]),
      .msg_in(msg_in[p]), .c_in(c_in[p]), .op_busy(op_busy[p]), .out_valid(out_valid[p]),
      .out_bit(out_bit[p]), .c_out(c_out[p]), .auth_ok(auth_ok[p]),
      .puf_t_diff_fs(t_diff[p]), .meas_clk(1'b0), .meas_rst_n(1'b0), .meas_cfg(5'd0),
      .meas_start(1'b0), .meas_busy(meas_busy[p]), .meas_done(meas_done[p]),
      .meas_err_count(meas_err_count[p]));
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic configure(bit [P-1:0] who);
    @(negedge clk);
    for (int p = 0; p < P; p++) cfg_start[p] = who[p];
    @(negedge clk);
    for (int p = 0; p < P; p++) cfg_start[p] = 1'b0;
    for (int p = 0; p < P; p++) while (cfg_busy[p]) @(negedge clk);
  endtask

  task automatic run_ops(bit [P-1:0] who, op_t o, bit m, logic [N-1:0] c);
    @(negedge clk);
    for (int p = 0; p < P; p++) begin
      op[p] = o;
      msg_in[p] = m;
      c_in[p] = c;
      op_start[p] = who[p];
    end
    @(negedge clk);
    for (int p = 0; p < P; p++) op_start[p] = 1'b0;
    for (int p = 0; p < P; p++) if (who[p]) while (!out_valid[p]) @(negedge clk);
  endtask

  initial begin
    #(64'd20_000_000_000);  // watchdog: 20 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint d [P][MAXN], others [MAXN], e [P][MAXN], t [MAXN];
    int slots, agree [P];
    for (int p = 0; p < P; p++) begin
      cfg_start[p] = 1'b0;
      op_start[p] = 1'b0;
      op[p] = OP_AUTH_ANSWER;
      msg_in[p] = 1'b0;
      c_in[p] = '0;
      agree[p] = 0;
      for (int i = 0; i < N; i++) d[p][i] = seg_diff_fs(10 + p, i);
    end
    for (int p = 0; p < P; p++) begin
      for (int i = 0; i < N; i++) begin
        others[i] = d[(p + 1) % P][i] > d[(p + 2) % P][i] ? d[(p + 1) % P][i]
                                                            : d[(p + 2) % P][i];
        own_d[p][i] = delay_t'(d[p][i]);
        partner_d[p][i] = delay_t'(others[i]);
      end
      effective(d[p], others, N, e[p], slots);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    configure(3'b111);
    for (int i = 0; i < N; i++) begin
      t[i] = d[0][i];
      for (int p = 1; p < P; p++) if (d[p][i] > t[i]) t[i] = d[p][i];
      for (int p = 0; p < P; p++) check("common template", longint'(templ_d[p][i]) == t[i]);
    end

    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] c;
      c = {$urandom, $urandom};
      run_ops(3'b111, OP_AUTH_ANSWER, 1'b0, c);
      for (int p = 0; p < P; p++) check("reference model", out_bit[p] == respond(e[p], N, c));
      for (int p = 0; p < P; p++) if (out_bit[p] == out_bit[(p + 1) % P]) agree[p]++;
    end
    $display("pairwise accuracy: 0-1 %0d, 1-2 %0d, 2-0 %0d (of 1000)", agree[0], agree[1], agree[2]);
    for (int p = 0; p < P; p++) check("pairwise accuracy at least 95 %", agree[p] >= 950);

    // broadcast from party 0
    agree[1] = 0;
    agree[2] = 0;
    for (int k = 0; k < 100; k++) begin
      bit m, r;
      logic [N-1:0] c;
      m = 1'($urandom);
      run_ops(3'b001, OP_ENCRYPT, m, '0);
      r = out_bit[0];
      c = c_out[0];
      run_ops(3'b110, OP_DECRYPT, r, c);
      if (out_bit[1] == m) agree[1]++;
      if (out_bit[2] == m) agree[2]++;
    end
    check($sformatf("broadcast received: %0d and %0d of 100", agree[1], agree[2]),
          agree[1] >= 90 && agree[2] >= 90);

    // re-match party 0 to party 1 alone
    for (int i = 0; i < N; i++) partner_d[0][i] = delay_t'(d[1][i]);
    configure(3'b001);
    for (int i = 0; i < N; i++)
      check("pairwise template", longint'(templ_d[0][i]) == (d[0][i] > d[1][i] ? d[0][i] : d[1][i]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
