// Full-size test of puf_match_platform with every parameter at its
// default (64-segment PUF, 64 PDL slots, 10-LUT chain, 10,000 pulses).
// The partner party is modelled here: its PUF is the process-variation
// model with seed 2, and its matched responses come from tb_ref_pkg.
// One complete operation: configure the platform against the partner,
// answer 1,000 random template challenges (each response must equal the
// reference model of this party exactly; agreement with the modelled
// partner, the matching accuracy, must be at least 95 %), encrypt 200
// bits that the modelled partner decrypts, and one delay measurement on
// each side of the timing limit.
module tb_full_size;
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 64;
  localparam int PULSES = 10_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_start = 1'b0, cfg_busy, cfg_done, cfg_overflow;
  delay_t own_d [N], partner_d [N], templ_d [N];
  logic [$clog2(N+1)-1:0] n_slots;
  logic op_start = 1'b0, msg_in = 1'b0, op_busy, out_valid, out_bit, auth_ok;
  op_t op = OP_ENCRYPT;
  logic [N-1:0] c_in = '0, c_out;
  delay_t t_diff;
  logic meas_clk = 1'b0, meas_rst_n = 1'b0, meas_start = 1'b0, meas_busy, meas_done;
  logic [4:0] meas_cfg = '0;
  logic [$clog2(PULSES+1)-1:0] meas_err_count;
  longint meas_half = 7000;

  int checks = 0, failures = 0;

  puf_match_platform dut (
    .clk, .rst_n, .cfg_start, .own_d, .partner_d, .cfg_busy, .cfg_done, .cfg_overflow,
    .n_slots, .templ_d, .op_start, .op, .msg_in, .c_in, .op_busy, .out_valid, .out_bit,
    .c_out, .auth_ok, .puf_t_diff_fs(t_diff), .meas_clk, .meas_rst_n, .meas_cfg,
    .meas_start, .meas_busy, .meas_done, .meas_err_count);

  always #5000 clk = ~clk;
  always #(meas_half) meas_clk = ~meas_clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_op(op_t o, bit m, logic [N-1:0] c);
    @(negedge clk);
    op = o;
    msg_in = m;
    c_in = c;
    op_start = 1'b1;
    @(negedge clk);
    op_start = 1'b0;
    while (!out_valid) @(negedge clk);
  endtask

  task automatic measure(longint period_ps, int exp_count);
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
    while (!meas_done) @(posedge meas_clk);
    #1;
    check($sformatf("measurement at %0d ps: %0d errors, expected %0d", period_ps,
                    meas_err_count, exp_count), int'(meas_err_count) == exp_count);
  endtask

  initial begin
    #(64'd50_000_000_000);  // watchdog: 50 ms
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint da [MAXN], db [MAXN], ea [MAXN], eb [MAXN];
    int sa, sb, agree, exact;
    for (int i = 0; i < N; i++) begin
      da[i] = seg_diff_fs(1, i);  // this party: the platform's default seed
      db[i] = seg_diff_fs(2, i);  // modelled partner
      own_d[i] = delay_t'(da[i]);
      partner_d[i] = delay_t'(db[i]);
    end
    effective(da, db, N, ea, sa);
    effective(db, da, N, eb, sb);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // configuration
    @(negedge clk);
    cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    while (!cfg_done) @(negedge clk);
    check($sformatf("n_slots %0d expected %0d", n_slots, sa), int'(n_slots) == sa && !cfg_overflow);
    for (int i = 0; i < N; i++)
      check("template", templ_d[i] == ((da[i] > db[i]) ? delay_t'(da[i]) : delay_t'(db[i])));

    // matching accuracy against the modelled partner
    agree = 0;
    exact = 0;
    for (int k = 0; k < 1000; k++) begin
      logic [N-1:0] c;
      c = {$urandom, $urandom};
      run_op(OP_AUTH_ANSWER, 1'b0, c);
      if (out_bit == respond(ea, N, c)) exact++;
      if (out_bit == respond(eb, N, c)) agree++;
    end
    check($sformatf("exact responses %0d of 1000", exact), exact == 1000);
    check($sformatf("matching accuracy %0d of 1000", agree), agree >= 950);
    $display("matching accuracy: %0d / 1000 (partner model), exact vs own model %0d", agree, exact);

    // message transfer to the modelled partner
    agree = 0;
    for (int k = 0; k < 200; k++) begin
      bit m;
      m = 1'($urandom);
      run_op(OP_ENCRYPT, m, '0);
      if ((out_bit ^ respond(eb, N, c_out)) == m) agree++;
    end
    check($sformatf("decrypted by partner %0d of 200", agree), agree >= 180);

    // delay characterization: 10-LUT chain of 12.48 ns with cfg 00000
    meas_cfg = 5'd0;
    measure(13_000, 0);
    measure(12_000, PULSES);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
