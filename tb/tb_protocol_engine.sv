// Testbench for protocol_engine: connects the engine to a stand-in PUF
// path (E(c) = parity of c AND a fixed mask, returned one cycle after
// puf_eval, like the matched PUF) and checks every operation: encryption
// (R = E(c) ^ m with the next value of a reference xorshift generator as
// c), decryption, issuing and answering an authentication challenge, and
// the authentication check accepting the right answer and rejecting the
// wrong one. Also checks the latency of 2 edges after the accepting edge
// (0 for the check) and that busy blocks a second start.
module tb_protocol_engine;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int N = 64;
  localparam logic [63:0] MASK = 64'hA5C3_1F0E_9B27_D468;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, msg_in = 1'b0;
  op_t op = OP_ENCRYPT;
  logic [N-1:0] c_in = '0, c_t, c_out;
  logic busy, puf_eval, puf_resp, puf_valid, out_valid, out_bit, auth_ok;
  logic [63:0] rng_ref;
  int checks = 0, failures = 0;

  protocol_engine dut (.clk, .rst_n, .start, .op, .msg_in, .c_in, .busy, .c_t, .puf_eval,
                       .puf_resp, .puf_valid, .out_valid, .out_bit, .c_out, .auth_ok);

  always #5 clk = ~clk;

  // stand-in PUF path
  always_ff @(posedge clk) begin
    puf_valid <= puf_eval;
    puf_resp  <= ^(c_t & MASK);
  end

  function automatic logic [63:0] xs(logic [63:0] x);
    x ^= x << 13;
    x ^= x >> 7;
    x ^= x << 17;
    return x;
  endfunction

  function automatic bit e_of(logic [N-1:0] c);
    return ^(c & MASK);
  endfunction

  task automatic do_op(op_t o, bit m, logic [N-1:0] c, int exp_lat);
    int lat;
    @(negedge clk);
    op = o;
    msg_in = m;
    c_in = c;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    lat = 0;
    while (!out_valid && lat < 10) begin
      @(posedge clk);
      #1;
      lat++;
    end
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL op %s latency %0d expected %0d", o.name(), lat, exp_lat);
    end
  endtask

  task automatic expect_bit(string what, bit got, bit want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, want);
    end
  endtask

  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] c;
    bit m, kept;
    rng_ref = 64'h9E37_79B9_7F4A_7C15;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 200; k++) begin
      // encryption with a fresh challenge
      m = 1'($urandom);
      do_op(OP_ENCRYPT, m, '0, 2);
      checks++;
      if (c_out != rng_ref[N-1:0]) begin
        failures++;
        $display("FAIL challenge %h expected %h", c_out, rng_ref[N-1:0]);
      end
      rng_ref = xs(rng_ref);
      expect_bit("ciphertext", out_bit, e_of(c_out) ^ m);
      // decryption of that ciphertext
      c = c_out;
      do_op(OP_DECRYPT, out_bit, c, 2);
      expect_bit("decrypted", out_bit, m);
      // authentication: issue, answer, check
      do_op(OP_AUTH_ISSUE, 1'b0, '0, 2);
      c = c_out;
      checks++;
      if (c != rng_ref[N-1:0]) begin
        failures++;
        $display("FAIL auth challenge %h expected %h", c, rng_ref[N-1:0]);
      end
      rng_ref = xs(rng_ref);
      kept = e_of(c);
      do_op(OP_AUTH_ANSWER, 1'b0, c, 2);
      expect_bit("answer", out_bit, kept);
      do_op(OP_AUTH_CHECK, (k % 3 == 2) ? ~kept : kept, '0, 0);
      expect_bit("auth_ok", auth_ok, (k % 3 != 2));
    end
    // a start while busy is ignored
    @(negedge clk);
    op = OP_AUTH_ANSWER;
    c_in = '1;
    start = 1'b1;
    @(posedge clk);
    #1;
    c_in = '0;
    @(negedge clk);
    #1;
    start = 1'b0;
    checks++;
    if (c_t != '1) begin
      failures++;
      $display("FAIL second start while busy changed the challenge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
