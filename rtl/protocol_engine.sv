// Protocol engine: runs the message and authentication protocols of the
// matched-PUF platform, one PUF evaluation per operation.
//
// E(c) is the one-bit response of the matched PUF to template challenge c.
// Because it is one bit, a message is handled one bit per challenge.
//   OP_ENCRYPT     sender: draw a random c, publish c and R = E(c) ^ m.
//   OP_DECRYPT     receiver: given c and R, recover m = E(c) ^ R.
//   OP_AUTH_ISSUE  verifier: draw a random c, keep R = E(c), publish c.
//   OP_AUTH_ANSWER prover: given c, answer R' = E(c).
//   OP_AUTH_CHECK  verifier: authenticate if and only if R' equals the kept R.
// The protocol steps follow the message-communication and authentication
// protocols of the matched-PUF scheme. The random challenges come from a
// 64-bit xorshift generator seeded by RNG_SEED: the source of randomness
// is not specified; a deployed design would use a true random source
// in its place.
//
// Interface: start with op, msg_in (m, R or R') and c_in (received
// challenge) begins an operation while busy is low. The engine drives the
// template challenge c_t and pulses puf_eval; the PUF path (challenge
// reassignment + matched PUF) returns puf_resp with puf_valid one cycle
// later. out_valid then pulses with out_bit (R, m or R'), c_out (the
// challenge used) and, for OP_AUTH_CHECK, auth_ok.
// Timing: out_valid is set by the second rising edge after the edge that
// accepts start for operations that evaluate the PUF (one edge launches
// the PUF, one edge returns its response), and by that same accepting
// edge for OP_AUTH_CHECK.
module protocol_engine #(
  parameter int          N        = 64,
  parameter logic [63:0] RNG_SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  puf_pkg::op_t     op,
  input  logic             msg_in,
  input  logic [N-1:0]     c_in,
  output logic             busy,
  output logic [N-1:0]     c_t,
  output logic             puf_eval,
  input  logic             puf_resp,
  input  logic             puf_valid,
  output logic             out_valid,
  output logic             out_bit,
  output logic [N-1:0]     c_out,
  output logic             auth_ok
);
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;

  if (N > 64) begin : g_bad_n
    $error("protocol_engine: N must not exceed the 64-bit generator");
  end

  logic [63:0] rng, rng_next;
  op_t         op_q;
  logic        msg_q;
  logic        kept;     // E(c) kept by the verifier
  logic        waiting;  // PUF result outstanding

  always_comb begin
    rng_next = rng ^ (rng << 13);
    rng_next = rng_next ^ (rng_next >> 7);
    rng_next = rng_next ^ (rng_next << 17);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rng       <= RNG_SEED;
      op_q      <= OP_ENCRYPT;
      msg_q     <= 1'b0;
      kept      <= 1'b0;
      waiting   <= 1'b0;
      busy      <= 1'b0;
      c_t       <= '0;
      puf_eval  <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      c_out     <= '0;
      auth_ok   <= 1'b0;
    end else begin
      puf_eval  <= 1'b0;
      out_valid <= 1'b0;
      if (start && !busy) begin
        op_q  <= op;
        msg_q <= msg_in;
        if (op == OP_AUTH_CHECK) begin
          out_valid <= 1'b1;
          out_bit   <= msg_in;
          auth_ok   <= (msg_in == kept);
        end else begin
          busy     <= 1'b1;
          waiting  <= 1'b1;
          puf_eval <= 1'b1;
          if (op == OP_ENCRYPT || op == OP_AUTH_ISSUE) begin
            c_t <= rng[N-1:0];
            rng <= rng_next;
          end else begin
            c_t <= c_in;
          end
        end
      end else if (waiting && puf_valid) begin
        waiting   <= 1'b0;
        busy      <= 1'b0;
        out_valid <= 1'b1;
        c_out     <= c_t;
        auth_ok   <= 1'b0;
        unique case (op_q)
          OP_ENCRYPT, OP_DECRYPT: out_bit <= puf_resp ^ msg_q;
          OP_AUTH_ISSUE: begin
            kept    <= puf_resp;
            out_bit <= 1'b0;
          end
          default: out_bit <= puf_resp;
        endcase
      end
    end
  end
endmodule
