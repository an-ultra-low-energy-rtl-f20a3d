// Testbench for challenge_reassign: for random template challenges and
// random slot assignments, checks the defining property directly: the
// sign with which each matched-PUF segment reaches the arbiter (parity of
// its own and all later matched-PUF challenge bits) equals the sign of the
// template segment it stands for (parity of the template bits from that
// segment on). Unused slots must get challenge bit 0.
module tb_challenge_reassign;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int N = 64, NP = 64;

  logic [N-1:0]         c_t;
  logic [NP-1:0]        slot_valid;
  logic [$clog2(N)-1:0] slot_map [NP];
  logic [N+NP-1:0]      c_ext;
  int checks = 0, failures = 0;

  challenge_reassign dut (.c_t, .slot_valid, .slot_map, .c_ext);

  function automatic bit tsign(int i);
    bit p = 0;
    for (int k = i; k < N; k++) p ^= c_t[k];
    return p;
  endfunction

  function automatic bit esign(int m);
    bit p = 0;
    for (int k = m; k < N + NP; k++) p ^= c_ext[k];
    return p;
  endfunction

  initial begin
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      int j, bad;
      // slots used in order, as match_config fills them; sometimes with gaps
      j = int'($urandom_range(0, NP));
      for (int s = 0; s < NP; s++) begin
        slot_valid[s] = (s < j) && ((k % 4 != 3) || $urandom_range(0, 3) != 0);
        slot_map[s]   = 6'($urandom_range(0, N - 1));
      end
      c_t = {$urandom, $urandom};
      #1;
      bad = 0;
      for (int m = 0; m < N; m++) if (esign(m) != tsign(m)) bad++;
      for (int s = 0; s < NP; s++) begin
        if (slot_valid[s] && esign(N + s) != tsign(int'(slot_map[s]))) bad++;
        if (!slot_valid[s] && c_ext[N+s]) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL k=%0d: %0d segments on the wrong path", k, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
