// Testbench for lut_chain_cut: for several shared configurations, sends
// rising and falling edges through the 10-LUT chain and checks that the
// output follows the input (even number of inversions) after exactly ten
// LUT delays of the model 1.248 ns + 11 ps * cfg / 31, recomputed here.
module tb_lut_chain_cut;
  timeunit 1fs;
  timeprecision 1fs;

  localparam int N_LUT = 10;

  logic       din;
  logic [4:0] cfg;
  logic       dout;
  int checks = 0, failures = 0;

  lut_chain_cut dut (.din, .cfg, .dout);

  function automatic longint chain_fs(int c);
    return N_LUT * (64'd1_248_000 + (64'd11_000 * c) / 31);
  endfunction

  initial begin
    #(2_000_000_000);  // watchdog: 2 us
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    din = 1'b0;
    cfg = '0;
    #(20_000_000);
    for (int k = 0; k < 12; k++) begin
      int c;
      c = (k < 2) ? k * 31 : int'($urandom_range(0, 31));
      cfg = 5'(c);
      #(20_000_000);
      for (int e = 0; e < 2; e++) begin
        din = ~din;
        t0 = $time;
        @(dout);
        checks++;
        if (dout !== din || ($time - t0) != time'(chain_fs(c))) begin
          failures++;
          $display("FAIL cfg=%0d dout=%0b din=%0b delay=%0d fs expected %0d", c, dout, din,
                   $time - t0, chain_fs(c));
        end
        #(20_000_000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
