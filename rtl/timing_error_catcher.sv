// Timing error catcher: estimates the probability of a timing error by
// counting how many of a fixed number of clock pulses flag an error.
//
// After start, the block watches err for PULSES consecutive rising edges of
// clk (10,000 pulses per frequency step in the measurement setup) and
// counts those with err = 1. The error probability is err_count / PULSES.
// The counting scheme and handshake are this design's choices; only the
// pulse count and the purpose come from the measurement setup.
//
// Interface: start (one cycle) begins a window, busy is high during it,
// done pulses for one cycle after the last counted pulse and err_count then
// holds the result until the next start.
// Timing: done rises PULSES + 1 cycles after the start cycle.
module timing_error_catcher #(
  parameter int PULSES = 10_000
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        err,
  output logic                        busy,
  output logic                        done,
  output logic [$clog2(PULSES+1)-1:0] err_count
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int CW = $clog2(PULSES+1);

  logic [CW-1:0] pulses;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      pulses    <= '0;
      err_count <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        pulses    <= '0;
        err_count <= '0;
      end else if (busy) begin
        if (err) err_count <= err_count + CW'(1);
        if (pulses == CW'(PULSES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        pulses <= pulses + CW'(1);
      end
    end
  end
endmodule
