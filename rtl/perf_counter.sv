// perf_counter: cycle-accurate latency counter of one hardware-thread run.
//
// The counter clears and starts on the start pulse, counts every clock
// cycle while the thread runs and freezes when stop pulses, so count holds
// the latency of the run, in cycles of the fabric clock, until the next
// start: it ends at the number of cycles from the one after start up to and
// including the one where stop pulses. running is high between start and
// stop. A start that coincides with stop wins and restarts the counter.
//
// Interface: start, stop (single-cycle pulses); count (WIDTH bits, wraps
// after 2^WIDTH cycles); running. The published scheme equips each accelerator with
// such a counter; the width is this design's choice (48 bits, over 32 days
// at 100 MHz).
module perf_counter #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  output logic [WIDTH-1:0] count,
  output logic             running
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
    end else if (start) begin
      count   <= '0;
      running <= 1'b1;
    end else if (running) begin
      count <= count + 1'b1;
      if (stop) running <= 1'b0;
    end
  end

endmodule
