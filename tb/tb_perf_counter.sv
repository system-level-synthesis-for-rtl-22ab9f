// tb_perf_counter: self-checking test of perf_counter.
//
// Runs of random lengths are timed: start pulses, stop pulses L cycles
// later, and count must then hold exactly L and stay frozen; running must be
// high exactly in between. A new start must clear the count, and a stop
// without a run must change nothing.
module tb_perf_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, stop, running;
  logic [47:0] count;
  int checks = 0, failures = 0;

  perf_counter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned len;
    start = 1'b0; stop = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0 && !running, "idle after reset");
    for (int r = 0; r < 40; r++) begin
      len = 1 + $urandom % 500;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(running && count == 0, "cleared and running after start");
      repeat (len - 1) begin
        @(negedge clk);
        check(running, "running during run");
      end
      stop = 1'b1;
      @(negedge clk);
      stop = 1'b0;
      check(!running, "stopped");
      check(count == 48'(len), $sformatf("count %0d exp %0d", count, len));
      repeat ($urandom % 20) @(negedge clk);
      stop = 1'b1;
      @(negedge clk);
      stop = 1'b0;
      check(count == 48'(len) && !running, "frozen after stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
