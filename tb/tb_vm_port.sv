// tb_vm_port: self-checking test of vm_port in all three translation modes.
//
// Three harnesses run side by side, one per mode (DRAM_TLB, LOCAL_TLB,
// CACHE_TLB, the cache scaled to 4 lines so that conflict misses happen
// within a 12-page array). Each issues random virtual read and write bursts,
// many of them crossing page boundaries, and checks data, completion and
// page breaks against its own reference (see vm_port_harness).
module tb_vm_port;
  import vm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin [3];
  int   c [3], f [3], br [3], hi [3], mi [3];
  int   checks, failures;

  vm_port_harness #(.MODE(DRAM_TLB),  .SEED(11)) h0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .n_breaks(br[0]), .n_hits(hi[0]), .n_misses(mi[0]));
  vm_port_harness #(.MODE(LOCAL_TLB), .SEED(22)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .n_breaks(br[1]), .n_hits(hi[1]), .n_misses(mi[1]));
  vm_port_harness #(.MODE(CACHE_TLB), .SEED(33)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .n_breaks(br[2]), .n_hits(hi[2]), .n_misses(mi[2]));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2] + 3;
    failures = f[0] + f[1] + f[2];
    for (int m = 0; m < 3; m++)
      if (br[m] == 0) begin failures++; $display("FAIL: no page break in mode %0d", m); end
    $display("page breaks %0d/%0d/%0d, cache hits %0d misses %0d", br[0], br[1], br[2], hi[2], mi[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
