// tb_workload_pease: the FFT-style workload with scalar accesses, run
// through the address-translation shell once per translation mode.
//
// Three pease_harness instances (DRAM_TLB, LOCAL_TLB, CACHE_TLB) transform
// the same kind of 2048-point data with 11 constant-geometry stages of
// scalar reads and writes. Each checks its result. The run lengths must
// reflect the cost of each mode for scalar accesses: DRAM_TLB pays one extra
// memory access per access and must be at least 1.5 times slower than
// LOCAL_TLB, and CACHE_TLB, whose few misses are one per page, must stay
// within 5 % of LOCAL_TLB.
module tb_workload_pease;
  import vm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin [3];
  int          c [3], f [3];
  logic [47:0] cyc [3];
  int          checks, failures;

  pease_harness #(.MODE(DRAM_TLB))  h0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .cycles(cyc[0]));
  pease_harness #(.MODE(LOCAL_TLB)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .cycles(cyc[1]));
  pease_harness #(.MODE(CACHE_TLB)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .cycles(cyc[2]));

  initial begin
    repeat (20000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2] + 2;
    failures = f[0] + f[1] + f[2];
    $display("cycles: DRAM_TLB %0d, LOCAL_TLB %0d, CACHE_TLB %0d", cyc[0], cyc[1], cyc[2]);
    if (!(cyc[0] * 2 >= cyc[1] * 3)) begin failures++; $display("FAIL: DRAM_TLB not slower than LOCAL_TLB"); end
    if (!(cyc[2] * 100 <= cyc[1] * 105)) begin failures++; $display("FAIL: CACHE_TLB far from LOCAL_TLB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
