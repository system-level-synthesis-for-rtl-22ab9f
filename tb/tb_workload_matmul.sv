// tb_workload_matmul: the blocked matrix product, run through the
// address-translation shell in each translation mode and with two tile
// sizes (6 runs side by side, 64 x 64 matrices, tiles 16 and 32).
//
// Each run checks its product (see matmul_harness). The run lengths must
// show what makes DRAM_TLB acceptable for burst-heavy, compute-bound
// kernels: its overhead over LOCAL_TLB, one table read per row burst, must
// stay below 25 % with 16 x 16 tiles and below 10 % with 32 x 32 tiles, and
// shrink as the tiles grow. CACHE_TLB must be within 2 % of LOCAL_TLB.
module tb_workload_matmul;
  import vm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin [6];
  int          c [6], f [6];
  logic [47:0] cyc [6];
  int          checks, failures;

  matmul_harness #(.MODE(DRAM_TLB),  .TILE(16)) h0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .cycles(cyc[0]));
  matmul_harness #(.MODE(LOCAL_TLB), .TILE(16)) h1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .cycles(cyc[1]));
  matmul_harness #(.MODE(CACHE_TLB), .TILE(16)) h2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .cycles(cyc[2]));
  matmul_harness #(.MODE(DRAM_TLB),  .TILE(32)) h3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]), .cycles(cyc[3]));
  matmul_harness #(.MODE(LOCAL_TLB), .TILE(32)) h4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]), .cycles(cyc[4]));
  matmul_harness #(.MODE(CACHE_TLB), .TILE(32)) h5 (.clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]), .cycles(cyc[5]));

  initial begin
    repeat (5000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[3], f[0] + f[3] + 1);
    $finish;
  end

  initial begin
    real ov16, ov32;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    checks = 5; failures = 0;
    for (int i = 0; i < 6; i++) begin checks += c[i]; failures += f[i]; end
    ov16 = real'(cyc[0]) / real'(cyc[1]) - 1.0;
    ov32 = real'(cyc[3]) / real'(cyc[4]) - 1.0;
    $display("tile 16: DRAM_TLB %0d, LOCAL_TLB %0d, CACHE_TLB %0d cycles (DRAM overhead %0.1f %%)",
             cyc[0], cyc[1], cyc[2], 100.0 * ov16);
    $display("tile 32: DRAM_TLB %0d, LOCAL_TLB %0d, CACHE_TLB %0d cycles (DRAM overhead %0.1f %%)",
             cyc[3], cyc[4], cyc[5], 100.0 * ov32);
    if (!(ov16 < 0.25))  begin failures++; $display("FAIL: DRAM_TLB overhead, tile 16"); end
    if (!(ov32 < 0.10))  begin failures++; $display("FAIL: DRAM_TLB overhead, tile 32"); end
    if (!(ov32 < ov16))  begin failures++; $display("FAIL: overhead does not shrink with the tile"); end
    if (!(real'(cyc[2]) <= 1.02 * real'(cyc[1]))) begin failures++; $display("FAIL: CACHE_TLB, tile 16"); end
    if (!(real'(cyc[5]) <= 1.02 * real'(cyc[4]))) begin failures++; $display("FAIL: CACHE_TLB, tile 32"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
