// tb_vm_hw_thread: end-to-end test of the address-translation shell at its
// default parameters (three arrays: A via DRAM_TLB, B via LOCAL_TLB, C via
// CACHE_TLB, an 8192-entry local table and a 1024-line cache).
//
// The testbench plays both the software side and the accelerator. As
// software, it places three N x N matrices of 32-bit words at virtual
// addresses that do not start on a page boundary, maps each virtual page to
// a scattered physical page, writes the shadow page tables (one physical
// page address per virtual page) into the memory model and starts the
// thread with the tables' addresses. As the accelerator, it computes the
// matrix product C = A x B row by row: read row i of A as one burst, read
// every row k of B as a burst, accumulate, and write row i of C as a burst
// while the next row of A is being read on another port. Finally it reads
// C back with scalar accesses and checks every element against a product
// computed here, and also checks C at its physical location.
//
// Each mechanism must occur at least once: the accelerator stalling until
// the local table is loaded, page breaks inside bursts on all three ports,
// external table lookups (DRAM_TLB), cache hits and misses (CACHE_TLB),
// arbitration conflicts between ports, and a cycle count from the
// performance counter equal to the run length seen here.
module tb_vm_hw_thread;
  import vm_pkg::*;

  localparam int N   = 48;          // matrix order of this test
  localparam int NA  = 3;
  localparam int PGS = (N * N * 4 + 4095) / 4096 + 1;   // pages per array

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start, ready, acc_finish, running;
  logic [47:0]      cycles;
  addr_t            cfg_table_base  [NA];
  addr_t            cfg_array_vbase [NA];
  pn_t              cfg_npages      [NA];
  logic             acc_req_valid  [NA];
  logic             acc_req_ready  [NA];
  addr_t            acc_req_vaddr  [NA];
  acc_len_t         acc_req_nwords [NA];
  logic             acc_req_we     [NA];
  logic             acc_wvalid     [NA];
  logic             acc_wready     [NA];
  data_t            acc_wdata      [NA];
  logic             acc_rvalid     [NA];
  data_t            acc_rdata      [NA];
  logic             acc_done       [NA];
  logic             m_cmd_valid, m_cmd_ready, m_wvalid, m_wready, m_wlast, m_rvalid, m_rlast, m_bvalid;
  mem_cmd_t         m_cmd;
  data_t            m_wdata, m_rdata;
  logic             ev_xlate [NA];
  logic             ev_break [NA];
  logic             ev_hit   [NA];
  logic             ev_miss  [NA];
  logic             conflict;

  vm_hw_thread dut (.*);

  acp_mem_model #(.LAT(30), .STALL_PCT(5)) u_mem (
    .clk, .rst_n, .cmd_valid (m_cmd_valid), .cmd_ready (m_cmd_ready), .cmd (m_cmd),
    .wvalid (m_wvalid), .wready (m_wready), .wdata (m_wdata), .wlast (m_wlast),
    .rvalid (m_rvalid), .rdata (m_rdata), .rlast (m_rlast), .bvalid (m_bvalid)
  );

  int checks = 0, failures = 0;
  int n_xlate [NA], n_break [NA], n_hit [NA], n_miss [NA], n_done [NA];
  int n_conflict = 0, n_stall = 0;

  addr_t vbase [NA] = '{32'h4000_0a00, 32'h4010_0f00, 32'h4020_0104};
  addr_t tbase [NA] = '{32'h0080_0000, 32'h0080_1ff8, 32'h0080_3000};
  addr_t ppage [NA][PGS];

  data_t A [N][N], B [N][N], C [N][N];
  data_t wq [NA][$];
  data_t rq [NA][$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t v2p(int a, addr_t va);
    return ppage[a][(va >> 12) - (vbase[a] >> 12)] | (va & 32'hfff);
  endfunction

  function automatic addr_t elem(int a, int r, int c);
    return vbase[a] + 4 * (r * N + c);
  endfunction

  // per-port write-data sources, read-data sinks and event counters
  for (genvar p = 0; p < NA; p++) begin : g_acc
    always @(posedge clk) begin
      if (acc_wvalid[p] && acc_wready[p]) void'(wq[p].pop_front());
      if (acc_rvalid[p]) rq[p].push_back(acc_rdata[p]);
      if (acc_done[p]) n_done[p]++;
      if (ev_xlate[p]) n_xlate[p]++;
      if (ev_break[p]) n_break[p]++;
      if (ev_hit[p])   n_hit[p]++;
      if (ev_miss[p])  n_miss[p]++;
    end
    always @(negedge clk) begin
      #1;
      acc_wvalid[p] = wq[p].size() > 0;
      acc_wdata[p]  = (wq[p].size() > 0) ? wq[p][0] : '0;
    end
  end

  // a port-1 request is outstanding while the shell is not yet ready
  bit b_pending = 1'b0;
  always @(posedge clk) begin
    if (conflict) n_conflict++;
    if (b_pending && !ready) n_stall++;
    if (acc_req_valid[1] && acc_req_ready[1]) b_pending <= 1'b1;
    else if (acc_done[1]) b_pending <= 1'b0;
  end

  // One virtual burst on port p; read data is left in rq[p].
  task automatic access(int p, addr_t va, int nw, bit we, data_t wd [$]);
    int d0;
    d0 = n_done[p];
    if (we) foreach (wd[i]) wq[p].push_back(wd[i]);
    @(negedge clk);
    acc_req_valid[p] = 1'b1; acc_req_vaddr[p] = va; acc_req_nwords[p] = acc_len_t'(nw); acc_req_we[p] = we;
    do @(posedge clk); while (!acc_req_ready[p]);
    @(negedge clk);
    acc_req_valid[p] = 1'b0;
    while (n_done[p] == d0) @(negedge clk);
  endtask

  initial begin
    data_t none [$];
    data_t row [$];
    data_t acc [N];
    data_t c_row [$];
    int unsigned t0;
    for (int p = 0; p < NA; p++) begin
      acc_req_valid[p] = 1'b0; acc_req_vaddr[p] = '0; acc_req_nwords[p] = '0; acc_req_we[p] = 1'b0;
      acc_wvalid[p] = 1'b0; acc_wdata[p] = '0;
      n_xlate[p] = 0; n_break[p] = 0; n_hit[p] = 0; n_miss[p] = 0; n_done[p] = 0;
    end
    start = 1'b0; acc_finish = 1'b0;
    // software side: scattered physical pages, shadow tables, matrices
    for (int a = 0; a < NA; a++) begin
      for (int g = 0; g < PGS; g++) begin
        ppage[a][g] = 32'h2000_0000 + (((g * 5 + a * 3 + 1) % (PGS * 2)) * NA + a) * 4096;
        u_mem.poke(tbase[a] + 4 * g, ppage[a][g]);
      end
      cfg_table_base[a] = tbase[a]; cfg_array_vbase[a] = vbase[a]; cfg_npages[a] = pn_t'(PGS);
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        A[r][c] = $urandom % 1000; B[r][c] = $urandom % 1000;
        u_mem.poke(v2p(0, elem(0, r, c)), A[r][c]);
        u_mem.poke(v2p(1, elem(1, r, c)), B[r][c]);
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        C[r][c] = 0;
        for (int k = 0; k < N; k++) C[r][c] += A[r][k] * B[k][c];
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    t0 = 0;
    @(negedge clk);
    start = 1'b0;
    check(!ready, "LOCAL_TLB port not ready while its table loads");
    // the first read of B is issued at once and must wait for the preload
    rq[1].delete();
    access(1, elem(1, 0, 0), N, 1'b0, none);
    check(rq[1].size() == N && rq[1][N-1] == B[0][N-1], "first row of B after preload");
    // accelerator: C = A x B, row by row
    c_row = {};
    for (int i = 0; i <= N; i++) begin
      fork
        if (i < N) begin
          rq[0].delete();
          access(0, elem(0, i, 0), N, 1'b0, none);
        end
        if (i > 0) access(2, elem(2, i - 1, 0), N, 1'b1, c_row);
      join
      if (i == N) break;
      check(rq[0].size() == N, $sformatf("row %0d of A: %0d words", i, rq[0].size()));
      foreach (acc[j]) acc[j] = 0;
      for (int k = 0; k < N; k++) begin
        rq[1].delete();
        access(1, elem(1, k, 0), N, 1'b0, none);
        for (int j = 0; j < N; j++) acc[j] += rq[0][k] * rq[1][j];
      end
      c_row = {};
      foreach (acc[j]) c_row.push_back(acc[j]);
    end
    // read C back with scalar accesses
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        rq[2].delete();
        access(2, elem(2, r, c), 1, 1'b0, none);
        if (rq[2].size() != 1 || rq[2][0] != C[r][c]) check(1'b0, $sformatf("C[%0d][%0d]", r, c));
        if (u_mem.peek(v2p(2, elem(2, r, c))) != C[r][c]) check(1'b0, $sformatf("C[%0d][%0d] physical", r, c));
      end
    checks += 2;
    @(negedge clk);
    acc_finish = 1'b1;
    @(negedge clk);
    acc_finish = 1'b0;
    // mechanism coverage
    check(n_stall > 0, $sformatf("accelerator stalled on table preload (%0d cycles)", n_stall));
    for (int p = 0; p < NA; p++) check(n_break[p] > 0, $sformatf("page breaks on port %0d: %0d", p, n_break[p]));
    check(n_xlate[0] > 0 && n_xlate[0] == N + n_break[0], $sformatf("DRAM_TLB lookups %0d", n_xlate[0]));
    check(n_hit[2] > 0 && n_miss[2] > 0, $sformatf("cache hits %0d misses %0d", n_hit[2], n_miss[2]));
    check(n_miss[2] == ((vbase[2] + N * N * 4 - 1) >> 12) - (vbase[2] >> 12) + 1,
          $sformatf("one cache miss per page of C: %0d", n_miss[2]));
    check(n_conflict > 0, $sformatf("arbitration conflicts %0d", n_conflict));
    check(!running && cycles > 0, "performance counter stopped");
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("stall %0d, breaks %0d/%0d/%0d, dram lookups %0d, cache hit %0d miss %0d, conflicts %0d, cycles %0d",
             n_stall, n_break[0], n_break[1], n_break[2], n_xlate[0], n_hit[2], n_miss[2], n_conflict, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the counter must equal the cycles seen from the start edge to the finish edge
  int unsigned run_cycles = 0;
  bit in_run = 1'b0;
  always @(posedge clk) begin
    if (start) begin in_run <= 1'b1; run_cycles <= 0; end
    else if (in_run) begin
      run_cycles <= run_cycles + 1;
      if (acc_finish) begin
        in_run <= 1'b0;
        checks++;
        if (cycles + 1 != 48'(run_cycles + 1)) begin
          failures++;
          $display("FAIL: cycle counter %0d exp %0d", cycles + 1, run_cycles + 1);
        end
      end
    end
  end
endmodule
