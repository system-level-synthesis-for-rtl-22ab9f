// tb_at_local_tlb: self-checking test of at_local_tlb.
//
// The shadow table (NP random entries) starts near the end of a physical
// page, so the preload must split its bursts at page boundaries. The test
// checks that ready rises only after the copy, that the copy used exactly
// the expected number of bursts and words, and that no memory access
// happens afterwards. Then every page of the array is translated back to
// back (a new request every cycle) and each result must arrive one cycle
// after acceptance and equal {table[page(V)-page(base)][31:12], V[11:0]}.
// A second run with a new table checks that start reloads the copy.
module tb_at_local_tlb;
  import vm_pkg::*;

  localparam int unsigned LAT = 30;
  localparam int unsigned NP  = 2100;
  localparam addr_t TBASE = 32'h0020_0f00;
  localparam addr_t VBASE = 32'h5555_5123;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, ready, tr_valid, tr_ready, tr_done;
  addr_t    cfg_table_base, cfg_array_vbase, tr_vaddr, tr_paddr;
  pn_t      cfg_npages;
  logic     t_cmd_valid, t_cmd_ready, t_rvalid, t_rlast, t_bvalid, t_wready;
  mem_cmd_t t_cmd;
  data_t    t_rdata;
  data_t    table_ref [NP];

  int checks = 0, failures = 0;

  at_local_tlb dut (.*);

  acp_mem_model #(.LAT(LAT), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .cmd_valid (t_cmd_valid), .cmd_ready (t_cmd_ready), .cmd (t_cmd),
    .wvalid (1'b0), .wready (t_wready), .wdata ('0), .wlast (1'b0),
    .rvalid (t_rvalid), .rdata (t_rdata), .rlast (t_rlast), .bvalid (t_bvalid)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected bursts for a table of n words at base b, split at 4 kB pages.
  function automatic int unsigned exp_bursts(addr_t b, int unsigned n);
    addr_t first_end;
    int unsigned first;
    first = (4096 - (b & 32'hfff)) / 4;
    if (n <= first) return 1;
    return 1 + (n - first + 1023) / 1024;
  endfunction

  task automatic one_run(int run);
    int unsigned r0, w0, cyc, k, inflight;
    addr_t va;
    addr_t exp_q [$];
    for (int i = 0; i < NP; i++) begin
      table_ref[i] = {$urandom};
      u_mem.poke(TBASE + 4 * i, table_ref[i]);
    end
    r0 = u_mem.n_reads; w0 = u_mem.n_words;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!ready) begin
      check(!tr_ready, "no translation during preload");
      @(negedge clk);
      cyc++;
    end
    check(u_mem.n_reads - r0 == exp_bursts(TBASE, NP),
          $sformatf("run %0d: %0d bursts exp %0d", run, u_mem.n_reads - r0, exp_bursts(TBASE, NP)));
    check(u_mem.n_words - w0 == NP, $sformatf("run %0d: preload words %0d", run, u_mem.n_words - w0));
    r0 = u_mem.n_reads;
    // back-to-back translations of every page, in random order of offsets
    k = 0;
    inflight = 0;
    while (k < NP || inflight > 0) begin
      if (k < NP) begin
        va = ((VBASE & 32'hffff_f000) + k * 4096) | ($urandom & 32'hfff);
        tr_valid = 1'b1;
        tr_vaddr = va;
        exp_q.push_back({table_ref[k][31:12], va[11:0]});
      end else begin
        tr_valid = 1'b0;
      end
      @(posedge clk);
      if (k < NP) begin
        check(tr_ready, "accepts every cycle");
        k++;
      end
      #1;
      if (tr_done) begin
        check(exp_q.size() > 0, "unexpected tr_done");
        if (exp_q.size() > 0) begin
          addr_t e;
          e = exp_q.pop_front();
          check(tr_paddr == e, $sformatf("paddr %h exp %h", tr_paddr, e));
        end
      end
      inflight = exp_q.size();
      check(inflight <= 1, "one-cycle lookup latency");
      @(negedge clk);
    end
    tr_valid = 1'b0;
    check(u_mem.n_reads == r0, "no memory traffic while translating");
  endtask

  initial begin
    start = 1'b0; tr_valid = 1'b0; tr_vaddr = '0;
    cfg_table_base = TBASE; cfg_array_vbase = VBASE; cfg_npages = pn_t'(NP);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ready, "not ready before start");
    one_run(0);
    one_run(1);
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
