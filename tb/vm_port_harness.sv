// vm_port_harness: drives one vm_port of a given MODE through a random mix
// of virtual read and write bursts and checks every result; used by
// tb_vm_port.
//
// The array of NPAGES virtual pages starts mid-page at VBASE; its pages are
// mapped to a shuffled, non-contiguous set of physical pages, and the
// shadow table (one physical page address per virtual page) sits in a
// separate memory model on the table master. Write bursts update a
// reference copy of the virtual array kept here; read bursts must return
// the reference contents in order, and a sample of written words is also
// looked up directly at its physical address. Each request's acc_done must
// pulse once, after its last word, and the number of page breaks signalled
// must match the pages each burst touches. Results are reported through
// checks/failures once finished rises.
module vm_port_harness
  import vm_pkg::*;
#(
  parameter at_mode_e    MODE   = CACHE_TLB,
  parameter int unsigned NREQ   = 120,
  parameter int unsigned NPAGES = 12,
  parameter addr_t       VBASE  = 32'h7000_0340,
  parameter addr_t       TBASE  = 32'h0040_0ff0,
  parameter int unsigned SEED   = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_breaks,
  output int   n_hits,
  output int   n_misses
);

  logic     start, ready;
  logic     acc_req_valid, acc_req_ready, acc_req_we;
  addr_t    acc_req_vaddr;
  acc_len_t acc_req_nwords;
  logic     acc_wvalid, acc_wready, acc_rvalid, acc_done;
  data_t    acc_wdata, acc_rdata;
  logic     t_cmd_valid, t_cmd_ready, t_rvalid, t_rlast, t_bvalid, t_wready;
  mem_cmd_t t_cmd;
  data_t    t_rdata;
  logic     d_cmd_valid, d_cmd_ready, d_wvalid, d_wready, d_wlast, d_rvalid, d_rlast, d_bvalid;
  mem_cmd_t d_cmd;
  data_t    d_wdata, d_rdata;
  logic     ev_xlate, ev_break, ev_hit, ev_miss;
  addr_t    cfg_table_base, cfg_array_vbase;
  pn_t      cfg_npages;

  addr_t ppage [NPAGES];
  data_t vref [addr_t];
  data_t wq [$];
  data_t rq [$];
  int    n_done;

  vm_port #(.MODE(MODE), .LOCAL_ENTRIES(64), .CACHE_LINES(4)) dut (.*);

  acp_mem_model #(.LAT(30), .STALL_PCT(10)) u_tmem (
    .clk, .rst_n, .cmd_valid (t_cmd_valid), .cmd_ready (t_cmd_ready), .cmd (t_cmd),
    .wvalid (1'b0), .wready (t_wready), .wdata ('0), .wlast (1'b0),
    .rvalid (t_rvalid), .rdata (t_rdata), .rlast (t_rlast), .bvalid (t_bvalid)
  );

  acp_mem_model #(.LAT(30), .STALL_PCT(10)) u_dmem (
    .clk, .rst_n, .cmd_valid (d_cmd_valid), .cmd_ready (d_cmd_ready), .cmd (d_cmd),
    .wvalid (d_wvalid), .wready (d_wready), .wdata (d_wdata), .wlast (d_wlast),
    .rvalid (d_rvalid), .rdata (d_rdata), .rlast (d_rlast), .bvalid (d_bvalid)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL mode %0d: %s", MODE, what); end
  endtask

  function automatic addr_t v2p(addr_t va);
    return ppage[(va >> 12) - (VBASE >> 12)] | (va & 32'hfff);
  endfunction

  // Write-data source: presents queued words with random gaps.
  always @(posedge clk) begin
    if (acc_wvalid && acc_wready) begin
      void'(wq.pop_front());
    end
  end
  always @(negedge clk) begin
    #1;
    acc_wvalid = (wq.size() > 0) && ($urandom % 4 != 0);
    acc_wdata  = (wq.size() > 0) ? wq[0] : '0;
  end

  // Read-data sink and event counters.
  always @(posedge clk) begin
    if (acc_rvalid) rq.push_back(acc_rdata);
    if (acc_done)   n_done++;
    if (ev_break)   n_breaks++;
    if (ev_hit)     n_hits++;
    if (ev_miss)    n_misses++;
  end

  initial begin
    int unsigned span, nw, done0, br0, exp_pages;
    addr_t va;
    bit we;
    finished = 1'b0; checks = 0; failures = 0;
    n_breaks = 0; n_hits = 0; n_misses = 0; n_done = 0;
    start = 1'b0; acc_req_valid = 1'b0; acc_req_vaddr = '0; acc_req_nwords = '0; acc_req_we = 1'b0;
    acc_wvalid = 1'b0; acc_wdata = '0;
    void'($urandom(SEED));
    // physical pages: shuffled, non-contiguous
    for (int i = 0; i < NPAGES; i++) ppage[i] = 32'h1000_0000 + (((i * 7 + 3) % NPAGES) * 3 + 1) * 4096;
    for (int i = 0; i < NPAGES; i++) u_tmem.poke(TBASE + 4 * i, ppage[i] | 32'h0000_0abc);
    cfg_table_base = TBASE; cfg_array_vbase = VBASE; cfg_npages = pn_t'(NPAGES);
    span = (NPAGES - 1) * 1024 - ((VBASE & 32'hfff) >> 2);   // words in the array
    // initialise the reference from what physical memory holds
    for (int w = 0; w < span; w++) vref[VBASE + 4 * w] = u_dmem.peek(v2p(VBASE + 4 * w));
    wait (rst_n);
    @(negedge clk);
    // a request issued before start must wait for the unit to be ready
    acc_req_valid = 1'b1; acc_req_vaddr = VBASE; acc_req_nwords = 1; acc_req_we = 1'b0;
    repeat (5) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    acc_req_valid = 1'b0;
    wait (n_done == 1);
    check(rq.size() == 1 && rq[0] == vref[VBASE], "first read after start");
    rq.delete();
    for (int r = 0; r < NREQ; r++) begin
      we = 1'($urandom);
      nw = ($urandom % 3 == 0) ? 1 + $urandom % 4 : 1 + $urandom % 2500;
      va = VBASE + 4 * ($urandom % (span - nw));
      exp_pages = ((va + 4 * nw - 1) >> 12) - (va >> 12) + 1;
      if (we)
        for (int w = 0; w < nw; w++) begin
          data_t d;
          d = {$urandom};
          wq.push_back(d);
          vref[va + 4 * w] = d;
        end
      done0 = n_done; br0 = n_breaks;
      @(negedge clk);
      acc_req_valid = 1'b1; acc_req_vaddr = va; acc_req_nwords = acc_len_t'(nw); acc_req_we = we;
      do @(posedge clk); while (!acc_req_ready);
      @(negedge clk);
      acc_req_valid = 1'b0;
      wait (n_done == done0 + 1);
      @(negedge clk);
      check(n_breaks - br0 == exp_pages - 1, $sformatf("page breaks %0d exp %0d", n_breaks - br0, exp_pages - 1));
      if (we) begin
        check(wq.size() == 0, "all write data consumed");
        for (int s = 0; s < 4; s++) begin
          addr_t a;
          a = va + 4 * ($urandom % nw);
          check(u_dmem.peek(v2p(a)) == vref[a], $sformatf("physical word at va %h", a));
        end
      end else begin
        check(rq.size() == nw, $sformatf("read %0d words exp %0d", rq.size(), nw));
        for (int w = 0; w < nw && w < rq.size(); w++)
          if (rq[w] != vref[va + 4 * w]) begin
            check(1'b0, $sformatf("read va %h: %h exp %h", va + 4 * w, rq[w], vref[va + 4 * w]));
            break;
          end
        checks++;
        rq.delete();
      end
    end
    check(u_tmem.n_protocol_errors == 0 && u_dmem.n_protocol_errors == 0, "memory protocol");
    // the table straddles a physical page boundary: the copy takes two bursts
    if (MODE == LOCAL_TLB) check(u_tmem.n_reads == 2, "table copied once, split at the page");
    if (MODE == CACHE_TLB) check(n_hits > 0 && n_misses > 0, "cache hits and misses both seen");
    finished = 1'b1;
  end

endmodule
