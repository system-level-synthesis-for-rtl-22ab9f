// tb_page_splitter: self-checking test of page_splitter.
//
// Random burst requests (random start offset inside a page, 1..5000 words)
// are fed to the splitter while the chunk consumer drops ready at random.
// Each chunk is compared with a reference computed here: it must start where
// the previous one ended, run to the page end or the request end, carry the
// request's direction, and ch_last must mark exactly the final chunk. The
// number of chunks must equal the pages the burst touches, which is at most
// ceil(B/4096)+1 for B bytes. With ready held high, a request of k chunks
// must take exactly k cycles (one chunk per cycle).
module tb_page_splitter;
  import vm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid, req_ready, req_we;
  addr_t    req_vaddr;
  acc_len_t req_nwords;
  logic     ch_valid, ch_ready, ch_we, ch_last;
  addr_t    ch_vaddr;
  blen_t    ch_len;

  int checks = 0, failures = 0;

  page_splitter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One request, consumer ready with probability ready_pct.
  task automatic run_req(addr_t va, int unsigned nw, bit we, int unsigned ready_pct,
                         bit check_rate);
    addr_t exp_a;
    int unsigned left, n_ch, n_pages, cyc;
    int unsigned exp_len;
    exp_a = va;
    left  = nw;
    n_ch  = 0;
    n_pages = ((va + nw * 4 - 1) >> 12) - (va >> 12) + 1;
    @(negedge clk);
    req_valid = 1'b1; req_vaddr = va; req_nwords = acc_len_t'(nw); req_we = we;
    @(posedge clk);
    check(req_ready, "request accepted when idle");
    @(negedge clk);
    req_valid = 1'b0;
    cyc = 0;
    while (left > 0) begin
      ch_ready = ($urandom % 100) < ready_pct;
      @(posedge clk);
      cyc++;
      if (ch_valid && ch_ready) begin
        exp_len = 1024 - ((exp_a & 32'hfff) >> 2);
        if (exp_len > left) exp_len = left;
        check(ch_vaddr == exp_a, $sformatf("chunk addr %h exp %h", ch_vaddr, exp_a));
        check(int'(ch_len) == exp_len, $sformatf("chunk len %0d exp %0d", ch_len, exp_len));
        check(ch_we == we, "chunk direction");
        check(ch_last == (exp_len == left), "ch_last");
        exp_a = exp_a + exp_len * 4;
        left  = left - exp_len;
        n_ch++;
      end
      @(negedge clk);
    end
    ch_ready = 1'b0;
    check(n_ch == n_pages, $sformatf("chunks %0d pages %0d", n_ch, n_pages));
    check(n_ch <= (nw * 4 + 4095) / 4096 + 1, "chunk count bound ceil(B/P)+1");
    if (check_rate) check(cyc == n_ch, $sformatf("one chunk per cycle: %0d cycles for %0d", cyc, n_ch));
    @(posedge clk);
    check(req_ready && !ch_valid, "idle after last chunk");
  endtask

  initial begin
    req_valid = 1'b0; req_vaddr = '0; req_nwords = '0; req_we = 1'b0; ch_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed cases
    run_req(32'h1000_0000, 1,    1'b0, 100, 1'b1);   // scalar, page start
    run_req(32'h1000_0ffc, 1,    1'b1, 100, 1'b1);   // scalar, last word of page
    run_req(32'h1000_0ffc, 2,    1'b0, 100, 1'b1);   // crosses a page with 2 words
    run_req(32'h2000_0000, 1024, 1'b1, 100, 1'b1);   // exactly one page
    run_req(32'h2000_0004, 1024, 1'b0, 100, 1'b1);   // one page, misaligned: 2 chunks
    run_req(32'h3000_0800, 4096, 1'b0, 100, 1'b1);   // 16 kB misaligned: 5 chunks
    // random cases with back-pressure
    for (int t = 0; t < 300; t++)
      run_req({$urandom} & 32'hffff_fffc & 32'h7fff_ffff, 1 + $urandom % 5000, 1'($urandom),
              30 + $urandom % 71, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
