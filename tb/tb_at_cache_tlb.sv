// tb_at_cache_tlb: self-checking test of at_cache_tlb.
//
// A shadow table of NP entries lives in the memory model. Virtual addresses
// are drawn from a mix of a small hot set of pages (mostly hits) and pages
// that share a cache index with a hot page but differ in tag (conflict
// misses). A reference direct-mapped cache kept here predicts hit or miss
// for every request; the test checks the hit/miss pulses, the translated
// address, one table read per miss and none per hit, and the latency: 1
// cycle after acceptance for a hit, LAT+3 for a miss with a memory that
// answers LAT+1 edges after the command. A second start must flush the
// cache, so the first access to each page misses again.
module tb_at_cache_tlb;
  import vm_pkg::*;

  localparam int unsigned LAT   = 30;
  localparam int unsigned LINES = 1024;
  localparam int unsigned NP    = 4 * LINES;
  localparam addr_t TBASE = 32'h0030_0000;
  localparam addr_t VBASE = 32'h6000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, ready, tr_valid, tr_ready, tr_done, hit, miss;
  addr_t    cfg_table_base, cfg_array_vbase, tr_vaddr, tr_paddr;
  logic     t_cmd_valid, t_cmd_ready, t_rvalid, t_rlast, t_bvalid, t_wready;
  mem_cmd_t t_cmd;
  data_t    t_rdata;
  data_t    table_ref [NP];

  // reference cache: which page each line holds, -1 if empty
  int ref_line [LINES];
  int n_hit = 0, n_miss = 0;
  int checks = 0, failures = 0;

  at_cache_tlb dut (.*);

  acp_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .cmd_valid (t_cmd_valid), .cmd_ready (t_cmd_ready), .cmd (t_cmd),
    .wvalid (1'b0), .wready (t_wready), .wdata ('0), .wlast (1'b0),
    .rvalid (t_rvalid), .rdata (t_rdata), .rlast (t_rlast), .bvalid (t_bvalid)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic translate(int page);
    addr_t va, exp;
    int unsigned lat, r0;
    bit exp_hit;
    va = VBASE + page * 4096 + ($urandom & 32'hffc);
    exp = {table_ref[page][31:12], va[11:0]};
    exp_hit = (ref_line[page % LINES] == page);
    ref_line[page % LINES] = page;
    r0 = u_mem.n_reads;
    tr_valid = 1'b1; tr_vaddr = va;
    do @(posedge clk); while (!tr_ready);
    @(negedge clk);
    tr_valid = 1'b0;
    lat = 1;
    while (!tr_done) begin @(negedge clk); lat++; end
    check(tr_paddr == exp, $sformatf("page %0d: %h exp %h", page, tr_paddr, exp));
    check(hit == exp_hit && miss == !exp_hit, $sformatf("page %0d: hit %b exp %b", page, hit, exp_hit));
    check(lat == (exp_hit ? 1 : LAT + 3), $sformatf("latency %0d (hit %b)", lat, exp_hit));
    @(negedge clk);
    check(u_mem.n_reads - r0 == (exp_hit ? 0 : 1), "table reads");
    if (exp_hit) n_hit++; else n_miss++;
  endtask

  initial begin
    int hot [8];
    start = 1'b0; tr_valid = 1'b0; tr_vaddr = '0;
    cfg_table_base = TBASE; cfg_array_vbase = VBASE;
    for (int k = 0; k < NP; k++) begin
      table_ref[k] = {$urandom};
      u_mem.poke(TBASE + 4 * k, table_ref[k]);
    end
    foreach (hot[i]) hot[i] = $urandom % NP;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      for (int l = 0; l < LINES; l++) ref_line[l] = -1;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(ready, "ready after start");
      for (int t = 0; t < 600; t++) begin
        case ($urandom % 4)
          0, 1: translate(hot[$urandom % 8]);
          2:    translate((hot[$urandom % 8] + LINES * (1 + $urandom % 3)) % NP);
          default: translate($urandom % NP);
        endcase
      end
    end
    check(n_hit > 100 && n_miss > 100, $sformatf("mix of hits %0d and misses %0d", n_hit, n_miss));
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
