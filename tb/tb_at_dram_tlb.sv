// tb_at_dram_tlb: self-checking test of at_dram_tlb.
//
// A shadow page table of NP entries (random physical page addresses, with
// junk in the low 12 bits that must be ignored) is written into the memory
// model; the array starts in the middle of a virtual page. Random virtual
// addresses inside the array are translated and compared with
// {table[page(V) - page(base)][31:12], V[11:0]} computed here. Each
// translation must cost exactly one single-word table read, and, with a
// memory answering LAT+1 edges after the command, take LAT+2 cycles from
// acceptance to tr_done.
module tb_at_dram_tlb;
  import vm_pkg::*;

  localparam int unsigned LAT = 30;
  localparam int unsigned NP  = 300;
  localparam addr_t TBASE = 32'h0010_0f80;
  localparam addr_t VBASE = 32'h4000_0a00;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     start, ready, tr_valid, tr_ready, tr_done;
  addr_t    cfg_table_base, cfg_array_vbase, tr_vaddr, tr_paddr;
  logic     t_cmd_valid, t_cmd_ready, t_rvalid, t_rlast, t_bvalid, t_wready;
  mem_cmd_t t_cmd;
  data_t    t_rdata;
  data_t    table_ref [NP];

  int checks = 0, failures = 0;

  at_dram_tlb dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t va, exp;
    int unsigned lat, reads0;
    start = 1'b0; tr_valid = 1'b0; tr_vaddr = '0;
    cfg_table_base = TBASE; cfg_array_vbase = VBASE;
    for (int k = 0; k < NP; k++) begin
      table_ref[k] = {$urandom};
      u_mem.poke(TBASE + 4 * k, table_ref[k]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ready && !tr_ready, "not ready before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(ready, "ready after start");
    for (int t = 0; t < 400; t++) begin
      va = VBASE + ($urandom % ((NP - 1) * 4096 - 32'h0a00));
      exp = {table_ref[(va >> 12) - (VBASE >> 12)][31:12], va[11:0]};
      reads0 = u_mem.n_reads;
      tr_valid = 1'b1; tr_vaddr = va;
      do @(posedge clk); while (!tr_ready);
      @(negedge clk);
      tr_valid = 1'b0; tr_vaddr = $urandom;   // input may change after acceptance
      lat = 0;
      while (!tr_done) begin @(negedge clk); lat++; end
      lat++;
      check(tr_paddr == exp, $sformatf("va %h -> %h exp %h", va, tr_paddr, exp));
      check(lat == LAT + 2, $sformatf("latency %0d exp %0d", lat, LAT + 2));
      @(negedge clk);
      check(u_mem.n_reads == reads0 + 1, "one table read per translation");
    end
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
