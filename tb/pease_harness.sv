// pease_harness: runs a constant-geometry (Pease) transform through a
// two-array vm_hw_thread whose arrays both use translation MODE; used by
// tb_workload_pease.
//
// The accelerator side is played here. Every stage reads x[i] and
// x[i+NP/2] and writes y[2i] = a+b, y[2i+1] = a-b, all with scalar
// (one-word) accesses, then the roles of the two arrays swap; after
// log2(NP) stages this is the Walsh-Hadamard transform, i.e. a Pease FFT
// data flow with trivial twiddles. The access pattern has no bursts, the
// case the published scheme singles out as the hardest for address translation.
// The result is read back and compared with the same stages computed in
// plain arrays here; cycles reports the run length from the shell's
// performance counter.
module pease_harness
  import vm_pkg::*;
#(
  parameter at_mode_e    MODE = CACHE_TLB,
  parameter int unsigned LOGN = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int          checks,
  output int          failures,
  output logic [47:0] cycles
);
  localparam int NP = 1 << LOGN;
  localparam int NA = 2;
  localparam int PGS = (NP * 4 + 4095) / 4096 + 1;

  logic             start, ready, acc_finish, running;
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

  vm_hw_thread #(.N_ARRAYS(NA), .MODES({MODE, MODE})) dut (.*);

  acp_mem_model #(.LAT(30)) u_mem (
    .clk, .rst_n, .cmd_valid (m_cmd_valid), .cmd_ready (m_cmd_ready), .cmd (m_cmd),
    .wvalid (m_wvalid), .wready (m_wready), .wdata (m_wdata), .wlast (m_wlast),
    .rvalid (m_rvalid), .rdata (m_rdata), .rlast (m_rlast), .bvalid (m_bvalid)
  );

  addr_t vbase [NA] = '{32'h4000_0800, 32'h4100_0c00};
  addr_t tbase [NA] = '{32'h0090_0000, 32'h0090_1000};
  addr_t ppage [NA][PGS];
  data_t ref_x [NP], ref_y [NP];
  data_t last_rd;
  int    n_done [NA];

  for (genvar p = 0; p < NA; p++) begin : g_mon
    always @(posedge clk) begin
      if (acc_done[p]) n_done[p]++;
      if (acc_rvalid[p]) last_rd <= acc_rdata[p];
    end
  end

  function automatic addr_t v2p(int a, addr_t va);
    return ppage[a][(va >> 12) - (vbase[a] >> 12)] | (va & 32'hfff);
  endfunction

  task automatic rd(int p, int idx, output data_t d);
    int d0;
    d0 = n_done[p];
    @(negedge clk);
    acc_req_valid[p] = 1'b1; acc_req_vaddr[p] = vbase[p] + 4 * idx; acc_req_nwords[p] = 1; acc_req_we[p] = 1'b0;
    do @(posedge clk); while (!acc_req_ready[p]);
    @(negedge clk);
    acc_req_valid[p] = 1'b0;
    while (n_done[p] == d0) @(negedge clk);
    d = last_rd;
  endtask

  task automatic wr(int p, int idx, data_t d);
    int d0;
    d0 = n_done[p];
    @(negedge clk);
    acc_req_valid[p] = 1'b1; acc_req_vaddr[p] = vbase[p] + 4 * idx; acc_req_nwords[p] = 1; acc_req_we[p] = 1'b1;
    acc_wvalid[p] = 1'b1; acc_wdata[p] = d;
    do @(posedge clk); while (!acc_req_ready[p]);
    @(negedge clk);
    acc_req_valid[p] = 1'b0;
    while (!(acc_wvalid[p] && acc_wready[p])) @(posedge clk);
    @(negedge clk);
    acc_wvalid[p] = 1'b0;
    while (n_done[p] == d0) @(negedge clk);
  endtask

  initial begin
    int src;
    data_t a, b, d;
    finished = 1'b0; checks = 0; failures = 0;
    start = 1'b0; acc_finish = 1'b0;
    for (int p = 0; p < NA; p++) begin
      acc_req_valid[p] = 1'b0; acc_req_vaddr[p] = '0; acc_req_nwords[p] = '0; acc_req_we[p] = 1'b0;
      acc_wvalid[p] = 1'b0; acc_wdata[p] = '0; n_done[p] = 0;
      for (int g = 0; g < PGS; g++) begin
        ppage[p][g] = 32'h3000_0000 + ((g * 7 + 2) % (PGS * 3)) * 8192 + p * 4096;
        u_mem.poke(tbase[p] + 4 * g, ppage[p][g]);
      end
      cfg_table_base[p] = tbase[p]; cfg_array_vbase[p] = vbase[p]; cfg_npages[p] = pn_t'(PGS);
    end
    for (int i = 0; i < NP; i++) begin
      ref_x[i] = $urandom % 256;
      u_mem.poke(v2p(0, vbase[0] + 4 * i), ref_x[i]);
    end
    wait (rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    src = 0;
    for (int s = 0; s < LOGN; s++) begin
      for (int i = 0; i < NP / 2; i++) begin
        rd(src, i, a);
        rd(src, i + NP / 2, b);
        wr(1 - src, 2 * i, a + b);
        wr(1 - src, 2 * i + 1, a - b);
        ref_y[2 * i] = ref_x[i] + ref_x[i + NP / 2];
        ref_y[2 * i + 1] = ref_x[i] - ref_x[i + NP / 2];
      end
      ref_x = ref_y;
      src = 1 - src;
    end
    @(negedge clk);
    acc_finish = 1'b1;
    @(negedge clk);
    acc_finish = 1'b0;
    // check the result, through the shell and at its physical location
    for (int i = 0; i < NP; i++) begin
      rd(src, i, d);
      checks += 2;
      if (d != ref_x[i]) begin failures++; $display("FAIL mode %0d: X[%0d] %h exp %h", MODE, i, d, ref_x[i]); end
      if (u_mem.peek(v2p(src, vbase[src] + 4 * i)) != ref_x[i]) begin failures++; $display("FAIL mode %0d: physical X[%0d]", MODE, i); end
    end
    checks++;
    if (u_mem.n_protocol_errors != 0) failures++;
    finished = 1'b1;
  end
endmodule
