// matmul_harness: runs a blocked matrix product C = A x B through a
// three-array vm_hw_thread whose arrays all use translation MODE; used by
// tb_workload_matmul.
//
// The accelerator side is played here. For every TILE x TILE block of C it
// loops over the blocks of the shared dimension: it reads the TILE rows of
// the A block and of the B block as TILE-word bursts, then spends TILE^3
// cycles computing (one multiply-accumulate per cycle, a stand-in for the
// accelerator's datapath), and finally writes the C block as row bursts.
// The matrices (NM x NM words) start off page boundaries and their pages are
// scattered, so some row bursts are split. The result is checked against a
// product computed here, through the shell and at its physical location;
// cycles reports the run length from the shell's performance counter.
module matmul_harness
  import vm_pkg::*;
#(
  parameter at_mode_e    MODE = DRAM_TLB,
  parameter int unsigned NM   = 64,
  parameter int unsigned TILE = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int          checks,
  output int          failures,
  output logic [47:0] cycles
);
  localparam int NA  = 3;
  localparam int PGS = (NM * NM * 4 + 4095) / 4096 + 1;

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

  vm_hw_thread #(.MODES({MODE, MODE, MODE})) dut (.*);

  acp_mem_model #(.LAT(30)) u_mem (
    .clk, .rst_n, .cmd_valid (m_cmd_valid), .cmd_ready (m_cmd_ready), .cmd (m_cmd),
    .wvalid (m_wvalid), .wready (m_wready), .wdata (m_wdata), .wlast (m_wlast),
    .rvalid (m_rvalid), .rdata (m_rdata), .rlast (m_rlast), .bvalid (m_bvalid)
  );

  addr_t vbase [NA] = '{32'h4000_0a00, 32'h4010_0f00, 32'h4020_0104};
  addr_t tbase [NA] = '{32'h0080_0000, 32'h0080_1000, 32'h0080_2000};
  addr_t ppage [NA][PGS];
  data_t A [NM][NM], B [NM][NM], C [NM][NM];
  data_t wq [NA][$];
  data_t rq [NA][$];
  int    n_done [NA];

  for (genvar p = 0; p < NA; p++) begin : g_acc
    always @(posedge clk) begin
      if (acc_wvalid[p] && acc_wready[p]) void'(wq[p].pop_front());
      if (acc_rvalid[p]) rq[p].push_back(acc_rdata[p]);
      if (acc_done[p]) n_done[p]++;
    end
    always @(negedge clk) begin
      #1;
      acc_wvalid[p] = wq[p].size() > 0;
      acc_wdata[p]  = (wq[p].size() > 0) ? wq[p][0] : '0;
    end
  end

  function automatic addr_t v2p(int a, addr_t va);
    return ppage[a][(va >> 12) - (vbase[a] >> 12)] | (va & 32'hfff);
  endfunction

  function automatic addr_t elem(int a, int r, int c);
    return vbase[a] + 4 * (r * NM + c);
  endfunction

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
    data_t ta [TILE][TILE], tb [TILE][TILE], tc [TILE][TILE];
    finished = 1'b0; checks = 0; failures = 0;
    start = 1'b0; acc_finish = 1'b0;
    for (int p = 0; p < NA; p++) begin
      acc_req_valid[p] = 1'b0; acc_req_vaddr[p] = '0; acc_req_nwords[p] = '0; acc_req_we[p] = 1'b0;
      acc_wvalid[p] = 1'b0; acc_wdata[p] = '0; n_done[p] = 0;
      for (int g = 0; g < PGS; g++) begin
        ppage[p][g] = 32'h2000_0000 + (((g * 7 + p * 3 + 1) % (PGS * 2)) * NA + p) * 4096;
        u_mem.poke(tbase[p] + 4 * g, ppage[p][g]);
      end
      cfg_table_base[p] = tbase[p]; cfg_array_vbase[p] = vbase[p]; cfg_npages[p] = pn_t'(PGS);
    end
    for (int r = 0; r < NM; r++)
      for (int c = 0; c < NM; c++) begin
        A[r][c] = $urandom % 1000; B[r][c] = $urandom % 1000;
        u_mem.poke(v2p(0, elem(0, r, c)), A[r][c]);
        u_mem.poke(v2p(1, elem(1, r, c)), B[r][c]);
      end
    for (int r = 0; r < NM; r++)
      for (int c = 0; c < NM; c++) begin
        C[r][c] = 0;
        for (int k = 0; k < NM; k++) C[r][c] += A[r][k] * B[k][c];
      end
    wait (rst_n);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int i0 = 0; i0 < NM; i0 += TILE)
      for (int j0 = 0; j0 < NM; j0 += TILE) begin
        foreach (tc[r, c]) tc[r][c] = 0;
        for (int k0 = 0; k0 < NM; k0 += TILE) begin
          for (int r = 0; r < TILE; r++) begin
            rq[0].delete();
            access(0, elem(0, i0 + r, k0), TILE, 1'b0, none);
            for (int c = 0; c < TILE; c++) ta[r][c] = rq[0][c];
            rq[1].delete();
            access(1, elem(1, k0 + r, j0), TILE, 1'b0, none);
            for (int c = 0; c < TILE; c++) tb[r][c] = rq[1][c];
          end
          for (int r = 0; r < TILE; r++)
            for (int c = 0; c < TILE; c++)
              for (int k = 0; k < TILE; k++) tc[r][c] += ta[r][k] * tb[k][c];
          repeat (TILE * TILE * TILE) @(negedge clk);
        end
        for (int r = 0; r < TILE; r++) begin
          row = {};
          for (int c = 0; c < TILE; c++) row.push_back(tc[r][c]);
          access(2, elem(2, i0 + r, j0), TILE, 1'b1, row);
        end
      end
    @(negedge clk);
    acc_finish = 1'b1;
    @(negedge clk);
    acc_finish = 1'b0;
    for (int r = 0; r < NM; r++) begin
      rq[2].delete();
      access(2, elem(2, r, 0), NM, 1'b0, none);
      checks += 2;
      for (int c = 0; c < NM; c++)
        if (rq[2][c] != C[r][c]) begin
          failures++; $display("FAIL mode %0d tile %0d: C[%0d][%0d]", MODE, TILE, r, c); break;
        end
      for (int c = 0; c < NM; c++)
        if (u_mem.peek(v2p(2, elem(2, r, c))) != C[r][c]) begin
          failures++; $display("FAIL mode %0d tile %0d: physical C[%0d][%0d]", MODE, TILE, r, c); break;
        end
    end
    checks++;
    if (u_mem.n_protocol_errors != 0) failures++;
    finished = 1'b1;
  end
endmodule
