// tb_workload_stencil: a tiled 2D stencil run through the address-translation
// shell at its default parameters.
//
// A G x G grid of 32-bit values (G = 100, not a power of two, like the
// 2000 x 2000 grid of the target kernel) is updated for T time steps with
//     out[y][x] = in[y-1][x] + in[y+1][x] + in[y][x-1] + in[y][x+1] - 4*in[y][x] + w[y][x]
// on the interior cells; border cells keep their values. The two grids U and
// V swap roles every step; U sits on array 0 (DRAM_TLB), the weight image W
// on array 1 (LOCAL_TLB) and V on array 2 (CACHE_TLB). The interior is cut
// into square tiles and the test runs twice, with two tile sizes (14 and 49).
// For each tile the accelerator reads the tile plus its one-cell halo row by
// row as bursts, reads the tile's rows of W, and writes the tile's rows of
// the output as bursts. Grid rows are 400 bytes, so many bursts cross a page.
// The final grid is compared with the same update computed here in plain
// arrays, both through the shell and at its physical location.
module tb_workload_stencil;
  import vm_pkg::*;

  localparam int G  = 100;
  localparam int T  = 2;
  localparam int NA = 3;
  localparam int PGS = (G * G * 4 + 4095) / 4096 + 1;

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
  int n_done [NA], n_break [NA];

  addr_t vbase [NA] = '{32'h5000_0e00, 32'h5100_0010, 32'h5200_0a40};
  addr_t tbase [NA] = '{32'h00a0_0000, 32'h00a0_1000, 32'h00a0_2000};
  addr_t ppage [NA][PGS];

  data_t U0 [G][G], W [G][G], R [G][G], S [G][G];
  data_t wq [NA][$];
  data_t rq [NA][$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t v2p(int a, addr_t va);
    return ppage[a][(va >> 12) - (vbase[a] >> 12)] | (va & 32'hfff);
  endfunction

  function automatic addr_t elem(int a, int r, int c);
    return vbase[a] + 4 * (r * G + c);
  endfunction

  for (genvar p = 0; p < NA; p++) begin : g_acc
    always @(posedge clk) begin
      if (acc_wvalid[p] && acc_wready[p]) void'(wq[p].pop_front());
      if (acc_rvalid[p]) rq[p].push_back(acc_rdata[p]);
      if (acc_done[p]) n_done[p]++;
      if (ev_break[p]) n_break[p]++;
    end
    always @(negedge clk) begin
      #1;
      acc_wvalid[p] = wq[p].size() > 0;
      acc_wdata[p]  = (wq[p].size() > 0) ? wq[p][0] : '0;
    end
  end

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

  // one stencil step from array src to array dst, tiles of size ts
  task automatic step(int src, int dst, int ts);
    data_t none [$];
    data_t halo [$];
    data_t wrow [$];
    data_t orow [$];
    for (int ty = 1; ty < G - 1; ty += ts)
      for (int tx = 1; tx < G - 1; tx += ts) begin
        halo = {};
        for (int y = ty - 1; y <= ty + ts; y++) begin
          rq[src].delete();
          access(src, elem(src, y, tx - 1), ts + 2, 1'b0, none);
          halo = {halo, rq[src]};
        end
        for (int y = 0; y < ts; y++) begin
          rq[1].delete();
          access(1, elem(1, ty + y, tx), ts, 1'b0, none);
          wrow = rq[1];
          orow = {};
          for (int x = 0; x < ts; x++) begin
            int hy, hx;
            hy = y + 1; hx = x + 1;
            orow.push_back(halo[(hy - 1) * (ts + 2) + hx] + halo[(hy + 1) * (ts + 2) + hx]
                         + halo[hy * (ts + 2) + hx - 1] + halo[hy * (ts + 2) + hx + 1]
                         - 4 * halo[hy * (ts + 2) + hx] + wrow[x]);
          end
          access(dst, elem(dst, ty + y, tx), ts, 1'b1, orow);
        end
      end
  endtask

  initial begin
    data_t none [$];
    int tiles [2] = '{14, 49};
    int src, brk0;
    for (int p = 0; p < NA; p++) begin
      acc_req_valid[p] = 1'b0; acc_req_vaddr[p] = '0; acc_req_nwords[p] = '0; acc_req_we[p] = 1'b0;
      acc_wvalid[p] = 1'b0; acc_wdata[p] = '0; n_done[p] = 0; n_break[p] = 0;
      for (int g = 0; g < PGS; g++) begin
        ppage[p][g] = 32'h2800_0000 + (((g * 3 + 1) % (PGS * 2)) * NA + p) * 4096;
        u_mem.poke(tbase[p] + 4 * g, ppage[p][g]);
      end
      cfg_table_base[p] = tbase[p]; cfg_array_vbase[p] = vbase[p]; cfg_npages[p] = pn_t'(PGS);
    end
    start = 1'b0; acc_finish = 1'b0;
    for (int y = 0; y < G; y++)
      for (int x = 0; x < G; x++) begin
        U0[y][x] = $urandom % 100;
        W[y][x]  = $urandom % 10;
        u_mem.poke(v2p(1, elem(1, y, x)), W[y][x]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (tiles[t]) begin
      // software side: load the initial grid into U and V (borders in both)
      for (int y = 0; y < G; y++)
        for (int x = 0; x < G; x++) begin
          u_mem.poke(v2p(0, elem(0, y, x)), U0[y][x]);
          u_mem.poke(v2p(2, elem(2, y, x)), U0[y][x]);
          R[y][x] = U0[y][x];
        end
      // reference
      for (int s = 0; s < T; s++) begin
        S = R;
        for (int y = 1; y < G - 1; y++)
          for (int x = 1; x < G - 1; x++)
            S[y][x] = R[y-1][x] + R[y+1][x] + R[y][x-1] + R[y][x+1] - 4 * R[y][x] + W[y][x];
        R = S;
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      brk0 = n_break[0] + n_break[2];
      src = 0;
      for (int s = 0; s < T; s++) begin
        step(src, 2 - src, tiles[t]);
        src = 2 - src;
      end
      @(negedge clk);
      acc_finish = 1'b1;
      @(negedge clk);
      acc_finish = 1'b0;
      $display("tile %0d: %0d cycles, %0d page breaks", tiles[t], cycles, n_break[0] + n_break[2] - brk0);
      check(n_break[0] + n_break[2] > brk0, "bursts crossed pages");
      for (int y = 0; y < G; y++) begin
        rq[src].delete();
        access(src, elem(src, y, 0), G, 1'b0, none);
        for (int x = 0; x < G; x++) begin
          if (rq[src][x] != R[y][x]) begin
            check(1'b0, $sformatf("tile %0d: grid[%0d][%0d] %0d exp %0d", tiles[t], y, x, rq[src][x], R[y][x]));
            break;
          end
          if (u_mem.peek(v2p(src, elem(src, y, x))) != R[y][x]) begin
            check(1'b0, $sformatf("tile %0d: physical grid[%0d][%0d]", tiles[t], y, x));
            break;
          end
        end
        checks++;
      end
    end
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
