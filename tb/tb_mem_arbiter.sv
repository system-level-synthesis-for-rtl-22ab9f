// tb_mem_arbiter: self-checking test of mem_arbiter with N = 4 masters.
//
// Each master runs its own random sequence of read and write bursts on a
// private address region, through the arbiter, into one memory model with
// latency and random back-pressure. Reads must return what the same master
// wrote before (or the model's default contents), each master must see
// exactly its own responses (read beats and write responses), and the memory
// must see well-formed bursts. In a first phase all four masters request at
// once with single-word reads: the grants must then rotate 0,1,2,3,0,...
// (round robin) and the conflict flag must be raised; after a grant to m1,
// m0 and m2 asking together must be served m2 first.
module tb_mem_arbiter;
  import vm_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     s_cmd_valid [N];
  logic     s_cmd_ready [N];
  mem_cmd_t s_cmd       [N];
  logic     s_wvalid    [N];
  logic     s_wready    [N];
  data_t    s_wdata     [N];
  logic     s_wlast     [N];
  logic     s_rvalid    [N];
  data_t    s_rdata     [N];
  logic     s_rlast     [N];
  logic     s_bvalid    [N];
  logic     m_cmd_valid, m_cmd_ready, m_wvalid, m_wready, m_wlast, m_rvalid, m_rlast, m_bvalid;
  mem_cmd_t m_cmd;
  data_t    m_wdata, m_rdata;
  logic     conflict;

  int checks = 0, failures = 0;
  int n_conflict = 0;
  int grant_log [$];
  data_t ref_mem [addr_t];
  bit done_m [N];

  mem_arbiter #(.N(N)) dut (.*);

  acp_mem_model #(.LAT(5), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .cmd_valid (m_cmd_valid), .cmd_ready (m_cmd_ready), .cmd (m_cmd),
    .wvalid (m_wvalid), .wready (m_wready), .wdata (m_wdata), .wlast (m_wlast),
    .rvalid (m_rvalid), .rdata (m_rdata), .rlast (m_rlast), .bvalid (m_bvalid)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (conflict) n_conflict++;
    for (int i = 0; i < N; i++)
      if (s_cmd_valid[i] && s_cmd_ready[i]) grant_log.push_back(i);
  end

  function automatic data_t ref_rd(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : ~a;
  endfunction

  // One burst of master m.
  task automatic burst(int m, addr_t a, int len, bit we);
    int beats;
    @(negedge clk);
    s_cmd_valid[m] = 1'b1;
    s_cmd[m] = '{addr: a, len: blen_t'(len), we: we};
    do @(posedge clk); while (!s_cmd_ready[m]);
    @(negedge clk);
    s_cmd_valid[m] = 1'b0;
    if (we) begin
      for (int b = 0; b < len; b++) begin
        data_t d;
        d = {$urandom};
        s_wvalid[m] = 1'b1; s_wdata[m] = d; s_wlast[m] = (b == len - 1);
        do @(posedge clk); while (!s_wready[m]);
        ref_mem[a + 4 * b] = d;
        @(negedge clk);
      end
      s_wvalid[m] = 1'b0; s_wlast[m] = 1'b0;
      while (!s_bvalid[m]) @(negedge clk);
      check(1'b1, "write response");
      @(negedge clk);
    end else begin
      beats = 0;
      forever begin
        @(posedge clk);
        if (s_rvalid[m]) begin
          if (s_rdata[m] != ref_rd(a + 4 * beats)) begin
            check(1'b0, $sformatf("m%0d read %h beat %0d", m, a, beats));
          end
          if (s_rlast[m] != (beats == len - 1)) check(1'b0, "rlast position");
          beats++;
          if (s_rlast[m]) break;
        end
      end
      check(beats == len, $sformatf("m%0d beats %0d exp %0d", m, beats, len));
      @(negedge clk);
    end
  endtask

  // Other masters must never see a response while m waits for none.
  always @(posedge clk)
    for (int i = 0; i < N; i++) begin
      int c;
      c = 0;
      for (int j = 0; j < N; j++) c += int'(s_rvalid[j]) + int'(s_bvalid[j]);
      if (c > 1) begin failures++; $display("FAIL: response steered to several masters"); end
    end

  task automatic master(int m);
    for (int t = 0; t < 60; t++) begin
      addr_t a;
      int len;
      len = 1 + $urandom % 40;
      a = 32'h0100_0000 * (m + 1) + 4 * ($urandom % 900);
      burst(m, a, len, 1'($urandom));
      repeat ($urandom % 4) @(negedge clk);
    end
    done_m[m] = 1'b1;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      s_cmd_valid[i] = 1'b0; s_cmd[i] = '0; s_wvalid[i] = 1'b0; s_wdata[i] = '0; s_wlast[i] = 1'b0;
      done_m[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: all masters request together, repeatedly
    for (int round = 0; round < 3; round++) begin
      fork
        burst(0, 32'h0100_0000, 1, 1'b0);
        burst(1, 32'h0200_0000, 1, 1'b0);
        burst(2, 32'h0300_0000, 1, 1'b0);
        burst(3, 32'h0400_0000, 1, 1'b0);
      join
    end
    check(grant_log.size() == 12, "12 grants");
    for (int g = 0; g < grant_log.size(); g++)
      check(grant_log[g] == g % N, $sformatf("grant %0d to m%0d exp m%0d", g, grant_log[g], g % N));
    check(n_conflict > 0, "conflict flagged");
    // after a grant to m1, m0 and m2 asking together: m2 comes first
    burst(1, 32'h0200_0000, 1, 1'b0);
    fork
      burst(0, 32'h0100_0000, 1, 1'b0);
      burst(2, 32'h0300_0000, 1, 1'b0);
    join
    check(grant_log.size() == 15 && grant_log[13] == 2 && grant_log[14] == 0,
          "round robin resumes after the last winner");
    // phase 2: independent random traffic
    fork
      master(0); master(1); master(2); master(3);
    join
    check(u_mem.n_protocol_errors == 0, "memory protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
