// vm_hw_thread: address-translation shell of a virtual-memory-enabled
// hardware thread.
//
// A hardware accelerator running as a thread of a Linux process works on
// arrays allocated by ordinary software, in virtual memory: a virtually
// contiguous array is scattered over 4 kB physical pages. This shell lets
// such an accelerator use the process' virtual addresses directly, without
// interrupts and without walking the OS page tables. Before the thread is
// started, software builds a flat "shadow" page table per shared array (the
// physical address of each of its pages), locks the pages and passes each
// table's physical address and the array's virtual base to the shell.
//
// Each of the N_ARRAYS arrays has its own vm_port, whose translation mode is
// chosen per array by MODES[i] (DRAM_TLB, LOCAL_TLB or CACHE_TLB). All table
// and data masters share the thread's single coherent memory port (the ACP
// port on a Zynq) through a round-robin mem_arbiter: port i's table master is
// arbiter input 2i, its data master input 2i+1. A perf_counter measures the
// run from start to acc_finish.
//
// Interface: start pulses once per run, with cfg_* valid; ready rises when
// every array port can translate (LOCAL_TLB ports first copy their table).
// acc_* are the accelerator's per-array virtual burst ports; m_* the
// physical memory port; ev_* and conflict are event pulses for monitoring.
//
// The per-array translation units and their three modes follow the published scheme.
// The default mode assignment, one array per mode (as for the three arrays
// of a matrix product), is this design's choice; any mix may be set.
module vm_hw_thread
  import vm_pkg::*;
#(
  parameter int unsigned N_ARRAYS                 = 3,
  parameter at_mode_e [N_ARRAYS-1:0] MODES        = {CACHE_TLB, LOCAL_TLB, DRAM_TLB},
  parameter int unsigned LOCAL_ENTRIES            = 8192,
  parameter int unsigned CACHE_LINES              = 1024,
  parameter int unsigned CNT_W                    = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  // run control and configuration
  input  logic             start,
  input  addr_t            cfg_table_base  [N_ARRAYS],
  input  addr_t            cfg_array_vbase [N_ARRAYS],
  input  pn_t              cfg_npages      [N_ARRAYS],
  output logic             ready,
  input  logic             acc_finish,
  output logic [CNT_W-1:0] cycles,
  output logic             running,
  // accelerator ports (virtual), one per array
  input  logic             acc_req_valid  [N_ARRAYS],
  output logic             acc_req_ready  [N_ARRAYS],
  input  addr_t            acc_req_vaddr  [N_ARRAYS],
  input  acc_len_t         acc_req_nwords [N_ARRAYS],
  input  logic             acc_req_we     [N_ARRAYS],
  input  logic             acc_wvalid     [N_ARRAYS],
  output logic             acc_wready     [N_ARRAYS],
  input  data_t            acc_wdata      [N_ARRAYS],
  output logic             acc_rvalid     [N_ARRAYS],
  output data_t            acc_rdata      [N_ARRAYS],
  output logic             acc_done       [N_ARRAYS],
  // coherent memory port (physical)
  output logic             m_cmd_valid,
  input  logic             m_cmd_ready,
  output mem_cmd_t         m_cmd,
  output logic             m_wvalid,
  input  logic             m_wready,
  output data_t            m_wdata,
  output logic             m_wlast,
  input  logic             m_rvalid,
  input  data_t            m_rdata,
  input  logic             m_rlast,
  input  logic             m_bvalid,
  // monitoring
  output logic             ev_xlate [N_ARRAYS],
  output logic             ev_break [N_ARRAYS],
  output logic             ev_hit   [N_ARRAYS],
  output logic             ev_miss  [N_ARRAYS],
  output logic             conflict
);

  localparam int unsigned NM = 2 * N_ARRAYS;

  logic     s_cmd_valid [NM];
  logic     s_cmd_ready [NM];
  mem_cmd_t s_cmd       [NM];
  logic     s_wvalid    [NM];
  logic     s_wready    [NM];
  data_t    s_wdata     [NM];
  logic     s_wlast     [NM];
  logic     s_rvalid    [NM];
  data_t    s_rdata     [NM];
  logic     s_rlast     [NM];
  logic     s_bvalid    [NM];

  logic     port_ready  [N_ARRAYS];

  for (genvar i = 0; i < N_ARRAYS; i++) begin : g_port
    vm_port #(
      .MODE          (MODES[i]),
      .LOCAL_ENTRIES (LOCAL_ENTRIES),
      .CACHE_LINES   (CACHE_LINES)
    ) u_port (
      .clk, .rst_n, .start,
      .cfg_table_base  (cfg_table_base[i]),
      .cfg_array_vbase (cfg_array_vbase[i]),
      .cfg_npages      (cfg_npages[i]),
      .ready           (port_ready[i]),
      .acc_req_valid   (acc_req_valid[i]),
      .acc_req_ready   (acc_req_ready[i]),
      .acc_req_vaddr   (acc_req_vaddr[i]),
      .acc_req_nwords  (acc_req_nwords[i]),
      .acc_req_we      (acc_req_we[i]),
      .acc_wvalid      (acc_wvalid[i]),
      .acc_wready      (acc_wready[i]),
      .acc_wdata       (acc_wdata[i]),
      .acc_rvalid      (acc_rvalid[i]),
      .acc_rdata       (acc_rdata[i]),
      .acc_done        (acc_done[i]),
      .t_cmd_valid     (s_cmd_valid[2*i]),
      .t_cmd_ready     (s_cmd_ready[2*i]),
      .t_cmd           (s_cmd[2*i]),
      .t_rvalid        (s_rvalid[2*i]),
      .t_rdata         (s_rdata[2*i]),
      .t_rlast         (s_rlast[2*i]),
      .d_cmd_valid     (s_cmd_valid[2*i+1]),
      .d_cmd_ready     (s_cmd_ready[2*i+1]),
      .d_cmd           (s_cmd[2*i+1]),
      .d_wvalid        (s_wvalid[2*i+1]),
      .d_wready        (s_wready[2*i+1]),
      .d_wdata         (s_wdata[2*i+1]),
      .d_wlast         (s_wlast[2*i+1]),
      .d_rvalid        (s_rvalid[2*i+1]),
      .d_rdata         (s_rdata[2*i+1]),
      .d_rlast         (s_rlast[2*i+1]),
      .d_bvalid        (s_bvalid[2*i+1]),
      .ev_xlate        (ev_xlate[i]),
      .ev_break        (ev_break[i]),
      .ev_hit          (ev_hit[i]),
      .ev_miss         (ev_miss[i])
    );
    // Table masters only read.
    assign s_wvalid[2*i] = 1'b0;
    assign s_wdata[2*i]  = '0;
    assign s_wlast[2*i]  = 1'b0;
  end

  always_comb begin
    ready = 1'b1;
    for (int unsigned i = 0; i < N_ARRAYS; i++) ready &= port_ready[i];
  end

  mem_arbiter #(.N(NM)) u_arb (
    .clk, .rst_n,
    .s_cmd_valid, .s_cmd_ready, .s_cmd,
    .s_wvalid, .s_wready, .s_wdata, .s_wlast,
    .s_rvalid, .s_rdata, .s_rlast, .s_bvalid,
    .m_cmd_valid, .m_cmd_ready, .m_cmd,
    .m_wvalid, .m_wready, .m_wdata, .m_wlast,
    .m_rvalid, .m_rdata, .m_rlast, .m_bvalid,
    .conflict
  );

  perf_counter #(.WIDTH(CNT_W)) u_perf (
    .clk, .rst_n, .start, .stop (acc_finish), .count (cycles), .running
  );

endmodule
