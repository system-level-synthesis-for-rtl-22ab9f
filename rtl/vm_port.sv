// vm_port: virtual-memory access port of one shared array of a hardware
// thread. One instance sits between the accelerator and the memory system
// for each array the accelerator shares with software.
//
// The accelerator issues burst requests in the array's virtual address
// space (scalar accesses are bursts of one word). The page_splitter cuts
// each request into intra-page chunks; each chunk is translated by the
// address-translation (AT) unit selected by MODE and then issued as one
// physical burst on the data master. Write data is taken from the
// accelerator's stream as the burst proceeds; read data is handed to the
// accelerator as it arrives. acc_done pulses when the last chunk of a
// request has completed (last read beat, or write response).
//
//   MODE = DRAM_TLB : every chunk reads its table entry from memory
//   MODE = LOCAL_TLB: the table is copied on chip at start, lookups take 1 cycle
//   MODE = CACHE_TLB: a direct-mapped cache of table entries
//
// Interface: start/cfg_* configure the AT unit for a thread run and ready
// tells when translations can begin. t_* is the AT unit's table master, d_*
// the data master; both go to the memory arbiter. Chunks are handled one at
// a time: translate, issue, transfer, complete. ev_xlate pulses at every
// translation, ev_break at every page break inside a request, ev_hit and
// ev_miss at cache hits and misses (CACHE_TLB only).
//
// One AT unit per array and the three modes follow the published scheme; the
// chunk-at-a-time sequencing and the stream handshakes are this design's own.
module vm_port
  import vm_pkg::*;
#(
  parameter at_mode_e    MODE          = CACHE_TLB,
  parameter int unsigned LOCAL_ENTRIES = 8192,
  parameter int unsigned CACHE_LINES   = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration
  input  logic     start,
  input  addr_t    cfg_table_base,
  input  addr_t    cfg_array_vbase,
  input  pn_t      cfg_npages,
  output logic     ready,
  // accelerator side (virtual)
  input  logic     acc_req_valid,
  output logic     acc_req_ready,
  input  addr_t    acc_req_vaddr,
  input  acc_len_t acc_req_nwords,
  input  logic     acc_req_we,
  input  logic     acc_wvalid,
  output logic     acc_wready,
  input  data_t    acc_wdata,
  output logic     acc_rvalid,
  output data_t    acc_rdata,
  output logic     acc_done,
  // table master (physical)
  output logic     t_cmd_valid,
  input  logic     t_cmd_ready,
  output mem_cmd_t t_cmd,
  input  logic     t_rvalid,
  input  data_t    t_rdata,
  input  logic     t_rlast,
  // data master (physical)
  output logic     d_cmd_valid,
  input  logic     d_cmd_ready,
  output mem_cmd_t d_cmd,
  output logic     d_wvalid,
  input  logic     d_wready,
  output data_t    d_wdata,
  output logic     d_wlast,
  input  logic     d_rvalid,
  input  data_t    d_rdata,
  input  logic     d_rlast,
  input  logic     d_bvalid,
  // event pulses
  output logic     ev_xlate,
  output logic     ev_break,
  output logic     ev_hit,
  output logic     ev_miss
);

  typedef enum logic [2:0] {S_IDLE, S_XREQ, S_XWAIT, S_CMD, S_WDATA, S_BWAIT, S_RDATA} state_e;

  state_e state_q;
  addr_t  paddr_q;
  blen_t  beat_q;

  logic   ch_valid, ch_ready, ch_we, ch_last;
  addr_t  ch_vaddr;
  blen_t  ch_len;

  logic   tr_valid, tr_ready, tr_done;
  addr_t  tr_paddr;
  logic   chunk_done;

  page_splitter u_split (
    .clk, .rst_n,
    .req_valid (acc_req_valid), .req_ready (acc_req_ready),
    .req_vaddr (acc_req_vaddr), .req_nwords (acc_req_nwords), .req_we (acc_req_we),
    .ch_valid, .ch_ready, .ch_vaddr, .ch_len, .ch_we, .ch_last
  );

  assign tr_valid = (state_q == S_XREQ);

  generate
    if (MODE == DRAM_TLB) begin : g_dram
      at_dram_tlb u_at (
        .clk, .rst_n, .start, .cfg_table_base, .cfg_array_vbase, .ready,
        .tr_valid, .tr_ready, .tr_vaddr (ch_vaddr), .tr_done, .tr_paddr,
        .t_cmd_valid, .t_cmd_ready, .t_cmd, .t_rvalid, .t_rdata, .t_rlast
      );
      assign ev_hit  = 1'b0;
      assign ev_miss = 1'b0;
    end else if (MODE == LOCAL_TLB) begin : g_local
      at_local_tlb #(.ENTRIES(LOCAL_ENTRIES)) u_at (
        .clk, .rst_n, .start, .cfg_table_base, .cfg_array_vbase, .cfg_npages, .ready,
        .tr_valid, .tr_ready, .tr_vaddr (ch_vaddr), .tr_done, .tr_paddr,
        .t_cmd_valid, .t_cmd_ready, .t_cmd, .t_rvalid, .t_rdata, .t_rlast
      );
      assign ev_hit  = 1'b0;
      assign ev_miss = 1'b0;
    end else begin : g_cache
      at_cache_tlb #(.LINES(CACHE_LINES)) u_at (
        .clk, .rst_n, .start, .cfg_table_base, .cfg_array_vbase, .ready,
        .tr_valid, .tr_ready, .tr_vaddr (ch_vaddr), .tr_done, .tr_paddr,
        .hit (ev_hit), .miss (ev_miss),
        .t_cmd_valid, .t_cmd_ready, .t_cmd, .t_rvalid, .t_rdata, .t_rlast
      );
    end
  endgenerate

  // Physical burst of the current chunk.
  assign d_cmd_valid = (state_q == S_CMD);
  assign d_cmd.addr  = paddr_q;
  assign d_cmd.len   = ch_len;
  assign d_cmd.we    = ch_we;

  assign d_wvalid   = (state_q == S_WDATA) && acc_wvalid;
  assign d_wdata    = acc_wdata;
  assign d_wlast    = (beat_q == ch_len - 1'b1);
  assign acc_wready = (state_q == S_WDATA) && d_wready;

  assign acc_rvalid = (state_q == S_RDATA) && d_rvalid;
  assign acc_rdata  = d_rdata;

  assign chunk_done = ((state_q == S_RDATA) && d_rvalid && d_rlast)
                   || ((state_q == S_BWAIT) && d_bvalid);
  assign ch_ready   = chunk_done;
  assign acc_done   = chunk_done && ch_last;

  assign ev_xlate = tr_done && (state_q == S_XWAIT);
  assign ev_break = chunk_done && !ch_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      paddr_q <= '0;
      beat_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (ch_valid) state_q <= S_XREQ;
        S_XREQ:  if (tr_ready) state_q <= S_XWAIT;
        S_XWAIT: if (tr_done) begin
          paddr_q <= tr_paddr;
          state_q <= S_CMD;
        end
        S_CMD: if (d_cmd_ready) begin
          beat_q  <= '0;
          state_q <= ch_we ? S_WDATA : S_RDATA;
        end
        S_WDATA: if (d_wvalid && d_wready) begin
          beat_q <= beat_q + 1'b1;
          if (d_wlast) state_q <= S_BWAIT;
        end
        S_BWAIT: if (d_bvalid) state_q <= S_IDLE;
        S_RDATA: if (d_rvalid && d_rlast) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The physical burst keeps the page offset of the virtual chunk.
  a_offset_kept: assert property (@(posedge clk) disable iff (!rst_n)
    d_cmd_valid |-> d_cmd.addr[PAGE_BITS-1:0] == ch_vaddr[PAGE_BITS-1:0]);
  // Translations only start once the AT unit is ready.
  a_ready_first: assert property (@(posedge clk) disable iff (!rst_n)
    tr_valid && tr_ready |-> ready);

endmodule
