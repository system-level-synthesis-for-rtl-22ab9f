// at_local_tlb: address translation through an on-chip copy of the shadow
// page table (mode LOCAL_TLB).
//
// The per-array shadow table (one 32-bit physical page address per virtual
// page of the array, built by software) is copied into a block RAM of
// ENTRIES words when the thread starts. The copy uses burst reads: each
// burst runs to the end of the current 4 kB page of the table or to the end
// of the table, whichever is nearer. Once the copy is complete, ready rises
// and a translation of V is a single synchronous RAM read at index
// page(V) - page(cfg_array_vbase), giving {entry[31:12], V[11:0]}.
//
// Interface: start samples cfg_* and begins the copy of cfg_npages entries
// (at most ENTRIES are kept). tr_valid/tr_ready take a virtual address and
// tr_done pulses with tr_paddr one cycle later; a new request can be taken
// every cycle. t_* is a read-only memory master used only for the copy.
//
// The on-chip table, its burst preload and the one-cycle lookup follow the
// published design. ENTRIES = 8192 is this design's choice: it holds the page map
// of a 32 MB array, more than the 16 MB arrays of the workloads. There is no
// bound check: an index past ENTRIES wraps.
module at_local_tlb
  import vm_pkg::*;
#(
  parameter int unsigned ENTRIES = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration
  input  logic     start,
  input  addr_t    cfg_table_base,
  input  addr_t    cfg_array_vbase,
  input  pn_t      cfg_npages,
  output logic     ready,
  // translation requests
  input  logic     tr_valid,
  output logic     tr_ready,
  input  addr_t    tr_vaddr,
  output logic     tr_done,
  output addr_t    tr_paddr,
  // read master to the shadow table (preload)
  output logic     t_cmd_valid,
  input  logic     t_cmd_ready,
  output mem_cmd_t t_cmd,
  input  logic     t_rvalid,
  input  data_t    t_rdata,
  input  logic     t_rlast
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  typedef logic [IDX_W-1:0] idx_t;

  typedef enum logic [1:0] {S_OFF, S_CMD, S_BURST, S_RUN} state_e;

  state_e state_q;
  addr_t  load_addr_q;   // next table word to fetch
  pn_t    load_left_q;   // table words still to fetch
  idx_t   wr_idx_q;      // next RAM slot to fill
  pn_t    vbase_pn_q;
  blen_t  burst_len;

  // Shadow page table copy, one word per page.
  data_t  tlb_mem [ENTRIES];
  data_t  rd_q;
  logic   lookup_q;
  logic [PAGE_BITS-1:0] off_q;
  pn_t    rel_pn;

  assign burst_len = (load_left_q < pn_t'(words_to_page_end(load_addr_q)))
                   ? blen_t'(load_left_q) : words_to_page_end(load_addr_q);

  assign t_cmd_valid = (state_q == S_CMD);
  assign t_cmd.addr  = load_addr_q;
  assign t_cmd.len   = burst_len;
  assign t_cmd.we    = 1'b0;

  assign ready    = (state_q == S_RUN);
  assign tr_ready = (state_q == S_RUN);
  assign rel_pn   = page_of(tr_vaddr) - vbase_pn_q;
  assign tr_done  = lookup_q;
  assign tr_paddr = {rd_q[ADDR_W-1:PAGE_BITS], off_q};

  // Table RAM: one write port for the preload, one read port for lookups.
  always_ff @(posedge clk) begin
    if (state_q == S_BURST && t_rvalid)
      tlb_mem[wr_idx_q] <= t_rdata;
    if (tr_valid && tr_ready)
      rd_q <= tlb_mem[idx_t'(rel_pn)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_OFF;
      load_addr_q <= '0;
      load_left_q <= '0;
      wr_idx_q    <= '0;
      vbase_pn_q  <= '0;
      lookup_q    <= 1'b0;
      off_q       <= '0;
    end else begin
      lookup_q <= tr_valid && tr_ready;
      if (tr_valid && tr_ready) off_q <= tr_vaddr[PAGE_BITS-1:0];
      if (start) begin
        load_addr_q <= cfg_table_base;
        load_left_q <= (cfg_npages > pn_t'(ENTRIES)) ? pn_t'(ENTRIES) : cfg_npages;
        wr_idx_q    <= '0;
        vbase_pn_q  <= page_of(cfg_array_vbase);
        state_q     <= (cfg_npages == '0) ? S_RUN : S_CMD;
      end else begin
        unique case (state_q)
          S_OFF: ;
          S_CMD: if (t_cmd_ready) begin
            load_addr_q <= load_addr_q + (addr_t'(burst_len) << 2);
            load_left_q <= load_left_q - pn_t'(burst_len);
            state_q     <= S_BURST;
          end
          S_BURST: if (t_rvalid) begin
            wr_idx_q <= wr_idx_q + 1'b1;
            if (t_rlast) state_q <= (load_left_q == '0) ? S_RUN : S_CMD;
          end
          S_RUN: ;
          default: state_q <= S_OFF;
        endcase
      end
    end
  end

  // Once running, the unit never touches memory.
  a_no_fetch_when_running: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_RUN |-> !t_cmd_valid);

endmodule
