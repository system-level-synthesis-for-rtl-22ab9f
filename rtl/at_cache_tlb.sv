// at_cache_tlb: address translation through an on-chip cache of the
// external shadow page table (mode CACHE_TLB).
//
// The shadow table stays in external memory, as in DRAM_TLB, but recently
// used entries are kept in a direct-mapped cache of LINES lines. Each line
// holds one table entry: the 20-bit physical page number and the tag, i.e.
// the upper bits of the page's index in the table; with LINES = 1024 a line
// is 30 bits wide and the whole cache fits one 1k x 32 block RAM. A valid
// bit per line is kept in flip-flops and cleared on start.
//
// Operation: an accepted request reads its line (index = low bits of
// page(V) - page(cfg_array_vbase)). In the next cycle the tag is compared:
// on a hit tr_done pulses with {ppn, V[11:0]}; on a miss the entry is read
// from cfg_table_base + 4*index through the memory port, written into the
// line and returned in the cycle it arrives.
//
// Interface: start samples cfg_* and flushes the cache; tr_valid/tr_ready
// take a virtual address, tr_done/tr_paddr return the physical one; t_* is
// a read-only memory master (single-word bursts). hit/miss pulse with
// tr_done to tell which path the translation took. Timing: hit 1 cycle
// after acceptance, miss 2 cycles plus the memory latency.
//
// The published scheme gives the function (a cache over the shadow table) and the
// size (1k entries, one block RAM); direct mapping, one entry per line and
// fetch-on-miss are this design's choices.
module at_cache_tlb
  import vm_pkg::*;
#(
  parameter int unsigned LINES = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  // configuration
  input  logic     start,
  input  addr_t    cfg_table_base,
  input  addr_t    cfg_array_vbase,
  output logic     ready,
  // translation requests
  input  logic     tr_valid,
  output logic     tr_ready,
  input  addr_t    tr_vaddr,
  output logic     tr_done,
  output addr_t    tr_paddr,
  output logic     hit,
  output logic     miss,
  // read master to the shadow table
  output logic     t_cmd_valid,
  input  logic     t_cmd_ready,
  output mem_cmd_t t_cmd,
  input  logic     t_rvalid,
  input  data_t    t_rdata,
  input  logic     t_rlast
);

  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = PN_W - IDX_W;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  typedef struct packed {
    tag_t tag;
    pn_t  ppn;
  } line_t;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_CMD, S_WAIT} state_e;

  state_e state_q;
  addr_t  table_base_q;
  pn_t    vbase_pn_q;
  addr_t  vaddr_q;
  logic   ready_q;

  line_t  lines [LINES];
  line_t  line_q;
  logic [LINES-1:0] valid_q;
  logic   valid_rd_q;

  pn_t    req_rel, cur_rel;
  idx_t   cur_idx;
  tag_t   cur_tag;
  logic   is_hit;

  assign req_rel = page_of(tr_vaddr) - vbase_pn_q;
  assign cur_rel = page_of(vaddr_q) - vbase_pn_q;
  assign cur_idx = cur_rel[IDX_W-1:0];
  assign cur_tag = cur_rel[PN_W-1:IDX_W];
  assign is_hit  = valid_rd_q && (line_q.tag == cur_tag);

  assign ready    = ready_q;
  assign tr_ready = ready_q && (state_q == S_IDLE);

  assign t_cmd_valid = (state_q == S_CMD);
  assign t_cmd.addr  = table_base_q + (addr_t'(cur_rel) << 2);
  assign t_cmd.len   = blen_t'(1);
  assign t_cmd.we    = 1'b0;

  assign hit      = (state_q == S_LOOKUP) && is_hit;
  assign miss     = (state_q == S_WAIT) && t_rvalid;
  assign tr_done  = hit || miss;
  assign tr_paddr = hit ? {line_q.ppn, vaddr_q[PAGE_BITS-1:0]}
                        : {t_rdata[ADDR_W-1:PAGE_BITS], vaddr_q[PAGE_BITS-1:0]};

  // Line RAM: read on acceptance, written on refill.
  always_ff @(posedge clk) begin
    if (tr_valid && tr_ready)
      line_q <= lines[req_rel[IDX_W-1:0]];
    if (miss)
      lines[cur_idx] <= '{tag: cur_tag, ppn: t_rdata[ADDR_W-1:PAGE_BITS]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      table_base_q <= '0;
      vbase_pn_q   <= '0;
      vaddr_q      <= '0;
      ready_q      <= 1'b0;
      valid_q      <= '0;
      valid_rd_q   <= 1'b0;
    end else begin
      if (start) begin
        table_base_q <= cfg_table_base;
        vbase_pn_q   <= page_of(cfg_array_vbase);
        ready_q      <= 1'b1;
        valid_q      <= '0;
      end else if (miss) begin
        valid_q[cur_idx] <= 1'b1;
      end
      unique case (state_q)
        S_IDLE: if (tr_valid && tr_ready) begin
          vaddr_q    <= tr_vaddr;
          valid_rd_q <= valid_q[req_rel[IDX_W-1:0]];
          state_q    <= S_LOOKUP;
        end
        S_LOOKUP: state_q <= is_hit ? S_IDLE : S_CMD;
        S_CMD:    if (t_cmd_ready) state_q <= S_WAIT;
        S_WAIT:   if (t_rvalid)    state_q <= S_IDLE;
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  a_single_beat: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_WAIT) && t_rvalid |-> t_rlast);

endmodule
