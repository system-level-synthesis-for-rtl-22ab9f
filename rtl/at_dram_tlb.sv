// at_dram_tlb: address translation through a shadow page table kept in
// external memory (mode DRAM_TLB).
//
// Before the thread starts, software builds for each shared array a flat
// table holding the physical address of every page of the array, and hands
// the table's physical address (cfg_table_base) and the array's virtual
// start (cfg_array_vbase) to the hardware. A translation of virtual address
// V reads the single entry
//     cfg_table_base + 4 * (page(V) - page(cfg_array_vbase))
// through the memory port and returns {entry[31:12], V[11:0]}. There is one
// level of indirection and no on-chip state beyond the request registers,
// so every translation costs one external memory read: the cheapest unit in
// area and the slowest in latency.
//
// Interface: start latches the configuration (cfg_* are sampled on start)
// and raises ready. tr_valid/tr_ready take a virtual address; tr_done pulses
// for one cycle with tr_paddr valid. t_* is a read-only memory master
// (single-word bursts). Timing: one cycle to issue the read after the
// request is accepted, then the memory latency; tr_done rises in the cycle
// the table word returns.
//
// The table layout and the single-read translation follow the published scheme;
// the handshakes are this design's own. There is no bound check, as in the
// published design: an address outside the array reads a word beyond the table.
module at_dram_tlb
  import vm_pkg::*;
(
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
  // read master to the shadow table
  output logic     t_cmd_valid,
  input  logic     t_cmd_ready,
  output mem_cmd_t t_cmd,
  input  logic     t_rvalid,
  input  data_t    t_rdata,
  input  logic     t_rlast
);

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_WAIT} state_e;

  state_e state_q;
  addr_t  table_base_q;
  pn_t    vbase_pn_q;
  addr_t  vaddr_q;
  logic   ready_q;
  pn_t    rel_pn;

  assign ready    = ready_q;
  assign tr_ready = ready_q && (state_q == S_IDLE);
  assign rel_pn   = page_of(vaddr_q) - vbase_pn_q;

  assign t_cmd_valid = (state_q == S_CMD);
  assign t_cmd.addr  = table_base_q + (addr_t'(rel_pn) << 2);
  assign t_cmd.len   = blen_t'(1);
  assign t_cmd.we    = 1'b0;

  assign tr_done  = (state_q == S_WAIT) && t_rvalid;
  assign tr_paddr = {t_rdata[ADDR_W-1:PAGE_BITS], vaddr_q[PAGE_BITS-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      table_base_q <= '0;
      vbase_pn_q   <= '0;
      vaddr_q      <= '0;
      ready_q      <= 1'b0;
    end else begin
      if (start) begin
        table_base_q <= cfg_table_base;
        vbase_pn_q   <= page_of(cfg_array_vbase);
        ready_q      <= 1'b1;
      end
      unique case (state_q)
        S_IDLE: if (tr_valid && tr_ready) begin
          vaddr_q <= tr_vaddr;
          state_q <= S_CMD;
        end
        S_CMD:  if (t_cmd_ready) state_q <= S_WAIT;
        S_WAIT: if (t_rvalid)    state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A single-word read returns exactly one beat, which is also the last.
  a_single_beat: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_WAIT) && t_rvalid |-> t_rlast);

endmodule
