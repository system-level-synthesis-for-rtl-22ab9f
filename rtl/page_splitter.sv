// page_splitter: cuts one virtual-address burst request of the accelerator
// into a sequence of intra-page bursts (the hardware counterpart of the
// memcpy_breakpage function).
//
// A burst that starts at virtual byte address A and spans N 32-bit words may
// touch up to ceil(4N/4096)+1 pages, each of which may sit anywhere in
// physical memory, so it must be translated and issued page by page. The
// splitter accepts a request when idle, then emits chunks: each chunk starts
// at the current address and runs to the end of its page or to the end of
// the request, whichever comes first. ch_last marks the final chunk.
//
// Interface: req_* is a valid/ready request input (vaddr word aligned,
// nwords >= 1); ch_* is a valid/ready chunk output. Timing: the first chunk
// is valid the cycle after the request is accepted; each further chunk the
// cycle after the previous one is taken, so a free-running consumer sees one
// chunk per cycle. A new request is accepted the cycle after the last chunk
// is taken.
//
// The page-boundary rule follows the published scheme; the handshake is this
// design's own.
module page_splitter
  import vm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // request from the accelerator
  input  logic     req_valid,
  output logic     req_ready,
  input  addr_t    req_vaddr,
  input  acc_len_t req_nwords,
  input  logic     req_we,
  // intra-page chunks
  output logic     ch_valid,
  input  logic     ch_ready,
  output addr_t    ch_vaddr,
  output blen_t    ch_len,
  output logic     ch_we,
  output logic     ch_last
);

  logic     busy_q;
  addr_t    addr_q;
  acc_len_t left_q;
  logic     we_q;
  blen_t    room;

  assign room      = words_to_page_end(addr_q);
  assign req_ready = !busy_q;
  assign ch_valid  = busy_q;
  assign ch_vaddr  = addr_q;
  assign ch_we     = we_q;
  assign ch_last   = left_q <= acc_len_t'(room);
  assign ch_len    = ch_last ? blen_t'(left_q) : room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      addr_q <= '0;
      left_q <= '0;
      we_q   <= 1'b0;
    end else if (!busy_q) begin
      if (req_valid) begin
        busy_q <= 1'b1;
        addr_q <= {req_vaddr[ADDR_W-1:2], 2'b00};
        left_q <= req_nwords;
        we_q   <= req_we;
      end
    end else if (ch_ready) begin
      addr_q <= addr_q + (addr_t'(ch_len) << 2);
      left_q <= left_q - acc_len_t'(ch_len);
      if (ch_last) busy_q <= 1'b0;
    end
  end

  // A request must ask for at least one word.
  a_nonzero_len: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && req_ready |-> req_nwords != '0);
  // A chunk never crosses a page boundary.
  a_in_page: assert property (@(posedge clk) disable iff (!rst_n)
    ch_valid |-> (32'(ch_vaddr[PAGE_BITS-1:2]) + 32'(ch_len)) <= WORDS_PER_PAGE);

endmodule
