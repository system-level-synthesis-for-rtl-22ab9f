// vm_pkg: types and constants shared by the address-translation (AT) shell
// of a virtual-memory-enabled hardware thread.
//
// Addresses are 32-bit byte addresses (virtual on the accelerator side,
// physical on the memory side) and data words are 32 bits, as on the Zynq
// ACP port. Pages are 4 kB, so a virtual address splits into a 20-bit page
// number and a 12-bit offset. A shadow page-table entry is one 32-bit word
// holding the physical address of the page; only its upper 20 bits are used.
//
// Memory transactions are bursts of 1..WORDS_PER_PAGE 32-bit words that
// never cross a 4 kB page. The command carries the first byte address, the
// length in words and the direction. The channel handshakes (cmd/w valid-
// ready, r/b valid only) are this design's own simplification of an AXI
// master port.
package vm_pkg;

  localparam int unsigned ADDR_W         = 32;
  localparam int unsigned DATA_W         = 32;
  localparam int unsigned PAGE_BITS      = 12;                       // 4 kB pages
  localparam int unsigned PAGE_BYTES     = 1 << PAGE_BITS;
  localparam int unsigned WORD_BYTES     = DATA_W / 8;
  localparam int unsigned WORDS_PER_PAGE = PAGE_BYTES / WORD_BYTES;  // 1024
  localparam int unsigned PN_W           = ADDR_W - PAGE_BITS;       // 20-bit page number
  localparam int unsigned LEN_W          = $clog2(WORDS_PER_PAGE) + 1; // burst length 1..1024
  localparam int unsigned ACC_LEN_W      = 24;                       // accelerator request length in words

  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [DATA_W-1:0]    data_t;
  typedef logic [PN_W-1:0]      pn_t;
  typedef logic [LEN_W-1:0]     blen_t;
  typedef logic [ACC_LEN_W-1:0] acc_len_t;

  // Physical (or table) burst command issued on a memory master port.
  typedef struct packed {
    addr_t addr;   // byte address of the first word, word aligned
    blen_t len;    // number of words, 1..WORDS_PER_PAGE
    logic  we;     // 1: write burst, 0: read burst
  } mem_cmd_t;

  // Address-translation mode of one shared array (the mode= argument of the
  // per-array compiler directive).
  typedef enum logic [1:0] {
    DRAM_TLB  = 2'd0,  // shadow table in external memory, read per translation
    LOCAL_TLB = 2'd1,  // whole shadow table copied into on-chip memory
    CACHE_TLB = 2'd2   // on-chip cache of the external shadow table
  } at_mode_e;

  // Page number of a byte address, and the address of a page-table entry.
  function automatic pn_t page_of(addr_t a);
    return a[ADDR_W-1:PAGE_BITS];
  endfunction

  // Words left in the page of address a (1..WORDS_PER_PAGE).
  function automatic blen_t words_to_page_end(addr_t a);
    return blen_t'(WORDS_PER_PAGE) - blen_t'(a[PAGE_BITS-1:2]);
  endfunction

endpackage
