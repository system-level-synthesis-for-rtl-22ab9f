// acp_mem_model: behavioural model of the coherent memory port (a Zynq ACP
// port with the L2 cache and DRAM behind it), for simulation only.
//
// It answers the burst protocol of vm_pkg with a fixed latency: LAT is the
// number of idle cycles between the accepted command and the first read
// beat (the first read beat is sampled LAT+1 clock edges after the command
// edge), and between the last write beat and the write response. Read
// beats then follow one per cycle. STALL_PCT makes cmd_ready and wready
// drop at random to exercise back-pressure. Memory is sparse (an
// associative array of words); a word never written reads as ~address.
// Tasks poke/peek give the testbench direct access, and counters record the
// traffic.
module acp_mem_model
  import vm_pkg::*;
#(
  parameter int unsigned LAT       = 30,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  mem_cmd_t cmd,
  input  logic     wvalid,
  output logic     wready,
  input  data_t    wdata,
  input  logic     wlast,
  output logic     rvalid,
  output data_t    rdata,
  output logic     rlast,
  output logic     bvalid
);

  typedef enum logic [2:0] {M_IDLE, M_RLAT, M_RDATA, M_WDATA, M_BLAT, M_BRESP} mstate_e;

  data_t   mem [addr_t];
  mstate_e st;
  addr_t   a_q;
  blen_t   len_q;
  blen_t   beat;
  int unsigned wait_q;
  logic    stall_c, stall_w;

  int unsigned n_reads, n_writes, n_words, n_protocol_errors;

  function automatic data_t peek(addr_t a);
    addr_t w;
    w = {a[ADDR_W-1:2], 2'b00};
    return mem.exists(w) ? mem[w] : ~w;
  endfunction

  task automatic poke(addr_t a, data_t d);
    mem[{a[ADDR_W-1:2], 2'b00}] = d;
  endtask

  assign cmd_ready = (st == M_IDLE) && !stall_c;
  assign wready    = (st == M_WDATA) && !stall_w;
  assign rvalid    = (st == M_RDATA);
  assign rdata     = peek(a_q + (addr_t'(beat) << 2));
  assign rlast     = (st == M_RDATA) && (beat == len_q - 1'b1);
  assign bvalid    = (st == M_BRESP);

  initial begin
    n_reads = 0; n_writes = 0; n_words = 0; n_protocol_errors = 0;
    st = M_IDLE; a_q = '0; len_q = '0; beat = '0; wait_q = 0;
    stall_c = 1'b0; stall_w = 1'b0;
  end

  always @(posedge clk) begin
    stall_c <= (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
    stall_w <= (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
    if (!rst_n) begin
      st <= M_IDLE;
    end else begin
      case (st)
        M_IDLE: if (cmd_valid && cmd_ready) begin
          a_q   <= cmd.addr;
          len_q <= cmd.len;
          beat  <= '0;
          // a burst must stay inside one 4 kB page
          if (cmd.len == 0 || 32'(cmd.addr[PAGE_BITS-1:2]) + 32'(cmd.len) > WORDS_PER_PAGE)
            n_protocol_errors++;
          if (cmd.we) begin
            n_writes++;
            st <= M_WDATA;
          end else begin
            n_reads++;
            wait_q <= (LAT == 0) ? 0 : LAT - 1;
            st <= (LAT == 0) ? M_RDATA : M_RLAT;
          end
        end
        M_RLAT: if (wait_q == 0) st <= M_RDATA; else wait_q <= wait_q - 1;
        M_RDATA: begin
          n_words++;
          beat <= beat + 1'b1;
          if (rlast) st <= M_IDLE;
        end
        M_WDATA: if (wvalid && wready) begin
          poke(a_q + (addr_t'(beat) << 2), wdata);
          n_words++;
          beat <= beat + 1'b1;
          if (wlast != (beat == len_q - 1'b1)) n_protocol_errors++;
          if (wlast) begin
            wait_q <= LAT;
            st <= M_BLAT;
          end
        end
        M_BLAT: if (wait_q == 0) st <= M_BRESP; else wait_q <= wait_q - 1;
        M_BRESP: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
