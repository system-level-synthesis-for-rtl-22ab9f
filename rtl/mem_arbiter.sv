// mem_arbiter: shares the hardware thread's single coherent memory port
// among N burst masters (the table and data masters of every array port).
//
// A whole transaction is granted at a time. While idle, the arbiter picks
// one requesting master in round-robin order, starting after the last
// winner, and passes its command to the memory. Once the memory accepts the
// command, the winner owns the port until the transaction completes: the
// last read beat for a read, the write response for a write. Write data is
// taken only from the owner, and read data and write responses are steered
// back to it. One transaction is in flight at a time, so responses need no
// identifier.
//
// Interface: arrays s_*[N] face the masters, m_* the memory; handshakes are
// the design's burst protocol (cmd and w valid/ready, r and b valid only).
// Timing: the command path is combinational (a request is seen by the
// memory in the same cycle), and a new command can be granted the cycle
// after the previous transaction ends.
//
// The published scheme has all arrays of a thread reach memory through one master
// port; how it is shared is not described, and this arbiter is this
// design's own.
module mem_arbiter
  import vm_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic     clk,
  input  logic     rst_n,
  // masters
  input  logic     s_cmd_valid [N],
  output logic     s_cmd_ready [N],
  input  mem_cmd_t s_cmd       [N],
  input  logic     s_wvalid    [N],
  output logic     s_wready    [N],
  input  data_t    s_wdata     [N],
  input  logic     s_wlast     [N],
  output logic     s_rvalid    [N],
  output data_t    s_rdata     [N],
  output logic     s_rlast     [N],
  output logic     s_bvalid    [N],
  // memory
  output logic     m_cmd_valid,
  input  logic     m_cmd_ready,
  output mem_cmd_t m_cmd,
  output logic     m_wvalid,
  input  logic     m_wready,
  output data_t    m_wdata,
  output logic     m_wlast,
  input  logic     m_rvalid,
  input  data_t    m_rdata,
  input  logic     m_rlast,
  input  logic     m_bvalid,
  // a command was waiting while another master held the port
  output logic     conflict
);

  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1;
  typedef logic [SEL_W-1:0] sel_t;

  logic busy_q;
  sel_t owner_q;
  sel_t last_q;
  sel_t pick;
  logic any;

  // Round-robin choice among requesting masters, starting after last_q.
  always_comb begin
    pick = last_q;
    any  = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % N;
      if (!any && s_cmd_valid[i]) begin
        pick = sel_t'(i);
        any  = 1'b1;
      end
    end
  end

  assign m_cmd_valid = !busy_q && any;
  assign m_cmd       = s_cmd[pick];
  assign m_wvalid    = busy_q && s_wvalid[owner_q];
  assign m_wdata     = s_wdata[owner_q];
  assign m_wlast     = s_wlast[owner_q];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      s_cmd_ready[i] = !busy_q && any && (pick == sel_t'(i)) && m_cmd_ready;
      s_wready[i]    = busy_q && (owner_q == sel_t'(i)) && m_wready;
      s_rvalid[i]    = busy_q && (owner_q == sel_t'(i)) && m_rvalid;
      s_rdata[i]     = m_rdata;
      s_rlast[i]     = m_rlast;
      s_bvalid[i]    = busy_q && (owner_q == sel_t'(i)) && m_bvalid;
    end
  end

  always_comb begin
    conflict = 1'b0;
    for (int unsigned i = 0; i < N; i++)
      if (busy_q && s_cmd_valid[i] && owner_q != sel_t'(i)) conflict = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      last_q  <= sel_t'(N - 1);
    end else if (!busy_q) begin
      if (m_cmd_valid && m_cmd_ready) begin
        busy_q  <= 1'b1;
        owner_q <= pick;
        last_q  <= pick;
      end
    end else if ((m_rvalid && m_rlast) || m_bvalid) begin
      busy_q <= 1'b0;
    end
  end

  // Memory responses only arrive while a transaction is owned.
  a_resp_owned: assert property (@(posedge clk) disable iff (!rst_n)
    (m_rvalid || m_bvalid) |-> busy_q);

endmodule
