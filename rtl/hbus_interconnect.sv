// hbus_interconnect: shared bus between the hthreads masters and slaves.
//
// Operating-system services are reached by ordinary bus reads, so every
// computation needs a path to the memory and to the OS cores. This block
// gives N_M masters (the host processor and one HWTI per hardware thread)
// round-robin access to the slaves, one transfer at a time. It decodes
// addr[31:28] to the shared memory, the thread manager, the scheduler, the
// synchronization manager or an HWTI register file (HWTI number in
// addr[15:8]). A transfer to an unmapped address is acknowledged by the
// interconnect itself with read data 0 and counted in err_count.
//
// Timing: one idle cycle to grant, then the request is forwarded unchanged
// to the slave until the slave's ack, which is passed straight back to the
// master; the grant is released in the same edge. The bus protocol
// (request held stable until ack) is this design's own choice; the
// hthreads paper names no bus.
module hbus_interconnect
  import hthreads_pkg::*;
#(
  parameter int unsigned N_M   = 3,   // masters
  parameter int unsigned N_HWT = 2    // HWTI register files (slaves 4..)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t m_req [N_M],
  output bus_rsp_t m_rsp [N_M],
  // slave side: 0 memory, 1 thread manager, 2 scheduler, 3 sync manager,
  // 4+i HWTI i
  output bus_req_t s_req [4+N_HWT],
  input  bus_rsp_t s_rsp [4+N_HWT],
  output logic [15:0] err_count
);
  localparam int unsigned N_S = 4 + N_HWT;
  localparam int unsigned MW  = (N_M > 1) ? $clog2(N_M) : 1;
  localparam int unsigned SW  = $clog2(N_S + 1);

  logic          busy;
  logic [MW-1:0] gnt, last;
  bus_req_t      cur;
  logic [SW-1:0] sel;        // N_S means unmapped
  logic          sel_ok;
  logic          cur_ack;
  word_t         cur_rdata;
  logic          err_ack;

  assign cur = m_req[gnt];

  // address decode
  always_comb begin
    sel = SW'(N_S);
    unique case (cur.addr[31:28])
      REG_MEM:   sel = SW'(0);
      REG_TMGR:  sel = SW'(1);
      REG_SCHED: sel = SW'(2);
      REG_SYNC:  sel = SW'(3);
      REG_HWTI:  if (int'(cur.addr[15:8]) < N_HWT) sel = SW'(4 + int'(cur.addr[15:8]));
      default:   sel = SW'(N_S);
    endcase
  end
  assign sel_ok = (sel != SW'(N_S));

  always_comb begin
    for (int s = 0; s < N_S; s++) begin
      s_req[s]    = cur;
      s_req[s].req = busy && cur.req && sel_ok && (sel == SW'(s));
    end
  end

  always_comb begin
    cur_ack   = err_ack;
    cur_rdata = '0;
    for (int s = 0; s < N_S; s++) begin
      if (sel_ok && sel == SW'(s)) begin
        cur_ack   = s_rsp[s].ack;
        cur_rdata = s_rsp[s].rdata;
      end
    end
  end

  always_comb begin
    for (int m = 0; m < N_M; m++) begin
      m_rsp[m].ack   = busy && (gnt == MW'(m)) && cur_ack;
      m_rsp[m].rdata = cur_rdata;
    end
  end

  // round-robin pick: first requester after the last one granted
  logic          pick_ok;
  logic [MW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int k = 1; k <= N_M; k++) begin
      int m;
      m = (int'(last) + k) % N_M;
      if (!pick_ok && m_req[m].req) begin
        pick_ok = 1'b1;
        pick    = MW'(m);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      gnt       <= '0;
      last      <= MW'(N_M - 1);
      err_ack   <= 1'b0;
      err_count <= '0;
    end else begin
      err_ack <= 1'b0;
      if (!busy) begin
        if (pick_ok) begin
          busy <= 1'b1;
          gnt  <= pick;
          last <= pick;
        end
      end else if (cur_ack) begin
        busy <= 1'b0;
      end else if (!sel_ok && cur.req && !err_ack) begin
        err_ack   <= 1'b1;
        err_count <= err_count + 16'd1;
      end
    end
  end

  // Bus rule: a master keeps its request unchanged until it is acknowledged.
  for (genvar m = 0; m < N_M; m++) begin : g_rule
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (m_req[m].req && !m_rsp[m].ack) |=>
        (m_req[m].req && $stable(m_req[m].addr) && $stable(m_req[m].we)));
  end
endmodule
