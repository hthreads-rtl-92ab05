// hthreads_top: the hardware of an hthreads system.
//
// Computations of any kind take part in the system by following one thread
// interface: they ask the operating system for services with bus reads and
// obey the answers. The OS itself is three independent hardware state
// machines that run in parallel with each other and with the application:
// the thread manager, the scheduler and the synchronization manager. Each
// hardware thread is a computation (here the multiply-accumulate thread)
// paired with its own HWTI, which forms the OS requests for it.
//
//   host processor --+                           +-- shared memory
//   HWTI 0 (master) -+-- hbus_interconnect ------+-- thread manager --+
//   HWTI 1 (master) -+   (round robin, decode)   +-- scheduler <------+
//                                                +-- sync manager ----+
//                                                +-- HWTI register files
//
// Each HWTI also holds a small local memory. A hardware thread reaches it
// with the same loads and stores as shared memory (region REG_LOCAL), and the
// host reaches it through the HWTI's bus window.
//
// The thread manager and the synchronization manager hand ready threads to
// the scheduler on direct ports; the scheduler wakes a thread bound to
// HWTI n with a pulse on that HWTI's wake input.
//
// The processor that runs software threads is not part of this RTL; its bus
// master port is brought out as host_*: it follows the bus rule of
// hthreads_pkg (hold req, we, addr, wdata until a one-cycle host_ack).
// A typical spawn of a hardware thread from the host: TM_CREATE (answer
// tid), write the HWTI's identifier and argument registers, SC_BIND_HW tid
// to the HWTI, then TM_ADD tid: the scheduler wakes the HWTI and the
// computation runs. The status outputs are event counters for monitoring.
module hthreads_top
  import hthreads_pkg::*;
#(
  parameter int unsigned N_HWT     = 2,
  parameter int unsigned NUM_TID   = 256,
  parameter int unsigned NUM_SEMA  = 64,
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned LOCAL_WORDS = 256   // per HWTI
) (
  input  logic        clk,
  input  logic        rst_n,
  // host processor bus master port
  input  logic        host_req,
  input  logic        host_we,
  input  addr_t       host_addr,
  input  word_t       host_wdata,
  output logic        host_ack,
  output word_t       host_rdata,
  // monitoring
  output logic [15:0] bus_errors,
  output logic [15:0] ready_queue_len,
  output logic [15:0] lock_blocks,
  output logic [15:0] lock_handoffs
);
  localparam int unsigned N_M = 1 + N_HWT;
  localparam int unsigned N_S = 4 + N_HWT;

  bus_req_t m_req [N_M];
  bus_rsp_t m_rsp [N_M];
  bus_req_t s_req [N_S];
  bus_rsp_t s_rsp [N_S];

  assign m_req[0]   = '{req: host_req, we: host_we, addr: host_addr, wdata: host_wdata};
  assign host_ack   = m_rsp[0].ack;
  assign host_rdata = m_rsp[0].rdata;

  hbus_interconnect #(.N_M(N_M), .N_HWT(N_HWT)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp, .err_count(bus_errors)
  );

  shared_mem #(.MEM_WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n, .breq(s_req[0]), .brsp(s_rsp[0])
  );

  logic tm_enq_valid, tm_enq_ack, sy_enq_valid, sy_enq_ack;
  tid_t tm_enq_tid, sy_enq_tid;
  logic [N_HWT-1:0] hw_wake;

  thread_manager #(.NUM_TID(NUM_TID)) u_tmgr (
    .clk, .rst_n, .breq(s_req[1]), .brsp(s_rsp[1]),
    .enq_valid(tm_enq_valid), .enq_tid(tm_enq_tid), .enq_ack(tm_enq_ack)
  );

  thread_scheduler #(.NUM_TID(NUM_TID), .N_HWT(N_HWT)) u_sched (
    .clk, .rst_n, .breq(s_req[2]), .brsp(s_rsp[2]),
    .tm_enq_valid, .tm_enq_tid, .tm_enq_ack,
    .sy_enq_valid, .sy_enq_tid, .sy_enq_ack,
    .hw_wake, .queue_len(ready_queue_len)
  );

  sync_manager #(.NUM_TID(NUM_TID), .NUM_SEMA(NUM_SEMA)) u_sync (
    .clk, .rst_n, .breq(s_req[3]), .brsp(s_rsp[3]),
    .enq_valid(sy_enq_valid), .enq_tid(sy_enq_tid), .enq_ack(sy_enq_ack),
    .block_count(lock_blocks), .handoff_count(lock_handoffs)
  );

  for (genvar i = 0; i < N_HWT; i++) begin : g_hwt
    comp_status_t c_status;
    logic         c_op_we;
    hwti_op_e     c_opcode;
    word_t        c_arg1, c_arg2, c_result;

    hwti #(.LOCAL_WORDS(LOCAL_WORDS)) u_hwti (
      .clk, .rst_n,
      .s_breq(s_req[4+i]), .s_brsp(s_rsp[4+i]), .wake(hw_wake[i]),
      .m_breq(m_req[1+i]), .m_brsp(m_rsp[1+i]),
      .c_status, .c_op_we, .c_opcode, .c_arg1, .c_arg2, .c_result
    );

    multi_acc u_thread (
      .clk, .rst_n,
      .c_status, .c_op_we, .c_opcode, .c_arg1, .c_arg2, .c_result
    );
  end
endmodule
