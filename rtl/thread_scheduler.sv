// thread_scheduler: the scheduling core of the hthreads OS.
//
// It keeps the ready-to-run queue and the scheduling state of every thread:
// whether the thread is on the queue and whether it is a hardware thread
// bound to an HWTI. A tid that becomes ready is either pushed on the FIFO
// ready queue (software thread, picked up later by the processor with
// SC_DEQUEUE) or, if bound to HWTI n, turned into a one-cycle pulse on
// hw_wake[n] so that the hardware thread starts or resumes at once.
//
// Requests: bus reads to virtual registers (hthreads_pkg):
//   SC_ENQUEUE tid      make tid ready (FAIL if already queued or full)
//   SC_DEQUEUE          answer the oldest ready tid, FAIL if empty
//   SC_LENGTH           answer the queue length
//   SC_BIND_HW tid, n   tid runs on HWTI n
//   SC_UNBIND  tid      tid is a software thread
// and two internal enqueue ports, from the thread manager (thread added)
// and the synchronization manager (lock handed to a waiting thread), each a
// valid/ack handshake; internal ports go first, one action per cycle.
//
// Timing: an internal enqueue is acknowledged in the cycle it is taken (ack is
// combinational), so the requester drops valid at the next edge; a bus
// request is taken at the first free clock edge and answered (ack) in the
// following cycle. Queue discipline
// (FIFO, no priorities) and all encodings are this design's own choices.
module thread_scheduler
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_TID = 256,
  parameter int unsigned N_HWT   = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t breq,
  output bus_rsp_t brsp,
  input  logic     tm_enq_valid,
  input  tid_t     tm_enq_tid,
  output logic     tm_enq_ack,
  input  logic     sy_enq_valid,
  input  tid_t     sy_enq_tid,
  output logic     sy_enq_ack,
  output logic [N_HWT-1:0] hw_wake,
  output logic [15:0]      queue_len
);
  localparam int unsigned QW = $clog2(NUM_TID);

  typedef enum logic [1:0] {S_IDLE, S_RESP} st_e;

  st_e        st;
  tid_t       fifo   [NUM_TID];
  logic       queued [NUM_TID];
  logic       bound  [NUM_TID];
  logic [7:0] hw_of  [NUM_TID];
  logic [QW-1:0] head, tail;
  logic [QW:0]   count;
  word_t      ans;
  os_addr_t   a;

  localparam int unsigned TIW = (NUM_TID > 1) ? $clog2(NUM_TID) : 1;
  logic [TIW-1:0] ti, e_ti;   // table indexes

  assign a  = os_addr_t'(breq.addr);
  assign ti = a.tid[TIW-1:0];

  // which enqueue (if any) happens this cycle
  logic e_go, e_tm, e_sy, e_bus;
  tid_t e_tid;
  always_comb begin
    e_tm  = (st == S_IDLE) && tm_enq_valid;
    e_sy  = (st == S_IDLE) && !tm_enq_valid && sy_enq_valid;
    e_bus = (st == S_IDLE) && !tm_enq_valid && !sy_enq_valid && breq.req &&
            !breq.we && a.op == SC_ENQUEUE;
    e_go  = e_tm || e_sy || e_bus;
    e_tid = e_tm ? tm_enq_tid : (e_sy ? sy_enq_tid : a.tid);
    e_ti  = e_tid[TIW-1:0];
  end

  logic e_in_range, e_hw, e_push, e_fail;
  always_comb begin
    e_in_range = int'(e_tid) < NUM_TID;
    e_hw   = e_go && e_in_range && bound[e_ti] && int'(hw_of[e_ti]) < N_HWT;
    e_push = e_go && e_in_range && !e_hw && !queued[e_ti] && int'(count) < NUM_TID;
    e_fail = e_go && !e_hw && !e_push;
  end

  logic bus_go;
  assign bus_go = (st == S_IDLE) && !tm_enq_valid && !sy_enq_valid && breq.req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      head       <= '0;
      tail       <= '0;
      count      <= '0;
      ans        <= '0;
      hw_wake    <= '0;
      for (int i = 0; i < NUM_TID; i++) begin
        queued[i] <= 1'b0;
        bound[i]  <= 1'b0;
        hw_of[i]  <= '0;
        fifo[i]   <= '0;
      end
    end else begin
      hw_wake    <= '0;
      for (int n = 0; n < N_HWT; n++)
        if (e_hw && int'(hw_of[e_ti]) == n) hw_wake[n] <= 1'b1;
      if (e_push) begin
        fifo[tail]     <= e_tid;
        queued[e_ti]  <= 1'b1;
        tail           <= QW'((int'(tail) + 1) % NUM_TID);
        count          <= count + 1'b1;
      end
      unique case (st)
        S_IDLE: if (bus_go) begin
          st  <= S_RESP;
          ans <= '0;
          if (!breq.we) begin
            unique case (a.op)
              SC_ENQUEUE: ans[ANS_FAIL] <= e_fail;
              SC_DEQUEUE: begin
                if (count == 0) ans[ANS_FAIL] <= 1'b1;
                else begin
                  ans          <= word_t'(fifo[head]);
                  queued[fifo[head][TIW-1:0]] <= 1'b0;
                  head         <= QW'((int'(head) + 1) % NUM_TID);
                  count        <= count - 1'b1;
                end
              end
              SC_LENGTH: ans <= word_t'(count);
              SC_BIND_HW: begin
                if (int'(a.tid) < NUM_TID && int'(a.arg) < N_HWT) begin
                  bound[ti] <= 1'b1;
                  hw_of[ti] <= a.arg;
                end else ans[ANS_FAIL] <= 1'b1;
              end
              SC_UNBIND: begin
                if (int'(a.tid) < NUM_TID) bound[ti] <= 1'b0;
                else ans[ANS_FAIL] <= 1'b1;
              end
              default: ans[ANS_FAIL] <= 1'b1;
            endcase
          end
        end
        S_RESP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign tm_enq_ack = e_tm;
  assign sy_enq_ack = e_sy;
  assign brsp.ack   = (st == S_RESP);
  assign brsp.rdata = ans;
  assign queue_len  = 16'(count);
endmodule
