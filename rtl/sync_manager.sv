// sync_manager: the synchronization core of the hthreads OS.
//
// It keeps the status of NUM_SEMA binary semaphores (mutexes) and one
// waiting queue per semaphore. Locking is a single bus read, so no atomic
// instruction sequences, caches or coherency are needed. When a thread
// asks for a lock that is held, the manager queues the thread and answers
// BLOCK: the requester must halt itself; the manager does not stop it. When
// the owner unlocks, the oldest waiter becomes the owner at once and its tid
// is handed to the scheduler, which restarts it.
//
// Requests (bus reads to virtual registers, hthreads_pkg):
//   SY_LOCK    tid, s   answer 0 (owned now) or BLOCK (queued); FAIL if
//                       tid already owns s
//   SY_TRYLOCK tid, s   answer 0 or FAIL, never queues
//   SY_UNLOCK  tid, s   answer 0; FAIL if tid is not the owner
//   SY_OWNER   s        answer owner tid, FAIL flag set if s is free
// The waiting queues are linked lists through a per-thread next[] table, so
// a thread waits on at most one semaphore at a time.
//
// Timing: the request is taken at the first clock edge that sees it and
// answered (ack) in the following cycle; an unlock that hands the
// lock on waits in addition for the scheduler's enq_ack. Operations,
// encodings, sizes and the FIFO order of waiters are this design's choices.
module sync_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_TID  = 256,
  parameter int unsigned NUM_SEMA = 64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t breq,
  output bus_rsp_t brsp,
  output logic     enq_valid,
  output tid_t     enq_tid,
  input  logic     enq_ack,
  output logic [15:0] block_count,   // requests answered with BLOCK
  output logic [15:0] handoff_count  // locks handed to a waiter
);
  typedef enum logic [1:0] {S_IDLE, S_ENQ, S_RESP} st_e;

  st_e      st;
  logic     locked [NUM_SEMA];
  tid_t     owner  [NUM_SEMA];
  logic     qne    [NUM_SEMA];   // waiting queue not empty
  tid_t     qhead  [NUM_SEMA];
  tid_t     qtail  [NUM_SEMA];
  tid_t     nxt    [NUM_TID];
  word_t    ans;
  tid_t     enq_q;
  os_addr_t a;
  logic     ok;
  localparam int unsigned SIW = (NUM_SEMA > 1) ? $clog2(NUM_SEMA) : 1;
  logic [SIW-1:0] si;   // semaphore index
  localparam int unsigned TIW = (NUM_TID > 1) ? $clog2(NUM_TID) : 1;

  assign a  = os_addr_t'(breq.addr);
  assign si = a.arg[SIW-1:0];
  assign ok = (int'(a.arg) < NUM_SEMA) && (int'(a.tid) < NUM_TID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_IDLE;
      ans           <= '0;
      enq_q         <= '0;
      block_count   <= '0;
      handoff_count <= '0;
      for (int s = 0; s < NUM_SEMA; s++) begin
        locked[s] <= 1'b0;
        owner[s]  <= '0;
        qne[s]    <= 1'b0;
        qhead[s]  <= '0;
        qtail[s]  <= '0;
      end
      for (int t = 0; t < NUM_TID; t++) nxt[t] <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (breq.req) begin
          st  <= S_RESP;
          ans <= '0;
          if (!breq.we) begin
            if (!ok) ans[ANS_FAIL] <= 1'b1;
            else unique case (a.op)
              SY_LOCK, SY_TRYLOCK: begin
                if (!locked[si]) begin
                  locked[si] <= 1'b1;
                  owner[si]  <= a.tid;
                end else if (a.op == SY_TRYLOCK || owner[si] == a.tid) begin
                  ans[ANS_FAIL] <= 1'b1;
                end else begin
                  // append to the waiting queue, tell requester to halt
                  ans[ANS_BLOCK] <= 1'b1;
                  block_count    <= block_count + 16'd1;
                  qtail[si]   <= a.tid;
                  if (!qne[si]) begin
                    qne[si]   <= 1'b1;
                    qhead[si] <= a.tid;
                  end else begin
                    nxt[qtail[si][TIW-1:0]] <= a.tid;
                  end
                end
              end
              SY_UNLOCK: begin
                if (!locked[si] || owner[si] != a.tid) begin
                  ans[ANS_FAIL] <= 1'b1;
                end else if (qne[si]) begin
                  // hand the lock to the oldest waiter
                  owner[si]  <= qhead[si];
                  enq_q         <= qhead[si];
                  handoff_count <= handoff_count + 16'd1;
                  if (qhead[si] == qtail[si]) qne[si] <= 1'b0;
                  else qhead[si] <= nxt[qhead[si][TIW-1:0]];
                  st <= S_ENQ;
                end else begin
                  locked[si] <= 1'b0;
                end
              end
              SY_OWNER: begin
                ans <= word_t'(owner[si]);
                ans[ANS_FAIL] <= !locked[si];
              end
              default: ans[ANS_FAIL] <= 1'b1;
            endcase
          end
        end
        S_ENQ:  if (enq_ack) st <= S_RESP;
        S_RESP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign enq_valid  = (st == S_ENQ);
  assign enq_tid    = enq_q;
  assign brsp.ack   = (st == S_RESP);
  assign brsp.rdata = ans;
endmodule
