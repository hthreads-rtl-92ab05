// thread_manager: the thread management core of the hthreads OS.
//
// It owns the global thread resources: which thread identifiers are in use
// and the state of each thread. Requests arrive as bus reads to virtual
// registers (see hthreads_pkg for the address layout); the read data is the
// answer:
//   TM_CREATE        lowest unused tid -> CREATED, answer tid (FAIL if none)
//   TM_ADD    tid    CREATED -> READY, tid handed to the scheduler
//   TM_EXIT   tid    READY   -> EXITED
//   TM_STATUS tid    answer the state (thread_state_e)
//   TM_FREE   tid    EXITED  -> UNUSED
// A request in the wrong state is refused with the FAIL flag and changes
// nothing. Writes are acknowledged and ignored.
//
// Timing: a request is taken at the first clock edge that sees it and
// answered (ack) in the following cycle, so a transfer from idle takes one
// clock and back-to-back transfers take two; an
// ADD waits in addition for the scheduler to accept the tid on the
// enq_valid/enq_ack handshake. The hthreads paper gives the component's job, not
// its operations, encodings or state set: those are this design's.
module thread_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_TID = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t breq,
  output bus_rsp_t brsp,
  // to the scheduler
  output logic     enq_valid,
  output tid_t     enq_tid,
  input  logic     enq_ack
);
  typedef enum logic [1:0] {S_IDLE, S_ENQ, S_RESP} st_e;

  st_e           st;
  thread_state_e tstate [NUM_TID];
  os_addr_t      a;
  word_t         ans;
  tid_t          tid_q;
  logic          free_ok;
  tid_t          free_tid;

  localparam int unsigned TIW = (NUM_TID > 1) ? $clog2(NUM_TID) : 1;
  logic [TIW-1:0] ti;   // table index of the request's thread id

  assign a  = os_addr_t'(breq.addr);
  assign ti = a.tid[TIW-1:0];

  // lowest unused identifier
  always_comb begin
    free_ok  = 1'b0;
    free_tid = '0;
    for (int i = NUM_TID - 1; i >= 0; i--) begin
      if (tstate[i] == TS_UNUSED) begin
        free_ok  = 1'b1;
        free_tid = tid_t'(i);
      end
    end
  end

  logic tid_in_range;
  assign tid_in_range = (int'(a.tid) < NUM_TID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      ans   <= '0;
      tid_q <= '0;
      for (int i = 0; i < NUM_TID; i++) tstate[i] <= TS_UNUSED;
    end else begin
      unique case (st)
        S_IDLE: if (breq.req) begin
          st    <= S_RESP;
          ans   <= '0;
          tid_q <= a.tid;
          if (!breq.we) begin
            if (!tid_in_range && a.op != TM_CREATE) begin
              ans[ANS_FAIL] <= 1'b1;
            end else begin
              unique case (a.op)
                TM_CREATE: begin
                  if (free_ok) begin
                    tstate[free_tid[TIW-1:0]] <= TS_CREATED;
                    ans              <= word_t'(free_tid);
                  end else ans[ANS_FAIL] <= 1'b1;
                end
                TM_ADD: begin
                  if (tstate[ti] == TS_CREATED) begin
                    tstate[ti] <= TS_READY;
                    st            <= S_ENQ;
                  end else ans[ANS_FAIL] <= 1'b1;
                end
                TM_EXIT: begin
                  if (tstate[ti] == TS_READY) tstate[ti] <= TS_EXITED;
                  else ans[ANS_FAIL] <= 1'b1;
                end
                TM_STATUS: ans <= word_t'(tstate[ti]);
                TM_FREE: begin
                  if (tstate[ti] == TS_EXITED) tstate[ti] <= TS_UNUSED;
                  else ans[ANS_FAIL] <= 1'b1;
                end
                default: ans[ANS_FAIL] <= 1'b1;
              endcase
            end
          end
        end
        S_ENQ:  if (enq_ack) st <= S_RESP;
        S_RESP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign enq_valid  = (st == S_ENQ);
  assign enq_tid    = tid_q;
  assign brsp.ack   = (st == S_RESP);
  assign brsp.rdata = ans;
endmodule
