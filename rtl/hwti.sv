// hwti: hardware thread interface, one per hardware thread.
//
// The HWTI lets a hardware computation behave as an hthreads thread without
// knowing the OS request protocol. It has two faces.
//
// System interface (bus slave, five memory-mapped registers, word offsets):
//   0 identifier  thread id, written by the system when the thread is spawned
//   1 status      read-only HWTI state (hwti_state_e), for debugging
//   2 command     CMD_GO starts the computation or wakes it after a block;
//                 CMD_RESET abandons it and tells the computation to reset
//   3 argument    argument passed to the computation at spawn (a pointer)
//   4 result      value the computation returned on exit (read-only)
// A one-cycle pulse on wake (from the scheduler) acts like CMD_GO.
// The same bus window also reaches the HWTI's local memory (LOCAL_WORDS
// words, addr[27]=1, word index in addr[26:16], see hwti_local_addr), so the
// system can place data there before starting the thread.
//
// Computation interface (not memory mapped, five registers):
//   status (comp_status_t: run, reset, busy, done), opcode, argument 1,
//   argument 2, result. The computation presents arg1/arg2 and loads the
//   opcode with c_op_we; the HWTI keeps the opcode and captures the
//   arguments straight into its outgoing bus request, raises busy, performs
//   the operation and pulses done with the answer in c_result.
//   OP_LOAD/OP_STORE to an address in region REG_LOCAL go to the local
//   memory without using the bus; all other OP_LOAD/OP_STORE become bus
//   reads/writes, so the computation never needs to know which memory it
//   uses; OP_LOCK/OP_TRYLOCK/OP_UNLOCK
//   become reads of the synchronization manager's virtual registers with the
//   thread id from the identifier register; OP_LOCK answered with BLOCK puts
//   the HWTI in the blocked state until wake (the lock is then owned, result
//   0); OP_EXIT stores arg1 in the result register, reports the exit to the
//   thread manager and drops run.
//
// Timing: OP_GETARG/OP_GETID/OP_NOP and local loads/stores pulse done two
// clock edges after the edge that loads the opcode;
// bus operations answer in the cycle after the bus ack. A reset command that
// arrives during a bus transfer is held until the transfer ends. The
// register set and the local/shared resolution follow the hthreads paper;
// the opcode and command encodings, the local memory size and address
// window, and the exact handshake are this design's own.
module hwti
  import hthreads_pkg::*;
#(
  parameter int unsigned LOCAL_WORDS = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // system interface
  input  bus_req_t     s_breq,
  output bus_rsp_t     s_brsp,
  input  logic         wake,
  // bus master for OS requests and memory
  output bus_req_t     m_breq,
  input  bus_rsp_t     m_brsp,
  // computation interface
  output comp_status_t c_status,
  input  logic         c_op_we,
  input  hwti_op_e     c_opcode,
  input  word_t        c_arg1,
  input  word_t        c_arg2,
  output word_t        c_result
);
  typedef enum logic [2:0] {
    P_NONE, P_IMM, P_BUS, P_LOCAL
  } phase_e;

  localparam int unsigned LW = (LOCAL_WORDS > 1) ? $clog2(LOCAL_WORDS) : 1;

  hwti_state_e st;
  phase_e      ph;
  // system registers
  word_t       r_id, r_cmd, r_arg, r_result;
  // computation registers
  hwti_op_e    r_op;
  word_t       r_res;
  logic        s_ack_q;
  logic        rst_pend, reset_pulse, done_q;
  bus_req_t    mreq_q;

  // ------------------------------------------------ system register file
  logic  s_wr, s_rd_go, s_local, s_loc_q;
  word_t s_rdata;
  assign s_wr    = s_breq.req && !s_ack_q && s_breq.we;
  assign s_local = s_breq.addr[27];

  always_comb begin
    unique case (s_breq.addr[4:2])
      HR_ID:     s_rdata = r_id;
      HR_STATUS: s_rdata = word_t'(st);
      HR_CMD:    s_rdata = r_cmd;
      HR_ARG:    s_rdata = r_arg;
      HR_RESULT: s_rdata = r_result;
      default:   s_rdata = '0;
    endcase
  end
  assign s_rd_go = s_breq.req && !s_ack_q;

  word_t s_rdata_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack_q   <= 1'b0;
      s_loc_q   <= 1'b0;
      s_rdata_q <= '0;
    end else begin
      s_ack_q <= s_rd_go;
      if (s_rd_go) begin
        s_rdata_q <= s_rdata;
        s_loc_q   <= s_local;
      end
    end
  end

  // ------------------------------------------------ local memory
  // One write port shared by the system side (bus writes to the local
  // window) and the computation (OP_STORE to a REG_LOCAL address); the system
  // side wins a same-cycle conflict, so it should fill the memory while the
  // thread is not running. Two synchronous read ports.
  word_t          lmem [LOCAL_WORDS];
  word_t          lm_rd_s, lm_rd_c;
  logic [LW-1:0]  lm_sidx, lm_cidx;
  logic           acc_op, c_local, lm_cwe, lm_swe;
  assign lm_sidx = s_breq.addr[16+LW-1:16];
  assign lm_cidx = c_arg1[LW+1:2];
  assign c_local = (c_arg1[31:28] == REG_LOCAL) && (c_opcode inside {OP_LOAD, OP_STORE});
  assign lm_swe  = s_wr && s_local;
  assign lm_cwe  = acc_op && c_local && (c_opcode == OP_STORE);

  always_ff @(posedge clk) begin
    if (lm_swe)      lmem[lm_sidx] <= s_breq.wdata;
    else if (lm_cwe) lmem[lm_cidx] <= c_arg2;
    lm_rd_s <= lmem[lm_sidx];
    lm_rd_c <= lmem[lm_cidx];
  end

  assign s_brsp.ack   = s_ack_q;
  assign s_brsp.rdata = s_loc_q ? lm_rd_s : s_rdata_q;

  logic cmd_go, cmd_reset;
  logic s_wr_reg;
  assign s_wr_reg  = s_wr && !s_local;
  assign cmd_go    = (s_wr_reg && s_breq.addr[4:2] == HR_CMD && s_breq.wdata == CMD_GO) || wake;
  assign cmd_reset =  s_wr_reg && s_breq.addr[4:2] == HR_CMD && s_breq.wdata == CMD_RESET;
  // an opcode load that is taken this cycle
  assign acc_op    = (st == HS_RUN) && c_op_we && !(cmd_reset || rst_pend);

  // ------------------------------------------------ request formation
  function automatic bus_req_t form_req(hwti_op_e op, word_t a1, word_t a2, word_t id);
    bus_req_t r;
    r = '{req: 1'b1, we: 1'b0, addr: a1, wdata: a2};
    unique case (op)
      OP_STORE:   r.we   = 1'b1;
      OP_LOCK:    r.addr = os_addr(REG_SYNC, SY_LOCK,    tid_t'(id), a1[ARG_W-1:0]);
      OP_TRYLOCK: r.addr = os_addr(REG_SYNC, SY_TRYLOCK, tid_t'(id), a1[ARG_W-1:0]);
      OP_UNLOCK:  r.addr = os_addr(REG_SYNC, SY_UNLOCK,  tid_t'(id), a1[ARG_W-1:0]);
      OP_EXIT:    r.addr = os_addr(REG_TMGR, TM_EXIT,    tid_t'(id), '0);
      default: ;
    endcase
    return r;
  endfunction

  function automatic logic is_bus_op(hwti_op_e op);
    return op inside {OP_LOAD, OP_STORE, OP_LOCK, OP_TRYLOCK, OP_UNLOCK, OP_EXIT};
  endfunction

  // ------------------------------------------------ main state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= HS_IDLE;
      ph          <= P_NONE;
      r_id        <= '0;
      r_cmd       <= '0;
      r_arg       <= '0;
      r_result    <= '0;
      r_op        <= OP_NOP;
      r_res       <= '0;
      rst_pend    <= 1'b0;
      reset_pulse <= 1'b0;
      done_q      <= 1'b0;
      mreq_q      <= BUS_REQ_IDLE;
    end else begin
      done_q      <= 1'b0;
      reset_pulse <= 1'b0;

      if (s_wr_reg) begin
        unique case (s_breq.addr[4:2])
          HR_ID:  r_id  <= s_breq.wdata;
          HR_CMD: r_cmd <= s_breq.wdata;
          HR_ARG: r_arg <= s_breq.wdata;
          default: ;
        endcase
      end

      if (cmd_reset) rst_pend <= 1'b1;

      if ((cmd_reset || rst_pend) && !mreq_q.req) begin
        // abandon the computation (never in the middle of a bus transfer)
        st          <= HS_IDLE;
        ph          <= P_NONE;
        rst_pend    <= 1'b0;
        reset_pulse <= 1'b1;
      end else begin
        unique case (st)
          HS_IDLE, HS_EXITED: if (cmd_go) st <= HS_RUN;

          HS_RUN: if (c_op_we) begin
            r_op <= c_opcode;
            st   <= HS_BUSY;
            if (c_local) begin
              ph <= P_LOCAL;
            end else if (is_bus_op(c_opcode)) begin
              ph     <= P_BUS;
              mreq_q <= form_req(c_opcode, c_arg1, c_arg2, r_id);
              if (c_opcode == OP_EXIT) r_result <= c_arg1;
            end else begin
              ph <= P_IMM;
            end
          end

          HS_BUSY: unique case (ph)
            P_IMM: begin
              unique case (r_op)
                OP_GETARG: r_res <= r_arg;
                OP_GETID:  r_res <= r_id;
                default:   r_res <= '0;
              endcase
              done_q <= 1'b1;
              ph     <= P_NONE;
              st     <= HS_RUN;
            end
            P_LOCAL: begin
              r_res  <= (r_op == OP_STORE) ? '0 : lm_rd_c;
              done_q <= 1'b1;
              ph     <= P_NONE;
              st     <= HS_RUN;
            end
            P_BUS: if (m_brsp.ack) begin
              mreq_q <= BUS_REQ_IDLE;
              ph     <= P_NONE;
              r_res  <= (r_op == OP_STORE) ? '0 : m_brsp.rdata;
              if (r_op == OP_LOCK && m_brsp.rdata[ANS_BLOCK]) begin
                st <= HS_BLOCKED;           // halt until the lock is ours
              end else begin
                done_q <= 1'b1;
                st     <= (r_op == OP_EXIT) ? HS_EXITED : HS_RUN;
              end
            end
            default: st <= HS_RUN;
          endcase

          HS_BLOCKED: if (cmd_go) begin
            r_res  <= '0;                   // lock was handed to us
            done_q <= 1'b1;
            st     <= HS_RUN;
          end

          default: st <= HS_IDLE;
        endcase
      end
    end
  end

  assign m_breq         = mreq_q;
  assign c_result       = r_res;
  assign c_status.run   = (st == HS_RUN) || (st == HS_BUSY) || (st == HS_BLOCKED);
  assign c_status.reset = reset_pulse;
  assign c_status.busy  = (st == HS_BUSY) || (st == HS_BLOCKED);
  assign c_status.done  = done_q;

  // Computation side rule: an opcode is loaded only while the HWTI is idle
  // for it (running and not busy).
  a_op_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    c_op_we |-> (c_status.run && !c_status.busy && !c_status.done));
endmodule
