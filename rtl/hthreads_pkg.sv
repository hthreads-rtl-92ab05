// hthreads_pkg: types and constants shared by the hthreads hardware.
//
// All data is 32 bits wide, the width of every generic variable in the
// hardware intermediate form. Masters and slaves talk over a simple
// request/acknowledge bus: a master raises req with we/addr/wdata and holds
// them unchanged until the slave returns a one-cycle ack (with rdata for a
// read). Masters are synchronous: they take the ack at the clock edge where
// it is high and change their request only after that edge. Operating-system services are requested with bus READS whose
// address encodes the operation and its operands ("virtual registers"); the
// read data is the service's answer. The field layout of those addresses,
// the opcode values and the answer flags below are this design's own
// choices.
package hthreads_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned TID_W  = 8;   // thread identifier width
  localparam int unsigned ARG_W  = 8;   // operand field in a virtual register address

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [TID_W-1:0]  tid_t;

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic  req;
    logic  we;
    addr_t addr;
    word_t wdata;
  } bus_req_t;

  typedef struct packed {
    logic  ack;
    word_t rdata;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0};
  localparam bus_rsp_t BUS_RSP_IDLE = '{ack: 1'b0, rdata: '0};

  // ------------------------------------------------------- address map
  // addr[31:28] selects the region.
  localparam logic [3:0] REG_MEM   = 4'h0;  // shared memory
  localparam logic [3:0] REG_LOCAL = 4'h1;  // the HWTI's own local memory (computation side only)
  localparam logic [3:0] REG_TMGR  = 4'h6;  // thread manager
  localparam logic [3:0] REG_SCHED = 4'h7;  // scheduler
  localparam logic [3:0] REG_SYNC  = 4'h8;  // synchronization manager
  localparam logic [3:0] REG_HWTI  = 4'h9;  // HWTI system registers

  // Virtual register address of an OS service:
  //   [31:28] region  [27:24] opcode  [23:18] zero
  //   [17:10] thread id  [9:2] operand  [1:0] zero
  typedef struct packed {
    logic [3:0]       region;
    logic [3:0]       op;
    logic [5:0]       zero;
    tid_t             tid;
    logic [ARG_W-1:0] arg;
    logic [1:0]       byte_sel;
  } os_addr_t;

  function automatic addr_t os_addr(logic [3:0] region, logic [3:0] op,
                                    tid_t tid, logic [ARG_W-1:0] arg);
    os_addr_t a;
    a.region   = region;
    a.op       = op;
    a.zero     = '0;
    a.tid      = tid;
    a.arg      = arg;
    a.byte_sel = '0;
    return addr_t'(a);
  endfunction

  // HWTI system register address: [31:28]=REG_HWTI, [15:8]=HWTI index,
  // [4:2]=register number.
  function automatic addr_t hwti_addr(logic [7:0] idx, logic [2:0] regno);
    return {REG_HWTI, 12'h000, idx, 3'b000, regno, 2'b00};
  endfunction

  // HWTI local memory seen from the bus: [31:28]=REG_HWTI, [27]=1,
  // [26:16]=word index, [15:8]=HWTI index.
  function automatic addr_t hwti_local_addr(logic [7:0] idx, logic [10:0] word);
    return {REG_HWTI, 1'b1, word, idx, 8'h00};
  endfunction

  // Answer flags of an OS service read.
  localparam int unsigned ANS_FAIL  = 31;  // request refused / error
  localparam int unsigned ANS_BLOCK = 30;  // requester must halt itself

  // Thread manager operations
  localparam logic [3:0] TM_CREATE = 4'h1;  // answer: new tid, or FAIL
  localparam logic [3:0] TM_ADD    = 4'h2;  // created -> ready, handed to scheduler
  localparam logic [3:0] TM_EXIT   = 4'h3;  // -> exited
  localparam logic [3:0] TM_STATUS = 4'h4;  // answer: thread state
  localparam logic [3:0] TM_FREE   = 4'h5;  // exited -> unused (tid reusable)

  typedef enum logic [1:0] {
    TS_UNUSED  = 2'd0,
    TS_CREATED = 2'd1,
    TS_READY   = 2'd2,
    TS_EXITED  = 2'd3
  } thread_state_e;

  // Scheduler operations
  localparam logic [3:0] SC_ENQUEUE = 4'h1;  // put tid on ready-to-run queue
  localparam logic [3:0] SC_DEQUEUE = 4'h2;  // answer: next tid, or FAIL if empty
  localparam logic [3:0] SC_LENGTH  = 4'h3;  // answer: queue length
  localparam logic [3:0] SC_BIND_HW = 4'h4;  // tid runs on HWTI number <operand>
  localparam logic [3:0] SC_UNBIND  = 4'h5;  // tid is a software thread again

  // Synchronization manager operations (operand = semaphore number)
  localparam logic [3:0] SY_LOCK    = 4'h1;  // answer 0, or BLOCK (queued)
  localparam logic [3:0] SY_TRYLOCK = 4'h2;  // answer 0, or FAIL
  localparam logic [3:0] SY_UNLOCK  = 4'h3;  // answer 0, or FAIL if not owner
  localparam logic [3:0] SY_OWNER   = 4'h4;  // answer {FAIL if free, owner tid}

  // -------------------------------------------------------------- HWTI
  // System interface register numbers
  localparam logic [2:0] HR_ID     = 3'd0;
  localparam logic [2:0] HR_STATUS = 3'd1;
  localparam logic [2:0] HR_CMD    = 3'd2;
  localparam logic [2:0] HR_ARG    = 3'd3;
  localparam logic [2:0] HR_RESULT = 3'd4;

  // Command register values
  localparam word_t CMD_GO    = 32'd1;  // start, or wake after a block
  localparam word_t CMD_RESET = 32'd2;  // abandon the computation

  // System status register values (HWTI state)
  typedef enum logic [2:0] {
    HS_IDLE    = 3'd0,
    HS_RUN     = 3'd1,
    HS_BUSY    = 3'd2,
    HS_BLOCKED = 3'd3,
    HS_EXITED  = 3'd4
  } hwti_state_e;

  // Computation interface opcodes
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_GETARG  = 4'd1,  // result <- argument register
    OP_GETID   = 4'd2,  // result <- identifier register
    OP_LOAD    = 4'd3,  // result <- mem[arg1]
    OP_STORE   = 4'd4,  // mem[arg1] <- arg2
    OP_LOCK    = 4'd5,  // lock semaphore arg1 (halts until owned)
    OP_TRYLOCK = 4'd6,  // result 0 = got it, else FAIL set
    OP_UNLOCK  = 4'd7,  // unlock semaphore arg1
    OP_EXIT    = 4'd8   // result register <- arg1, thread exits
  } hwti_op_e;

  // Computation status (the computation-side status register)
  typedef struct packed {
    logic run;    // the computation should be executing
    logic reset;  // the computation should return to its start
    logic busy;   // an operation is in progress
    logic done;   // one-cycle pulse: result holds the answer
  } comp_status_t;

endpackage
