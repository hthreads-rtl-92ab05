// tb_sync_manager: self-checking test of the synchronization manager.
// A reference model (owner and a FIFO of waiters per semaphore) predicts the
// answer of every request. Checks: lock of a free semaphore, BLOCK for a
// held one with the waiter queued, unlock handing the lock to the oldest
// waiter and sending exactly that tid to the scheduler port, trylock never
// queueing, unlock by a non-owner refused, owner readout, and the two event
// counters. Ends with a random mix of requests from several threads.
module tb_sync_manager;
  import hthreads_pkg::*;
  localparam int unsigned NT = 16;
  localparam int unsigned NS = 4;

  logic clk = 0, rst_n = 0;
  bus_req_t breq;
  bus_rsp_t brsp;
  logic enq_valid, enq_ack, ack_rand;
  tid_t enq_tid;
  logic [15:0] blocks, handoffs;
  int checks = 0, failures = 0;
  int enq_seen = 0;
  tid_t last_enq;

  sync_manager #(.NUM_TID(NT), .NUM_SEMA(NS)) dut (
    .clk, .rst_n, .breq, .brsp, .enq_valid, .enq_tid, .enq_ack,
    .block_count(blocks), .handoff_count(handoffs));

  always #5 clk = ~clk;
  always @(negedge clk) ack_rand <= ($urandom_range(1) == 0);
  assign enq_ack = enq_valid && ack_rand;
  always @(posedge clk) if (enq_valid && enq_ack) begin enq_seen++; last_enq = enq_tid; end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic os_rd(input logic [3:0] op, input int tid, input int s, output word_t d);
    breq = '{req: 1'b1, we: 1'b0, addr: os_addr(REG_SYNC, op, tid_t'(tid), 8'(s)), wdata: '0};
    do begin @(posedge clk); #1; end while (!brsp.ack);
    d = brsp.rdata;
    breq = BUS_REQ_IDLE;
  endtask

  task automatic expect_eq(input string what, input word_t got, input word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  localparam word_t FAIL  = word_t'(1) << ANS_FAIL;
  localparam word_t BLOCK = word_t'(1) << ANS_BLOCK;

  // reference model
  logic locked [NS];
  int   owner  [NS];
  int   waitq  [NS][$];
  logic waiting [NT];
  int   m_blocks = 0, m_handoffs = 0;

  task automatic model_and_check(input logic [3:0] op, input int t, input int s);
    word_t want, d;
    int n0;
    logic handoff;
    int newowner;
    handoff = 0; newowner = 0;
    want = FAIL;
    unique case (op)
      SY_LOCK, SY_TRYLOCK: begin
        if (!locked[s]) begin locked[s] = 1; owner[s] = t; want = 0; end
        else if (op == SY_TRYLOCK || owner[s] == t) want = FAIL;
        else begin want = BLOCK; waitq[s].push_back(t); waiting[t] = 1; m_blocks++; end
      end
      SY_UNLOCK: begin
        if (!locked[s] || owner[s] != t) want = FAIL;
        else begin
          want = 0;
          if (waitq[s].size() > 0) begin
            owner[s] = waitq[s].pop_front(); waiting[owner[s]] = 0;
            handoff = 1; newowner = owner[s]; m_handoffs++;
          end else locked[s] = 0;
        end
      end
      SY_OWNER: want = locked[s] ? word_t'(owner[s]) : (FAIL | word_t'(owner[s]));
      default: ;
    endcase
    n0 = enq_seen;
    os_rd(op, t, s, d);
    if (op == SY_OWNER && !locked[s]) expect_eq("owner free flag", d & FAIL, FAIL);
    else expect_eq($sformatf("op %0d tid %0d sema %0d", op, t, s), d, want);
    expect_eq("scheduler handoff count", word_t'(enq_seen - n0), word_t'(handoff));
    if (handoff) expect_eq("handoff tid", word_t'(last_enq), word_t'(newowner));
  endtask

  initial begin
    word_t d;
    breq = BUS_REQ_IDLE;
    for (int s = 0; s < NS; s++) begin locked[s] = 0; owner[s] = 0; end
    for (int t = 0; t < NT; t++) waiting[t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    model_and_check(SY_LOCK, 1, 0);     // free: owned
    model_and_check(SY_OWNER, 0, 0);
    model_and_check(SY_LOCK, 2, 0);     // held: block
    model_and_check(SY_LOCK, 3, 0);     // held: block, second in line
    model_and_check(SY_TRYLOCK, 4, 0);  // never queues
    model_and_check(SY_LOCK, 1, 0);     // owner again: refused
    model_and_check(SY_UNLOCK, 2, 0);   // not owner
    model_and_check(SY_UNLOCK, 1, 0);   // handoff to 2
    model_and_check(SY_OWNER, 0, 0);
    model_and_check(SY_UNLOCK, 2, 0);   // handoff to 3
    model_and_check(SY_UNLOCK, 3, 0);   // free
    model_and_check(SY_OWNER, 0, 0);
    model_and_check(SY_TRYLOCK, 5, 1);
    model_and_check(SY_UNLOCK, 5, 1);
    os_rd(SY_LOCK, 0, NS + 2, d);
    expect_eq("bad semaphore", d, FAIL);

    // random mix: a thread that is waiting issues nothing
    for (int n = 0; n < 400; n++) begin
      int t, s, k;
      logic [3:0] op;
      t = $urandom_range(NT - 1);
      s = $urandom_range(NS - 1);
      k = $urandom_range(9);
      op = (k < 4) ? SY_LOCK : (k < 5) ? SY_TRYLOCK : (k < 9) ? SY_UNLOCK : SY_OWNER;
      if (op == SY_UNLOCK && locked[s] && $urandom_range(1) == 1) t = owner[s];
      if (!waiting[t]) model_and_check(op, t, s);
    end
    expect_eq("block counter", word_t'(blocks), word_t'(m_blocks));
    expect_eq("handoff counter", word_t'(handoffs), word_t'(m_handoffs));
    checks++;
    if (m_handoffs < 5) begin failures++; $display("too few handoffs"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
