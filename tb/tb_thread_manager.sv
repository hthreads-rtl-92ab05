// tb_thread_manager: self-checking test of the thread manager.
// Drives virtual-register reads and compares each answer with a reference
// model of the thread table kept in the testbench. The scheduler side is a
// model that accepts enqueues after random delays and records the tids.
// Covers: create until the table is full (FAIL), add (tid reaches the
// scheduler exactly once), exit, status, free and reuse of a tid, and
// requests refused in the wrong state. Also checks the one-cycle answer
// latency of a simple request.
module tb_thread_manager;
  import hthreads_pkg::*;
  localparam int unsigned NT = 16;

  logic clk = 0, rst_n = 0;
  bus_req_t breq;
  bus_rsp_t brsp;
  logic enq_valid, enq_ack;
  tid_t enq_tid;
  int checks = 0, failures = 0;
  int enq_seen = 0;
  tid_t last_enq;
  logic ack_rand;

  thread_manager #(.NUM_TID(NT)) dut (.clk, .rst_n, .breq, .brsp, .enq_valid, .enq_tid, .enq_ack);

  always #5 clk = ~clk;
  always @(negedge clk) ack_rand <= ($urandom_range(2) == 0);
  assign enq_ack = enq_valid && ack_rand;
  always @(posedge clk) if (enq_valid && enq_ack) begin enq_seen++; last_enq = enq_tid; end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat;
  task automatic os_rd(input logic [3:0] op, input int tid, output word_t d);
    breq = '{req: 1'b1, we: 1'b0, addr: os_addr(REG_TMGR, op, tid_t'(tid), '0), wdata: '0};
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!brsp.ack);
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

  localparam word_t FAIL = word_t'(1) << ANS_FAIL;
  thread_state_e ref_st [NT];

  initial begin
    word_t d;
    breq = BUS_REQ_IDLE;
    for (int i = 0; i < NT; i++) ref_st[i] = TS_UNUSED;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // create every tid, lowest first
    for (int i = 0; i < NT; i++) begin
      os_rd(TM_CREATE, 0, d);
      expect_eq("create", d, word_t'(i));
      if (i == 0) expect_eq("latency from idle", word_t'(lat), 1);
      ref_st[i] = TS_CREATED;
    end
    expect_eq("latency back to back", word_t'(lat), 2);
    os_rd(TM_CREATE, 0, d);
    expect_eq("create when full", d, FAIL);

    // add some threads: each reaches the scheduler once
    for (int i = 0; i < NT; i += 3) begin
      int n0;
      n0 = enq_seen;
      os_rd(TM_ADD, i, d);
      expect_eq("add", d, 0);
      expect_eq("enq count", word_t'(enq_seen - n0), 1);
      expect_eq("enq tid", word_t'(last_enq), word_t'(i));
      ref_st[i] = TS_READY;
    end
    // add twice is refused, no enqueue
    begin
      int n0;
      n0 = enq_seen;
      os_rd(TM_ADD, 0, d);
      expect_eq("re-add", d, FAIL);
      repeat (3) @(posedge clk);
      #1;
      expect_eq("no enq on refused add", word_t'(enq_seen - n0), 0);
    end
    // exit a ready thread, refuse exit of a created one
    os_rd(TM_EXIT, 3, d);   expect_eq("exit", d, 0); ref_st[3] = TS_EXITED;
    os_rd(TM_EXIT, 1, d);   expect_eq("exit created", d, FAIL);
    os_rd(TM_FREE, 6, d);   expect_eq("free ready", d, FAIL);
    os_rd(TM_FREE, 3, d);   expect_eq("free", d, 0); ref_st[3] = TS_UNUSED;
    // out of range tid
    os_rd(TM_STATUS, NT + 1, d); expect_eq("bad tid", d, FAIL);

    // every status matches the model
    for (int i = 0; i < NT; i++) begin
      os_rd(TM_STATUS, i, d);
      expect_eq("status", d, word_t'(ref_st[i]));
    end
    // freed tid is handed out again
    os_rd(TM_CREATE, 0, d);
    expect_eq("reuse", d, 3);
    ref_st[3] = TS_CREATED;

    // random mix against the model
    for (int n = 0; n < 300; n++) begin
      int t; logic [3:0] op; word_t want;
      t  = $urandom_range(NT - 1);
      op = 4'($urandom_range(5, 1));
      want = FAIL;
      unique case (op)
        TM_CREATE: begin
          want = FAIL;
          for (int i = NT - 1; i >= 0; i--) if (ref_st[i] == TS_UNUSED) want = word_t'(i);
          if (want != FAIL) ref_st[want] = TS_CREATED;
        end
        TM_ADD:    if (ref_st[t] == TS_CREATED) begin want = 0; ref_st[t] = TS_READY; end
        TM_EXIT:   if (ref_st[t] == TS_READY)   begin want = 0; ref_st[t] = TS_EXITED; end
        TM_STATUS: want = word_t'(ref_st[t]);
        TM_FREE:   if (ref_st[t] == TS_EXITED)  begin want = 0; ref_st[t] = TS_UNUSED; end
        default: ;
      endcase
      os_rd(op, t, d);
      expect_eq($sformatf("random op %0d tid %0d", op, t), d, want);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
