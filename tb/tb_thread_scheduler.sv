// tb_thread_scheduler: self-checking test of the scheduler.
// Checks the ready-to-run queue against a reference FIFO kept in the
// testbench: bus enqueues, enqueues from the two internal ports (thread
// manager and synchronization manager models), dequeue order, empty and
// duplicate refusal, the length register, and that a tid bound to an HWTI is
// not queued but produces exactly one wake pulse on that HWTI's line.
module tb_thread_scheduler;
  import hthreads_pkg::*;
  localparam int unsigned NT = 16;
  localparam int unsigned NH = 2;

  logic clk = 0, rst_n = 0;
  bus_req_t breq;
  bus_rsp_t brsp;
  logic tm_v = 0, tm_a, sy_v = 0, sy_a;
  tid_t tm_t = '0, sy_t = '0;
  logic [NH-1:0] hw_wake;
  logic [15:0] qlen;
  int checks = 0, failures = 0;
  int wakes [NH];

  thread_scheduler #(.NUM_TID(NT), .N_HWT(NH)) dut (
    .clk, .rst_n, .breq, .brsp,
    .tm_enq_valid(tm_v), .tm_enq_tid(tm_t), .tm_enq_ack(tm_a),
    .sy_enq_valid(sy_v), .sy_enq_tid(sy_t), .sy_enq_ack(sy_a),
    .hw_wake, .queue_len(qlen));

  always #5 clk = ~clk;
  always @(posedge clk) for (int n = 0; n < NH; n++) if (hw_wake[n]) wakes[n]++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic os_rd(input logic [3:0] op, input int tid, input int arg, output word_t d);
    breq = '{req: 1'b1, we: 1'b0, addr: os_addr(REG_SCHED, op, tid_t'(tid), 8'(arg)), wdata: '0};
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

  localparam word_t FAIL = word_t'(1) << ANS_FAIL;
  int q[$];
  logic inq [NT];

  // internal port driver: hold valid until the ack is seen at a clock edge
  task automatic port_enq(input bit sync_port, input int tid);
    if (sync_port) begin sy_v = 1; sy_t = tid_t'(tid); end
    else           begin tm_v = 1; tm_t = tid_t'(tid); end
    forever begin
      @(posedge clk);
      if (sync_port ? sy_a : tm_a) break;
    end
    #1;
    if (sync_port) sy_v = 0; else tm_v = 0;
  endtask

  initial begin
    word_t d;
    breq = BUS_REQ_IDLE;
    for (int n = 0; n < NH; n++) wakes[n] = 0;
    for (int i = 0; i < NT; i++) inq[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    os_rd(SC_DEQUEUE, 0, 0, d);  expect_eq("dequeue empty", d, FAIL);
    // enqueue by bus and both ports, in a known order
    for (int i = 0; i < 9; i++) begin
      int t;
      t = (i * 5 + 2) % NT;
      unique case (i % 3)
        0: begin os_rd(SC_ENQUEUE, t, 0, d); expect_eq("enqueue", d, 0); end
        1: port_enq(0, t);
        default: port_enq(1, t);
      endcase
      q.push_back(t); inq[t] = 1;
    end
    os_rd(SC_ENQUEUE, q[0], 0, d); expect_eq("duplicate", d, FAIL);
    os_rd(SC_LENGTH, 0, 0, d);     expect_eq("length", d, word_t'(q.size()));
    expect_eq("queue_len port", word_t'(qlen), word_t'(q.size()));
    for (int i = 0; i < 4; i++) begin
      int t;
      t = q.pop_front(); inq[t] = 0;
      os_rd(SC_DEQUEUE, 0, 0, d); expect_eq("dequeue order", d, word_t'(t));
    end

    // hardware-bound thread: wake pulse, not queued
    os_rd(SC_BIND_HW, 13, 1, d);  expect_eq("bind", d, 0);
    os_rd(SC_BIND_HW, 12, NH, d); expect_eq("bind bad hwti", d, FAIL);
    begin
      int w0, w1;
      w0 = wakes[0]; w1 = wakes[1];
      os_rd(SC_ENQUEUE, 13, 0, d); expect_eq("hw enqueue", d, 0);
      port_enq(1, 13);
      repeat (2) @(posedge clk); #1;
      expect_eq("wake hwti1", word_t'(wakes[1] - w1), 2);
      expect_eq("no wake hwti0", word_t'(wakes[0] - w0), 0);
    end
    os_rd(SC_LENGTH, 0, 0, d);    expect_eq("length after hw", d, word_t'(q.size()));
    os_rd(SC_UNBIND, 13, 0, d);   expect_eq("unbind", d, 0);
    os_rd(SC_ENQUEUE, 13, 0, d);  expect_eq("sw enqueue", d, 0);
    q.push_back(13); inq[13] = 1;

    // random mix
    for (int n = 0; n < 300; n++) begin
      int t, k;
      t = $urandom_range(NT - 1);
      k = $urandom_range(3);
      if (k == 0) begin
        word_t want;
        if (q.size() == 0) want = FAIL;
        else begin want = word_t'(q[0]); inq[q[0]] = 0; void'(q.pop_front()); end
        os_rd(SC_DEQUEUE, 0, 0, d); expect_eq("random dequeue", d, want);
      end else if (k == 1) begin
        word_t want;
        want = inq[t] ? FAIL : 0;
        if (!inq[t]) begin q.push_back(t); inq[t] = 1; end
        os_rd(SC_ENQUEUE, t, 0, d); expect_eq("random enqueue", d, want);
      end else begin
        if (!inq[t]) begin
          port_enq(k == 3, t);
          q.push_back(t); inq[t] = 1;
        end
      end
    end
    os_rd(SC_LENGTH, 0, 0, d); expect_eq("final length", d, word_t'(q.size()));
    while (q.size() > 0) begin
      int t;
      t = q.pop_front();
      os_rd(SC_DEQUEUE, 0, 0, d); expect_eq("drain", d, word_t'(t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
