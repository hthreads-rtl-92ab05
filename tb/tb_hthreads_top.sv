// tb_hthreads_top: end-to-end test of the hthreads hardware at its default
// size (2 hardware threads, 256 thread ids, 64 semaphores, 1024 words).
// The testbench is the host processor on the host_* bus port. It:
//   1. spawns both multiply-accumulate hardware threads the OS way
//      (create, fill HWTI registers, bind to the HWTI, add: the scheduler
//      wakes the HWTI) and checks r = x*y + a in memory, the HWTI result
//      registers and the EXITED state in the thread manager; both threads
//      run at once, so their HWTIs compete for the bus;
//   2. frees the threads and restarts them with new data by writing the
//      HWTI command register directly;
//   3. exercises the synchronization manager from software threads: a
//      held lock answers BLOCK, the unlock hands it to the waiter, which
//      lands on the ready-to-run queue and is dequeued;
//   4. creates thread ids until the table is full (refusal), touches an
//      unmapped address (bus error), and resets an HWTI by command.
// Each of these mechanisms is counted; one that never happens is a failure.
module tb_hthreads_top;
  import hthreads_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0, host_ack;
  addr_t host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  logic [15:0] bus_errors, ready_queue_len, lock_blocks, lock_handoffs;
  int checks = 0, failures = 0;

  hthreads_top dut (.clk, .rst_n, .host_req, .host_we, .host_addr, .host_wdata,
                    .host_ack, .host_rdata, .bus_errors, .ready_queue_len,
                    .lock_blocks, .lock_handoffs);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input word_t got, input word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  // synchronous host: drives after an edge, takes the ack at the next edge
  task automatic host(input logic we, input addr_t a, input word_t wd, output word_t rd);
    host_req = 1; host_we = we; host_addr = a; host_wdata = wd;
    do begin @(posedge clk); #3; end while (!host_ack);
    rd = host_rdata;
    @(posedge clk); #1;
    host_req = 0; host_we = 0;
  endtask

  task automatic os(input logic [3:0] region, input logic [3:0] op, input int tid, input int arg,
                    output word_t rd);
    host(1'b0, os_addr(region, op, tid_t'(tid), 8'(arg)), '0, rd);
  endtask

  // ---------------------------------------------- mechanism counters
  int n_contention = 0;   // both HWTIs requesting the bus in one cycle
  int n_sched_wake = 0;   // scheduler woke an HWTI
  int n_cmd_go = 0, n_block = 0, n_handoff = 0, n_dequeue = 0;
  int n_full = 0, n_buserr = 0, n_reset = 0, n_hw_runs = 0;
  int n_local = 0, n_hwt1_mem = 0;

  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (dut.m_req[1].req && dut.m_req[2].req) n_contention++;
    if (|dut.hw_wake) n_sched_wake++;
    if (dut.m_req[2].req && dut.m_rsp[2].ack && dut.m_req[2].addr[31:28] == REG_MEM) n_hwt1_mem++;
  end

  localparam word_t FAIL  = word_t'(1) << ANS_FAIL;
  localparam word_t BLOCK = word_t'(1) << ANS_BLOCK;

  word_t base [2];
  word_t xs [2], ys [2], as_ [2];
  int    tids [2];

  task automatic put_struct(input int i);
    word_t d;
    host(1, base[i] + 0, xs[i], d);
    host(1, base[i] + 4, ys[i], d);
    host(1, base[i] + 8, as_[i], d);
    host(1, base[i] + 12, 32'hFFFF_FFFF, d);
  endtask

  task automatic wait_exited(input int i);
    word_t d;
    int guard;
    guard = 0;
    d = '0;
    while (d != word_t'(TS_EXITED) && guard < 2000) begin
      os(REG_TMGR, TM_STATUS, tids[i], 0, d);
      guard++;
    end
    expect_eq($sformatf("thread %0d exited", i), d, word_t'(TS_EXITED));
  endtask

  task automatic check_result(input int i);
    word_t d;
    host(0, base[i] + 12, '0, d);
    expect_eq($sformatf("thread %0d r = x*y+a", i), d, xs[i] * ys[i] + as_[i]);
    host(0, hwti_addr(8'(i), HR_RESULT), '0, d);
    expect_eq($sformatf("thread %0d returned its argument", i), d, base[i]);
    host(0, hwti_addr(8'(i), HR_STATUS), '0, d);
    expect_eq($sformatf("hwti %0d status", i), d, word_t'(HS_EXITED));
    n_hw_runs++;
  endtask

  initial begin
    word_t d;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // ---- 1. spawn both hardware threads through the OS
    base[0] = 32'h100; xs[0] = 6;  ys[0] = 7;   as_[0] = 8;
    base[1] = 32'h240; xs[1] = 32'hFFFF_FFF0; ys[1] = 3; as_[1] = 100;
    for (int i = 0; i < 2; i++) begin
      put_struct(i);
      os(REG_TMGR, TM_CREATE, 0, 0, d);
      expect_eq("create", d & FAIL, 0);
      tids[i] = int'(d[7:0]);
      host(1, hwti_addr(8'(i), HR_ID), word_t'(tids[i]), d);
      host(1, hwti_addr(8'(i), HR_ARG), base[i], d);
      os(REG_SCHED, SC_BIND_HW, tids[i], i, d);
      expect_eq("bind", d, 0);
    end
    t0 = cyc;
    for (int i = 0; i < 2; i++) begin
      os(REG_TMGR, TM_ADD, tids[i], 0, d);
      expect_eq("add", d, 0);
    end
    for (int i = 0; i < 2; i++) wait_exited(i);
    $display("two threads spawned and finished in %0d cycles", cyc - t0);
    for (int i = 0; i < 2; i++) check_result(i);
    os(REG_SCHED, SC_LENGTH, 0, 0, d);
    expect_eq("hardware threads never queued", d, 0);

    // ---- 2. free, then restart by command register with new data
    for (int i = 0; i < 2; i++) begin
      os(REG_TMGR, TM_FREE, tids[i], 0, d);
      expect_eq("free", d, 0);
      os(REG_SCHED, SC_UNBIND, tids[i], 0, d);
      expect_eq("unbind", d, 0);
    end
    for (int i = 0; i < 2; i++) begin
      base[i] = 32'h300 + 32'h40 * i;
      xs[i] = $urandom; ys[i] = $urandom; as_[i] = $urandom;
      put_struct(i);
      os(REG_TMGR, TM_CREATE, 0, 0, d);
      tids[i] = int'(d[7:0]);
      os(REG_TMGR, TM_ADD, tids[i], 0, d);   // software-visible: goes on the queue
      host(1, hwti_addr(8'(i), HR_ID), word_t'(tids[i]), d);
      host(1, hwti_addr(8'(i), HR_ARG), base[i], d);
    end
    os(REG_SCHED, SC_LENGTH, 0, 0, d);
    expect_eq("queued threads", d, 2);
    for (int i = 0; i < 2; i++) begin
      os(REG_SCHED, SC_DEQUEUE, 0, 0, d);
      expect_eq("dequeue order", d, word_t'(tids[i]));
      n_dequeue++;
    end
    for (int i = 0; i < 2; i++) begin
      host(1, hwti_addr(8'(i), HR_CMD), CMD_GO, d);
      n_cmd_go++;
    end
    for (int i = 0; i < 2; i++) wait_exited(i);
    for (int i = 0; i < 2; i++) check_result(i);

    // ---- 3. locks between software threads 20 and 21
    os(REG_SYNC, SY_LOCK, 20, 5, d);   expect_eq("lock free", d, 0);
    os(REG_SYNC, SY_LOCK, 21, 5, d);   expect_eq("lock held", d, BLOCK);
    if (d == BLOCK) n_block++;
    expect_eq("block counter", word_t'(lock_blocks), 1);
    os(REG_SYNC, SY_TRYLOCK, 22, 5, d); expect_eq("trylock held", d, FAIL);
    os(REG_SYNC, SY_UNLOCK, 21, 5, d); expect_eq("unlock by waiter", d, FAIL);
    os(REG_SYNC, SY_UNLOCK, 20, 5, d); expect_eq("unlock", d, 0);
    expect_eq("handoff counter", word_t'(lock_handoffs), 1);
    if (lock_handoffs == 1) n_handoff++;
    os(REG_SYNC, SY_OWNER, 0, 5, d);   expect_eq("new owner", d, 21);
    expect_eq("waiter made ready", word_t'(ready_queue_len), 1);
    os(REG_SCHED, SC_DEQUEUE, 0, 0, d); expect_eq("waiter dequeued", d, 21);
    n_dequeue++;
    os(REG_SYNC, SY_UNLOCK, 21, 5, d); expect_eq("final unlock", d, 0);
    os(REG_SYNC, SY_OWNER, 0, 5, d);   expect_eq("free again", d & FAIL, FAIL);

    // ---- 4. table full, bus error, HWTI reset
    begin
      int made;
      made = 0;
      d = '0;
      while (!d[ANS_FAIL] && made < 300) begin
        os(REG_TMGR, TM_CREATE, 0, 0, d);
        if (!d[ANS_FAIL]) made++;
      end
      expect_eq("ids until full", word_t'(made), 256 - 2);
      if (d[ANS_FAIL]) n_full++;
    end
    host(0, 32'hC000_0000, '0, d);
    expect_eq("unmapped read", d, 0);
    expect_eq("bus error counted", word_t'(bus_errors), 1);
    if (bus_errors == 1) n_buserr++;

    // start HWTI 0 again and abandon the run with a reset command
    xs[0] = 2; ys[0] = 3; as_[0] = 4;
    put_struct(0);
    host(1, hwti_addr(8'd0, HR_CMD), CMD_GO, d);
    n_cmd_go++;
    host(1, hwti_addr(8'd0, HR_CMD), CMD_RESET, d);
    repeat (20) @(posedge clk);
    #1;
    host(0, hwti_addr(8'd0, HR_STATUS), '0, d);
    expect_eq("hwti 0 idle after reset", d, word_t'(HS_IDLE));
    if (d == word_t'(HS_IDLE)) n_reset++;
    // and it still works afterwards
    host(1, hwti_addr(8'd0, HR_CMD), CMD_GO, d);
    n_cmd_go++;
    d = '0;
    for (int g = 0; g < 200 && d != word_t'(HS_EXITED); g++)
      host(0, hwti_addr(8'd0, HR_STATUS), '0, d);
    check_result(0);

    // ---- 5. a thread whose struct lives in its HWTI's local memory
    begin
      int n_shared0;
      xs[1] = 32'd123; ys[1] = 32'd45; as_[1] = 32'd6;
      host(1, hwti_local_addr(8'd1, 11'd16), xs[1], d);
      host(1, hwti_local_addr(8'd1, 11'd17), ys[1], d);
      host(1, hwti_local_addr(8'd1, 11'd18), as_[1], d);
      host(1, hwti_local_addr(8'd1, 11'd19), 32'hFFFF_FFFF, d);
      host(1, hwti_addr(8'd1, HR_ARG), 32'h1000_0040, d);
      n_shared0 = n_hwt1_mem;
      host(1, hwti_addr(8'd1, HR_CMD), CMD_GO, d);
      n_cmd_go++;
      d = '0;
      for (int g = 0; g < 200 && d != word_t'(HS_EXITED); g++)
        host(0, hwti_addr(8'd1, HR_STATUS), '0, d);
      host(0, hwti_local_addr(8'd1, 11'd19), '0, d);
      expect_eq("local r = x*y+a", d, xs[1] * ys[1] + as_[1]);
      host(0, hwti_addr(8'd1, HR_RESULT), '0, d);
      expect_eq("local run returned its argument", d, 32'h1000_0040);
      expect_eq("no shared-memory traffic for a local struct", word_t'(n_hwt1_mem - n_shared0), 0);
      if (n_hwt1_mem == n_shared0 && d == 32'h1000_0040) n_local++;
    end

    // ---- mechanism coverage
    $display("contention=%0d sched_wake=%0d cmd_go=%0d block=%0d handoff=%0d dequeue=%0d full=%0d buserr=%0d reset=%0d hw_runs=%0d local=%0d",
             n_contention, n_sched_wake, n_cmd_go, n_block, n_handoff, n_dequeue,
             n_full, n_buserr, n_reset, n_hw_runs, n_local);
    checks++; if (n_contention == 0) begin failures++; $display("no bus contention"); end
    checks++; if (n_sched_wake == 0) begin failures++; $display("no scheduler wake"); end
    checks++; if (n_cmd_go == 0)     begin failures++; $display("no GO command"); end
    checks++; if (n_block == 0)      begin failures++; $display("no lock block"); end
    checks++; if (n_handoff == 0)    begin failures++; $display("no lock handoff"); end
    checks++; if (n_dequeue == 0)    begin failures++; $display("no dequeue"); end
    checks++; if (n_full == 0)       begin failures++; $display("no full table"); end
    checks++; if (n_buserr == 0)     begin failures++; $display("no bus error"); end
    checks++; if (n_reset == 0)      begin failures++; $display("no reset"); end
    checks++; if (n_local == 0)      begin failures++; $display("no local-memory run"); end
    checks++; if (n_hw_runs < 5)     begin failures++; $display("too few thread runs"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
