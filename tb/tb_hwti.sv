// tb_hwti: self-checking test of the hardware thread interface.
// The testbench plays three roles: the system (bus master on the HWTI's
// register file and source of wake pulses), the computation (drives the
// computation interface) and the bus slaves the HWTI talks to (a memory and
// OS cores whose answers the test chooses). Checks: register file reads and
// the read-only result register, start by command, every operation's bus
// request (address layout, thread id, operand) and result, blocking on a
// held lock until wake or a GO command, exit (result register, thread
// manager request, run dropping), reset command, the two-cycle latency
// of an immediate operation, and the local memory (filled and read from the
// bus window, used by loads and stores without any bus traffic).
module tb_hwti;
  import hthreads_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t s_breq, m_breq;
  bus_rsp_t s_brsp, m_brsp;
  logic wake = 0;
  comp_status_t c_status;
  logic c_op_we = 0;
  hwti_op_e c_opcode = OP_NOP;
  word_t c_arg1 = '0, c_arg2 = '0, c_result;
  int checks = 0, failures = 0;

  hwti dut (.clk, .rst_n, .s_breq, .s_brsp, .wake, .m_breq, .m_brsp,
            .c_status, .c_op_we, .c_opcode, .c_arg1, .c_arg2, .c_result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // ---------------------------------------------------- slave models
  word_t mem [logic [31:0]];
  word_t os_answer = '0;
  addr_t last_addr;
  int    n_req = 0;
  initial begin
    m_brsp = BUS_RSP_IDLE;
    forever begin
      @(posedge clk); #1;
      if (m_breq.req) begin
        word_t rd;
        repeat ($urandom_range(3)) begin @(posedge clk); #1; end
        last_addr = m_breq.addr;
        n_req++;
        rd = '0;
        if (m_breq.addr[31:28] == REG_MEM) begin
          if (m_breq.we) mem[m_breq.addr] = m_breq.wdata;
          else rd = mem.exists(m_breq.addr) ? mem[m_breq.addr] : '0;
        end else rd = os_answer;
        m_brsp = '{ack: 1'b1, rdata: rd};
        @(posedge clk); #1;
        m_brsp = BUS_RSP_IDLE;
      end
    end
  end

  // ---------------------------------------------------- system side
  task automatic sys_access(input logic we, input logic [2:0] r, input word_t wd, output word_t rd);
    s_breq = '{req: 1'b1, we: we, addr: hwti_addr(8'd0, r), wdata: wd};
    do begin @(posedge clk); #1; end while (!s_brsp.ack);
    rd = s_brsp.rdata;
    s_breq = BUS_REQ_IDLE;
  endtask

  // ---------------------------------------------------- computation side
  int op_lat;
  task automatic comp_op(input hwti_op_e op, input word_t a1, input word_t a2, output word_t res);
    while (!(c_status.run && !c_status.busy && !c_status.done)) begin @(posedge clk); #1; end
    c_opcode = op; c_arg1 = a1; c_arg2 = a2; c_op_we = 1;
    @(posedge clk); #1;
    c_op_we = 0;
    op_lat = 1;
    while (!c_status.done) begin @(posedge clk); #1; op_lat++; end
    res = c_result;
  endtask

  initial begin
    word_t d, r;
    s_breq = BUS_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    sys_access(0, HR_STATUS, 0, d);     expect_eq("status after reset", d, word_t'(HS_IDLE));
    expect_eq("run after reset", word_t'(c_status.run), 0);
    sys_access(1, HR_ID, 32'd5, d);
    sys_access(1, HR_ARG, 32'h100, d);
    sys_access(1, HR_RESULT, 32'h999, d);
    sys_access(0, HR_ID, 0, d);         expect_eq("id readback", d, 5);
    sys_access(0, HR_ARG, 0, d);        expect_eq("arg readback", d, 32'h100);
    sys_access(0, HR_RESULT, 0, d);     expect_eq("result read-only", d, 0);

    sys_access(1, HR_CMD, CMD_GO, d);
    expect_eq("run after GO", word_t'(c_status.run), 1);
    sys_access(0, HR_STATUS, 0, d);     expect_eq("status running", d, word_t'(HS_RUN));

    comp_op(OP_GETARG, 0, 0, r);        expect_eq("getarg", r, 32'h100);
    expect_eq("immediate op latency", word_t'(op_lat), 2);
    comp_op(OP_GETID, 0, 0, r);         expect_eq("getid", r, 5);

    comp_op(OP_STORE, 32'h40, 32'hABCD_1234, r);
    expect_eq("store reached memory", mem[32'h40], 32'hABCD_1234);
    comp_op(OP_LOAD, 32'h40, 0, r);     expect_eq("load", r, 32'hABCD_1234);
    expect_eq("load address", last_addr, 32'h40);

    // local memory: filled from the system side, used by the computation
    // without bus traffic
    begin
      int n0;
      for (int k = 0; k < 4; k++) begin
        s_breq = '{req: 1'b1, we: 1'b1, addr: hwti_local_addr(8'd0, 11'(k)), wdata: 32'hA000 + k};
        do begin @(posedge clk); #1; end while (!s_brsp.ack);
        s_breq = BUS_REQ_IDLE;
      end
      n0 = n_req;
      comp_op(OP_LOAD, 32'h1000_0008, 0, r);    expect_eq("local load", r, 32'hA002);
      expect_eq("local load latency", word_t'(op_lat), 2);
      comp_op(OP_STORE, 32'h1000_0010, 32'h5151, r);
      comp_op(OP_LOAD, 32'h1000_0010, 0, r);    expect_eq("local load after store", r, 32'h5151);
      comp_op(OP_LOAD, 32'h1000_0000, 0, r);    expect_eq("local load word 0", r, 32'hA000);
      expect_eq("no bus traffic for local memory", word_t'(n_req - n0), 0);
      s_breq = '{req: 1'b1, we: 1'b0, addr: hwti_local_addr(8'd0, 11'd4), wdata: '0};
      do begin @(posedge clk); #1; end while (!s_brsp.ack);
      expect_eq("local word seen from the bus", s_brsp.rdata, 32'h5151);
      s_breq = BUS_REQ_IDLE;
      sys_access(0, HR_ID, 0, d);                expect_eq("registers untouched", d, 5);
    end

    os_answer = '0;
    comp_op(OP_LOCK, 3, 0, r);          expect_eq("lock free", r, 0);
    expect_eq("lock address", last_addr, os_addr(REG_SYNC, SY_LOCK, 8'd5, 8'd3));

    // held lock: HWTI blocks until wake
    os_answer = word_t'(1) << ANS_BLOCK;
    fork
      comp_op(OP_LOCK, 7, 0, r);
      begin
        int blocked_cycles;
        blocked_cycles = 0;
        d = '0;
        while (d != word_t'(HS_BLOCKED)) sys_access(0, HR_STATUS, 0, d);
        repeat (10) begin
          @(posedge clk); #1;
          if (c_status.done) failures++;
          blocked_cycles++;
        end
        sys_access(0, HR_STATUS, 0, d); expect_eq("status blocked", d, word_t'(HS_BLOCKED));
        wake = 1; @(posedge clk); #1; wake = 0;
      end
    join
    expect_eq("lock after wake", r, 0);

    // held lock again, woken by a GO command
    fork
      comp_op(OP_LOCK, 8, 0, r);
      begin
        d = '0;
        while (d != word_t'(HS_BLOCKED)) sys_access(0, HR_STATUS, 0, d);
        sys_access(1, HR_CMD, CMD_GO, d);
      end
    join
    expect_eq("lock after GO", r, 0);

    os_answer = word_t'(1) << ANS_FAIL;
    comp_op(OP_TRYLOCK, 9, 0, r);       expect_eq("trylock fail", r, os_answer);
    expect_eq("trylock address", last_addr, os_addr(REG_SYNC, SY_TRYLOCK, 8'd5, 8'd9));
    os_answer = '0;
    comp_op(OP_UNLOCK, 3, 0, r);        expect_eq("unlock", r, 0);
    expect_eq("unlock address", last_addr, os_addr(REG_SYNC, SY_UNLOCK, 8'd5, 8'd3));

    comp_op(OP_EXIT, 32'h77, 0, r);
    expect_eq("exit address", last_addr, os_addr(REG_TMGR, TM_EXIT, 8'd5, 8'd0));
    @(posedge clk); #1;
    expect_eq("run after exit", word_t'(c_status.run), 0);
    sys_access(0, HR_RESULT, 0, d);     expect_eq("result register", d, 32'h77);
    sys_access(0, HR_STATUS, 0, d);     expect_eq("status exited", d, word_t'(HS_EXITED));

    // restart by wake pulse, then reset command
    wake = 1; @(posedge clk); #1; wake = 0;
    expect_eq("run after wake", word_t'(c_status.run), 1);
    begin
      int n0, seen_reset;
      n0 = n_req;
      seen_reset = 0;
      fork
        sys_access(1, HR_CMD, CMD_RESET, d);
        repeat (4) begin @(posedge clk); #0; if (c_status.reset) seen_reset++; end
      join
      expect_eq("reset pulse", word_t'(seen_reset), 1);
      expect_eq("no bus traffic on reset", word_t'(n_req - n0), 0);
    end
    expect_eq("run after reset cmd", word_t'(c_status.run), 0);
    sys_access(0, HR_STATUS, 0, d);     expect_eq("status idle", d, word_t'(HS_IDLE));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
