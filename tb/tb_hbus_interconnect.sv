// tb_hbus_interconnect: self-checking test of the bus interconnect.
// Three masters issue random reads and writes at the same time to all six
// slaves and to unmapped addresses. Each slave model answers after a random
// delay with data that encodes its own number and the address, so a master
// can check that its transfer reached the right slave and came back to it.
// Also checks: every transfer reaches exactly one slave once, an unmapped
// address is answered and counted, and while all masters keep requesting,
// grants rotate (no master waits for more than N_M transfers).
module tb_hbus_interconnect;
  import hthreads_pkg::*;
  localparam int unsigned NM = 3;
  localparam int unsigned NH = 2;
  localparam int unsigned NS = 4 + NH;

  logic clk = 0, rst_n = 0;
  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];
  logic [15:0] errs;
  int checks = 0, failures = 0;
  int served [NS];
  int unmapped_sent = 0;

  hbus_interconnect #(.N_M(NM), .N_HWT(NH)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp,
                                                  .err_count(errs));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic word_t answer(int s, addr_t a);
    return {8'(s), a[23:0]} ^ 32'h5A00_0000;
  endfunction

  // slave models
  for (genvar s = 0; s < NS; s++) begin : g_slave
    initial begin
      s_rsp[s] = BUS_RSP_IDLE;
      forever begin
        @(posedge clk); #2;
        if (s_req[s].req) begin
          addr_t a;
          a = s_req[s].addr;
          repeat ($urandom_range(3)) begin @(posedge clk); #2; end
          served[s]++;
          s_rsp[s] = '{ack: 1'b1, rdata: answer(s, a)};
          @(posedge clk); #2;
          s_rsp[s] = BUS_RSP_IDLE;
        end
      end
    end
  end

  // two slaves must never be selected together
  always @(posedge clk) begin
    int n;
    n = 0;
    for (int s = 0; s < NS; s++) if (s_req[s].req) n++;
    if (n > 1) begin failures++; $display("several slaves selected"); end
  end

  function automatic addr_t rand_addr(output int s);
    int k;
    k = $urandom_range(NS);
    s = k;
    unique case (k)
      0: return {REG_MEM, 16'h0, 10'($urandom), 2'b00};
      1: return os_addr(REG_TMGR, 4'($urandom), 8'($urandom), 8'($urandom));
      2: return os_addr(REG_SCHED, 4'($urandom), 8'($urandom), 8'($urandom));
      3: return os_addr(REG_SYNC, 4'($urandom), 8'($urandom), 8'($urandom));
      4, 5: return hwti_addr(8'(k - 4), 3'($urandom));
      default: begin
        s = NS;   // unmapped
        return ($urandom_range(1) == 0) ? {4'hC, 28'($urandom)} : hwti_addr(8'(NH + 1), 3'd0);
      end
    endcase
  endfunction

  int max_wait [NM];
  int done_cnt [NM];
  int total_done = 0;
  for (genvar m = 0; m < NM; m++) begin : g_master
    initial begin
      m_req[m] = BUS_REQ_IDLE;
      max_wait[m] = 0;
      done_cnt[m] = 0;
      @(posedge rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < 150; n++) begin
        int s, t0, others;
        addr_t a;
        a = rand_addr(s);
        if (s == NS) unmapped_sent++;
        m_req[m] = '{req: 1'b1, we: 1'($urandom), addr: a, wdata: $urandom};
        t0 = total_done;
        // masters are synchronous: they see the ack before the edge and
        // change their request only after it
        do begin @(posedge clk); #3; end while (!m_rsp[m].ack);
        others = total_done - t0;
        if (others > max_wait[m]) max_wait[m] = others;
        expect_eq($sformatf("master %0d data", m), m_rsp[m].rdata,
                  (s == NS) ? '0 : answer(s, a));
        total_done++;
        done_cnt[m]++;
        @(posedge clk); #1;
        m_req[m] = BUS_REQ_IDLE;
      end
    end
  end

  initial begin
    for (int s = 0; s < NS; s++) served[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_cnt[0] == 150 && done_cnt[1] == 150 && done_cnt[2] == 150);
    repeat (5) @(posedge clk);
    begin
      int tot;
      tot = 0;
      for (int s = 0; s < NS; s++) tot += served[s];
      expect_eq("each transfer served once", word_t'(tot + unmapped_sent), word_t'(3 * 150));
    end
    expect_eq("unmapped counted", word_t'(errs), word_t'(unmapped_sent));
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (max_wait[m] > NM - 1) begin
        failures++;
        $display("master %0d waited for %0d other transfers", m, max_wait[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
