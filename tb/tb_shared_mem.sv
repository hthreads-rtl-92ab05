// tb_shared_mem: self-checking test of the shared memory.
// Writes random words to random addresses, keeps a reference copy, reads
// every written address back and compares; checks that each access is
// acknowledged exactly one cycle after the request and only once.
module tb_shared_mem;
  import hthreads_pkg::*;
  localparam int unsigned W = 64;

  logic clk = 0, rst_n = 0;
  bus_req_t breq;
  bus_rsp_t brsp;
  int checks = 0, failures = 0;

  shared_mem #(.MEM_WORDS(W)) dut (.clk, .rst_n, .breq, .brsp);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic we, input addr_t addr, input word_t wd, output word_t rd);
    int lat;
    breq = '{req: 1'b1, we: we, addr: addr, wdata: wd};
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (!brsp.ack);
    rd = brsp.rdata;
    breq = BUS_REQ_IDLE;
    checks++;
    if (lat != 1) begin failures++; $display("latency %0d", lat); end
    @(posedge clk); #1;
    checks++;
    if (brsp.ack) begin failures++; $display("second ack"); end
  endtask

  word_t ref_mem [W];
  logic  valid [W];
  initial begin
    word_t rd;
    breq = BUS_REQ_IDLE;
    for (int i = 0; i < W; i++) valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      int idx; word_t d;
      idx = $urandom_range(W - 1);
      d   = $urandom;
      access(1'b1, addr_t'(idx * 4), d, rd);
      ref_mem[idx] = d;
      valid[idx]   = 1;
    end
    for (int i = 0; i < W; i++) if (valid[i]) begin
      access(1'b0, addr_t'(i * 4), '0, rd);
      checks++;
      if (rd !== ref_mem[i]) begin
        failures++;
        $display("word %0d: got %h want %h", i, rd, ref_mem[i]);
      end
    end
    // address wraps at MEM_WORDS
    access(1'b1, addr_t'(W * 4 + 8), 32'hCAFE_F00D, rd);
    access(1'b0, addr_t'(8), '0, rd);
    checks++;
    if (rd !== 32'hCAFE_F00D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
