// shared_mem: word-addressed shared memory on the hthreads bus.
//
// Every computation, hardware or software, sees the same memory through the
// bus; the hardware thread interface decides nothing about local versus
// shared data. The memory answers each request one cycle after it is
// presented (ack with rdata for a read, ack after the write for a write),
// then ignores the still-raised request for one cycle so that each access is
// served exactly once. Addresses are byte addresses; bits [1:0] are ignored
// and the word index wraps at MEM_WORDS. The size is this design's choice.
module shared_mem
  import hthreads_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t breq,
  output bus_rsp_t brsp
);
  localparam int unsigned AW = (MEM_WORDS > 1) ? $clog2(MEM_WORDS) : 1;

  word_t          mem [MEM_WORDS];
  logic [AW-1:0]  widx;
  logic           ack_q;
  word_t          rdata_q;

  assign widx = breq.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (breq.req && !ack_q && breq.we) mem[widx] <= breq.wdata;
    rdata_q <= mem[widx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_q <= 1'b0;
    else        ack_q <= breq.req && !ack_q;
  end

  assign brsp.ack   = ack_q;
  assign brsp.rdata = rdata_q;
endmodule
