// multi_acc: the multiply-accumulate hardware thread.
//
// This is the state machine the C-to-hardware flow makes from
//   typedef struct { int x, y, a, r; } mac_t;
//   void *multi_acc(void *arg) { mac->r = mac->x * mac->y + mac->a; return arg; }
// through the hardware intermediate form. Each state is one intermediate
// form statement, performed through the HWTI computation interface:
//   readarg hif_arg 0        OP_GETARG
//   hif_mac <- hif_arg       register copy
//   read x hif_mac 0         OP_LOAD  hif_mac+0
//   read y hif_mac 4         OP_LOAD  hif_mac+4
//   tmp1 <- mul x y          32-bit multiply, low 32 bits (C int)
//   read a hif_mac 8         OP_LOAD  hif_mac+8
//   tmp2 <- add tmp1 a       32-bit add
//   write hif_mac 12 tmp2    OP_STORE hif_mac+12
//   return hif_arg           OP_EXIT  hif_arg
// All variables are 32-bit registers. The thread starts when the HWTI raises
// run, returns to its first state on the HWTI's reset pulse, and waits in
// S_END after returning until run goes low, so that one GO gives exactly one
// execution.
//
// Timing: an operation is issued (c_op_we for one cycle) in an issue state
// when the HWTI is running and idle; the machine then waits for done. The
// multiply and the add take one cycle each. The statement sequence is the
// hthreads paper's example; the one-statement-per-state encoding is this design's.
module multi_acc
  import hthreads_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  comp_status_t c_status,
  output logic         c_op_we,
  output hwti_op_e     c_opcode,
  output word_t        c_arg1,
  output word_t        c_arg2,
  input  word_t        c_result
);
  typedef enum logic [3:0] {
    S_START, S_READARG, S_COPY, S_READ_X, S_READ_Y, S_MUL, S_READ_A,
    S_ADD, S_WRITE, S_RETURN, S_END
  } st_e;

  st_e   st;
  logic  waiting;   // operation issued, waiting for done
  word_t hif_arg, hif_mac, x, y, a, tmp1, tmp2;
  logic  ready;

  assign ready = c_status.run && !c_status.busy && !c_status.done && !waiting;

  // operation issued by each state
  always_comb begin
    c_opcode = OP_NOP;
    c_arg1   = '0;
    c_arg2   = '0;
    unique case (st)
      S_READARG: c_opcode = OP_GETARG;
      S_READ_X:  begin c_opcode = OP_LOAD;  c_arg1 = hif_mac; end
      S_READ_Y:  begin c_opcode = OP_LOAD;  c_arg1 = hif_mac + 32'd4; end
      S_READ_A:  begin c_opcode = OP_LOAD;  c_arg1 = hif_mac + 32'd8; end
      S_WRITE:   begin c_opcode = OP_STORE; c_arg1 = hif_mac + 32'd12; c_arg2 = tmp2; end
      S_RETURN:  begin c_opcode = OP_EXIT;  c_arg1 = hif_arg; end
      default: ;
    endcase
  end

  assign c_op_we = ready &&
    (st inside {S_READARG, S_READ_X, S_READ_Y, S_READ_A, S_WRITE, S_RETURN});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_START;
      waiting <= 1'b0;
      hif_arg <= '0;
      hif_mac <= '0;
      x       <= '0;
      y       <= '0;
      a       <= '0;
      tmp1    <= '0;
      tmp2    <= '0;
    end else if (c_status.reset) begin
      st      <= S_START;
      waiting <= 1'b0;
    end else begin
      if (c_op_we) waiting <= 1'b1;
      unique case (st)
        S_START:   if (c_status.run) st <= S_READARG;
        S_READARG: if (c_status.done) begin hif_arg <= c_result; waiting <= 1'b0; st <= S_COPY; end
        S_COPY:    begin hif_mac <= hif_arg; st <= S_READ_X; end
        S_READ_X:  if (c_status.done) begin x <= c_result; waiting <= 1'b0; st <= S_READ_Y; end
        S_READ_Y:  if (c_status.done) begin y <= c_result; waiting <= 1'b0; st <= S_MUL; end
        S_MUL:     begin tmp1 <= x * y; st <= S_READ_A; end
        S_READ_A:  if (c_status.done) begin a <= c_result; waiting <= 1'b0; st <= S_ADD; end
        S_ADD:     begin tmp2 <= tmp1 + a; st <= S_WRITE; end
        S_WRITE:   if (c_status.done) begin waiting <= 1'b0; st <= S_RETURN; end
        S_RETURN:  if (c_status.done) begin waiting <= 1'b0; st <= S_END; end
        S_END:     if (!c_status.run) st <= S_START;
        default:   st <= S_START;
      endcase
    end
  end
endmodule
