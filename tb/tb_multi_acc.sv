// tb_multi_acc: self-checking test of the multiply-accumulate thread.
// The testbench stands in for the HWTI: it raises run, answers each
// operation after a random delay from a small memory model, and records the
// operation sequence. For random structs {x, y, a, r} at random addresses it
// checks the exact sequence getarg, load +0, load +4, load +8,
// store +12 (x*y+a, low 32 bits), exit(arg), and that the thread then stays
// quiet. One run is abandoned half-way with a reset pulse and the next run
// must still be complete and correct.
module tb_multi_acc;
  import hthreads_pkg::*;

  logic clk = 0, rst_n = 0;
  comp_status_t c_status;
  logic c_op_we;
  hwti_op_e c_opcode;
  word_t c_arg1, c_arg2, c_result;
  int checks = 0, failures = 0;

  multi_acc dut (.clk, .rst_n, .c_status, .c_op_we, .c_opcode, .c_arg1, .c_arg2, .c_result);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // ------------------------------------------- HWTI stand-in
  word_t mem [logic [31:0]];
  word_t argument;
  hwti_op_e ops [$];
  word_t    a1s [$];
  word_t    a2s [$];
  logic run = 0, busy = 0, done = 0, rst_p = 0;
  word_t result = '0;
  assign c_status = '{run: run, reset: rst_p, busy: busy, done: done};
  assign c_result = result;

  int pend [$];   // indices of operations loaded but not yet served
  always @(posedge clk) begin
    if (c_op_we) begin
      pend.push_back(ops.size());
      ops.push_back(c_opcode); a1s.push_back(c_arg1); a2s.push_back(c_arg2);
    end
  end

  initial begin
    forever begin
      @(posedge clk); #1;
      done = 0;
      if (pend.size() > 0) begin
        hwti_op_e op; word_t x1, x2; int k;
        k = pend.pop_front();
        op = ops[k]; x1 = a1s[k]; x2 = a2s[k];
        busy = 1;
        repeat ($urandom_range(4)) begin @(posedge clk); #1; end
        if (!rst_p) begin
          unique case (op)
            OP_GETARG: result = argument;
            OP_LOAD:   result = mem.exists(x1) ? mem[x1] : '0;
            OP_STORE:  begin mem[x1] = x2; result = '0; end
            OP_EXIT:   begin result = '0; run = 0; end
            default:   result = '0;
          endcase
          busy = 0; done = 1;
        end else busy = 0;
      end
    end
  end

  task automatic one_run(input word_t base, input word_t x, input word_t y, input word_t a,
                         input bit check);
    int n0;
    mem[base] = x; mem[base + 4] = y; mem[base + 8] = a; mem[base + 12] = 32'hDEAD_DEAD;
    argument = base;
    n0 = ops.size();
    @(posedge clk); #1;
    run = 1;
    while (run) begin @(posedge clk); #1; end
    repeat (5) begin @(posedge clk); #1; end
    if (check) begin
      expect_eq("op count", word_t'(ops.size() - n0), 6);
      if (ops.size() - n0 == 6) begin
        expect_eq("op0 getarg", word_t'(ops[n0]), word_t'(OP_GETARG));
        expect_eq("op1 load x", word_t'(ops[n0+1]), word_t'(OP_LOAD));
        expect_eq("op1 addr",   a1s[n0+1], base);
        expect_eq("op2 load y", word_t'(ops[n0+2]), word_t'(OP_LOAD));
        expect_eq("op2 addr",   a1s[n0+2], base + 4);
        expect_eq("op3 load a", word_t'(ops[n0+3]), word_t'(OP_LOAD));
        expect_eq("op3 addr",   a1s[n0+3], base + 8);
        expect_eq("op4 store",  word_t'(ops[n0+4]), word_t'(OP_STORE));
        expect_eq("op4 addr",   a1s[n0+4], base + 12);
        expect_eq("op5 exit",   word_t'(ops[n0+5]), word_t'(OP_EXIT));
        expect_eq("op5 return value", a1s[n0+5], base);
      end
      expect_eq("r = x*y + a", mem[base + 12], x * y + a);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the example values
    one_run(32'h100, 32'd6, 32'd7, 32'd8, 1);
    // negative values, C int wrap-around
    one_run(32'h200, 32'hFFFF_FFFD, 32'd1000, 32'd5, 1);
    for (int n = 0; n < 20; n++)
      one_run(word_t'($urandom_range(255)) << 4, $urandom, $urandom, $urandom, 1);

    // reset in the middle of a run
    mem[32'h300] = 1; mem[32'h304] = 2; mem[32'h308] = 3;
    argument = 32'h300;
    run = 1;
    while (ops.size() == 0 || ops[$] != OP_LOAD) begin @(posedge clk); #1; end
    rst_p = 1; run = 0;
    @(posedge clk); #1;
    rst_p = 0;
    repeat (6) begin @(posedge clk); #1; end
    begin
      int n0;
      n0 = ops.size();
      repeat (10) begin @(posedge clk); #1; end
      expect_eq("quiet after reset", word_t'(ops.size() - n0), 0);
    end
    one_run(32'h400, 32'd11, 32'd12, 32'd13, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
