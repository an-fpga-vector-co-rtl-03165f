// tb_vliw_controller: the controller runs small microcode programs held in a
// synchronous-read memory model. Every word carries its own address in the
// immediate field, so the issued words give the execution trace, which is
// compared with the trace worked out by hand for each parameter setting. The
// programs use a nested call and return, forward and backward branches,
// parameter conditions (taken and not taken) and both ways of ending a
// function (HALT, and RET on an empty stack). Runs without waits check one
// word per cycle; runs with random input and output availability check that
// waiting words are not issued and that input words are consumed only by
// words that ask for them.
module tb_vliw_controller;
  import vcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start; logic [UC_AW-1:0] start_addr; logic [PARAM_W-1:0] params;
  logic busy, done, stack_err, in_valid, in_pop, out_credit_ok, issue;
  logic [UC_AW-1:0] uc_raddr;
  uinstr_t ir;
  uinstr_t prog [1024];

  vliw_controller dut (.clk, .rst_n, .start, .start_addr, .params, .busy, .done, .stack_err,
                       .uc_raddr, .ir, .in_valid, .in_pop, .out_credit_ok, .issue);

  always_ff @(posedge clk) ir <= prog[uc_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uinstr_t w(int addr, seq_op_e op = SEQ_NEXT, cond_e cond = COND_ALWAYS,
                                int cbit = 0, int target = 0, bit win = 0, bit wout = 0);
    uinstr_t u = '0;
    u.seq.op = op; u.seq.cond = cond; u.seq.cond_bit = 4'(cbit);
    u.seq.target = UC_AW'(target); u.seq.wait_in = win;
    u.pe.out_push = wout;
    u.pe.imm = PIX_W'(addr);
    return u;
  endfunction

  task automatic put(int addr, uinstr_t u);
    prog[addr] = u;
  endtask

  int stalls = 0;

  // Run from address 0 with the given parameters and compare the trace.
  task automatic run(logic [PARAM_W-1:0] p, int exp_trace[$], bit random_io);
    int got[$];
    int t0, t_done, pops, exp_pops;
    bit saw_done;
    params = p;
    @(negedge clk);
    start = 1; start_addr = '0;
    @(negedge clk);
    start = 0;
    t0 = 0; pops = 0; exp_pops = 0; saw_done = 0; t_done = 0;
    while (!saw_done && t0 < 500) begin
      in_valid      = random_io ? (($urandom % 3) != 0) : 1'b1;
      out_credit_ok = random_io ? (($urandom % 3) != 0) : 1'b1;
      #1;
      if (busy && !issue) stalls++;
      if (issue) begin
        got.push_back(int'(ir.pe.imm));
        if (ir.seq.wait_in) begin
          exp_pops++;
          checks++;
          if (!in_valid) begin failures++; $display("issued without input"); end
        end
        if (ir.pe.out_push) begin
          checks++;
          if (!out_credit_ok) begin failures++; $display("issued without output room"); end
        end
      end
      if (in_pop) pops++;
      if (done) begin saw_done = 1; t_done = t0; end
      @(negedge clk);
      t0++;
    end
    checks++;
    if (got != exp_trace) begin
      failures++;
      $display("trace mismatch: got %p exp %p", got, exp_trace);
    end
    checks++;
    if (pops != exp_pops) begin failures++; $display("pops %0d exp %0d", pops, exp_pops); end
    checks++;
    if (busy) begin failures++; $display("still busy after done"); end
    if (!random_io) begin
      checks++;
      if (t_done != exp_trace.size() - 1) begin
        failures++; $display("took %0d cycles for %0d words", t_done + 1, exp_trace.size());
      end
    end
  endtask

  initial begin
    foreach (prog[i]) prog[i] = w(i, SEQ_HALT);
    put(0,  w(0));
    put(1,  w(1, SEQ_CALL, COND_ALWAYS, 0, 10));
    put(2,  w(2, SEQ_BRANCH, COND_PARAM_SET, 2, 3));
    put(3,  w(3, SEQ_NEXT, COND_ALWAYS, 0, 0, 1));
    put(4,  w(4, SEQ_NEXT, COND_ALWAYS, 0, 0, 0, 1));
    put(5,  w(5, SEQ_CALL, COND_PARAM_CLR, 5, 20));
    put(6,  w(6, SEQ_HALT, COND_PARAM_SET, 7));
    put(7,  w(7, SEQ_RET, COND_STACK_EMPTY));
    put(10, w(10));
    put(11, w(11, SEQ_CALL, COND_ALWAYS, 0, 15));
    put(12, w(12, SEQ_RET));
    put(15, w(15, SEQ_NEXT, COND_ALWAYS, 0, 0, 1, 1));
    put(16, w(16, SEQ_RET));
    put(20, w(20, SEQ_BRANCH, COND_ALWAYS, 0, 2));
    put(21, w(21, SEQ_RET));
    put(22, w(22, SEQ_BRANCH, COND_ALWAYS, 0, 1023));   // -1
    start = 0; start_addr = '0; params = '0; in_valid = 0; out_credit_ok = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(16'h0000, '{0, 1, 10, 11, 15, 16, 12, 2, 3, 4, 5, 20, 22, 21, 6, 7}, 0);
    run(16'h00a4, '{0, 1, 10, 11, 15, 16, 12, 2, 5, 6}, 0);
    run(16'h0004, '{0, 1, 10, 11, 15, 16, 12, 2, 5, 20, 22, 21, 6, 7}, 0);
    for (int k = 0; k < 20; k++) begin
      run(16'h0000, '{0, 1, 10, 11, 15, 16, 12, 2, 3, 4, 5, 20, 22, 21, 6, 7}, 1);
      run(16'h00a4, '{0, 1, 10, 11, 15, 16, 12, 2, 5, 6}, 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no waits happened"); end
    checks++;
    if (stack_err) begin failures++; $display("unexpected stack error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
