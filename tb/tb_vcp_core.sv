// tb_vcp_core: end-to-end test of the co-processor at its default size
// (32 processors, 1024-word stores, 1024-word microcode memory).
//
// The testbench assembles microcode functions, loads them through the
// microcode port and then acts as the host: it calls functions with
// start/start_addr/params, streams two masked images in (one row of 32
// pixels per call of the load function, as a host calls fixed-size patch
// functions), and reads results out. Every output word is compared with a
// value worked out from the testbench's own copy of the images.
//
// Functions (microcode addresses):
//   0    LOADROW  64 words: one A pixel and one B pixel into each lane
//   64   INIT     sets the write address so that LOADROW starts at 0
//   70   ADD      C = A + B (mask AND), written to B[256+i], row sums out
//   80   READ     reads C out one lane at a time (tree as multiplexer)
//   340  MAIN     conditional calls of DIFF, THRESH, OPS2; a skip branch
//   400  DIFF     differentiation along each lane's row, row sums out
//   420  THRESH   threshold into the mask, zero by mask, row sums out
//   460  OPS2     multiply (shifted), then a nested call of ABS
//   490  ABS      absolute values, row sums out
// The consumer is slow during READ so that the output FIFO fills and the
// controller must wait; the input stream has gaps so that it waits for
// input too. Each mechanism is counted and must happen at least once.
module tb_vcp_core;
  import vcp_pkg::*;
  localparam int N = 32;
  localparam int M = 8;     // pixels per lane (row length)
  localparam int THRESH_T = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ucode_we; logic [UC_AW-1:0] ucode_addr; uinstr_t ucode_data;
  logic start; logic [UC_AW-1:0] start_addr; logic [PARAM_W-1:0] params;
  logic busy, done, stack_err;
  logic in_valid, in_ready; mpix_t in_data;
  logic out_valid, out_ready; out_word_t out_data;

  vcp_core dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- microcode assembly ----------------
  uinstr_t prog [1024];

  function automatic uinstr_t op(alu_op_e a, mask_op_e m, opb_e ob, int aaddr, int baddr);
    uinstr_t u = '0;
    u.pe.lane_all = 1;
    u.pe.alu_op = a; u.pe.mask_op = m; u.pe.opb_sel = ob;
    u.pe.a_op = ADDR_LOAD; u.pe.a_imm = STORE_AW'(aaddr);
    u.pe.b_op = ADDR_LOAD; u.pe.b_imm = STORE_AW'(baddr);
    return u;
  endfunction

  function automatic uinstr_t seq(uinstr_t u, seq_op_e s, cond_e c = COND_ALWAYS,
                                  int cbit = 0, int target = 0);
    u.seq.op = s; u.seq.cond = c; u.seq.cond_bit = 4'(cbit); u.seq.target = UC_AW'(target);
    return u;
  endfunction

  task automatic build_program();
    uinstr_t u;
    foreach (prog[i]) prog[i] = seq('0, SEQ_HALT);
    // LOADROW
    for (int j = 0; j < N; j++) begin
      u = '0; u.seq.wait_in = 1; u.pe.lane_sel = LANE_W'(j); u.pe.wr_src = WSRC_SCALAR;
      u.pe.wr_a = 1; u.pe.w_op = (j == 0) ? ADDR_INC : ADDR_HOLD;
      prog[2*j] = u;
      u.pe.wr_a = 0; u.pe.wr_b = 1; u.pe.w_op = ADDR_HOLD;
      prog[2*j+1] = (j == N - 1) ? seq(u, SEQ_HALT) : u;
    end
    // INIT
    u = '0; u.pe.w_op = ADDR_LOAD; u.pe.w_imm = '1;
    prog[64] = seq(u, SEQ_HALT);
    // ADD
    for (int i = 0; i < M; i++) begin
      u = op(ALU_ADD, MASK_AND, OPB_STORE_B, i, i);
      u.pe.w_op = ADDR_LOAD; u.pe.w_imm = STORE_AW'(256 + i); u.pe.wr_b = 1; u.pe.out_push = 1;
      prog[70+i] = (i == M - 1) ? seq(u, SEQ_HALT) : u;
    end
    // READ
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        u = op(ALU_PASS_B, MASK_B, OPB_STORE_B, 0, 256 + i);
        u.pe.lane_all = 0; u.pe.lane_sel = LANE_W'(j); u.pe.out_push = 1;
        prog[80 + i*N + j] = (i == M - 1 && j == N - 1) ? seq(u, SEQ_HALT) : u;
      end
    // MAIN
    prog[340] = seq('0, SEQ_CALL, COND_PARAM_SET, 0, 400);
    prog[341] = seq('0, SEQ_CALL, COND_ALWAYS, 0, 420);
    prog[342] = seq('0, SEQ_CALL, COND_PARAM_CLR, 1, 460);
    prog[343] = seq('0, SEQ_BRANCH, COND_PARAM_SET, 2, 2);
    u = op(ALU_PASS_A, MASK_A, OPB_STORE_B, 0, 0); u.pe.out_push = 1;
    prog[344] = u;
    prog[345] = seq('0, SEQ_RET, COND_STACK_EMPTY);
    // DIFF
    prog[400] = op(ALU_PASS_A, MASK_A, OPB_STORE_B, 0, 0);
    for (int i = 1; i < M; i++) begin
      u = op(ALU_SUB, MASK_AND, OPB_PREV_A, i, 0); u.pe.a_op = ADDR_INC; u.pe.out_push = 1;
      prog[400+i] = (i == M - 1) ? seq(u, SEQ_RET) : u;
    end
    // THRESH
    for (int i = 0; i < M; i++) begin
      u = op(ALU_PASS_A, MASK_GT_AND, OPB_IMM, i, 0); u.pe.imm = PIX_W'(THRESH_T);
      u.pe.w_op = ADDR_LOAD; u.pe.w_imm = STORE_AW'(600 + i); u.pe.wr_a = 1;
      prog[420+i] = u;
    end
    prog[420+M]   = '0;
    prog[420+M+1] = '0;
    for (int i = 0; i < M; i++) begin
      u = op(ALU_ZERO, MASK_A, OPB_STORE_B, 600 + i, 0); u.pe.out_push = 1;
      prog[420+M+2+i] = (i == M - 1) ? seq(u, SEQ_RET) : u;
    end
    // OPS2
    for (int i = 0; i < M; i++) begin
      u = op(ALU_MUL, MASK_AND, OPB_STORE_B, i, i); u.pe.shift = 2; u.pe.out_push = 1;
      prog[460+i] = u;
    end
    prog[460+M]   = seq('0, SEQ_CALL, COND_ALWAYS, 0, 490);
    prog[460+M+1] = seq('0, SEQ_RET);
    // ABS
    for (int i = 0; i < M; i++) begin
      u = op(ALU_ABS, MASK_A, OPB_STORE_B, i, 0); u.pe.out_push = 1;
      prog[490+i] = (i == M - 1) ? seq(u, SEQ_RET) : u;
    end
  endtask

  // ---------------- image model ----------------
  int    av [N][M], bv [N][M], cv [N][M];
  logic  am [N][M], bm [N][M], cm [N][M];
  int    exp_sum [$];
  logic  exp_mask [$];

  function automatic int w16(longint v);
    logic [15:0] t = v[15:0];
    return int'($signed(t));
  endfunction

  task automatic expect_row(int vals[N], logic msk[N], logic lanes[N]);
    int s = 0; logic m = 0;
    for (int j = 0; j < N; j++) if (lanes[j]) begin s += vals[j]; m |= msk[j]; end
    exp_sum.push_back(s); exp_mask.push_back(m);
  endtask

  task automatic expect_all(int vals[N], logic msk[N]);
    logic lanes[N];
    foreach (lanes[j]) lanes[j] = 1;
    expect_row(vals, msk, lanes);
  endtask

  // ---------------- streams ----------------
  mpix_t in_q [$];
  int    in_gap_pct = 30;
  int    out_ready_pct = 100;
  int    got_sum [$];
  logic  got_mask [$];

  always @(negedge clk) begin
    in_valid = (in_q.size() != 0) && (($urandom % 100) >= in_gap_pct);
    in_data  = (in_q.size() != 0) ? in_q[0] : '0;
    out_ready = ($urandom % 100) < out_ready_pct;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(in_q.pop_front());
    if (out_valid && out_ready) begin
      got_sum.push_back(int'(out_data.sum)); got_mask.push_back(out_data.mask);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_in_wait, n_out_wait, n_call, n_ret, n_branch, n_not_taken, n_halt, n_ret_end;
  int n_fifo_full;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.running && dut.ir.seq.wait_in && !in_valid) n_in_wait++;
    if (dut.u_ctrl.running && dut.ir.pe.out_push && !dut.out_credit_ok) n_out_wait++;
    if (dut.issue && dut.u_ctrl.do_push) n_call++;
    if (dut.issue && dut.u_ctrl.do_pop) n_ret++;
    if (dut.issue && dut.ir.seq.op == SEQ_BRANCH && dut.u_ctrl.cond_true) n_branch++;
    if (dut.issue && dut.ir.seq.op != SEQ_NEXT && !dut.u_ctrl.cond_true) n_not_taken++;
    if (dut.issue && dut.ir.seq.op == SEQ_HALT && dut.u_ctrl.do_end) n_halt++;
    if (dut.issue && dut.ir.seq.op == SEQ_RET && dut.u_ctrl.do_end) n_ret_end++;
    if (!dut.u_fifo.wr_ready) n_fifo_full++;
  end

  // ---------------- host ----------------
  int t_run;
  task automatic call_fn(int addr, logic [PARAM_W-1:0] p);
    @(negedge clk);
    while (busy) @(negedge clk);
    start = 1; start_addr = UC_AW'(addr); params = p;
    @(negedge clk);
    start = 0;
    t_run = 0;
    while (!done) begin @(negedge clk); t_run++; end
    while (busy) @(negedge clk);
  endtask

  task automatic drain();
    int k = 0;
    while ((exp_sum.size() != got_sum.size()) && k < 5000) begin @(negedge clk); k++; end
  endtask

  task automatic compare(string what);
    int n = exp_sum.size();
    checks++;
    if (got_sum.size() != n) begin
      failures++; $display("%s: %0d outputs, expected %0d", what, got_sum.size(), n);
    end
    for (int k = 0; k < n && k < got_sum.size(); k++) begin
      checks++;
      if (got_sum[k] != exp_sum[k] || got_mask[k] != exp_mask[k]) begin
        failures++;
        if (failures < 20)
          $display("%s[%0d]: got %0d/%0b exp %0d/%0b", what, k, got_sum[k], got_mask[k],
                   exp_sum[k], exp_mask[k]);
      end
    end
    exp_sum.delete(); exp_mask.delete(); got_sum.delete(); got_mask.delete();
  endtask

  task automatic run_main(logic [PARAM_W-1:0] p);
    int vals[N]; logic msk[N];
    if (p[0]) begin   // DIFF
      for (int i = 1; i < M; i++) begin
        for (int j = 0; j < N; j++) begin
          vals[j] = w16(av[j][i] - av[j][i-1]); msk[j] = am[j][i] & am[j][i-1];
        end
        expect_all(vals, msk);
      end
    end
    for (int i = 0; i < M; i++) begin   // THRESH then ZERO
      for (int j = 0; j < N; j++) begin
        msk[j] = am[j][i] && (av[j][i] > THRESH_T);
        vals[j] = msk[j] ? av[j][i] : 0;
      end
      expect_all(vals, msk);
    end
    if (!p[1]) begin  // OPS2: MUL then ABS
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < N; j++) begin
          vals[j] = w16((longint'(av[j][i]) * longint'(bv[j][i])) >>> 2);
          msk[j] = am[j][i] & bm[j][i];
        end
        expect_all(vals, msk);
      end
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < N; j++) begin
          vals[j] = av[j][i] < 0 ? -av[j][i] : av[j][i]; msk[j] = am[j][i];
        end
        expect_all(vals, msk);
      end
    end
    if (!p[2]) begin  // word skipped by the branch: A[0] sum, a_addr loaded with 0
      for (int j = 0; j < N; j++) begin vals[j] = av[j][0]; msk[j] = am[j][0]; end
      expect_all(vals, msk);
    end
    call_fn(340, p);
    drain();
    compare($sformatf("MAIN(%0h)", p));
  endtask

  initial begin
    int vals[N]; logic msk[N]; logic lanes[N];
    ucode_we = 0; ucode_addr = '0; ucode_data = '0;
    start = 0; start_addr = '0; params = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_program();
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      ucode_we = 1; ucode_addr = UC_AW'(a); ucode_data = prog[a];
    end
    @(negedge clk); ucode_we = 0;

    // images: pixel values in [-400, 400], most masks valid
    for (int j = 0; j < N; j++)
      for (int i = 0; i < M; i++) begin
        av[j][i] = int'($urandom % 801) - 400; am[j][i] = ($urandom % 5) != 0;
        bv[j][i] = int'($urandom % 801) - 400; bm[j][i] = ($urandom % 5) != 0;
        cv[j][i] = w16(av[j][i] + bv[j][i]);   cm[j][i] = am[j][i] & bm[j][i];
      end

    // ---- load the images, one row (32 lanes x 2 pixels) per call ----
    call_fn(64, '0);
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin
        in_q.push_back('{mask: am[j][i], val: PIX_W'(av[j][i])});
        in_q.push_back('{mask: bm[j][i], val: PIX_W'(bv[j][i])});
      end
      call_fn(0, '0);
    end
    checks++;
    if (in_q.size() != 0) begin failures++; $display("input words left over"); end

    // ---- ADD: one word per cycle when nothing waits ----
    in_gap_pct = 0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) begin vals[j] = cv[j][i]; msk[j] = cm[j][i]; end
      expect_all(vals, msk);
    end
    call_fn(70, '0);
    checks++;
    if (t_run != M - 1) begin
      failures++; $display("ADD took %0d cycles for %0d words", t_run + 1, M);
    end
    drain();
    compare("ADD");

    // ---- READ one lane at a time through a slow consumer ----
    out_ready_pct = 25;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        foreach (lanes[k]) lanes[k] = (k == j);
        foreach (vals[k]) begin vals[k] = cv[k][i]; msk[k] = cm[k][i]; end
        expect_row(vals, msk, lanes);
      end
    call_fn(80, '0);
    drain();
    compare("READ");
    out_ready_pct = 70;

    // ---- MAIN with three parameter settings ----
    run_main(16'h0001);
    run_main(16'h0006);
    run_main(16'h0000);

    // ---- mechanisms ----
    checks++; if (n_in_wait == 0)   begin failures++; $display("no input wait"); end
    checks++; if (n_out_wait == 0)  begin failures++; $display("no output wait"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("output FIFO never full"); end
    checks++; if (n_call == 0)      begin failures++; $display("no call"); end
    checks++; if (n_ret == 0)       begin failures++; $display("no return"); end
    checks++; if (n_branch == 0)    begin failures++; $display("no branch taken"); end
    checks++; if (n_not_taken == 0) begin failures++; $display("no condition false"); end
    checks++; if (n_halt == 0)      begin failures++; $display("no halt"); end
    checks++; if (n_ret_end == 0)   begin failures++; $display("no return to host"); end
    checks++; if (stack_err)        begin failures++; $display("stack error"); end
    $display("mechanisms: in_wait=%0d out_wait=%0d fifo_full=%0d call=%0d ret=%0d branch=%0d not_taken=%0d halt=%0d ret_end=%0d",
             n_in_wait, n_out_wait, n_fifo_full, n_call, n_ret, n_branch, n_not_taken, n_halt,
             n_ret_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
