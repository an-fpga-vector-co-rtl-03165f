// tb_vector_processor: drives the VLIW bus of one processor (lane 3) directly.
// It loads both stores with scalar words (including words addressed to
// another lane, which must be ignored), then runs every pixel operation,
// differentiation through the previous-operand path, immediate and scalar
// operands, write-back and read-back, and compares each pushed result with a
// model of the stores kept in the testbench. It also checks that a result
// is presented 2 cycles after the edge that samples its instruction (the
// address-stage and result-stage registers lie between them).
module tb_vector_processor;
  import vcp_pkg::*;
  localparam int LANE = 3;
  localparam int M    = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  vliw_bus_t bus;
  logic push, contrib;
  mpix_t result;

  vector_processor #(.LANE(LANE)) dut (.clk, .rst_n, .bus, .push, .contrib, .result);

  mpix_t sa [1024], sb [1024];
  mpix_t exp_q [$];
  logic  exp_c [$];
  int    exp_cyc [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(posedge clk) if (rst_n && push) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected push");
    end else begin
      if (result !== exp_q[0] || contrib !== exp_c[0] || cyc != exp_cyc[0]) begin
        failures++;
        $display("cyc %0d: got %0d/%0b c=%0b exp %0d/%0b c=%0b (issued %0d)", cyc,
                 result.val, result.mask, contrib, exp_q[0].val, exp_q[0].mask, exp_c[0],
                 exp_cyc[0]);
      end
      void'(exp_q.pop_front()); void'(exp_c.pop_front()); void'(exp_cyc.pop_front());
    end
  end

  task automatic issue(pe_ctrl_t c, mpix_t s = '0);
    @(negedge clk);
    bus.valid = 1; bus.ctrl = c; bus.scalar = s;
    @(negedge clk);
    bus = '0;
  endtask

  task automatic nops(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic pe_ctrl_t op(alu_op_e a, mask_op_e m, opb_e ob, int aaddr, int baddr);
    pe_ctrl_t c = '0;
    c.lane_all = 1;
    c.alu_op = a; c.mask_op = m; c.opb_sel = ob;
    c.a_op = ADDR_LOAD; c.a_imm = STORE_AW'(aaddr);
    c.b_op = ADDR_LOAD; c.b_imm = STORE_AW'(baddr);
    c.out_push = 1;
    return c;
  endfunction

  function automatic mpix_t mk(int v, logic m);
    mpix_t p; p.val = PIX_W'(v); p.mask = m; return p;
  endfunction

  // expect: issue() drives on a negedge and returns one negedge later; the
  // processor samples the word at the posedge between (cycle c0) and the
  // result is pushed, registered, in time for the posedge of cycle c0+2.
  task automatic expect_push(mpix_t v, logic c);
    exp_q.push_back(v); exp_c.push_back(c); exp_cyc.push_back(cyc + 1);
  endtask

  initial begin
    pe_ctrl_t c;
    mpix_t s, r;
    int av, bv;
    bus = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- load store A and B with scalar words, lane 3 only ----
    for (int i = 0; i < M; i++) begin
      c = '0; c.lane_sel = LANE_W'(LANE); c.wr_a = 1; c.wr_src = WSRC_SCALAR;
      c.w_op = ADDR_LOAD; c.w_imm = STORE_AW'(i);
      s = mk(int'($urandom % 2000) - 1000, ($urandom % 4) != 0);
      sa[i] = s;
      issue(c, s);
      // a word for another lane: must not be written
      c.lane_sel = LANE_W'(LANE + 1);
      issue(c, mk(12345, 1));
      c = '0; c.lane_sel = LANE_W'(LANE); c.wr_b = 1; c.wr_src = WSRC_SCALAR;
      c.w_op = ADDR_INC;
      s = mk(int'($urandom % 2000) - 1000, ($urandom % 4) != 0);
      sb[i+1] = s;       // w address was i, INC makes i+1
      issue(c, s);
    end
    nops(4);
    // ---- pass A / pass B read back ----
    for (int i = 0; i < M; i++) begin
      issue(op(ALU_PASS_A, MASK_A, OPB_STORE_B, i, i + 1), '0); expect_push(sa[i], 1);
      issue(op(ALU_PASS_B, MASK_B, OPB_STORE_B, i, i + 1), '0); expect_push(sb[i+1], 1);
    end
    // ---- arithmetic with masks ----
    for (int i = 0; i < M; i++) begin
      av = int'(sa[i].val); bv = int'(sb[i+1].val);
      issue(op(ALU_ADD, MASK_AND, OPB_STORE_B, i, i + 1));
      expect_push(mk(av + bv, sa[i].mask & sb[i+1].mask), 1);
      issue(op(ALU_SUB, MASK_OR, OPB_STORE_B, i, i + 1));
      expect_push(mk(av - bv, sa[i].mask | sb[i+1].mask), 1);
      c = op(ALU_MUL, MASK_AND, OPB_STORE_B, i, i + 1); c.shift = 3;
      issue(c);
      expect_push(mk((av * bv) >>> 3, sa[i].mask & sb[i+1].mask), 1);
      issue(op(ALU_ABS, MASK_A, OPB_STORE_B, i, i + 1));
      expect_push(mk(av < 0 ? -av : av, sa[i].mask), 1);
      issue(op(ALU_ZERO, MASK_A, OPB_STORE_B, i, i + 1));
      expect_push(mk(sa[i].mask ? av : 0, sa[i].mask), 1);
      c = op(ALU_PASS_A, MASK_GT_AND, OPB_IMM, i, 0); c.imm = 16'sd100;
      issue(c);
      expect_push(mk(av, sa[i].mask && av > 100), 1);
      c = op(ALU_ADD, MASK_B, OPB_SCALAR, i, 0);
      issue(c, mk(7, 0));
      expect_push(mk(av + 7, 0), 1);
    end
    // ---- back-to-back differentiation along a row: A[i] - A[i-1] ----
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      bus = '0; bus.valid = 1;
      bus.ctrl = op(ALU_SUB, MASK_AND, OPB_PREV_A, 0, 0);
      bus.ctrl.a_op = (i == 0) ? ADDR_LOAD : ADDR_INC;
      bus.ctrl.out_push = (i != 0);
      if (i != 0) begin
        exp_q.push_back(mk(int'(sa[i].val) - int'(sa[i-1].val), sa[i].mask & sa[i-1].mask));
        exp_c.push_back(1); exp_cyc.push_back(cyc + 2);
      end
      @(negedge clk);
    end
    bus = '0;
    nops(4);
    // ---- write back a sum into store B (addr 100+i), then read it back ----
    for (int i = 0; i < M; i++) begin
      c = op(ALU_ADD, MASK_AND, OPB_STORE_B, i, i + 1);
      c.out_push = 0; c.wr_b = 1; c.w_op = ADDR_LOAD; c.w_imm = STORE_AW'(100 + i);
      issue(c);
      sb[100+i] = mk(int'(sa[i].val) + int'(sb[i+1].val), sa[i].mask & sb[i+1].mask);
    end
    nops(4);
    for (int i = 0; i < M; i++) begin
      issue(op(ALU_PASS_B, MASK_B, OPB_STORE_B, 0, 100 + i)); expect_push(sb[100+i], 1);
    end
    // ---- output to a different lane: pushed but not contributed ----
    c = op(ALU_PASS_A, MASK_A, OPB_STORE_B, 0, 0); c.lane_all = 0; c.lane_sel = LANE_W'(LANE + 2);
    issue(c); expect_push(sa[0], 0);
    nops(6);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
