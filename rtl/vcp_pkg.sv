// vcp_pkg: shared widths, encodings and the microcode / VLIW bus layout of the
// vector co-processor.
//
// The co-processor is a SIMD machine: one VLIW controller reads one wide
// microcode word per cycle and broadcasts the processor part of that word
// (plus one scalar data word taken from the input stream) to a vector of
// identical processors. Each processor holds two local stores and a masked
// pixel maths unit. Every pixel carries one extra mask bit, which is
// processed in parallel with the arithmetic.
//
// What follows the source design: a wide microcode word split into a
// sequencing part (used by the controller) and a processor part (broadcast),
// conditional relative branches, a call stack, control parameters used as
// branch conditions, waits on the external interfaces, a mask bit per pixel,
// and the list of pixel operations. Field widths, encodings and the pixel
// width are this design's own choices.
package vcp_pkg;

  // ---- sizes ------------------------------------------------------------
  localparam int PIX_W    = 16;  // pixel width (signed, two's complement)
  localparam int STORE_AW = 10;  // address width of one local store (1024 words)
  localparam int UC_AW    = 10;  // microcode address width (1024 words)
  localparam int LANE_W   = 6;   // lane number width: up to 64 processors
  localparam int PARAM_W  = 16;  // number of control parameter bits
  localparam int SHIFT_W  = 4;   // product shift amount width
  localparam int SUM_W    = PIX_W + LANE_W;  // vector sum width

  // A pixel with its mask (valid) bit.
  typedef struct packed {
    logic                    mask;
    logic signed [PIX_W-1:0] val;
  } mpix_t;

  // ---- sequencing field (controller) ---------------------------------------
  typedef enum logic [2:0] {
    SEQ_NEXT   = 3'd0,  // pc + 1
    SEQ_BRANCH = 3'd1,  // if cond: pc + signed(target)
    SEQ_CALL   = 3'd2,  // if cond: push pc + 1, pc = target
    SEQ_RET    = 3'd3,  // if cond: pop; empty stack ends the function
    SEQ_HALT   = 3'd4   // if cond: end the function
  } seq_op_e;

  typedef enum logic [1:0] {
    COND_ALWAYS      = 2'd0,
    COND_PARAM_SET   = 2'd1,  // params[cond_bit] == 1
    COND_PARAM_CLR   = 2'd2,  // params[cond_bit] == 0
    COND_STACK_EMPTY = 2'd3   // internal status: call stack empty
  } cond_e;

  typedef struct packed {
    seq_op_e          op;
    cond_e            cond;
    logic [3:0]       cond_bit;
    logic [UC_AW-1:0] target;   // absolute (CALL) or signed offset (BRANCH)
    logic             wait_in;  // wait for and consume one input word
  } seq_ctrl_t;

  // ---- processor field (broadcast on the VLIW bus) -----------------------
  typedef enum logic [1:0] {
    ADDR_HOLD = 2'd0,
    ADDR_LOAD = 2'd1,  // address = immediate
    ADDR_INC  = 2'd2,  // address + 1
    ADDR_DEC  = 2'd3   // address - 1
  } addr_op_e;

  typedef enum logic [1:0] {
    OPB_STORE_B = 2'd0,  // read port of store B
    OPB_SCALAR  = 2'd1,  // scalar data word on the VLIW bus
    OPB_IMM     = 2'd2,  // immediate field (mask = 1)
    OPB_PREV_A  = 2'd3   // operand A of the previous instruction
  } opb_e;

  typedef enum logic [2:0] {
    ALU_PASS_A = 3'd0,
    ALU_PASS_B = 3'd1,
    ALU_ADD    = 3'd2,
    ALU_SUB    = 3'd3,  // A - B (with OPB_PREV_A: differentiation)
    ALU_MUL    = 3'd4,  // (A * B) >>> shift, low PIX_W bits
    ALU_ABS    = 3'd5,
    ALU_ZERO   = 3'd6   // A where mask of A is set, else 0
  } alu_op_e;

  typedef enum logic [2:0] {
    MASK_AND     = 3'd0,  // mA & mB
    MASK_OR      = 3'd1,
    MASK_A       = 3'd2,
    MASK_B       = 3'd3,
    MASK_ONE     = 3'd4,
    MASK_ZERO    = 3'd5,
    MASK_GT      = 3'd6,  // A > B (threshold)
    MASK_GT_AND  = 3'd7   // mA & (A > B)
  } mask_op_e;

  typedef enum logic {
    WSRC_RESULT = 1'b0,
    WSRC_SCALAR = 1'b1
  } wsrc_e;

  typedef struct packed {
    logic                    lane_all;   // every processor is selected
    logic [LANE_W-1:0]       lane_sel;   // else only this one
    addr_op_e                a_op;
    logic [STORE_AW-1:0]     a_imm;
    addr_op_e                b_op;
    logic [STORE_AW-1:0]     b_imm;
    addr_op_e                w_op;
    logic [STORE_AW-1:0]     w_imm;
    opb_e                    opb_sel;
    alu_op_e                 alu_op;
    mask_op_e                mask_op;
    logic [SHIFT_W-1:0]      shift;
    logic signed [PIX_W-1:0] imm;
    logic                    wr_a;       // write back into store A
    logic                    wr_b;       // write back into store B
    wsrc_e                   wr_src;
    logic                    out_push;   // send result to the vector sum tree / output
  } pe_ctrl_t;

  // One microcode word.
  typedef struct packed {
    seq_ctrl_t seq;
    pe_ctrl_t  pe;
  } uinstr_t;

  // The VLIW bus as broadcast to the processors.
  typedef struct packed {
    logic     valid;   // an instruction was issued this cycle
    pe_ctrl_t ctrl;
    mpix_t    scalar;  // scalar data word (from the input stream)
  } vliw_bus_t;

  // Output stream word: vector sum plus OR of contributing masks.
  typedef struct packed {
    logic                    mask;
    logic signed [SUM_W-1:0] sum;
  } out_word_t;

  localparam int UINSTR_W = $bits(uinstr_t);
  localparam int VLIW_W   = $bits(vliw_bus_t);

  // ceil(log_f(n)): depth of an f-ary tree with n leaves.
  function automatic int clog_base(int n, int f);
    int l = 0;
    int p = 1;
    while (p < n) begin
      p = p * f;
      l = l + 1;
    end
    return l;
  endfunction

  // An instruction that does nothing.
  localparam pe_ctrl_t PE_NOP = '0;

endpackage
