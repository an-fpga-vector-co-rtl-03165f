// vliw_controller: the sequencer of the co-processor. It holds the program
// counter into the microcode memory and decides, from the sequencing field of
// the current microcode word, which word executes next. Like a very small
// general-purpose processor it can add a signed offset to the program counter
// (branch forwards or backwards), call a function and return from it through
// a stack of return addresses, and make each of these conditional on one of
// the control parameters written by the host (or on its own stack being
// empty). It also synchronises the core with its external interfaces: a word
// that consumes an input word waits until one is available, and a word that
// produces an output word waits until there is room for it.
//
// Interface and timing: the microcode memory has a synchronous read, and its
// output register is the instruction register "ir": the address placed on
// uc_raddr in cycle t is the instruction in cycle t+1. The next address is
// computed in the same cycle from ir, so there are no branch delay slots and
// one word executes per cycle unless the controller waits. A function is
// started with start/start_addr while idle; it ends with HALT, or with RET on
// an empty stack, and "done" pulses in the cycle the last word issues.
// "issue" marks a cycle in which ir's processor field goes on the VLIW bus; a
// waiting word is re-read and does not issue. There are no loop counters:
// loop conditions come only from the static parameters, as in the source
// design. Encodings, the stack depth (8) and the credit-based output wait are
// this design's choices.
module vliw_controller
  import vcp_pkg::*;
#(
  parameter int STACK_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // host control
  input  logic               start,
  input  logic [UC_AW-1:0]   start_addr,
  input  logic [PARAM_W-1:0] params,
  output logic               busy,
  output logic               done,
  output logic               stack_err,   // sticky: push on a full stack
  // microcode memory
  output logic [UC_AW-1:0]   uc_raddr,
  input  uinstr_t            ir,
  // external interface synchronisation
  input  logic               in_valid,
  output logic               in_pop,
  input  logic               out_credit_ok,
  // issue to the VLIW bus
  output logic               issue
);
  localparam int SP_W  = $clog2(STACK_DEPTH + 1);
  localparam int IDX_W = (STACK_DEPTH > 1) ? $clog2(STACK_DEPTH) : 1;

  logic                 running;
  logic [UC_AW-1:0]     pc;
  logic [UC_AW-1:0]     stack [STACK_DEPTH];
  logic [SP_W-1:0]      sp;

  logic                 stall;
  logic                 cond_true;
  logic                 stack_empty;
  logic [UC_AW-1:0]     pc_inc;
  logic [UC_AW-1:0]     npc;
  logic                 do_push, do_pop, do_end;

  assign stack_empty = (sp == '0);
  assign pc_inc      = pc + 1'b1;

  always_comb begin
    unique case (ir.seq.cond)
      COND_ALWAYS:      cond_true = 1'b1;
      COND_PARAM_SET:   cond_true = params[ir.seq.cond_bit];
      COND_PARAM_CLR:   cond_true = !params[ir.seq.cond_bit];
      COND_STACK_EMPTY: cond_true = stack_empty;
      default:          cond_true = 1'b0;
    endcase
  end

  assign stall = running &&
                 ((ir.seq.wait_in && !in_valid) || (ir.pe.out_push && !out_credit_ok));
  assign issue = running && !stall;
  assign in_pop = issue && ir.seq.wait_in;

  always_comb begin
    npc     = pc;
    do_push = 1'b0;
    do_pop  = 1'b0;
    do_end  = 1'b0;
    if (!running) begin
      npc = start ? start_addr : pc;
    end else if (!stall) begin
      npc = pc_inc;
      if (cond_true) begin
        unique case (ir.seq.op)
          SEQ_NEXT:   npc = pc_inc;
          SEQ_BRANCH: npc = pc + ir.seq.target;
          SEQ_CALL: begin
            npc     = ir.seq.target;
            do_push = 1'b1;
          end
          SEQ_RET: begin
            if (stack_empty) do_end = 1'b1;
            else begin
              npc    = stack[IDX_W'(sp - 1'b1)];
              do_pop = 1'b1;
            end
          end
          SEQ_HALT:   do_end = 1'b1;
          default:    npc = pc_inc;
        endcase
      end
    end
  end

  assign uc_raddr = npc;
  assign busy     = running;
  assign done     = running && !stall && do_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      pc        <= '0;
      sp        <= '0;
      stack_err <= 1'b0;
      for (int i = 0; i < STACK_DEPTH; i++) stack[i] <= '0;
    end else begin
      pc <= npc;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          sp      <= '0;
        end
      end else begin
        if (do_end) running <= 1'b0;
        if (do_push) begin
          if (sp == SP_W'(STACK_DEPTH)) stack_err <= 1'b1;
          else begin
            stack[IDX_W'(sp)] <= pc_inc;
            sp        <= sp + 1'b1;
          end
        end
        if (do_pop) sp <= sp - 1'b1;
      end
    end
  end

  // A push onto a full stack is a microcode error.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(do_push && sp == SP_W'(STACK_DEPTH)))
    else $error("vliw_controller: call stack overflow");
endmodule
