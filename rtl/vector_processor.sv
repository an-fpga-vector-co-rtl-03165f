// vector_processor: one processing element of the SIMD vector. Every
// processor in the vector is identical and obeys the same VLIW bus word; only
// its lane number differs.
//
// Insides (following the processor diagram of the source design): two local
// stores, A and B, and a maths unit fed from them. Operand A is always the
// read port of store A. Operand B is chosen by the VLIW word: store B, the
// scalar data word carried on the bus, an immediate, or the previous
// instruction's operand A (which turns the subtractor into a pipelined
// differentiator along a row). The result can be written back into either
// store, and can be sent to the vector sum tree.
//
// Pipeline (all lanes in step; the bus arrives already registered by the
// buffer tree):
//   S0  address registers updated (hold / load immediate / +1 / -1); the new
//       read addresses go to the stores.
//   S1  store data arrive; maths unit computes; result registered.
//   S2  result (or the bus's scalar word) written to store A and/or B at the
//       write address; out_push produces "contrib" for the sum tree.
// Writes are made only by selected lanes (lane_all, or lane_sel equal to LANE);
// a write at S2 is seen by a read issued at S0 two instructions later or more.
// There are no interlocks: the microcode schedules the pipeline.
// The three-stage split, address generation inside each processor and the
// lane-select field are this design's own choices.
module vector_processor
  import vcp_pkg::*;
#(
  parameter int LANE = 0,
  parameter int AW   = STORE_AW
) (
  input  logic      clk,
  input  logic      rst_n,
  input  vliw_bus_t bus,
  output logic      push,      // out_push instruction at S2 (any lane)
  output logic      contrib,   // this lane contributes to the output
  output mpix_t     result     // registered result at S2
);
  // ---------------- S0: address generation ----------------
  logic [AW-1:0] a_addr, b_addr, w_addr;
  logic [AW-1:0] a_addr_n, b_addr_n, w_addr_n;

  function automatic logic [AW-1:0] next_addr(addr_op_e op, logic [AW-1:0] cur,
                                               logic [STORE_AW-1:0] imm);
    unique case (op)
      ADDR_HOLD: return cur;
      ADDR_LOAD: return imm[AW-1:0];
      ADDR_INC:  return cur + 1'b1;
      ADDR_DEC:  return cur - 1'b1;
      default:   return cur;
    endcase
  endfunction

  always_comb begin
    a_addr_n = a_addr;
    b_addr_n = b_addr;
    w_addr_n = w_addr;
    if (bus.valid) begin
      a_addr_n = next_addr(bus.ctrl.a_op, a_addr, bus.ctrl.a_imm);
      b_addr_n = next_addr(bus.ctrl.b_op, b_addr, bus.ctrl.b_imm);
      w_addr_n = next_addr(bus.ctrl.w_op, w_addr, bus.ctrl.w_imm);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_addr <= '0;
      b_addr <= '0;
      w_addr <= '0;
    end else begin
      a_addr <= a_addr_n;
      b_addr <= b_addr_n;
      w_addr <= w_addr_n;
    end
  end

  // Bus and write address carried down the pipeline.
  vliw_bus_t     s1_bus, s2_bus;
  logic [AW-1:0] s1_waddr, s2_waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_bus   <= '0;
      s2_bus   <= '0;
      s1_waddr <= '0;
      s2_waddr <= '0;
    end else begin
      s1_bus   <= bus;
      s2_bus   <= s1_bus;
      s1_waddr <= w_addr_n;
      s2_waddr <= s1_waddr;
    end
  end

  // ---------------- stores ----------------
  mpix_t a_rd, b_rd;
  logic  s2_hit;
  logic  we_a, we_b;
  mpix_t wdata;

  assign s2_hit = s2_bus.valid &&
                  (s2_bus.ctrl.lane_all || (s2_bus.ctrl.lane_sel == LANE_W'(LANE)));
  assign we_a   = s2_hit && s2_bus.ctrl.wr_a;
  assign we_b   = s2_hit && s2_bus.ctrl.wr_b;
  assign wdata  = (s2_bus.ctrl.wr_src == WSRC_SCALAR) ? s2_bus.scalar : result;

  pe_store #(.AW(AW)) u_store_a (
    .clk, .we(we_a), .wr_addr(s2_waddr), .wr_data(wdata),
    .rd_addr(a_addr_n), .rd_data(a_rd)
  );

  pe_store #(.AW(AW)) u_store_b (
    .clk, .we(we_b), .wr_addr(s2_waddr), .wr_data(wdata),
    .rd_addr(b_addr_n), .rd_data(b_rd)
  );

  // ---------------- S1: maths ----------------
  mpix_t prev_a;
  mpix_t opb;
  mpix_t y;

  always_comb begin
    unique case (s1_bus.ctrl.opb_sel)
      OPB_STORE_B: opb = b_rd;
      OPB_SCALAR:  opb = s1_bus.scalar;
      OPB_IMM:     opb = '{mask: 1'b1, val: s1_bus.ctrl.imm};
      OPB_PREV_A:  opb = prev_a;
      default:     opb = b_rd;
    endcase
  end

  pe_maths u_maths (
    .alu_op (s1_bus.ctrl.alu_op),
    .mask_op(s1_bus.ctrl.mask_op),
    .shift  (s1_bus.ctrl.shift),
    .a      (a_rd),
    .b      (opb),
    .y      (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_a <= '0;
      result <= '0;
    end else if (s1_bus.valid) begin
      prev_a <= a_rd;
      result <= y;
    end
  end

  // ---------------- S2: output ----------------
  assign push    = s2_bus.valid && s2_bus.ctrl.out_push;
  assign contrib = push && s2_hit;
endmodule
