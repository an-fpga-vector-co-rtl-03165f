// pe_maths: the "Maths" unit of one vector processor. Combinational.
//
// It computes one masked pixel operation per cycle. The value path performs
// the pixel arithmetic of the source design (add, subtract, multiply,
// absolute value, zero-by-mask; differentiation along a row is a subtract
// whose B operand is the previous A operand, chosen outside this unit). The
// mask path runs in parallel and decides the mask bit of the result,
// including the threshold operation that writes A > B into the mask.
//
// Choices of this design: pixels are signed PIX_W-bit values and results wrap
// (no saturation); a product is shifted right arithmetically by "shift" and
// truncated to PIX_W bits; the threshold compare is signed "greater than".
module pe_maths
  import vcp_pkg::*;
(
  input  alu_op_e            alu_op,
  input  mask_op_e           mask_op,
  input  logic [SHIFT_W-1:0] shift,
  input  mpix_t              a,
  input  mpix_t              b,
  output mpix_t              y
);
  logic signed [2*PIX_W-1:0] prod;
  logic                      a_gt_b;

  always_comb begin
    prod    = a.val * b.val;
    a_gt_b  = a.val > b.val;

    unique case (alu_op)
      ALU_PASS_A: y.val = a.val;
      ALU_PASS_B: y.val = b.val;
      ALU_ADD:    y.val = a.val + b.val;
      ALU_SUB:    y.val = a.val - b.val;
      ALU_MUL:    y.val = PIX_W'(prod >>> shift);
      ALU_ABS:    y.val = a.val[PIX_W-1] ? -a.val : a.val;
      ALU_ZERO:   y.val = a.mask ? a.val : '0;
      default:    y.val = a.val;
    endcase

    unique case (mask_op)
      MASK_AND:    y.mask = a.mask & b.mask;
      MASK_OR:     y.mask = a.mask | b.mask;
      MASK_A:      y.mask = a.mask;
      MASK_B:      y.mask = b.mask;
      MASK_ONE:    y.mask = 1'b1;
      MASK_ZERO:   y.mask = 1'b0;
      MASK_GT:     y.mask = a_gt_b;
      MASK_GT_AND: y.mask = a.mask & a_gt_b;
      default:     y.mask = 1'b0;
    endcase
  end
endmodule
