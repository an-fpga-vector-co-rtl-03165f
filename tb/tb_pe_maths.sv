// tb_pe_maths: exhaustive over operations, random over operands; the expected
// value and mask are computed with 32-bit integer arithmetic in the testbench.
module tb_pe_maths;
  import vcp_pkg::*;
  alu_op_e alu_op; mask_op_e mask_op; logic [SHIFT_W-1:0] shift;
  mpix_t a, b, y;
  int checks = 0, failures = 0;

  pe_maths dut (.alu_op, .mask_op, .shift, .a, .b, .y);

  function automatic int wrap16(longint v);
    logic [15:0] t = v[15:0];
    return int'($signed(t));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av, bv, ev; logic em; longint p;
    for (int n = 0; n < 4000; n++) begin
      alu_op  = alu_op_e'($urandom % 7);
      mask_op = mask_op_e'($urandom % 8);
      shift   = SHIFT_W'($urandom);
      a = mpix_t'($urandom); b = mpix_t'($urandom);
      if (n % 10 == 0) b.val = a.val;           // equal operands for the compare
      av = int'(a.val); bv = int'(b.val);
      #1;
      case (alu_op)
        ALU_PASS_A: ev = av;
        ALU_PASS_B: ev = bv;
        ALU_ADD:    ev = wrap16(av + bv);
        ALU_SUB:    ev = wrap16(av - bv);
        ALU_MUL:    begin p = longint'(av) * longint'(bv); ev = wrap16(p >>> shift); end
        ALU_ABS:    ev = wrap16(av < 0 ? -av : av);
        ALU_ZERO:   ev = a.mask ? av : 0;
        default:    ev = av;
      endcase
      case (mask_op)
        MASK_AND:    em = a.mask & b.mask;
        MASK_OR:     em = a.mask | b.mask;
        MASK_A:      em = a.mask;
        MASK_B:      em = b.mask;
        MASK_ONE:    em = 1;
        MASK_ZERO:   em = 0;
        MASK_GT:     em = av > bv;
        MASK_GT_AND: em = a.mask && (av > bv);
        default:     em = 0;
      endcase
      checks++;
      if (int'(y.val) != ev || y.mask != em) begin
        failures++;
        if (failures < 10)
          $display("op %0d/%0d a=%0d b=%0d sh=%0d: got %0d/%0b exp %0d/%0b",
                   alu_op, mask_op, av, bv, shift, y.val, y.mask, ev, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
