// tb_pe_store: random writes and reads against a reference array; checks the
// one-cycle read latency and that a same-cycle read returns the old word.
module tb_pe_store;
  import vcp_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [AW-1:0] wa, ra; mpix_t wd, rd;
  int checks = 0, failures = 0;
  mpix_t ref_mem [2**AW];

  pe_store #(.AW(AW)) dut (.clk, .we, .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mpix_t exp_q;
    we = 1;
    for (int i = 0; i < 2**AW; i++) begin
      wa = AW'(i); wd = mpix_t'($urandom); ra = '0;
      ref_mem[i] = wd;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 1000; n++) begin
      we = ($urandom % 2) == 1;
      wa = AW'($urandom); wd = mpix_t'($urandom);
      ra = ($urandom % 4 == 0) ? wa : AW'($urandom);
      exp_q = ref_mem[ra];       // old word even if written now
      @(posedge clk); #1;
      if (we) ref_mem[wa] = wd;
      checks++;
      if (rd !== exp_q) begin
        failures++;
        $display("mismatch addr %0d got %h exp %h", ra, rd, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
