// tb_microcode_memory: loads random microcode words through the load port and
// reads them back through the synchronous read port (one-cycle latency).
module tb_microcode_memory;
  import vcp_pkg::*;
  localparam int AW = 10;
  localparam int W  = UINSTR_W;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [AW-1:0] la, ra; logic [W-1:0] ld, rd;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [2**AW];

  microcode_memory dut (.clk, .load_we(we), .load_addr(la), .load_data(ld),
                        .rd_addr(ra), .rd_data(rd));

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = {v[W-1:0] << 32} | W'($urandom);
    return v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1; ra = '0;
    for (int i = 0; i < 2**AW; i++) begin
      la = AW'(i); ld = rnd_word(); ref_mem[i] = ld;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      ra = AW'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd !== ref_mem[ra]) begin
        failures++;
        $display("mismatch addr %0d", ra);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
