// tb_processor_scaling: the same 2^10-pixel row differentiation on cores of
// 4, 8, 16, 32 and 64 processors, all running side by side. Every result
// pixel is checked. The DIFF function must issue exactly 1024/N words, and the
// time of one call (words plus the pipeline drain, which grows only with the
// depth of the two trees) must fall as the processor count rises.
module tb_processor_scaling;
  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int K = 5;
  localparam int NPS [K] = '{4, 8, 16, 32, 64};
  logic fin [K];
  int   c [K], f [K], cyc [K], words [K];

  for (genvar i = 0; i < K; i++) begin : g_core
    diff_scaling_unit #(.NP(NPS[i])) u (.clk, .rst_n, .go, .finished(fin[i]), .checks(c[i]),
                                        .failures(f[i]), .diff_cycles(cyc[i]),
                                        .diff_words(words[i]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    go = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < K; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < K; i++) begin
      checks += c[i]; failures += f[i];
      $display("%0d processors: DIFF of 1024 pixels issues %0d words, %0d cycles with drain",
               NPS[i], words[i], cyc[i]);
      checks++;
      if (words[i] != 1024 / NPS[i]) begin failures++; $display("wrong word count"); end
      if (i > 0) begin
        checks++;
        if (cyc[i] >= cyc[i-1]) begin failures++; $display("no speed-up"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
