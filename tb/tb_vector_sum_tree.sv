// tb_vector_sum_tree: random vectors every cycle (with random lane selection)
// into a 32-lane and a 5-lane tree; checks the sum, the mask OR and the
// latency of 1 + ceil(log2(N)) cycles.
module tb_vector_sum_tree;
  import vcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N1 = 32, N2 = 5;
  localparam int LAT1 = 6, LAT2 = 4;

  logic v1, v2, ov1, ov2;
  logic c1 [N1]; mpix_t p1 [N1];
  logic c2 [N2]; mpix_t p2 [N2];
  out_word_t o1, o2;

  vector_sum_tree #(.N(N1)) dut1 (.clk, .rst_n, .in_valid(v1), .contrib(c1), .pix(p1),
                                  .out_valid(ov1), .out_word(o1));
  vector_sum_tree #(.N(N2)) dut2 (.clk, .rst_n, .in_valid(v2), .contrib(c2), .pix(p2),
                                  .out_valid(ov2), .out_word(o2));

  int exp_sum1 [$], exp_sum2 [$]; logic exp_m1 [$], exp_m2 [$];
  int cyc_in1 [$], cyc_in2 [$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n) begin
    if (ov1) begin
      checks++;
      if (exp_sum1.size() == 0 || int'(o1.sum) != exp_sum1[0] || o1.mask != exp_m1[0]
          || cyc - cyc_in1[0] != LAT1) begin
        failures++;
        $display("N=32 mismatch: got %0d/%0b", o1.sum, o1.mask);
      end
      if (exp_sum1.size() != 0) begin
        void'(exp_sum1.pop_front()); void'(exp_m1.pop_front()); void'(cyc_in1.pop_front());
      end
    end
    if (ov2) begin
      checks++;
      if (exp_sum2.size() == 0 || int'(o2.sum) != exp_sum2[0] || o2.mask != exp_m2[0]
          || cyc - cyc_in2[0] != LAT2) begin
        failures++;
        $display("N=5 mismatch: got %0d/%0b", o2.sum, o2.mask);
      end
      if (exp_sum2.size() != 0) begin
        void'(exp_sum2.pop_front()); void'(exp_m2.pop_front()); void'(cyc_in2.pop_front());
      end
    end
  end

  initial begin
    int s; logic m;
    v1 = 0; v2 = 0;
    foreach (c1[i]) begin c1[i] = 0; p1[i] = '0; end
    foreach (c2[i]) begin c2[i] = 0; p2[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      v1 = ($urandom % 3) != 0; v2 = ($urandom % 2) != 0;
      s = 0; m = 0;
      foreach (c1[i]) begin
        c1[i] = (n % 4 == 0) ? 1'b1 : (($urandom % 2) == 1);
        p1[i] = mpix_t'($urandom);
        if (n % 7 == 0) p1[i].val = 16'sh7fff;     // largest sums
        if (c1[i]) begin s += int'(p1[i].val); m |= p1[i].mask; end
      end
      if (v1) begin exp_sum1.push_back(s); exp_m1.push_back(m); cyc_in1.push_back(cyc); end
      s = 0; m = 0;
      foreach (c2[i]) begin
        c2[i] = ($urandom % 2) == 1;
        p2[i] = mpix_t'($urandom);
        if (c2[i]) begin s += int'(p2[i].val); m |= p2[i].mask; end
      end
      if (v2) begin exp_sum2.push_back(s); exp_m2.push_back(m); cyc_in2.push_back(cyc); end
    end
    @(negedge clk); v1 = 0; v2 = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_sum1.size() != 0 || exp_sum2.size() != 0) begin
      failures++;
      $display("missing outputs %0d %0d", exp_sum1.size(), exp_sum2.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
