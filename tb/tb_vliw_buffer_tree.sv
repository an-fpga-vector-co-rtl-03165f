// tb_vliw_buffer_tree: a new random root word every cycle; every leaf must
// show the word LEVELS cycles later (32 leaves with fan-out 4: 4 cycles;
// 7 leaves with fan-out 2: 4 cycles).
module tb_vliw_buffer_tree;
  localparam int W = 93;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [W-1:0] root;
  logic [W-1:0] leaf1 [32];
  logic [W-1:0] leaf2 [7];
  logic [W-1:0] hist [$];

  vliw_buffer_tree #(.N(32), .W(W), .FANOUT(4)) dut1 (.clk, .rst_n, .root, .leaf(leaf1));
  vliw_buffer_tree #(.N(7),  .W(W), .FANOUT(2)) dut2 (.clk, .rst_n, .root, .leaf(leaf2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v = '0;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  initial begin
    root = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      // hist[0] is the word driven 4 cycles before this edge's sample
      if (hist.size() == 4) begin
        for (int i = 0; i < 32; i++) begin
          checks++;
          if (leaf1[i] !== hist[0]) begin failures++; $display("leaf1[%0d] wrong at %0d", i, n); end
        end
        for (int i = 0; i < 7; i++) begin
          checks++;
          if (leaf2[i] !== hist[0]) begin failures++; $display("leaf2[%0d] wrong at %0d", i, n); end
        end
        void'(hist.pop_front());
      end
      root = rnd();
      hist.push_back(root);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
