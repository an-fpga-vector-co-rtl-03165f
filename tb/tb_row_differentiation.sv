// tb_row_differentiation: differentiation along image rows of 2^10 pixels on
// the default 32-processor core, with the pixels taken as 1, 2 or 4 images
// (32 rows of 32, 16 or 8 pixels). Row r of every image sits in lane r, the
// images one after another in store A. One call of the DIFF function handles
// one image: its first word only primes the previous-operand register, the
// others compute p[x] - p[x-1] into store B, so every image costs one call
// and one pipeline flush. The results are read back and checked, and the
// cycle counts must grow linearly with the number of images: the time for K
// images is 32 words plus K times a fixed per-call overhead.
module tb_row_differentiation;
  import vcp_pkg::*;
  import vcp_asm_pkg::*;
  localparam int N = 32;
  localparam int ROW = 32;   // pixels per lane in total

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ucode_we; logic [UC_AW-1:0] ucode_addr; uinstr_t ucode_data;
  logic start; logic [UC_AW-1:0] start_addr; logic [PARAM_W-1:0] params;
  logic busy, done, stack_err;
  logic in_valid, in_ready; mpix_t in_data;
  logic out_valid, out_ready; out_word_t out_data;

  vcp_core dut (.*);
  vcp_host host (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int F_INIT = 0, F_LOAD = 8, F_READ = 120;
  function automatic int f_diff(int w);
    return (w == 32) ? 200 : (w == 16) ? 240 : 260;
  endfunction

  int   a [N][ROW];
  logic am [N][ROW];
  int   t_k [3];

  task automatic load_program();
    uinstr_t u;
    host.load(F_INIT, seq(addr_init(), SEQ_HALT));
    for (int j = 0; j < N; j++) begin
      u = load_word(j, 0, j == 0);
      host.load(F_LOAD + j, (j == N - 1) ? seq(u, SEQ_HALT) : u);
    end
    for (int j = 0; j < N; j++) begin
      u = read_b_word(j, j == 0);
      host.load(F_READ + j, (j == N - 1) ? seq(u, SEQ_HALT) : u);
    end
    for (int w = 8; w <= 32; w *= 2)
      for (int x = 0; x < w; x++) begin
        u = (x == 0) ? op(ALU_PASS_A, MASK_A, OPB_PREV_A, 0, 0)
                     : op(ALU_SUB, MASK_AND, OPB_PREV_A, 0, 0);
        u.pe.a_op = ADDR_INC; u.pe.b_op = ADDR_HOLD; u.pe.w_op = ADDR_INC;
        u.pe.wr_b = (x != 0);
        host.load(f_diff(w) + x, (x == w - 1) ? seq(u, SEQ_HALT) : u);
      end
  endtask

  task automatic run_images(int k, int idx);
    int w = ROW / k;
    int t = 0;
    host.call_fn(F_INIT);
    for (int i = 0; i < k; i++) begin
      host.call_fn(f_diff(w));
      t += host.t_total;
      checks++;
      if (host.t_run != w - 1) begin failures++; $display("DIFF took %0d cycles", host.t_run + 1); end
    end
    t_k[idx] = t;
    host.call_fn(F_INIT);
    for (int x = 0; x < ROW; x++) host.call_fn(F_READ);
    host.wait_outputs(ROW * N);
    checks++;
    if (host.out_q.size() != ROW * N) begin failures++; $display("%0d outputs", host.out_q.size()); end
    for (int x = 0; x < ROW; x++)
      for (int r = 0; r < N; r++)
        if (x % w != 0 && x * N + r < host.out_q.size()) begin
          checks++;
          if (int'(host.out_q[x*N+r].sum) != w16(a[r][x] - a[r][x-1]) ||
              host.out_q[x*N+r].mask != (am[r][x] & am[r][x-1])) begin
            failures++;
            if (failures < 10) $display("K=%0d row %0d x %0d: got %0d", k, r, x,
                                        host.out_q[x*N+r].sum);
          end
        end
    host.out_q.delete();
    $display("%0d image(s) of 32x%0d: %0d cycles", k, w, t);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program();
    foreach (a[r, x]) begin
      a[r][x] = int'($urandom % 20001) - 10000; am[r][x] = ($urandom % 8) != 0;
    end
    host.in_gap_pct = 10;
    host.call_fn(F_INIT);
    for (int x = 0; x < ROW; x++) begin
      for (int r = 0; r < N; r++) host.in_q.push_back('{mask: am[r][x], val: PIX_W'(a[r][x])});
      host.call_fn(F_LOAD);
    end
    host.in_gap_pct = 0;
    run_images(1, 0);
    run_images(2, 1);
    run_images(4, 2);
    // linear growth: t(K) = 32 + K * overhead
    checks++;
    if (!(t_k[1] - t_k[0] > 0 && t_k[2] - t_k[1] == 2 * (t_k[1] - t_k[0]))) begin
      failures++; $display("time not linear in the number of images: %p", t_k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
