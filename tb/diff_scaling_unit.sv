// diff_scaling_unit: one co-processor of NP processors with its own host
// model, differentiating 2^10 pixels along rows as a single image (NP rows of
// 1024/NP pixels, row r in lane r). When "go" rises it loads the image, calls
// the DIFF function once (1024/NP words), reads the result back and checks
// every pixel. It reports the number of checks and failures and the cycles
// the DIFF call took from start to the end of the pipeline drain.
module diff_scaling_unit
  import vcp_pkg::*;
  import vcp_asm_pkg::*;
#(
  parameter int NP = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   diff_cycles,
  output int   diff_words
);
  localparam int W = 1024 / NP;     // pixels per lane
  localparam int F_INIT = 0, F_LOAD = 4, F_READ = 100, F_DIFF = 200;

  logic ucode_we; logic [UC_AW-1:0] ucode_addr; uinstr_t ucode_data;
  logic start; logic [UC_AW-1:0] start_addr; logic [PARAM_W-1:0] params;
  logic busy, done, stack_err;
  logic in_valid, in_ready; mpix_t in_data;
  logic out_valid, out_ready; out_word_t out_data;

  vcp_core #(.N_PROC(NP)) dut (.*);
  vcp_host host (.*);

  int   a [NP][W];
  logic am [NP][W];

  initial begin
    uinstr_t u;
    finished = 0; checks = 0; failures = 0; diff_cycles = 0; diff_words = 0;
    wait (go);
    host.load(F_INIT, seq(addr_init(), SEQ_HALT));
    for (int j = 0; j < NP; j++) begin
      u = load_word(j, 0, j == 0);
      host.load(F_LOAD + j, (j == NP - 1) ? seq(u, SEQ_HALT) : u);
      u = read_b_word(j, j == 0);
      host.load(F_READ + j, (j == NP - 1) ? seq(u, SEQ_HALT) : u);
    end
    for (int x = 0; x < W; x++) begin
      u = (x == 0) ? op(ALU_PASS_A, MASK_A, OPB_PREV_A, 0, 0)
                   : op(ALU_SUB, MASK_AND, OPB_PREV_A, 0, 0);
      u.pe.a_op = ADDR_INC; u.pe.b_op = ADDR_HOLD; u.pe.w_op = ADDR_INC; u.pe.wr_b = (x != 0);
      host.load(F_DIFF + x, (x == W - 1) ? seq(u, SEQ_HALT) : u);
    end
    foreach (a[r, x]) begin
      a[r][x] = int'($urandom % 60001) - 30000; am[r][x] = ($urandom % 8) != 0;
    end
    host.call_fn(F_INIT);
    for (int x = 0; x < W; x++) begin
      for (int r = 0; r < NP; r++) host.in_q.push_back('{mask: am[r][x], val: PIX_W'(a[r][x])});
      host.call_fn(F_LOAD);
    end
    host.call_fn(F_INIT);
    host.call_fn(F_DIFF);
    diff_cycles = host.t_total;
    diff_words  = host.t_run + 1;
    host.call_fn(F_INIT);
    for (int x = 0; x < W; x++) host.call_fn(F_READ);
    host.wait_outputs(W * NP);
    checks++;
    if (host.out_q.size() != W * NP) failures++;
    for (int x = 1; x < W; x++)
      for (int r = 0; r < NP; r++) begin
        checks++;
        if (x * NP + r >= host.out_q.size() ||
            int'(host.out_q[x*NP+r].sum) != w16(a[r][x] - a[r][x-1]) ||
            host.out_q[x*NP+r].mask != (am[r][x] & am[r][x-1]))
          failures++;
      end
    checks++;
    if (stack_err) failures++;
    finished = 1;
  end
endmodule
