// tb_sum_masked_images: the masked image summing workload, at the default
// core size (32 processors). Square images of width 50, 100 and 150 pixels
// (the largest of these uses 704 of the 1024 words per store) are streamed
// in once, pixel p going to lane p mod 32 at address p div 32, and then
// processed by 128 operations, as in the published measurements. Each
// operation is one pass of the ADD function over the image (32 microcode
// words per call, each adding one address in every lane: 1024 pixels per
// call), computing B = A + B in place with the AND of the two masks, so after
// 128 passes B holds B0 + 128*A. The READ function then streams the result
// back one pixel at a time. Every pixel and mask is checked, each ADD call must
// take exactly 32 cycles, and the cycles spent loading, computing and reading
// are printed.
module tb_sum_masked_images;
  import vcp_pkg::*;
  import vcp_asm_pkg::*;
  localparam int N = 32;
  localparam int OPS = 128;   // operations per image copy

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ucode_we; logic [UC_AW-1:0] ucode_addr; uinstr_t ucode_data;
  logic start; logic [UC_AW-1:0] start_addr; logic [PARAM_W-1:0] params;
  logic busy, done, stack_err;
  logic in_valid, in_ready; mpix_t in_data;
  logic out_valid, out_ready; out_word_t out_data;

  vcp_core dut (.*);
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  vcp_host host (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int F_INIT = 0, F_LOAD = 8, F_ADD = 80, F_READ = 120;

  task automatic load_program();
    uinstr_t u;
    host.load(F_INIT, seq(addr_init(), SEQ_HALT));
    for (int j = 0; j < N; j++) begin
      host.load(F_LOAD + 2*j, load_word(j, 0, j == 0));
      u = load_word(j, 1, 0);
      host.load(F_LOAD + 2*j + 1, (j == N - 1) ? seq(u, SEQ_HALT) : u);
    end
    for (int k = 0; k < 32; k++) begin
      u = op(ALU_ADD, MASK_AND, OPB_STORE_B, 0, 0);
      u.pe.a_op = ADDR_INC; u.pe.b_op = ADDR_INC; u.pe.w_op = ADDR_INC; u.pe.wr_b = 1;
      host.load(F_ADD + k, (k == 31) ? seq(u, SEQ_HALT) : u);
    end
    for (int j = 0; j < N; j++) begin
      u = read_b_word(j, j == 0);
      host.load(F_READ + j, (j == N - 1) ? seq(u, SEQ_HALT) : u);
    end
  endtask

  task automatic run_width(int width);
    int npix = width * width;
    int per_lane = (npix + N - 1) / N;
    int a[], b[]; logic am[], bm[];
    int calls;
    int t0, t_load, t_comp, t_read;
    a = new[per_lane * N]; b = new[per_lane * N]; am = new[per_lane * N]; bm = new[per_lane * N];
    foreach (a[p]) begin
      a[p] = int'($urandom % 4001) - 2000; b[p] = int'($urandom % 4001) - 2000;
      am[p] = (p < npix) && (($urandom % 6) != 0); bm[p] = (p < npix) && (($urandom % 6) != 0);
    end
    host.in_gap_pct = 20;
    t0 = cyc;
    host.call_fn(F_INIT);
    for (int i = 0; i < per_lane; i++) begin
      for (int j = 0; j < N; j++) begin
        host.in_q.push_back('{mask: am[i*N+j], val: PIX_W'(a[i*N+j])});
        host.in_q.push_back('{mask: bm[i*N+j], val: PIX_W'(b[i*N+j])});
      end
      host.call_fn(F_LOAD);
    end
    t_load = cyc - t0;
    host.in_gap_pct = 0;
    calls = (per_lane + 31) / 32;
    t0 = cyc;
    for (int o = 0; o < OPS; o++) begin
      host.call_fn(F_INIT);
      for (int c = 0; c < calls; c++) begin
        host.call_fn(F_ADD);
        checks++;
        if (host.t_run != 31) begin
          failures++; $display("ADD call took %0d cycles", host.t_run + 1);
        end
      end
    end
    t_comp = cyc - t0;
    t0 = cyc;
    host.call_fn(F_INIT);
    host.out_ready_pct = 60;
    for (int i = 0; i < per_lane; i++) host.call_fn(F_READ);
    host.wait_outputs(per_lane * N);
    t_read = cyc - t0;
    checks++;
    if (host.out_q.size() != per_lane * N) begin
      failures++; $display("width %0d: %0d outputs", width, host.out_q.size());
    end
    for (int p = 0; p < npix && p < host.out_q.size(); p++) begin
      checks++;
      if (int'(host.out_q[p].sum) != w16(b[p] + OPS * a[p]) || host.out_q[p].mask != (am[p] & bm[p])) begin
        failures++;
        if (failures < 10) $display("width %0d pixel %0d: got %0d/%0b", width, p,
                                    host.out_q[p].sum, host.out_q[p].mask);
      end
    end
    host.out_q.delete();
    $display("width %0d: %0d pixels, %0d per lane; cycles: load %0d, %0d operations %0d, read %0d",
             width, npix, per_lane, t_load, OPS, t_comp, t_read);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_program();
    run_width(50);
    run_width(100);
    run_width(150);
    checks++;
    if (stack_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
