// vcp_host: host-side model used by the workload testbenches. It drives the
// co-processor's microcode load port, calls functions, feeds the input
// stream from a queue and collects the output stream into a queue. The
// input stream has random gaps and the consumer random back-pressure, set by
// in_gap_pct and out_ready_pct.
module vcp_host
  import vcp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  output logic               ucode_we,
  output logic [UC_AW-1:0]   ucode_addr,
  output uinstr_t            ucode_data,
  output logic               start,
  output logic [UC_AW-1:0]   start_addr,
  output logic [PARAM_W-1:0] params,
  input  logic               busy,
  input  logic               done,
  output logic               in_valid,
  input  logic               in_ready,
  output mpix_t              in_data,
  input  logic               out_valid,
  output logic               out_ready,
  input  out_word_t          out_data
);
  mpix_t     in_q  [$];
  out_word_t out_q [$];
  int        in_gap_pct = 0;
  int        out_ready_pct = 100;
  int        t_run;     // cycles from start to done of the last call
  int        t_total;   // cycles from start to not busy of the last call

  initial begin
    ucode_we = 0; ucode_addr = '0; ucode_data = '0;
    start = 0; start_addr = '0; params = '0;
  end

  always @(negedge clk) begin
    in_valid  = (in_q.size() != 0) && (($urandom % 100) >= in_gap_pct);
    in_data   = (in_q.size() != 0) ? in_q[0] : '0;
    out_ready = ($urandom % 100) < out_ready_pct;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) void'(in_q.pop_front());
    if (out_valid && out_ready) out_q.push_back(out_data);
  end

  task automatic load(int addr, uinstr_t u);
    @(negedge clk);
    ucode_we = 1; ucode_addr = UC_AW'(addr); ucode_data = u;
    @(negedge clk);
    ucode_we = 0;
  endtask

  task automatic call_fn(int addr, logic [PARAM_W-1:0] p = '0);
    @(negedge clk);
    while (busy) @(negedge clk);
    start = 1; start_addr = UC_AW'(addr); params = p;
    @(negedge clk);
    start = 0;
    t_run = 0; t_total = 1;
    while (!done) begin @(negedge clk); t_run++; t_total++; end
    while (busy) begin @(negedge clk); t_total++; end
  endtask

  task automatic wait_outputs(int n);
    int k = 0;
    while (out_q.size() < n && k < 100000) begin @(negedge clk); k++; end
  endtask
endmodule
