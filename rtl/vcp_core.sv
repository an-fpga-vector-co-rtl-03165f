// vcp_core: the vector co-processor core. A VLIW controller steps through
// microcode held in block RAM; each microcode word carries a sequencing
// field for the controller and a processor field that, together with one
// scalar data word from the input stream, forms the VLIW bus. The bus is
// delivered to a vector of N_PROC identical processors through a registered
// buffer tree. Processor results leave through a pipelined vector sum tree
// (which both adds a vector up and reads out a single lane) into an output
// FIFO.
//
// Host interface (plain signals):
//   ucode_we/ucode_addr/ucode_data  write one microcode word per cycle
//   start/start_addr/params         call the microcode function at start_addr;
//                                   params are the condition bits it tests
//   busy/done                       busy until the last issued word has left
//                                   the pipeline; done pulses when the
//                                   function's last word issues
//   in_valid/in_ready/in_data       input stream (scalar data words)
//   out_valid/out_ready/out_data    output stream (sum tree results)
//   stack_err                       sticky call-stack overflow
//
// Latency: a word issued in cycle t reaches the processors at t+BT_LEVELS,
// writes their stores at the end of t+BT_LEVELS+2 and, if it pushes an
// output, enters the FIFO at t+BT_LEVELS+2+SUM_LAT. The controller only
// issues an output-producing word when the FIFO is sure to have room for it
// (a credit count of words issued but not yet taken by the consumer), so the
// pipeline never needs to stop. What follows the source design: the SIMD
// organisation, the controller's features, the microcode RAM, the buffer tree
// and the sum tree; the default of 32 processors is the configuration whose
// performance the source design reports. Widths, the FIFO, the credit scheme
// and the interface signals are this design's choices.
module vcp_core
  import vcp_pkg::*;
#(
  parameter int N_PROC      = 32,
  parameter int FANOUT      = 4,
  parameter int STORE_DEPTH_LOG2 = STORE_AW,
  parameter int STACK_DEPTH = 8,
  parameter int FIFO_DEPTH  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // microcode load port
  input  logic               ucode_we,
  input  logic [UC_AW-1:0]   ucode_addr,
  input  uinstr_t            ucode_data,
  // function call
  input  logic               start,
  input  logic [UC_AW-1:0]   start_addr,
  input  logic [PARAM_W-1:0] params,
  output logic               busy,
  output logic               done,
  output logic               stack_err,
  // input stream
  input  logic               in_valid,
  output logic               in_ready,
  input  mpix_t              in_data,
  // output stream
  output logic               out_valid,
  input  logic               out_ready,
  output out_word_t          out_data
);
  localparam int BT_LEVELS = clog_base(N_PROC, FANOUT) + 1;
  localparam int SUM_LAT   = ((N_PROC > 1) ? $clog2(N_PROC) : 0) + 1;
  localparam int PIPE_LAT  = BT_LEVELS + 3 + SUM_LAT;
  localparam int CRED_W    = $clog2(FIFO_DEPTH + 1);

  // ---------------- controller and microcode ----------------
  logic [UC_AW-1:0] uc_raddr;
  uinstr_t          ir;
  logic             issue;
  logic             ctrl_busy;
  logic             out_credit_ok;

  microcode_memory #(.AW(UC_AW), .W(UINSTR_W)) u_ucode (
    .clk,
    .load_we  (ucode_we),
    .load_addr(ucode_addr),
    .load_data(ucode_data),
    .rd_addr  (uc_raddr),
    .rd_data  (ir)
  );

  vliw_controller #(.STACK_DEPTH(STACK_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .start, .start_addr, .params,
    .busy(ctrl_busy), .done, .stack_err,
    .uc_raddr, .ir,
    .in_valid, .in_pop(in_ready),
    .out_credit_ok,
    .issue
  );

  // ---------------- VLIW bus distribution ----------------
  vliw_bus_t root;
  assign root.valid  = issue;
  assign root.ctrl   = issue ? ir.pe : PE_NOP;
  assign root.scalar = (issue && ir.seq.wait_in) ? in_data : '0;

  logic [VLIW_W-1:0] leaf [N_PROC];

  vliw_buffer_tree #(.N(N_PROC), .W(VLIW_W), .FANOUT(FANOUT)) u_tree (
    .clk, .rst_n,
    .root(root),
    .leaf(leaf)
  );

  // ---------------- vector of processors ----------------
  logic  push    [N_PROC];
  logic  contrib [N_PROC];
  mpix_t result  [N_PROC];

  for (genvar i = 0; i < N_PROC; i++) begin : g_pe
    vector_processor #(.LANE(i), .AW(STORE_DEPTH_LOG2)) u_pe (
      .clk, .rst_n,
      .bus    (vliw_bus_t'(leaf[i])),
      .push   (push[i]),
      .contrib(contrib[i]),
      .result (result[i])
    );
  end

  // ---------------- vector sum tree and output ----------------
  logic      sum_valid;
  out_word_t sum_word;
  logic      fifo_wr_ready;

  vector_sum_tree #(.N(N_PROC)) u_sum (
    .clk, .rst_n,
    .in_valid (push[0]),
    .contrib  (contrib),
    .pix      (result),
    .out_valid(sum_valid),
    .out_word (sum_word)
  );

  out_fifo #(.W($bits(out_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(sum_valid),
    .wr_ready(fifo_wr_ready),
    .wr_data (sum_word),
    .rd_valid(out_valid),
    .rd_ready(out_ready),
    .rd_data (out_data)
  );

  // Output credits: words issued with out_push and not yet read out.
  logic [CRED_W-1:0] outstanding;
  logic              cred_take, cred_give;
  assign cred_take     = issue && ir.pe.out_push;
  assign cred_give     = out_valid && out_ready;
  assign out_credit_ok = outstanding < CRED_W'(FIFO_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else        outstanding <= outstanding + CRED_W'(cred_take) - CRED_W'(cred_give);
  end

  // ---------------- busy ----------------
  logic [PIPE_LAT-1:0] inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= {inflight[PIPE_LAT-2:0], issue};
  end
  assign busy = ctrl_busy || (|inflight);

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
                                sum_valid |-> fifo_wr_ready)
    else $error("vcp_core: output FIFO overrun");
endmodule
