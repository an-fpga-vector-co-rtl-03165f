// out_fifo: synchronous FIFO buffering the co-processor's output stream so
// that results already in the pipeline always have somewhere to go while the
// consumer applies back-pressure. Valid/ready on both sides; a word is moved
// when valid and ready are both high. DEPTH must be a power of two.
// The FIFO itself is this design's own choice.
module out_fifo #(
  parameter int W     = 23,
  parameter int DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          wr_fire, rd_fire;

  assign wr_ready = (wp - rp) != (AW+1)'(DEPTH);
  assign rd_valid = wp != rp;
  assign rd_data  = mem[rp[AW-1:0]];
  assign wr_fire  = wr_valid && wr_ready;
  assign rd_fire  = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (wr_fire) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_fire) wp <= wp + 1'b1;
      if (rd_fire) rp <= rp + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_valid |-> wr_ready)
    else $error("out_fifo: write while full");
endmodule
