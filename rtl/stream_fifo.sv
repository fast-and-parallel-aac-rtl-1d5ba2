// stream_fifo: the per-stream input FIFO of the parallel decoder (Fig. 3),
// buffering the compressed frames of one stream until a core unit takes
// them.
//
// Words are 32 bits with a `last` flag on the final word of each frame.
// Write and read use valid/ready handshakes; both can happen in the same
// cycle. `frames` counts the complete frames held (a frame counts once its
// last word is written and stops counting when its last word is read), so
// the global controller can tell whether a whole frame is ready. DEPTH is
// this design's choice (the document gives no FIFO size): 512 words hold a
// 2 KB ADTS frame.
module stream_fifo #(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] wr_word,
  input  logic        wr_last,
  input  logic        wr_valid,
  output logic        wr_ready,
  output logic [31:0] rd_word,
  output logic        rd_last,
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [7:0]  frames
);
  logic [32:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic        do_wr, do_rd;

  assign wr_ready = (wptr - rptr) != (AW+1)'(DEPTH);
  assign rd_valid = (wptr != rptr);
  assign {rd_last, rd_word} = mem[rptr[AW-1:0]];
  assign do_wr = wr_valid && wr_ready;
  assign do_rd = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= {wr_last, wr_word};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0; frames <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      frames <= frames + 8'(do_wr && wr_last) - 8'(do_rd && rd_last);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (wptr - rptr) <= (AW+1)'(DEPTH));
endmodule
