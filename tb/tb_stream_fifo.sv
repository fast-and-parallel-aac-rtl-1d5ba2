// tb_stream_fifo: random writes and reads of words with frame-end flags;
// checks data order, the full and empty handshakes, and the complete-frame
// count against a queue model.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0;
  logic [31:0] wr_word, rd_word;
  logic wr_last, wr_valid, wr_ready, rd_last, rd_valid, rd_ready;
  logic [7:0] frames;
  int checks = 0, failures = 0;
  logic [32:0] q [$];
  int nfr = 0;

  stream_fifo #(.DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_word = 0; wr_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      bit fill;
      @(negedge clk);
      fill = (i / 500) % 2;
      wr_valid = $urandom_range(0, 3) < (fill ? 3 : 1);
      rd_ready = $urandom_range(0, 3) < (fill ? 1 : 3);
      wr_word = $urandom();
      wr_last = $urandom_range(0, 4) == 0;
      #1;
      checks++;
      if (wr_ready != (q.size() < 16) || rd_valid != (q.size() > 0) || frames != 8'(nfr)) begin
        failures++;
        $display("FAIL flags: size %0d wr_ready %0b rd_valid %0b frames %0d/%0d", q.size(), wr_ready, rd_valid, frames, nfr);
      end
      if (rd_valid && rd_ready) begin
        checks++;
        if ({rd_last, rd_word} != q[0]) begin failures++; $display("FAIL data"); end
      end
      @(posedge clk);
      if (rd_valid && rd_ready) begin if (q[0][32]) nfr--; void'(q.pop_front()); end
      if (wr_valid && wr_ready) begin q.push_back({wr_last, wr_word}); if (wr_last) nfr++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
