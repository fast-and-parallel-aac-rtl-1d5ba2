// tb_bitstream_parser: streams random words into the parser with random
// input gaps, consumes random field lengths (0..21) through both inputs of
// the length mux, and checks each 21-bit window against the bit queue.
module tb_bitstream_parser;
  import aac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic restart = 0;
  logic [31:0] in_word;
  logic in_last, in_valid, in_ready;
  logic [WIN_W-1:0] window;
  logic window_valid, consume, len_sel;
  logic [LEN_W-1:0] huff_len, parse_len;
  logic [15:0] bit_count;
  int checks = 0, failures = 0;
  bit stream [$];
  logic [31:0] words [200];
  int wi = 0, pos = 0, total;

  bitstream_parser dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word source
  always @(posedge clk) begin
    if (in_valid && in_ready) wi <= wi + 1;
  end
  always_comb begin
    in_word = words[wi < 200 ? wi : 199];
    in_last = (wi == 199);
  end
  logic gap;
  always @(negedge clk) gap <= ($urandom_range(0, 3) == 0);
  assign in_valid = rst_n && (wi < 200) && !gap;

  initial begin
    consume = 0; len_sel = 0; huff_len = 0; parse_len = 0;
    for (int i = 0; i < 200; i++) begin
      words[i] = $urandom();
      for (int b = 31; b >= 0; b--) stream.push_back(words[i][b]);
    end
    total = 200 * 32;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pos < total - 21) begin
      int l;
      @(negedge clk);
      consume = 0;
      if (window_valid) begin
        logic [20:0] exp;
        for (int b = 0; b < 21; b++) exp[20 - b] = (pos + b < total) ? stream[pos + b] : 1'b0;
        checks++;
        if (window !== exp || bit_count != 16'(pos)) begin
          failures++;
          $display("FAIL pos %0d window %h exp %h", pos, window, exp);
        end
        l = $urandom_range(0, 21);
        len_sel = $urandom_range(0, 1);
        huff_len  = len_sel ? 5'(l) : 5'($urandom_range(0, 21));
        parse_len = len_sel ? 5'($urandom_range(0, 21)) : 5'(l);
        consume = 1;
        pos += l;
      end
    end
    @(negedge clk); consume = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
