// tb_demux_huff: end-to-end test of the bitstream parsing and Huffman
// decoding block. Loads all codebooks, encodes random ADTS frames (with and
// without CRC, with escapes, zero bands, a 49-band section that needs the
// section-length escape) and streams them in with random gaps. Every SD-RAM
// and SF-RAM write is captured and compared with the values encoded; the
// side information (window shape, max_sfb, sampling index) is checked too.
module tb_demux_huff;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  import tb_frame_gen::*;
  logic clk = 0, rst_n = 0;
  hcb_cfg_t cfg;
  logic start, busy, done, error;
  logic [31:0] in_word;
  logic in_last, in_valid, in_ready;
  logic sd_we, sf_we;
  logic [9:0] sd_addr;
  logic [SD_W-1:0] sd_wdata;
  logic [5:0] sf_addr;
  logic [SF_W-1:0] sf_wdata;
  win_seq_t win_seq;
  logic win_shape;
  logic [3:0] sr_index;
  logic [5:0] max_sfb;
  int checks = 0, failures = 0;
  int sd_got [1024];
  int sf_got [64];
  int sd_cnt;

  demux_huff dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (sd_we) begin sd_got[sd_addr] <= $signed(sd_wdata); sd_cnt <= sd_cnt + 1; end
    if (sf_we) sf_got[sf_addr] <= int'(sf_wdata);
  end

  task automatic load_books();
    for (int cb = 1; cb <= 12; cb++)
      for (int i = 0; i < cb_entries(cb); i++) begin
        logic [20:0] c; int l;
        eg_code(i, c, l);
        @(negedge clk);
        cfg.we = 1; cfg.cb = 4'(cb); cfg.addr = 9'(i); cfg.code = c; cfg.len = 5'(l);
        cfg.val = (cb == 12) ? 24'(i) : entry_tuple(cb, i);
      end
    @(negedge clk); cfg.we = 0;
  endtask

  task automatic run_frame(input int mode, input bit crc);
    int gg, msfb, cbs[49], sfs[49], spec[1024];
    bitq_t q;
    int nwords, wi, cyc;
    make_frame(mode, gg, msfb, cbs, sfs, spec);
    encode_frame(gg, mode == 2, msfb, cbs, sfs, spec, crc, q);
    nwords = q.size() / 32;
    sd_cnt = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wi = 0; cyc = 0;
    while (busy) begin
      logic [31:0] w;
      for (int b = 0; b < 32; b++) w[31 - b] = (wi < nwords) ? q[wi * 32 + b] : 1'b0;
      in_word = w; in_last = (wi == nwords - 1);
      in_valid = (wi < nwords) && ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (in_valid && in_ready) wi++;
      #1; cyc++;
    end
    in_valid = 0;
    checks++;
    if (error || sd_cnt != 1024 || max_sfb != 6'(msfb) || win_shape != (mode == 2) || sr_index != 4'd3) begin
      failures++;
      $display("FAIL frame: error=%0b writes=%0d max_sfb=%0d/%0d", error, sd_cnt, max_sfb, msfb);
    end
    for (int i = 0; i < 1024; i++) begin
      checks++;
      if (sd_got[i] != spec[i]) begin
        failures++;
        if (failures < 10) $display("FAIL coef %0d got %0d exp %0d", i, sd_got[i], spec[i]);
      end
    end
    for (int b = 0; b < msfb; b++) if (cbs[b] != 0) begin
      checks++;
      if (sf_got[b] != sfs[b]) begin
        failures++;
        $display("FAIL sf %0d got %0d exp %0d", b, sf_got[b], sfs[b]);
      end
    end
    $display("frame mode %0d: %0d words, %0d cycles", mode, nwords, cyc);
  endtask

  initial begin
    cfg = '0; start = 0; in_valid = 0; in_word = 0; in_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_books();
    run_frame(0, 1'b0);
    run_frame(1, 1'b1);
    run_frame(2, 1'b0);
    run_frame(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
