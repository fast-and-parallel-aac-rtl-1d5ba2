// tb_huffman_decoder: loads all twelve codebooks, then for random books and
// entries checks the codeword length and the W, X, Y, Z coefficients
// through Coeff_Mux, scale factor decoding, and escape decoding (prefix
// count, then 2^(N+4) + word through the SD Mux) for all N from 0 to 8.
module tb_huffman_decoder;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  logic clk = 0, rst_n = 0;
  hcb_cfg_t cfg;
  logic [WIN_W-1:0] window;
  logic [3:0] hcb_sel, esc_prefix_n, esc_sel;
  logic spec_hit, load_tuple, sf_hit, esc_prefix_ok, sd_src_sel;
  logic [LEN_W-1:0] spec_len, sf_len, esc_word_len;
  logic [1:0] coeff_sel;
  logic signed [SD_W-1:0] coeff, sd_data;
  logic [SF_W-1:0] sf_index;
  logic [SD_W-1:0] esc_value;
  int checks = 0, failures = 0;

  huffman_decoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    cfg = '0; window = 0; hcb_sel = 0; esc_sel = 0; load_tuple = 0; coeff_sel = 0; sd_src_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cb = 1; cb <= 12; cb++)
      for (int i = 0; i < cb_entries(cb); i++) begin
        logic [20:0] c; int l;
        eg_code(i, c, l);
        @(negedge clk);
        cfg.we = 1; cfg.cb = 4'(cb); cfg.addr = 9'(i); cfg.code = c; cfg.len = 5'(l);
        cfg.val = (cb == 12) ? 24'(i) : entry_tuple(cb, i);
      end
    @(negedge clk); cfg.we = 0;
    for (int n = 0; n < 1500; n++) begin
      int cb, i, l, dim;
      logic [20:0] c;
      logic [23:0] t;
      cb = $urandom_range(1, 11);
      i = $urandom_range(0, cb_entries(cb) - 1);
      eg_code(i, c, l);
      t = entry_tuple(cb, i);
      @(negedge clk);
      hcb_sel = 4'(cb);
      window = c | (21'($urandom()) & (21'h1FFFFF >> l));
      load_tuple = 1;
      #1;
      chk(spec_hit && spec_len == 5'(l), "spectral length");
      @(negedge clk); load_tuple = 0;
      dim = cb_quad(cb) ? 4 : 2;
      for (int j = 0; j < dim; j++) begin
        coeff_sel = 2'(3 - j); sd_src_sel = 0;
        #1;
        chk(sd_data == SD_W'($signed(t[23 - 6 * j -: 6])) && coeff == sd_data, "coefficient");
      end
      // scale factor book
      i = $urandom_range(0, 120);
      eg_code(i, c, l);
      window = c | (21'($urandom()) & (21'h1FFFFF >> l));
      #1;
      chk(sf_hit && sf_len == 5'(l) && sf_index == 8'(i), "scale factor");
    end
    for (int nn = 0; nn <= 8; nn++)
      for (int r = 0; r < 20; r++) begin
        int w;
        w = $urandom_range(0, (1 << (nn + 4)) - 1);
        @(negedge clk);
        window = (21'h1FFFFF << (21 - nn)) | (21'($urandom()) & (21'h1FFFFF >> (nn + 1)));
        window[20 - nn] = 1'b0;
        #1;
        chk(esc_prefix_ok && esc_prefix_n == 4'(nn), "escape prefix");
        window = (21'(w) << (21 - (nn + 4))) | (21'($urandom()) & (21'h1FFFFF >> (nn + 4)));
        esc_sel = 4'(nn); sd_src_sel = 1;
        #1;
        chk(esc_word_len == 5'(nn + 4) && sd_data == SD_W'((1 << (nn + 4)) + w), "escape word");
      end
    window = 21'h1FF000; #1;
    chk(!esc_prefix_ok, "escape prefix over 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
