// tb_hcb_pla: loads an 81-entry codebook with Exp-Golomb codewords and
// checks that every codeword, followed by random bits, is matched in one
// lookup with the right value and length; bit patterns with no codeword
// prefix (more than 13 leading zeros) must miss.
module tb_hcb_pla;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [HCB_IDX_W-1:0] cfg_addr;
  logic [WIN_W-1:0] cfg_code, window;
  logic [LEN_W-1:0] cfg_len, len;
  logic [23:0] cfg_val, val;
  logic hit;
  int checks = 0, failures = 0;

  hcb_pla #(.ENTRIES(81), .VAL_W(24)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_code = 0; cfg_len = 0; cfg_val = 0; window = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 81; i++) begin
      logic [20:0] c; int l;
      eg_code(i, c, l);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 9'(i); cfg_code = c; cfg_len = 5'(l); cfg_val = entry_tuple(3, i);
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [20:0] c, rnd; int l, i;
      i = $urandom_range(0, 80);
      eg_code(i, c, l);
      rnd = 21'($urandom());
      window = c | (rnd & (21'h1FFFFF >> l));
      #1;
      checks++;
      if (!hit || len != 5'(l) || val != entry_tuple(3, i)) begin
        failures++;
        $display("FAIL entry %0d hit=%0b len=%0d val=%h", i, hit, len, val);
      end
    end
    window = 21'h000001; #1;
    checks++;
    if (hit) begin failures++; $display("FAIL spurious hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
