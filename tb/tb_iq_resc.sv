// tb_iq_resc: fills SD-RAM and SF-RAM models with random quantized values
// (small ones, LUT-range ones up to 1025 and interpolated ones up to 8191)
// and scale factors, runs one frame and compares every IQ-RAM write with
// sign(x)|x|^(4/3) 2^((sf-100)/4) computed in floating point. A band with
// sf = 128 (no shift, no fraction) must give the LUT entry exactly. The
// cycle count must be 4 per coefficient, 5 when interpolating.
module tb_iq_resc;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, win_short, busy, done;
  logic [9:0] sd_raddr, iq_waddr;
  logic [SD_W-1:0] sd_rdata;
  logic [5:0] sf_raddr;
  logic [SF_W-1:0] sf_rdata;
  logic iq_we;
  logic [DATA_W-1:0] iq_wdata;
  int checks = 0, failures = 0, writes = 0, n_big = 0;
  int sd [1024];
  int sf [64];
  real maxerr = 0.0;

  iq_resc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    sd_rdata <= 16'(sd[sd_raddr]);
    sf_rdata <= 8'(sf[sf_raddr]);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int band_of(int k);
    for (int b = 0; b < 49; b++) if (k < swb(b + 1)) return b;
    return 48;
  endfunction

  always @(posedge clk) if (iq_we) begin
    real r, e;
    int b;
    b = band_of(int'(iq_waddr));
    r = iq_ref(sd[iq_waddr], sf[b], win_short);
    e = real'($signed(iq_wdata)) - r;
    if (e < 0) e = -e;
    checks++;
    writes++;
    if (e > 4.0 + 2.0e-4 * (r < 0 ? -r : r)) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d q=%0d sf=%0d got %0d exp %f", iq_waddr, sd[iq_waddr], sf[b], $signed(iq_wdata), r);
    end
    if (sf[b] == 128 && !win_short) begin
      // exponent 0, fraction 0: the LUT value itself
      int a; longint lut;
      a = sd[iq_waddr] < 0 ? -sd[iq_waddr] : sd[iq_waddr];
      if (a < 1026) begin
        lut = longint'($rtoi($pow(a, 4.0 / 3.0) * 16384.0 + 0.5));
        checks++;
        if (longint'($signed(iq_wdata)) != (sd[iq_waddr] < 0 ? -lut : lut)) begin
          failures++;
          $display("FAIL exact LUT q=%0d got %0d exp %0d", sd[iq_waddr], $signed(iq_wdata), lut);
        end
      end
    end
  end

  task automatic run(input bit shortw);
    int cyc;
    writes = 0; n_big = 0;
    // keep every result inside 32 bits: no interpolated values at sf = 128
    for (int b = 0; b < 64; b++) sf[b] = (b % 7 == 0) ? 128 : $urandom_range(80, shortw ? 108 : 120);
    for (int k = 0; k < 1024; k++) begin
      int sel, v;
      sel = $urandom_range(0, 9);
      v = sel < 5 ? $urandom_range(0, 20) : (sel < 8 ? $urandom_range(0, 1025) : $urandom_range(1026, 8191));
      if (sf[band_of(k)] == 128 && v > 1025) v = v >> 3;
      if (k == 5) v = 1025;
      if (k == 6) v = 1026;
      if (k == 7) v = 8191;
      if (v >= 1026) n_big++;
      sd[k] = $urandom_range(0, 1) ? -v : v;
    end
    win_short = shortw;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (writes != 1024 || cyc != 4 * 1024 + n_big + 1) begin
      failures++;
      $display("FAIL writes=%0d cycles=%0d expected %0d", writes, cyc, 4 * 1024 + n_big + 1);
    end
    $display("IQ_RESC frame: %0d cycles", cyc);
  endtask

  initial begin
    start = 0; win_short = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
