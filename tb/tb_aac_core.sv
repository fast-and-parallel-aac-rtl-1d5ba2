// tb_aac_core: decodes ADTS frames end to end through one core unit,
// alternating between its two stream slots as the global controller would,
// and compares every PCM sample with the floating point reference decoder
// (tb_ref_model), allowing 2 LSB for fixed-point rounding. Also checks one
// frame_ready per frame and reports the cycles per frame against the
// 12,620-cycle figure of the original design (with a 20-cycle IFFT).
module tb_aac_core;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  import tb_frame_gen::*;
  import tb_ref_model::*;
  logic clk = 0, rst_n = 0;
  hcb_cfg_t cfg;
  logic start, slot, frame_ready, error;
  logic [31:0] in_word;
  logic in_last, in_valid, in_ready;
  logic ifft_short, ifft_in_valid, ifft_start, ifft_out_valid;
  logic signed [DATA_W-1:0] ifft_in_re, ifft_in_im, ifft_out_re, ifft_out_im;
  logic pcm_valid;
  logic signed [31:0] pcm_data;
  int checks = 0, failures = 0, maxdiff = 0;
  int got [1024];
  int np;
  chan_state_t st [2];

  aac_core dut (.*);
  ifft_model #(.LATENCY(20)) u_ifft (.clk, .short_sz(ifft_short), .in_valid(ifft_in_valid),
    .in_re(ifft_in_re), .in_im(ifft_in_im), .start(ifft_start),
    .out_valid(ifft_out_valid), .out_re(ifft_out_re), .out_im(ifft_out_im));
  always #5 clk = ~clk;
  always @(posedge clk) if (pcm_valid) begin got[np % 1024] = pcm_data; np++; end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  task automatic run_frame(input bit s, input int mode, input bit shape);
    int gg, msfb, cbs[49], sfs[49], spec[1024], pcm[1024];
    bitq_t q;
    int nwords, wi, cyc;
    make_frame(mode, gg, msfb, cbs, sfs, spec);
    // keep the decoded signal inside 32-bit fixed point
    for (int b = 0; b < 49; b++) if (sfs[b] > 125) sfs[b] = 125;
    for (int i = 0; i < 1024; i++) if (spec[i] > 300) spec[i] = 300; else if (spec[i] < -300) spec[i] = -300;
    if (gg > 125) gg = 125;
    begin
      int p; p = gg;
      for (int b = 0; b < msfb; b++) if (cbs[b] != 0) begin
        if (sfs[b] - p > 59) sfs[b] = p + 59;
        if (p - sfs[b] > 59) sfs[b] = p - 59;
        p = sfs[b];
      end
    end
    encode_frame(gg, shape, msfb, cbs, sfs, spec, 1'b0, q);
    decode(spec, sfs, shape, st[s], pcm);
    nwords = q.size() / 32;
    slot = s; np = 0; wi = 0; cyc = 0;
    @(negedge clk); start = 1;
    while (!(frame_ready && cyc > 5)) begin
      logic [31:0] w;
      for (int b = 0; b < 32; b++) w[31 - b] = (wi < nwords) ? q[wi * 32 + b] : 1'b0;
      in_word = w; in_last = (wi == nwords - 1);
      in_valid = (wi < nwords);
      @(posedge clk);
      if (in_valid && in_ready) wi++;
      #1; cyc++;
      if (cyc == 3) start = 0;
    end
    in_valid = 0;
    checks++;
    if (error || np != 1024) begin failures++; $display("FAIL frame error=%0b samples=%0d", error, np); end
    for (int n = 0; n < 1024; n++) begin
      int d;
      d = got[n] - pcm[n]; if (d < 0) d = -d;
      if (d > maxdiff) maxdiff = d;
      checks++;
      if (d > 2) begin
        failures++;
        if (failures < 10) $display("FAIL slot %0d n %0d got %0d exp %0d", s, n, got[n], pcm[n]);
      end
    end
    $display("core frame slot %0d: %0d words, %0d cycles, pcm[100]=%0d", s, nwords, cyc, pcm[100]);
  endtask

  initial begin
    cfg = '0; start = 0; slot = 0; in_valid = 0; in_word = 0; in_last = 0;
    for (int s = 0; s < 2; s++) begin st[s].shape = 0; foreach (st[s].ov[i]) st[s].ov[i] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_books();
    run_frame(0, 0, 0);
    run_frame(1, 2, 1);
    run_frame(0, 1, 1);
    run_frame(1, 0, 0);
    $display("max PCM difference %0d", maxdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
