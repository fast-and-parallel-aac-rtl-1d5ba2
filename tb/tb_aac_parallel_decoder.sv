// tb_aac_parallel_decoder: end-to-end test of the parallel decoder at its
// default size (50 streams, 25 core units). Every stream receives FRAMES
// random ADTS frames (some with CRC, with escapes, window shape changes);
// one stream gets a frame whose escape values need
// the interpolated inverse quantization and a loud frame that must clip at the PCM converter; one
// stream starts late so that its core waits with Start low; one stream
// pushes six frames without gaps so its FIFO applies back-pressure. Each
// stream's PCM output is compared sample by sample with the floating point
// reference decoder (2 LSB tolerance). The testbench counts how often each
// mechanism happened (stream switches, start stalls, escapes, CRC frames,
// sine and KBD windows, interpolated inverse quantization, clipping, FIFO
// back-pressure) and fails if one never did.
// Every core's IFFT port is served by an ifft_model instance (20-cycle
// latency). Codebooks are loaded through cfg first, then enable is raised;
// stream words are offered on random cycles. The whole run takes about
// 150,000 cycles. The 50-stream size is the one the design is sized for;
// the stimulus (pairs alternating, CRC on some streams, 6144-bit frame
// limit) is this testbench's own choice.
module tb_aac_parallel_decoder;
  import aac_pkg::*;
  import tb_aac_pkg::*;
  import tb_frame_gen::*;
  import tb_ref_model::*;
  localparam int NS = 50;
  localparam int NC = NS / 2;
  localparam int FRAMES = 2;
  localparam int LATE_STREAM = 3;
  localparam int LOUD_STREAM = 4;
  localparam int BURST_STREAM = 6;

  logic clk = 0, rst_n = 0, enable;
  hcb_cfg_t cfg;
  logic [31:0] in_word [NS];
  logic in_last [NS], in_valid [NS], in_ready [NS];
  logic signed [31:0] pcm_out [NS];
  logic [NS-1:0] out_valid;
  logic [NC-1:0] core_error, ifft_short, ifft_in_valid, ifft_start, ifft_out_valid;
  logic signed [DATA_W-1:0] ifft_in_re [NC], ifft_in_im [NC], ifft_out_re [NC], ifft_out_im [NC];

  aac_parallel_decoder dut (.*);

  for (genvar c = 0; c < NC; c++) begin : g_ifft
    ifft_model #(.LATENCY(20)) u_ifft (.clk, .short_sz(ifft_short[c]), .in_valid(ifft_in_valid[c] && rst_n),
      .in_re(ifft_in_re[c]), .in_im(ifft_in_im[c]), .start(ifft_start[c]),
      .out_valid(ifft_out_valid[c]), .out_re(ifft_out_re[c]), .out_im(ifft_out_im[c]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int words  [NS][$];
  int lasts  [NS][$];
  int expect_pcm [NS][$];
  int got_cnt [NS];
  int maxdiff = 0;
  // mechanism counters
  int n_switch = 0, n_stall = 0, n_escape = 0, n_crc = 0, n_sine = 0, n_kbd = 0;
  int n_interp = 0, n_clip = 0, n_backpressure = 0;
  longint cycles = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int s = 0; s < NS; s++) for (int f = 0; f < 8; f++) if (nfail[s][f] > 0) $display("stream %0d frame %0d: %0d failures", s, f, nfail[s][f]);
    for (int s = 0; s < NS; s++) if (got_cnt[s] != n_frames(s) * 1024) $display("stream %0d has %0d samples, fifo frames %0d, words %0d", s, got_cnt[s], dut.frames[s], words[s].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int s = 0; s < NS; s++) if (out_valid[s]) begin
      int e, d;
      e = (expect_pcm[s].size() > got_cnt[s]) ? expect_pcm[s][got_cnt[s]] : 999999;
      d = pcm_out[s] - e; if (d < 0) d = -d;
      if (d > maxdiff && e != 999999) maxdiff = d;
      checks++;
      if (d > 2) begin
        failures++;
        nfail[s][got_cnt[s] / 1024]++;
        if (failures < 10) $display("FAIL stream %0d sample %0d got %0d exp %0d", s, got_cnt[s], pcm_out[s], e);
      end
      if (pcm_out[s] == 32767 || pcm_out[s] == -32768) n_clip++;
      got_cnt[s]++;
    end
    for (int s = 0; s < NS; s++) if (in_valid[s] && !in_ready[s]) n_backpressure++;
  end

  // mechanism probes inside the cores
  for (genvar c = 0; c < NC; c++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      if (dut.frame_ready[c]) n_switch++;
      if (dut.g_core[c].u_core.u_lctrl.state == 3'd1 && !dut.start[c] && enable) n_stall++;
      if (dut.g_core[c].u_core.u_demux.u_ctrl.state == 5'd16 && dut.g_core[c].u_core.u_demux.window_valid) n_escape++;
      if (dut.g_core[c].u_core.u_iq.state == 3'd4) n_interp++;
      if (dut.g_core[c].u_core.u_win_ov.state == 2'd3) begin
        if (dut.g_core[c].u_core.u_win_ov.win_c) n_kbd++; else n_sine++;
      end
    end
  end

  // stream drivers
  for (genvar s = 0; s < NS; s++) begin : g_drv
    int wi = 0;
    always @(negedge clk) begin
      bit go;
      go = rst_n && enable && (wi < words[s].size())
           && (s != LATE_STREAM || cycles > 30000)
           && (s == BURST_STREAM || $urandom_range(0, 3) != 0);
      in_valid[s] <= go;
      in_word[s]  <= go ? 32'(words[s][wi]) : 32'd0;
      in_last[s]  <= go ? lasts[s][wi] != 0 : 1'b0;
    end
    always @(posedge clk) if (in_valid[s] && in_ready[s]) wi <= wi + 1;
  end

  // the burst stream carries more frames than its FIFO holds; its partner
  // stream on the same core gets as many, since the core alternates strictly
  function automatic int n_frames(int s);
    return (s / 2 == BURST_STREAM / 2) ? 6 : FRAMES;
  endfunction
  int total_frames = 0;
  int nfail[NS][8];
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

  task automatic build_streams();
    for (int s = 0; s < NS; s++) begin
      chan_state_t st;
      st.shape = 0;
      foreach (st.ov[i]) st.ov[i] = 0.0;
      for (int f = 0; f < n_frames(s); f++) begin
        int gg, msfb, cbs[49], sfs[49], spec[1024], pcm[1024];
        bit shape, crc;
        bitq_t q;
        make_frame((s + f) % 3, gg, msfb, cbs, sfs, spec);
        for (int b = 0; b < 49; b++) if (sfs[b] > 110) sfs[b] = 110;
        for (int i = 0; i < 1024; i++) if (spec[i] > 300) spec[i] = 300; else if (spec[i] < -300) spec[i] = -300;
        if (gg > 110) gg = 110;
        begin
          int p; p = gg;
          for (int b = 0; b < msfb; b++) if (cbs[b] != 0) begin
            if (sfs[b] - p > 59) sfs[b] = p + 59;
            if (p - sfs[b] > 59) sfs[b] = p - 59;
            p = sfs[b];
          end
        end
        if (s == LOUD_STREAM && f == 1) begin
          // escape values beyond the 1026-entry table: interpolated IQ
          msfb = 1; gg = 100;
          for (int i = 0; i < 1024; i++) spec[i] = 0;
          for (int b = 0; b < 49; b++) begin cbs[b] = 0; sfs[b] = 0; end
          cbs[0] = 11; sfs[0] = 100;
          spec[0] = 3000; spec[1] = -2000; spec[2] = 5001; spec[3] = 8191;
        end
        if (s == LOUD_STREAM && f == 0) begin
          // one coherent band, large gain: output beyond 16 bits
          msfb = 1; gg = 158;
          for (int i = 0; i < 1024; i++) spec[i] = 0;
          for (int b = 0; b < 49; b++) begin cbs[b] = 0; sfs[b] = 0; end
          cbs[0] = 11; sfs[0] = 158;
          for (int i = 0; i < 4; i++) spec[i] = 30;
        end
        shape = (s + f) % 2;
        crc = (s % 4 == 1);
        if (crc) n_crc++;
        encode_frame(gg, shape, msfb, cbs, sfs, spec, crc, q);
        // AAC allows at most 6144 bits per channel and frame
        while (q.size() > 6144) begin
          for (int i = 0; i < 1024; i++) spec[i] = spec[i] / 2;
          encode_frame(gg, shape, msfb, cbs, sfs, spec, crc, q);
        end
        decode(spec, sfs, shape, st, pcm);
        for (int w = 0; w < q.size() / 32; w++) begin
          logic [31:0] v;
          for (int b = 0; b < 32; b++) v[31 - b] = q[w * 32 + b];
          words[s].push_back(int'(v));
          lasts[s].push_back(w == q.size() / 32 - 1);
        end
        for (int i = 0; i < 1024; i++) expect_pcm[s].push_back(pcm[i]);
        total_frames++;
      end
    end
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    $display("mechanism %-22s happened %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    bit all_done;
    cfg = '0; enable = 0;
    for (int s = 0; s < NS; s++) begin in_valid[s] = 0; in_word[s] = 0; in_last[s] = 0; got_cnt[s] = 0; end
    build_streams();
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_books();
    @(negedge clk); enable = 1;
    all_done = 0;
    while (!all_done) begin
      repeat (100) @(posedge clk);
      all_done = 1;
      for (int s = 0; s < NS; s++) if (got_cnt[s] < n_frames(s) * 1024) all_done = 0;
    end
    repeat (20) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (got_cnt[s] != n_frames(s) * 1024) begin failures++; $display("FAIL stream %0d samples %0d", s, got_cnt[s]); end
    end
    checks++;
    if (core_error != '0) begin failures++; $display("FAIL core error %b", core_error); end
    mech("stream switch", n_switch);
    mech("start stall", n_stall);
    mech("escape decode", n_escape);
    mech("CRC frame", n_crc);
    mech("sine window", n_sine);
    mech("KBD window", n_kbd);
    mech("IQ interpolation", n_interp);
    mech("PCM clipping", n_clip);
    mech("FIFO back-pressure", n_backpressure);
    $display("decoded %0d frames on %0d cores in %0d cycles, max PCM difference %0d", total_frames, NC, cycles, maxdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
