// tb_local_controller: drives the four busy inputs from stage models with
// random durations and checks the Fig. 6 order Demux -> IQ -> IMDCT ->
// Win_OV -> Demux, that each stage starts only after the previous one went
// idle, that Demux waits for `start`, and one frame_ready per frame.
module tb_local_controller;
  logic clk = 0, rst_n = 0;
  logic start, demux_busy, iq_busy, imdct_busy, winov_busy;
  logic demux_start, iq_start, imdct_start, winov_start, frame_ready;
  int checks = 0, failures = 0;
  int cnt [4];
  int expect_stage = 0, frames = 0;

  local_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stage models: busy for a random time after their start
  always @(posedge clk) begin
    if (!rst_n) begin
      cnt = '{0, 0, 0, 0};
    end else begin
      for (int i = 0; i < 4; i++) if (cnt[i] > 0) cnt[i]--;
      if (demux_start) cnt[0] = $urandom_range(1, 30);
      if (iq_start)    cnt[1] = $urandom_range(1, 30);
      if (imdct_start) cnt[2] = $urandom_range(1, 30);
      if (winov_start) cnt[3] = $urandom_range(1, 30);
    end
  end
  assign demux_busy = cnt[0] > 0;
  assign iq_busy    = cnt[1] > 0;
  assign imdct_busy = cnt[2] > 0;
  assign winov_busy = cnt[3] > 0;

  // order checker
  always @(negedge clk) if (rst_n) begin
    logic [3:0] st;
    st = {winov_start, imdct_start, iq_start, demux_start};
    if (st != 0) begin
      checks++;
      if (st != 4'(1 << expect_stage) || demux_busy || iq_busy || imdct_busy || winov_busy
          || (demux_start && !start)) begin
        failures++;
        $display("FAIL starts %b expected stage %0d", st, expect_stage);
      end
      expect_stage = (expect_stage + 1) % 4;
    end
    if (frame_ready) begin
      frames++;
      checks++;
      if (expect_stage != 0 || winov_busy) begin failures++; $display("FAIL frame_ready early"); end
    end
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    checks++;
    if (expect_stage != 0) begin failures++; $display("FAIL started without start"); end
    for (int f = 0; f < 20; f++) begin
      @(negedge clk); start = $urandom_range(0, 1);
      repeat ($urandom_range(5, 40)) @(negedge clk);
      start = 1;
      wait (frame_ready);
      @(negedge clk); start = 0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (frames != 20) begin failures++; $display("FAIL frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
