// tb_global_controller: four streams on two cores. Checks that Start needs
// `enable` and a complete frame in the selected FIFO, that Stream Select
// flips on each Frame Ready so each core alternates between its two streams
// (Fig. 4), and that OUT Valid reaches only the selected stream.
module tb_global_controller;
  localparam int NS = 4, NC = 2;
  logic clk = 0, rst_n = 0, enable;
  logic [7:0] frames [NS];
  logic [NC-1:0] frame_ready, core_pcm_valid, start, stream_sel;
  logic [NS-1:0] out_valid;
  int checks = 0, failures = 0;
  int served [NS];

  global_controller #(.N_STREAMS(NS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; frame_ready = 0; core_pcm_valid = 0;
    for (int s = 0; s < NS; s++) frames[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [NC-1:0] sel_before;
      @(negedge clk);
      enable = (i > 10);
      for (int s = 0; s < NS; s++) frames[s] = 8'($urandom_range(0, 2));
      core_pcm_valid = NC'($urandom());
      frame_ready = NC'($urandom_range(0, 3) == 0 ? $urandom() : 0);
      #1;
      for (int c = 0; c < NC; c++) begin
        checks += 3;
        if (start[c] != (enable && frames[2 * c + stream_sel[c]] != 0)) begin failures++; $display("FAIL start"); end
        if (out_valid[2 * c + stream_sel[c]] != core_pcm_valid[c]) begin failures++; $display("FAIL out_valid"); end
        if (out_valid[2 * c + 1 - stream_sel[c]]) begin failures++; $display("FAIL out_valid other"); end
      end
      sel_before = stream_sel;
      for (int c = 0; c < NC; c++) if (frame_ready[c]) served[2 * c + stream_sel[c]]++;
      @(posedge clk); #1;
      checks++;
      if (stream_sel != (sel_before ^ frame_ready)) begin failures++; $display("FAIL select"); end
    end
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (served[2 * c] - served[2 * c + 1] > 1 || served[2 * c + 1] - served[2 * c] > 1) begin
        failures++; $display("FAIL unfair %0d %0d", served[2 * c], served[2 * c + 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
