// global_controller: schedules the N streams onto the N/2 core units of the
// parallel decoder (Fig. 3, data flow of Fig. 4).
//
// Core c serves streams 2c and 2c+1 in turn, one frame each: Stream Select
// picks which stream's FIFO feeds the core and which output receives its PCM
// samples; it flips on each Frame Ready from the core, so the outputs follow
// the S1_f0, S2_f0, S1_f1, S2_f1 ... order of Fig. 4. Start to a core is
// held high while `enable` is set and the selected FIFO holds a complete
// frame. OUT Valid of a stream is the core's PCM valid routed to the
// selected stream. The strict alternation and the frame-count gating of
// Start are this design's choices; the document names the signals only.
module global_controller #(
  parameter int unsigned N_STREAMS = 50,
  localparam int unsigned N_CORES = N_STREAMS / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [7:0]           frames     [N_STREAMS],
  input  logic [N_CORES-1:0]   frame_ready,
  input  logic [N_CORES-1:0]   core_pcm_valid,
  output logic [N_CORES-1:0]   start,
  output logic [N_CORES-1:0]   stream_sel,
  output logic [N_STREAMS-1:0] out_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stream_sel <= '0;
    else        stream_sel <= stream_sel ^ frame_ready;
  end

  always_comb begin
    for (int c = 0; c < int'(N_CORES); c++) begin
      start[c]         = enable && (frames[2*c + int'(stream_sel[c])] != 8'd0);
      out_valid[2*c]   = core_pcm_valid[c] && !stream_sel[c];
      out_valid[2*c+1] = core_pcm_valid[c] &&  stream_sel[c];
    end
  end
endmodule
