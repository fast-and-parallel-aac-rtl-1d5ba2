// aac_parallel_decoder: N-stream parallel AAC decoder (Fig. 3), the top of
// the design.
//
// Each of the N_STREAMS compressed streams is buffered in its own FIFO. A
// core unit is fast enough to decode two frames in the time one stream
// delivers one, so N_STREAMS/2 core units serve the streams in pairs: a
// 2:1 mux in front of core c selects the FIFO of stream 2c or 2c+1, and a
// 1:2 demux behind it sends the PCM samples to OUT_2c or OUT_2c+1. The
// global controller drives the Stream Select and Start signals and turns
// each core's Frame Ready into the switch to the other stream (Fig. 4).
// The default of 50 streams on 25 cores is the prototype of the document.
//
// Ports: per stream a 32-bit word input with last flag and valid/ready,
// a 16-bit PCM sample (sign-extended to 32 bits) with out_valid; one
// codebook load port shared by all cores; per core the streaming ports of
// the external IFFT core and an error flag. `enable` lets the cores start.
module aac_parallel_decoder
  import aac_pkg::*;
#(
  parameter int unsigned N_STREAMS  = 50,
  parameter int unsigned FIFO_DEPTH = 512,
  localparam int unsigned N_CORES = N_STREAMS / 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  hcb_cfg_t                 cfg,
  input  logic [31:0]              in_word   [N_STREAMS],
  input  logic                     in_last   [N_STREAMS],
  input  logic                     in_valid  [N_STREAMS],
  output logic                     in_ready  [N_STREAMS],
  output logic signed [31:0]       pcm_out   [N_STREAMS],
  output logic [N_STREAMS-1:0]     out_valid,
  output logic [N_CORES-1:0]       core_error,
  output logic [N_CORES-1:0]       ifft_short,
  output logic [N_CORES-1:0]       ifft_in_valid,
  output logic signed [DATA_W-1:0] ifft_in_re  [N_CORES],
  output logic signed [DATA_W-1:0] ifft_in_im  [N_CORES],
  output logic [N_CORES-1:0]       ifft_start,
  input  logic [N_CORES-1:0]       ifft_out_valid,
  input  logic signed [DATA_W-1:0] ifft_out_re [N_CORES],
  input  logic signed [DATA_W-1:0] ifft_out_im [N_CORES]
);
  logic [31:0] f_word  [N_STREAMS];
  logic        f_last  [N_STREAMS];
  logic        f_valid [N_STREAMS];
  logic        f_ready [N_STREAMS];
  logic [7:0]  frames  [N_STREAMS];

  logic [N_CORES-1:0] start, stream_sel, frame_ready, core_pcm_valid;
  logic signed [31:0] core_pcm [N_CORES];

  for (genvar s = 0; s < N_STREAMS; s++) begin : g_fifo
    stream_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_word(in_word[s]), .wr_last(in_last[s]), .wr_valid(in_valid[s]), .wr_ready(in_ready[s]),
      .rd_word(f_word[s]), .rd_last(f_last[s]), .rd_valid(f_valid[s]), .rd_ready(f_ready[s]),
      .frames(frames[s])
    );
  end

  global_controller #(.N_STREAMS(N_STREAMS)) u_gctrl (
    .clk, .rst_n, .enable, .frames, .frame_ready, .core_pcm_valid,
    .start, .stream_sel, .out_valid
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    logic [31:0] m_word;
    logic        m_last, m_valid, m_ready;

    // stream mux (2:1) and ready demux
    assign m_word  = stream_sel[c] ? f_word[2*c+1]  : f_word[2*c];
    assign m_last  = stream_sel[c] ? f_last[2*c+1]  : f_last[2*c];
    assign m_valid = stream_sel[c] ? f_valid[2*c+1] : f_valid[2*c];
    assign f_ready[2*c]   = m_ready && !stream_sel[c];
    assign f_ready[2*c+1] = m_ready &&  stream_sel[c];

    aac_core u_core (
      .clk, .rst_n, .cfg, .start(start[c]), .slot(stream_sel[c]),
      .frame_ready(frame_ready[c]), .error(core_error[c]),
      .in_word(m_word), .in_last(m_last), .in_valid(m_valid), .in_ready(m_ready),
      .ifft_short(ifft_short[c]), .ifft_in_valid(ifft_in_valid[c]),
      .ifft_in_re(ifft_in_re[c]), .ifft_in_im(ifft_in_im[c]), .ifft_start(ifft_start[c]),
      .ifft_out_valid(ifft_out_valid[c]), .ifft_out_re(ifft_out_re[c]), .ifft_out_im(ifft_out_im[c]),
      .pcm_valid(core_pcm_valid[c]), .pcm_data(core_pcm[c])
    );

    // output demux (1:2)
    assign pcm_out[2*c]   = core_pcm[c];
    assign pcm_out[2*c+1] = core_pcm[c];
  end
endmodule
