// aac_core: one AAC LC decoder core unit (Fig. 5).
//
// A compressed ADTS frame enters as 32-bit words. DEMUX_HUFF parses it and
// writes 1024 quantized coefficients to SD-RAM (16-bit) and one scale factor
// per band to SF-RAM (8-bit); IQ_RESC turns them into rescaled coefficients
// in IQ-RAM (32-bit); the filter bank (IMDCT, IMDCT RAM, WIN_OV) produces
// 1024 time samples, and the PCM converter clips them to 16 bits. The local
// controller runs the four stages one after another for each frame (Fig. 6).
// Table 1 of the document gives 12,620 cycles per frame; this implementation
// takes about 2k (demux, data dependent) + 4.1k (IQ) + 3.6k plus the IFFT
// latency (IMDCT) + 2k (WIN_OV) cycles.
//
// Interface: start (from the global controller) allows the next frame to
// begin; slot tells WIN_OV which of the two streams served by this core the
// frame belongs to (its overlap memory is kept per slot); frame_ready pulses
// after the last PCM sample of a frame; pcm_valid/pcm_data carry the samples
// in order. The IFFT core the document takes from a third party is outside:
// its streaming ports ifft_* are brought out. The Huffman codebook contents
// are loaded through cfg. `error` is high after a frame this core could not
// decode (see demux_controller).
module aac_core
  import aac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  hcb_cfg_t                 cfg,
  input  logic                     start,
  input  logic                     slot,
  output logic                     frame_ready,
  output logic                     error,
  input  logic [31:0]              in_word,
  input  logic                     in_last,
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic                     ifft_short,
  output logic                     ifft_in_valid,
  output logic signed [DATA_W-1:0] ifft_in_re,
  output logic signed [DATA_W-1:0] ifft_in_im,
  output logic                     ifft_start,
  input  logic                     ifft_out_valid,
  input  logic signed [DATA_W-1:0] ifft_out_re,
  input  logic signed [DATA_W-1:0] ifft_out_im,
  output logic                     pcm_valid,
  output logic signed [31:0]       pcm_data
);
  logic demux_start, demux_busy, demux_done;
  logic iq_start, iq_busy, iq_done;
  logic imdct_start, imdct_busy, imdct_done;
  logic winov_start, winov_busy, winov_done;

  win_seq_t   win_seq;
  logic       win_shape;
  logic [3:0] sr_index;
  logic [5:0] max_sfb;

  logic              sd_we, sf_we, iq_we, z_we;
  logic [9:0]        sd_waddr, sd_raddr, iq_waddr, iq_raddr;
  logic [5:0]        sf_waddr, sf_raddr;
  logic [10:0]       z_waddr, z_raddr;
  logic [SD_W-1:0]   sd_wdata, sd_rdata;
  logic [SF_W-1:0]   sf_wdata, sf_rdata;
  logic [DATA_W-1:0] iq_wdata, z_wdata;
  logic signed [DATA_W-1:0] iq_rdata, z_rdata;
  logic signed [DATA_W-1:0] fb_data;
  logic              fb_valid, clipped;

  local_controller u_lctrl (
    .clk, .rst_n, .start,
    .demux_busy, .iq_busy, .imdct_busy, .winov_busy,
    .demux_start, .iq_start, .imdct_start, .winov_start, .frame_ready
  );

  demux_huff u_demux (
    .clk, .rst_n, .cfg, .start(demux_start), .busy(demux_busy), .done(demux_done), .error,
    .in_word, .in_last, .in_valid, .in_ready,
    .sd_we, .sd_addr(sd_waddr), .sd_wdata, .sf_we, .sf_addr(sf_waddr), .sf_wdata,
    .win_seq, .win_shape, .sr_index, .max_sfb
  );

  core_ram #(.WIDTH(SD_W), .DEPTH(1024)) u_sd_ram (
    .clk, .we(sd_we), .waddr(sd_waddr), .wdata(sd_wdata), .raddr(sd_raddr), .rdata(sd_rdata));
  core_ram #(.WIDTH(SF_W), .DEPTH(64)) u_sf_ram (
    .clk, .we(sf_we), .waddr(sf_waddr), .wdata(sf_wdata), .raddr(sf_raddr), .rdata(sf_rdata));

  iq_resc u_iq (
    .clk, .rst_n, .start(iq_start), .win_short(win_seq == EIGHT_SHORT_SEQUENCE),
    .busy(iq_busy), .done(iq_done),
    .sd_raddr, .sd_rdata, .sf_raddr, .sf_rdata, .iq_we, .iq_waddr, .iq_wdata
  );

  core_ram #(.WIDTH(DATA_W), .DEPTH(1024)) u_iq_ram (
    .clk, .we(iq_we), .waddr(iq_waddr), .wdata(iq_wdata), .raddr(iq_raddr), .rdata(iq_rdata));

  imdct u_imdct (
    .clk, .rst_n, .start(imdct_start), .win_short(win_seq == EIGHT_SHORT_SEQUENCE),
    .busy(imdct_busy), .done(imdct_done),
    .iq_raddr, .iq_rdata,
    .ifft_short, .ifft_in_valid, .ifft_in_re, .ifft_in_im, .ifft_start,
    .ifft_out_valid, .ifft_out_re, .ifft_out_im,
    .out_we(z_we), .out_addr(z_waddr), .out_data(z_wdata)
  );

  core_ram #(.WIDTH(DATA_W), .DEPTH(2048)) u_imdct_ram (
    .clk, .we(z_we), .waddr(z_waddr), .wdata(z_wdata), .raddr(z_raddr), .rdata(z_rdata));

  win_ov u_win_ov (
    .clk, .rst_n, .start(winov_start), .slot, .win_shape,
    .busy(winov_busy), .done(winov_done),
    .z_raddr, .z_rdata, .out_valid(fb_valid), .out_data(fb_data)
  );

  pcm_converter u_pcm (.sample_in(fb_data), .pcm_out(pcm_data), .clipped);
  assign pcm_valid = fb_valid;
endmodule
