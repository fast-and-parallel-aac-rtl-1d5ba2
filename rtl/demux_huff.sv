// demux_huff: the DEMUX_HUFF module of the core unit (Fig. 7): bitstream
// parsing and Huffman decoding combined in one block, sharing one barrel
// shifter, so that side information parsing and codeword decoding advance
// the same bit pointer.
//
// It joins the bitstream parser (input buffer, Reg_0/Reg_1, barrel shifter,
// Len_Mux and accumulator), the PLA Huffman decoder and the Demux_Controller.
// The Huffman codeword length from HCB_Len_Mux drives input 1 of Len_Mux,
// the controller's parse length input 0. Outputs are the SD-RAM (16-bit) and
// SF-RAM (8-bit) write ports and the frame's side information.
// Timing: start pulses once per frame; done pulses when the frame has been
// parsed and SD-RAM holds all 1024 coefficients.
module demux_huff
  import aac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  hcb_cfg_t          cfg,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              error,
  input  logic [31:0]       in_word,
  input  logic              in_last,
  input  logic              in_valid,
  output logic              in_ready,
  output logic              sd_we,
  output logic [9:0]        sd_addr,
  output logic [SD_W-1:0]   sd_wdata,
  output logic              sf_we,
  output logic [5:0]        sf_addr,
  output logic [SF_W-1:0]   sf_wdata,
  output win_seq_t          win_seq,
  output logic              win_shape,
  output logic [3:0]        sr_index,
  output logic [5:0]        max_sfb
);
  logic [WIN_W-1:0] window;
  logic             window_valid, consume, len_sel, parser_restart;
  logic [LEN_W-1:0] parse_len, spec_len, sf_len, esc_word_len;
  logic [3:0]       hcb_sel, esc_prefix_n, esc_sel;
  logic             spec_hit, sf_hit, load_tuple, esc_prefix_ok, sd_src_sel;
  logic [1:0]       coeff_sel;
  logic [SF_W-1:0]  sf_index;
  logic signed [SD_W-1:0] coeff, sd_data;
  logic [SD_W-1:0]  esc_value;
  logic [15:0]      bit_count;

  // words are only taken while a frame is being parsed
  logic parser_in_ready;
  assign in_ready = parser_in_ready && busy;

  bitstream_parser u_parser (
    .clk, .rst_n, .restart(parser_restart),
    .in_word, .in_last, .in_valid(in_valid && busy), .in_ready(parser_in_ready),
    .window, .window_valid, .consume, .len_sel,
    .huff_len(spec_len), .parse_len, .bit_count
  );

  huffman_decoder u_huff (
    .clk, .rst_n, .cfg, .window, .hcb_sel,
    .spec_hit, .spec_len, .load_tuple, .coeff_sel, .coeff,
    .sf_hit, .sf_len, .sf_index,
    .esc_prefix_n, .esc_prefix_ok, .esc_sel, .esc_word_len, .esc_value,
    .sd_src_sel, .sd_data
  );

  demux_controller u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .error,
    .parser_restart, .window, .window_valid, .consume, .len_sel, .parse_len,
    .hcb_sel, .spec_hit, .sf_hit, .sf_len, .sf_index, .load_tuple, .coeff_sel,
    .esc_prefix_n, .esc_prefix_ok, .esc_sel, .esc_word_len, .sd_src_sel, .sd_data,
    .sd_we, .sd_addr, .sd_wdata, .sf_we, .sf_addr, .sf_wdata,
    .win_seq, .win_shape, .sr_index, .max_sfb
  );
endmodule
