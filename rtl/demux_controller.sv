// demux_controller: the Demux_Controller of the DEMUX_HUFF module (Fig. 7,
// FSM of Fig. 9). It walks one ADTS frame through the bitstream parser and
// the Huffman decoder and fills the SF-RAM and SD-RAM of the core unit.
//
// Parsing order (AAC LC syntax): search the 12-bit ADTS sync word, read the
// 56-bit ADTS header (and the 16-bit CRC when protection_absent = 0), the
// element ID, and for a single channel element (ID 0) the instance tag,
// global_gain and ics_info; then the section data (4-bit sect_cb, 5-bit
// sect_len with escape value 31), the scale factors (HCB_SF, differential to
// global_gain, offset 60, one per band with a non-zero codebook, written to
// SF-RAM), the pulse/TNS/gain-control flags, and the spectral data band by
// band: one codeword per cycle, then one cycle per coefficient to take its
// sign bit (unsigned books), escape prefix and escape word for codebook 11
// values of 16, and one SD-RAM write per coefficient. Bands past max_sfb and
// zero-codebook bands are written as zeros, so SD-RAM always holds 1024
// coefficients. Finally the ID_END element (7) is read.
//
// The states of Fig. 9 (wait sync word, get element ID, read section,
// Huffman decode, get sign bit/output W..Z coefficient, get ESC prefix, get
// ESC word) are kept. Fig. 9 draws each coefficient's escape right after its
// sign bit; the AAC syntax sends all sign bits of a codeword before its
// escapes, and that order is followed here. This design decodes one single
// channel element with long windows at 44.1/48 kHz: a short-window frame,
// pulse data, TNS, gain control, intensity/noise books or another element
// set `error` and end the frame.
//
// Interface: start (one cycle) begins a frame and restarts the parser; busy
// stays high until the frame is done; done pulses once at the end.
module demux_controller
  import aac_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   error,
  // bitstream parser
  output logic                   parser_restart,
  input  logic [WIN_W-1:0]       window,
  input  logic                   window_valid,
  output logic                   consume,
  output logic                   len_sel,
  output logic [LEN_W-1:0]       parse_len,
  // Huffman decoder
  output logic [3:0]             hcb_sel,
  input  logic                   spec_hit,
  input  logic                   sf_hit,
  input  logic [LEN_W-1:0]       sf_len,
  input  logic [SF_W-1:0]        sf_index,
  output logic                   load_tuple,
  output logic [1:0]             coeff_sel,
  input  logic [3:0]             esc_prefix_n,
  input  logic                   esc_prefix_ok,
  output logic [3:0]             esc_sel,
  input  logic [LEN_W-1:0]       esc_word_len,
  output logic                   sd_src_sel,
  input  logic signed [SD_W-1:0] sd_data,
  // RAM write ports
  output logic                   sd_we,
  output logic [9:0]             sd_addr,
  output logic [SD_W-1:0]        sd_wdata,
  output logic                   sf_we,
  output logic [5:0]             sf_addr,
  output logic [SF_W-1:0]        sf_wdata,
  // side information for the later stages
  output win_seq_t               win_seq,
  output logic                   win_shape,
  output logic [3:0]             sr_index,
  output logic [5:0]             max_sfb
);
  typedef enum logic [4:0] {
    S_IDLE, S_SYNC, S_HDR_A, S_HDR_B, S_HDR_C, S_CRC, S_ELE_ID, S_ICS,
    S_SECT_CB, S_SECT_LEN, S_SECT_FILL, S_SF, S_FLAGS, S_SPEC, S_SIGN,
    S_ESC_PFX, S_ESC_WORD, S_WRITE, S_ZFILL, S_END_ID, S_DONE
  } state_t;

  state_t            state;
  logic              prot_absent;
  logic [7:0]        global_gain;
  logic [3:0]        sfb_cb [NUM_SWB];
  logic [3:0]        sect_cb;
  logic [6:0]        sect_len;
  logic [5:0]        sfb;
  logic [10:0]       k;
  logic [7:0]        sf_acc;
  logic [3:0]        cur_cb;
  logic [2:0]        idx;           // element of the current tuple
  logic [15:0]       mag [4];
  logic [3:0]        neg;
  logic [3:0]        esc_n_q;

  function automatic logic [20:0] field(logic [WIN_W-1:0] w, int unsigned n);
    return 21'(w >> (WIN_W - n));
  endfunction

  logic [2:0] dim;
  assign dim       = hcb_is_quad(cur_cb) ? 3'd4 : 3'd2;
  assign coeff_sel = 2'(3 - idx);
  assign esc_sel   = esc_n_q;
  assign busy      = (state != S_IDLE);
  assign sd_addr   = k[9:0];
  assign sf_addr   = sfb;

  always_comb begin
    hcb_sel = cur_cb;
    if (state == S_SPEC && sfb < max_sfb) hcb_sel = sfb_cb[sfb];
  end

  // combinational consume/write requests
  always_comb begin
    consume    = 1'b0;
    len_sel    = 1'b0;
    parse_len  = '0;
    load_tuple = 1'b0;
    sd_src_sel = 1'b0;
    sd_we      = 1'b0;
    sd_wdata   = '0;
    sf_we      = 1'b0;
    sf_wdata   = '0;
    parser_restart = (state == S_IDLE) && start;
    unique case (state)
      S_SYNC:   if (window_valid) begin
                  consume = 1'b1;
                  parse_len = (field(window, 12) == 21'hFFF) ? 5'd12 : 5'd1;
                end
      S_HDR_A:  if (window_valid) begin consume = 1'b1; parse_len = 5'd16; end
      S_HDR_B, S_HDR_C:
                if (window_valid) begin consume = 1'b1; parse_len = 5'd14; end
      S_CRC:    if (window_valid) begin consume = !prot_absent; parse_len = 5'd16; end
      S_ELE_ID: if (window_valid) begin
                  consume = 1'b1;
                  parse_len = (field(window, 3) == 21'd0) ? 5'd15 : 5'd3;
                end
      S_ICS:    if (window_valid) begin consume = 1'b1; parse_len = 5'd11; end
      S_SECT_CB: if (window_valid) begin consume = 1'b1; parse_len = 5'd4; end
      S_SECT_LEN: if (window_valid) begin consume = 1'b1; parse_len = 5'd5; end
      S_SF:     if (sfb < max_sfb) begin
                  if (sfb_cb[sfb] == 4'd0) begin
                    sf_we = 1'b1; sf_wdata = '0;
                  end else if (window_valid && sf_hit) begin
                    consume = 1'b1; parse_len = sf_len;
                    sf_we = 1'b1; sf_wdata = sf_acc + sf_index - 8'd60;
                  end
                end
      S_FLAGS:  if (window_valid) begin consume = 1'b1; parse_len = 5'd3; end
      S_SPEC:   if (sfb < max_sfb && k != swb_offset_long(sfb + 6'd1)) begin
                  if (sfb_cb[sfb] == 4'd0) begin
                    sd_we = 1'b1;
                  end else if (window_valid && spec_hit) begin
                    consume = 1'b1; len_sel = 1'b1; load_tuple = 1'b1;
                  end
                end
      S_SIGN:   if (hcb_is_unsigned(cur_cb) && sd_data != '0 && window_valid) begin
                  consume = 1'b1; parse_len = 5'd1;
                end
      S_ESC_PFX: if (idx < 3'd2 && mag[idx] == 16'd16 && window_valid && esc_prefix_ok) begin
                  consume = 1'b1; parse_len = 5'(esc_prefix_n + 4'd1);
                end
      S_ESC_WORD: if (window_valid) begin
                  consume = 1'b1; parse_len = esc_word_len; sd_src_sel = 1'b1;
                end
      S_WRITE:  begin
                  sd_we = 1'b1;
                  sd_wdata = neg[idx] ? SD_W'(-$signed(mag[idx])) : mag[idx];
                end
      S_ZFILL:  if (k < 11'd1024) sd_we = 1'b1;
      S_END_ID: if (window_valid) begin consume = 1'b1; parse_len = 5'd3; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; error <= 1'b0;
      prot_absent <= 1'b1; global_gain <= '0;
      sect_cb <= '0; sect_len <= '0; sfb <= '0; k <= '0; sf_acc <= '0;
      cur_cb <= '0; idx <= '0; neg <= '0; esc_n_q <= '0;
      win_seq <= ONLY_LONG_SEQUENCE; win_shape <= 1'b0; sr_index <= '0; max_sfb <= '0;
      for (int i = 0; i < NUM_SWB; i++) sfb_cb[i] <= '0;
      for (int i = 0; i < 4; i++) mag[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SYNC; error <= 1'b0;
        end
        S_SYNC: if (window_valid && field(window, 12) == 21'hFFF) state <= S_HDR_A;
        S_HDR_A: if (window_valid) begin
          prot_absent <= window[WIN_W-4];
          sr_index    <= window[WIN_W-7 -: 4];
          if (window[WIN_W-5 -: 2] != 2'd1) error <= 1'b1;  // profile must be LC
          state <= S_HDR_B;
        end
        S_HDR_B: if (window_valid) state <= S_HDR_C;
        S_HDR_C: if (window_valid) state <= S_CRC;
        S_CRC:   if (window_valid || prot_absent) state <= S_ELE_ID;
        S_ELE_ID: if (window_valid) begin
          if (field(window, 3) == 21'd0) begin
            global_gain <= window[WIN_W-8 -: 8];
            state <= S_ICS;
          end else begin
            error <= 1'b1;
            state <= S_DONE;
          end
        end
        S_ICS: if (window_valid) begin
          win_seq   <= win_seq_t'(window[WIN_W-2 -: 2]);
          win_shape <= window[WIN_W-4];
          max_sfb   <= window[WIN_W-5 -: 6];
          sfb       <= '0;
          if (window[WIN_W-2 -: 2] == 2'(EIGHT_SHORT_SEQUENCE) || window[WIN_W-11]
              || window[WIN_W-5 -: 6] > 6'(NUM_SWB)) begin
            error <= 1'b1;
            state <= S_DONE;
          end else if (window[WIN_W-5 -: 6] == 6'd0) begin
            state <= S_FLAGS;
          end else begin
            state <= S_SECT_CB;
          end
        end
        S_SECT_CB: if (window_valid) begin
          sect_cb  <= window[WIN_W-1 -: 4];
          sect_len <= '0;
          state    <= S_SECT_LEN;
        end
        S_SECT_LEN: if (window_valid) begin
          if (window[WIN_W-1 -: 5] == 5'd31) begin
            sect_len <= sect_len + 7'd31;
          end else begin
            sect_len <= sect_len + 7'(window[WIN_W-1 -: 5]);
            state    <= S_SECT_FILL;
          end
        end
        S_SECT_FILL: begin
          if (sect_len == '0 || sfb >= max_sfb) begin
            if (sect_len != '0) error <= 1'b1;
            if (sfb >= max_sfb) begin
              sfb <= '0; sf_acc <= global_gain; state <= S_SF;
            end else begin
              state <= S_SECT_CB;
            end
          end else begin
            sfb_cb[sfb] <= sect_cb;
            if (sect_cb > 4'd11) error <= 1'b1;   // noise/intensity books
            sfb      <= sfb + 6'd1;
            sect_len <= sect_len - 7'd1;
          end
        end
        S_SF: begin
          if (sfb >= max_sfb) begin
            state <= S_FLAGS;
          end else if (sfb_cb[sfb] == 4'd0) begin
            sfb <= sfb + 6'd1;
          end else if (window_valid && sf_hit) begin
            sf_acc <= sf_acc + sf_index - 8'd60;
            sfb    <= sfb + 6'd1;
          end
        end
        S_FLAGS: if (window_valid) begin
          if (window[WIN_W-1 -: 3] != 3'd0) begin
            error <= 1'b1;
            state <= S_DONE;
          end else begin
            sfb <= '0; k <= '0; state <= S_SPEC;
          end
        end
        S_SPEC: begin
          if (sfb >= max_sfb) begin
            state <= S_ZFILL;
          end else if (k == swb_offset_long(sfb + 6'd1)) begin
            sfb <= sfb + 6'd1;
          end else if (sfb_cb[sfb] == 4'd0) begin
            k <= k + 11'd1;
          end else if (window_valid && spec_hit) begin
            cur_cb <= sfb_cb[sfb];
            idx    <= '0;
            neg    <= '0;
            state  <= S_SIGN;
          end
        end
        S_SIGN: begin
          if (!hcb_is_unsigned(cur_cb)) begin
            mag[idx[1:0]] <= 16'(sd_data < 0 ? -sd_data : sd_data);
            neg[idx[1:0]] <= (sd_data < 0);
          end else begin
            mag[idx[1:0]] <= 16'(sd_data);
          end
          if (!hcb_is_unsigned(cur_cb) || sd_data == '0 || window_valid) begin
            if (hcb_is_unsigned(cur_cb) && sd_data != '0) neg[idx[1:0]] <= window[WIN_W-1];
            if (idx + 3'd1 == dim) begin
              idx   <= '0;
              state <= (cur_cb == 4'(HCB_ESC)) ? S_ESC_PFX : S_WRITE;
            end else begin
              idx <= idx + 3'd1;
            end
          end
        end
        S_ESC_PFX: begin
          if (idx >= 3'd2) begin
            idx <= '0; state <= S_WRITE;
          end else if (mag[idx[1:0]] != 16'd16) begin
            idx <= idx + 3'd1;
          end else if (window_valid) begin
            if (!esc_prefix_ok) begin
              error <= 1'b1; state <= S_DONE;
            end else begin
              esc_n_q <= esc_prefix_n;
              state   <= S_ESC_WORD;
            end
          end
        end
        S_ESC_WORD: if (window_valid) begin
          mag[idx[1:0]] <= 16'(sd_data);
          idx   <= idx + 3'd1;
          state <= S_ESC_PFX;
        end
        S_WRITE: begin
          k <= k + 11'd1;
          if (idx + 3'd1 == dim) begin
            idx <= '0; state <= S_SPEC;
          end else begin
            idx <= idx + 3'd1;
          end
        end
        S_ZFILL: begin
          if (k < 11'd1024) k <= k + 11'd1;
          else state <= S_END_ID;
        end
        S_END_ID: if (window_valid) begin
          if (field(window, 3) != 21'd7) error <= 1'b1;
          state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a codeword may only be taken when one of the books matched
  assert property (@(posedge clk) disable iff (!rst_n) (consume && len_sel) |-> spec_hit);
endmodule
