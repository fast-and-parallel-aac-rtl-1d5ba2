// huffman_decoder: the PLA-based Huffman decoder of the DEMUX_HUFF module
// (Fig. 8).
//
// All codebook PLAs see the same 21-bit barrel shifter window. HCB_1..HCB_11
// hold the spectral books and return a tuple {W,X,Y,Z} (2-tuple books use W
// and X) and a codeword length; HCB_Mux and HCB_Len_Mux pick the book named
// by hcb_sel. HCB_SF returns the scale factor index (0..120). The ESC logic
// decodes the escape sequence of codebook 11: esc_prefix_n counts the
// leading ones of the window (escape prefix, N of them, then a zero) and, in
// the following cycle, with esc_sel = N, ESC_Word_Mux extracts the N+4 bit
// escape word and forms 2^(N+4) + word.
//
// load_tuple latches the HCB_Mux tuple into the W, X, Y, Z registers;
// Coeff_Mux then hands out one coefficient per cycle (coeff_sel 3 = W,
// 2 = X, 1 = Y, 0 = Z, as printed in Fig. 8), and the SD Mux selects that
// coefficient (sd_src_sel = 0) or the escape value (1) for the SD-RAM.
// Everything but the W..Z registers and the PLA contents is combinational.
// The escape decoding follows the AAC standard; the load port of the PLAs is
// this design's choice (see hcb_pla).
module huffman_decoder
  import aac_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  hcb_cfg_t               cfg,
  input  logic [WIN_W-1:0]       window,
  input  logic [3:0]             hcb_sel,
  // spectral codebooks
  output logic                   spec_hit,
  output logic [LEN_W-1:0]       spec_len,
  input  logic                   load_tuple,
  input  logic [1:0]             coeff_sel,
  output logic signed [SD_W-1:0] coeff,
  // scale factor codebook
  output logic                   sf_hit,
  output logic [LEN_W-1:0]       sf_len,
  output logic [SF_W-1:0]        sf_index,
  // escape codebook
  output logic [3:0]             esc_prefix_n,
  output logic                   esc_prefix_ok,
  input  logic [3:0]             esc_sel,
  output logic [LEN_W-1:0]       esc_word_len,
  output logic [SD_W-1:0]        esc_value,
  // SD Mux
  input  logic                   sd_src_sel,
  output logic signed [SD_W-1:0] sd_data
);
  localparam int unsigned TW = 4*TUPLE_ELEM_W;

  logic [TW-1:0]    pla_val [1:11];
  logic [LEN_W-1:0] pla_len [1:11];
  logic             pla_hit [1:11];
  logic [TW-1:0]    sel_val;
  logic signed [SD_W-1:0] w_q, x_q, y_q, z_q;

  for (genvar c = 1; c <= 11; c++) begin : g_hcb
    hcb_pla #(.ENTRIES(hcb_entries(c)), .VAL_W(TW)) u_pla (
      .clk, .rst_n,
      .cfg_we   (cfg.we && (cfg.cb == 4'(c))),
      .cfg_addr (cfg.addr),
      .cfg_code (cfg.code),
      .cfg_len  (cfg.len),
      .cfg_val  (cfg.val),
      .window,
      .hit      (pla_hit[c]),
      .len      (pla_len[c]),
      .val      (pla_val[c])
    );
  end

  hcb_pla #(.ENTRIES(hcb_entries(HCB_SF)), .VAL_W(SF_W)) u_pla_sf (
    .clk, .rst_n,
    .cfg_we   (cfg.we && (cfg.cb == 4'(HCB_SF))),
    .cfg_addr (cfg.addr),
    .cfg_code (cfg.code),
    .cfg_len  (cfg.len),
    .cfg_val  (cfg.val[SF_W-1:0]),
    .window,
    .hit      (sf_hit),
    .len      (sf_len),
    .val      (sf_index)
  );

  // HCB_Mux / HCB_Len_Mux
  always_comb begin
    sel_val  = '0;
    spec_len = '0;
    spec_hit = 1'b0;
    if (hcb_sel >= 4'd1 && hcb_sel <= 4'd11) begin
      sel_val  = pla_val[hcb_sel];
      spec_len = pla_len[hcb_sel];
      spec_hit = pla_hit[hcb_sel];
    end
  end

  // W, X, Y, Z registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q <= '0; x_q <= '0; y_q <= '0; z_q <= '0;
    end else if (load_tuple) begin
      w_q <= SD_W'($signed(sel_val[4*TUPLE_ELEM_W-1 -: TUPLE_ELEM_W]));
      x_q <= SD_W'($signed(sel_val[3*TUPLE_ELEM_W-1 -: TUPLE_ELEM_W]));
      y_q <= SD_W'($signed(sel_val[2*TUPLE_ELEM_W-1 -: TUPLE_ELEM_W]));
      z_q <= SD_W'($signed(sel_val[1*TUPLE_ELEM_W-1 -: TUPLE_ELEM_W]));
    end
  end

  // Coeff_Mux
  always_comb begin
    case (coeff_sel)
      2'd3:    coeff = w_q;
      2'd2:    coeff = x_q;
      2'd1:    coeff = y_q;
      default: coeff = z_q;
    endcase
  end

  // ESC: prefix = run of ones ended by a zero, at most 8 ones allowed
  always_comb begin
    logic found;
    found         = 1'b0;
    esc_prefix_n  = 4'd9;
    esc_prefix_ok = 1'b0;
    for (int i = 0; i <= 8; i++) begin
      if (!found && !window[WIN_W-1-i]) begin
        found         = 1'b1;
        esc_prefix_n  = 4'(i);
        esc_prefix_ok = 1'b1;
      end
    end
  end

  // ESC_Word_Mux: N+4 bit word after the prefix
  always_comb begin
    logic [12:0] word;
    word         = 13'(window[WIN_W-1 -: 12] >> (4'd8 - esc_sel));
    esc_word_len = LEN_W'(esc_sel) + LEN_W'(4);
    esc_value    = SD_W'((13'd1 << (esc_sel + 4'd4)) | word);
    if (esc_sel > 4'd8) begin
      esc_word_len = '0;
      esc_value    = '0;
    end
  end

  assign sd_data = sd_src_sel ? $signed(esc_value) : coeff;
endmodule
