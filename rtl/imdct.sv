// imdct: FFT-based inverse MDCT of the filter bank (Fig. 11, FSM Fig. 12).
//
// An N-point IMDCT (N = 2048 for a long window, 256 for each of the eight
// short windows) is computed as an N/4-point complex IFFT between two
// complex twiddle multiplications:
//   pre-IFFT : Z[k]  = (X[2k] + j X[N/2-1-2k]) rotated by t[k], k < N/4,
//              with t[k] = cos(a_k) + j sin(a_k), a_k = 2 pi (k + 1/8) / N:
//              Im Z = x1 c + x2 s, Re Z = x2 c - x1 s (x1 = X[2k],
//              x2 = X[N/2-1-2k]);
//   IFFT     : unscaled N/4-point inverse DFT, done by an external FFT core;
//   post-IFFT: Im Z' = Im Z c + Re Z s, Re Z' = Re Z c - Im Z s, written to
//              Re_RAM and Im_RAM as the IFFT streams its output;
//   reorder  : the N outputs are read back from Re_RAM/Im_RAM in the order
//              of the IMDCT algorithm, some negated (the "-" mux of Fig. 11).
// The two spectral words for one multiplication are read from IQ-RAM on two
// consecutive cycles into Reg_RE/Reg_IM, so pre-IFFT takes 2 cycles per
// point; post-IFFT takes one cycle per IFFT output; reordering one cycle per
// output sample plus one. Twiddles are Q23, held in Coef_ROM 512_R/_I and
// 64_R/_I (computed at elaboration).
//
// The four stages, the ROM names and sizes and the FSM (IDLE, Eight Short
// with its count to 8, Pre IFFT, IFFT wait, Post IFFT, Reorder) are the
// document's; the exact factorization and the fixed-point formats are those
// of the well-known FFT-based algorithm the document cites and this
// design's choice. The IFFT core is outside this module: its ports
// (ifft_*) stream N/4 inputs in natural order, then ifft_start pulses, then
// the core returns N/4 outputs in natural order with ifft_out_valid.
// Output: out_we/out_addr/out_data write the N samples (8 x 256 for short
// windows) into the IMDCT RAM.
module imdct
  import aac_pkg::*;
#(
  parameter int unsigned TW_W = 24
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     win_short,
  output logic                     busy,
  output logic                     done,
  output logic [9:0]               iq_raddr,
  input  logic signed [DATA_W-1:0] iq_rdata,
  // external IFFT core
  output logic                     ifft_short,
  output logic                     ifft_in_valid,
  output logic signed [DATA_W-1:0] ifft_in_re,
  output logic signed [DATA_W-1:0] ifft_in_im,
  output logic                     ifft_start,
  input  logic                     ifft_out_valid,
  input  logic signed [DATA_W-1:0] ifft_out_re,
  input  logic signed [DATA_W-1:0] ifft_out_im,
  // IMDCT RAM write port
  output logic                     out_we,
  output logic [10:0]              out_addr,
  output logic signed [DATA_W-1:0] out_data
);
  localparam int unsigned TW_FRAC = TW_W - 1;

  logic signed [TW_W-1:0] rom512_r [512];
  logic signed [TW_W-1:0] rom512_i [512];
  logic signed [TW_W-1:0] rom64_r  [64];
  logic signed [TW_W-1:0] rom64_i  [64];
  initial begin
    for (int k = 0; k < 512; k++) begin
      rom512_r[k] = TW_W'($rtoi($cos(2.0 * 3.14159265358979 * (k + 0.125) / 2048.0) * (2.0 ** TW_FRAC) + 0.5));
      rom512_i[k] = TW_W'($rtoi($sin(2.0 * 3.14159265358979 * (k + 0.125) / 2048.0) * (2.0 ** TW_FRAC) + 0.5));
    end
    for (int k = 0; k < 64; k++) begin
      rom64_r[k] = TW_W'($rtoi($cos(2.0 * 3.14159265358979 * (k + 0.125) / 256.0) * (2.0 ** TW_FRAC) + 0.5));
      rom64_i[k] = TW_W'($rtoi($sin(2.0 * 3.14159265358979 * (k + 0.125) / 256.0) * (2.0 ** TW_FRAC) + 0.5));
    end
  end

  typedef enum logic [2:0] {S_IDLE, S_EIGHT, S_PRE, S_IFFT, S_POST, S_REORDER, S_DONE} state_t;
  state_t      state;
  logic        short_q;
  logic [3:0]  count1;            // short window number
  logic [11:0] count2;            // point counter inside a stage
  logic signed [DATA_W-1:0] reg_re;   // Reg_RE: x1 latched; x2 comes from the RAM output register
  logic [9:0]  n4, n2;
  logic [11:0] nlen;
  logic [9:0]  in_off;
  logic [10:0] out_off;

  assign n4      = short_q ? 10'd64  : 10'd512;
  assign n2      = short_q ? 10'd127 : 10'd1023;  // N/2 - 1
  assign nlen    = short_q ? 12'd256 : 12'd2048;
  assign in_off  = short_q ? 10'(count1 * 128) : 10'd0;
  assign out_off = short_q ? 11'(count1 * 256) : 11'd0;
  assign busy    = (state != S_IDLE);
  assign ifft_short = short_q;

  function automatic logic signed [DATA_W-1:0] cmul(logic signed [DATA_W-1:0] a,
                                                    logic signed [TW_W-1:0] c,
                                                    logic signed [DATA_W-1:0] b,
                                                    logic signed [TW_W-1:0] s,
                                                    logic sub);
    logic signed [DATA_W+TW_W:0] p;
    p = sub ? (DATA_W+TW_W+1)'(a * c) - (DATA_W+TW_W+1)'(b * s)
            : (DATA_W+TW_W+1)'(a * c) + (DATA_W+TW_W+1)'(b * s);
    p = (p + (DATA_W+TW_W+1)'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
    return DATA_W'(p);
  endfunction

  // twiddle for point k
  logic [9:0] tw_k;
  logic signed [TW_W-1:0] tw_c, tw_s;
  always_comb begin
    tw_c = short_q ? rom64_r[tw_k[5:0]] : rom512_r[tw_k[8:0]];
    tw_s = short_q ? rom64_i[tw_k[5:0]] : rom512_i[tw_k[8:0]];
  end

  // ---- pre-IFFT: 2 reads per point ----
  logic [9:0] kp;
  assign kp = 10'(count2 >> 1);
  always_comb begin
    iq_raddr = '0;
    if (state == S_PRE) begin
      if (!count2[0]) iq_raddr = in_off + 10'(kp << 1);
      else            iq_raddr = in_off + n2 - 10'(kp << 1);
    end
  end

  // ---- reorder source: which RAM word, real or imaginary, negated ----
  logic [10:0] ro_n;
  logic [9:0]  ro_src;
  logic        ro_use_im, ro_neg;
  always_comb begin
    logic [1:0]  q;
    logic [9:0]  r, m, n8;
    n8 = n4 >> 1;
    q  = short_q ? ro_n[7:6] : ro_n[10:9];
    r  = short_q ? 10'(ro_n[5:0]) : 10'(ro_n[8:0]);
    m  = r >> 1;
    ro_src = '0; ro_use_im = 1'b0; ro_neg = 1'b0;
    unique case ({q, r[0]})
      3'b000: begin ro_src = n8 + m;       ro_use_im = 1'b1; ro_neg = 1'b0; end
      3'b001: begin ro_src = n8 - 10'd1 - m; ro_use_im = 1'b0; ro_neg = 1'b1; end
      3'b010: begin ro_src = m;            ro_use_im = 1'b0; ro_neg = 1'b0; end
      3'b011: begin ro_src = n4 - 10'd1 - m; ro_use_im = 1'b1; ro_neg = 1'b1; end
      3'b100: begin ro_src = n8 + m;       ro_use_im = 1'b0; ro_neg = 1'b0; end
      3'b101: begin ro_src = n8 - 10'd1 - m; ro_use_im = 1'b1; ro_neg = 1'b1; end
      3'b110: begin ro_src = m;            ro_use_im = 1'b1; ro_neg = 1'b1; end
      default: begin ro_src = n4 - 10'd1 - m; ro_use_im = 1'b0; ro_neg = 1'b0; end
    endcase
  end

  // Re_RAM / Im_RAM
  logic        ram_we;
  logic [8:0]  ram_waddr, ram_raddr;
  logic signed [DATA_W-1:0] re_w, im_w, re_r, im_r;
  core_ram #(.WIDTH(DATA_W), .DEPTH(512)) u_re_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(re_w), .raddr(ram_raddr), .rdata(re_r));
  core_ram #(.WIDTH(DATA_W), .DEPTH(512)) u_im_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(im_w), .raddr(ram_raddr), .rdata(im_r));

  logic        ro_pend_v, ro_pend_im, ro_pend_neg;
  logic [10:0] ro_pend_n;

  always_comb begin
    tw_k          = '0;
    ifft_in_valid = 1'b0;
    ifft_in_re    = '0;
    ifft_in_im    = '0;
    ram_we        = 1'b0;
    ram_waddr     = 9'(count2);
    re_w          = '0;
    im_w          = '0;
    ro_n          = 11'(count2);
    ram_raddr     = ro_src[8:0];
    if (state == S_PRE && count2 >= 12'd2 && !count2[0]) begin
      // Reg_RE holds x1 = X[2k]; the RAM now returns x2 = X[N/2-1-2k]
      tw_k          = 10'((count2 - 12'd2) >> 1);
      ifft_in_valid = 1'b1;
      ifft_in_im    = cmul(reg_re, tw_c, iq_rdata, tw_s, 1'b0);
      ifft_in_re    = cmul(iq_rdata, tw_c, reg_re, tw_s, 1'b1);
    end
    if ((state == S_IFFT || state == S_POST) && ifft_out_valid) begin
      tw_k   = 10'(count2);
      ram_we = 1'b1;
      im_w   = cmul(ifft_out_im, tw_c, ifft_out_re, tw_s, 1'b0);
      re_w   = cmul(ifft_out_re, tw_c, ifft_out_im, tw_s, 1'b1);
    end
    out_we   = ro_pend_v;
    out_addr = ro_pend_n;
    out_data = ro_pend_im ? (ro_pend_neg ? -im_r : im_r) : (ro_pend_neg ? -re_r : re_r);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; short_q <= 1'b0; count1 <= '0; count2 <= '0;
      reg_re <= '0; done <= 1'b0; ifft_start <= 1'b0;
      ro_pend_v <= 1'b0; ro_pend_im <= 1'b0; ro_pend_neg <= 1'b0; ro_pend_n <= '0;
    end else begin
      done       <= 1'b0;
      ifft_start <= 1'b0;
      ro_pend_v  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          short_q <= win_short;
          count1  <= '0;
          count2  <= '0;
          state   <= win_short ? S_EIGHT : S_PRE;
        end
        S_EIGHT: begin
          count2 <= '0;
          if (count1 < 4'd8) state <= S_PRE;
          else state <= S_DONE;
        end
        S_PRE: begin
          if (count2[0]) reg_re <= iq_rdata;            // X[2k] arrives
          if (count2 == 12'(2 * n4)) begin
            count2     <= '0;
            ifft_start <= 1'b1;
            state      <= S_IFFT;
          end else begin
            count2 <= count2 + 12'd1;
          end
        end
        S_IFFT: if (ifft_out_valid) begin count2 <= 12'd1; state <= S_POST; end
        S_POST: if (ifft_out_valid) begin
          if (count2 == 12'(n4) - 12'd1) begin
            count2 <= '0;
            state  <= S_REORDER;
          end else begin
            count2 <= count2 + 12'd1;
          end
        end
        S_REORDER: begin
          ro_pend_v   <= 1'b1;
          ro_pend_n   <= out_off + 11'(count2);
          ro_pend_im  <= ro_use_im;
          ro_pend_neg <= ro_neg;
          if (count2 == nlen - 12'd1) begin
            count2 <= '0;
            if (short_q) begin
              count1 <= count1 + 4'd1;
              state  <= S_EIGHT;
            end else begin
              state <= S_DONE;
            end
          end else begin
            count2 <= count2 + 12'd1;
          end
        end
        S_DONE: begin
          if (!ro_pend_v) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
